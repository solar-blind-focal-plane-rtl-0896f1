// Calculation circuit: object information from the four edge positions.
//
// For every frame, from RV, FV (vertical projection) and RH, FH (horizontal
// projection) it computes
//   location   Ox = (RV + FV) / 2,  Oy = (RH + FH) / 2      (truncated)
//   size       Oz = (FV - RV) * (FH - RH)                   (pixel^2)
//   velocity   Vx = (Ox[n] - Ox[n-1]) / T,  Vy likewise     (pixel/s)
//   speed      Op = sqrt(Vx^2 + Vy^2)
//   direction  Od = atan2(Vy, Vx), 0 .. 359 degrees, image y axis pointing down
//   spreading  size of frame n against frame n-1: bigger, smaller, unchanged,
//              or lost when the current frame holds no object.
// Dividing by the frame interval T is a multiplication by the frame rate,
// RATE_Q8 = 256 / T (T in seconds); the product is rounded to whole pixel/s.
// The default, 18182, is the rate of a 14.08 ms frame interval (71.02 frame/s).
// Velocity, speed and direction are 0 unless both frames hold an object.
//
// Timing: `start` latches `edges`; the location, size, velocity and spreading
// status are ready the next cycle, and the speed (18-step square root) and the
// direction (16-step CORDIC) are computed in parallel. `done` pulses with `info`
// valid 22 cycles after `start`; `info` then holds until the next `done`.
//
// The formulas are the design's; the truncated location, the rounded velocity, the zero velocity around
// missing objects, the direction of a zero vector (0) and the fixed-point frame
// rate are this design's choices.
module calculation_circuit
  import uvs_pkg::*;
#(
  parameter int unsigned RATE_Q8 = 18182
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  edges_t edges,
  output logic   busy,
  output logic   done,
  output info_t  info
);

  localparam int unsigned RAD_W = 2 * VEL_W;

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_WAIT, S_OUT} state_t;

  state_t state;

  // previous frame
  logic               prev_present;
  logic [POS_W-1:0]   prev_ox, prev_oy;
  logic [2*POS_W-1:0] prev_oz;

  // current frame
  edges_t                  e;
  logic [POS_W-1:0]        ox, oy;
  logic [2*POS_W-1:0]      oz;
  logic signed [POS_W:0]   dx, dy;
  logic signed [VEL_W-1:0] vx, vy;
  logic [RAD_W-1:0]        rad;
  spread_t                 spread;
  logic [VEL_W-1:0]        op;
  logic [8:0]              od;
  logic                    sq_done, at_done, sq_seen, at_seen;

  // Combinational part, from the latched edges.
  always_comb begin
    logic [POS_W:0] sx, sy;
    logic signed [POS_W+17:0] px, py;
    logic [POS_W-1:0] wx, wy;
    sx = {1'b0, e.rv} + {1'b0, e.fv};
    sy = {1'b0, e.rh} + {1'b0, e.fh};
    ox = POS_W'(sx >> 1);
    oy = POS_W'(sy >> 1);
    wx = e.fv - e.rv;
    wy = e.fh - e.rh;
    oz = wx * wy;
    if (e.present && prev_present) begin
      dx = $signed({1'b0, ox}) - $signed({1'b0, prev_ox});
      dy = $signed({1'b0, oy}) - $signed({1'b0, prev_oy});
    end else begin
      dx = '0;
      dy = '0;
    end
    px = dx * $signed({1'b0, 17'(RATE_Q8)});
    py = dy * $signed({1'b0, 17'(RATE_Q8)});
    vx = VEL_W'((px + (POS_W+18)'(128)) >>> 8);
    vy = VEL_W'((py + (POS_W+18)'(128)) >>> 8);
    rad = RAD_W'(vx * vx) + RAD_W'(vy * vy);
    if (!e.present)         spread = SPREAD_LOST;
    else if (!prev_present) spread = (oz != 0) ? SPREAD_BIGGER : SPREAD_UNCHANGED;
    else if (oz > prev_oz)  spread = SPREAD_BIGGER;
    else if (oz < prev_oz)  spread = SPREAD_SMALLER;
    else                    spread = SPREAD_UNCHANGED;
  end

  logic go;
  assign go = (state == S_PREP);

  isqrt_seq #(.W(RAD_W)) u_sqrt (
    .clk, .rst_n, .start(go), .rad, .done(sq_done), .root(op)
  );

  cordic_atan2 #(.W(VEL_W), .ITER(16)) u_atan (
    .clk, .rst_n, .start(go), .x_in(vx), .y_in(vy), .done(at_done), .deg(od)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      e            <= '0;
      prev_present <= 1'b0;
      prev_ox      <= '0;
      prev_oy      <= '0;
      prev_oz      <= '0;
      sq_seen      <= 1'b0;
      at_seen      <= 1'b0;
      done         <= 1'b0;
      info         <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          e     <= edges;
          state <= S_PREP;
        end
        S_PREP: begin
          sq_seen <= 1'b0;
          at_seen <= 1'b0;
          state   <= S_WAIT;
        end
        S_WAIT: begin
          if (sq_done) sq_seen <= 1'b1;
          if (at_done) at_seen <= 1'b1;
          if ((sq_done || sq_seen) && (at_done || at_seen)) state <= S_OUT;
        end
        S_OUT: begin
          info.present <= e.present;
          info.ox      <= ox;
          info.oy      <= oy;
          info.vx      <= vx;
          info.vy      <= vy;
          info.op      <= op;
          info.od      <= od;
          info.oz      <= oz;
          info.spread  <= spread;
          prev_present <= e.present;
          prev_ox      <= ox;
          prev_oy      <= oy;
          prev_oz      <= oz;
          done         <= 1'b1;
          state        <= S_IDLE;
        end
      endcase
    end
  end

endmodule
