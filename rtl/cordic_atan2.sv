// Sequential CORDIC arctangent: direction of a velocity vector in degrees.
//
// Vectoring-mode CORDIC. A vector in the left half-plane is first turned by
// 180 degrees and scaled up by 2^12; then ITER micro-rotations by +-atan(2^-i) drive y towards 0 while
// the turned angle accumulates in z (degrees, 8 fraction bits). The result is
// atan2(y, x) folded into 0 .. 359 and rounded to whole degrees. The gain of
// the rotations does not matter since only the angle is used. A zero vector
// gives 0. `start` loads x and y; `done` pulses ITER clock cycles later.
//
// The angle table holds round(256 * atan(2^-i) * 180 / pi).
module cordic_atan2 #(
  parameter int unsigned W    = 18,  // signed input width
  parameter int unsigned ITER = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic                done,
  output logic [8:0]          deg
);

  localparam int unsigned PRE = 12;        // inputs are scaled up by 2^PRE for precision
  localparam int unsigned XW  = W + PRE + 3;
  localparam int unsigned ZW = 18;   // degrees in Q8, covers -360 .. +540

  function automatic logic signed [ZW-1:0] atan_tab(input logic [$clog2(ITER+1)-1:0] i);
    unique case (i)
      0: atan_tab = 11520;  1: atan_tab = 6801;  2: atan_tab = 3593;  3: atan_tab = 1824;
      4: atan_tab = 916;    5: atan_tab = 458;   6: atan_tab = 229;   7: atan_tab = 115;
      8: atan_tab = 57;     9: atan_tab = 29;   10: atan_tab = 14;   11: atan_tab = 7;
      12: atan_tab = 4;    13: atan_tab = 2;    14: atan_tab = 1;
      default: atan_tab = 0;
    endcase
  endfunction

  logic signed [XW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic [$clog2(ITER+1)-1:0] i;
  logic run, zero;
  logic signed [ZW-1:0] z_wrap;
  logic [ZW-1:0]        z_round;

  always_comb begin
    z_wrap  = (z < 0) ? z + ZW'(360 * 256) : z;
    z_round = ZW'(z_wrap + 128) >> 8;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; i <= '0;
      run <= 1'b0; zero <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        zero <= (x_in == 0) && (y_in == 0);
        if (x_in < 0) begin
          x <= -(XW'(x_in) <<< PRE);
          y <= -(XW'(y_in) <<< PRE);
          z <= ZW'(180 * 256);
        end else begin
          x <= XW'(x_in) <<< PRE;
          y <= XW'(y_in) <<< PRE;
          z <= '0;
        end
        i   <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (y >= 0) begin
          x <= x + (y >>> i);
          y <= y - (x >>> i);
          z <= z + atan_tab(i);
        end else begin
          x <= x - (y >>> i);
          y <= y + (x >>> i);
          z <= z - atan_tab(i);
        end
        i <= i + 1'b1;
        if (i == ($clog2(ITER+1))'(ITER - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Result, valid from the `done` pulse until the next start.
  assign deg = zero ? 9'd0 : (z_round >= ZW'(360)) ? 9'd0 : z_round[8:0];

endmodule
