// Frame controller of the motion sensor.
//
// Sequences the processing of one binary image once it is complete in the image
// registers (`frame_loaded`):
//   SETTLE   wait HP_SETTLE cycles for the OR chains of the projection histogram
//   CAPTURE  load the projected registers (`hp_capture`)
//   LOCATE   either take the edges from the combinational edge locator and
//            weighting (`search_sel` = 0), or start the searching circuit and
//            wait for its `search_done` (`search_sel` = 1)
//   CALC     start the calculation circuit and wait for `calc_done`.
// `busy` is high from `frame_loaded` to the end of CALC; a frame offered while
// busy is the caller's to drop. `exec_cycles` gives the cycles the last frame
// took from `frame_loaded` to `calc_done`, the circuit execution time.
// `search_sel` is sampled when a frame starts.
//
// The order of the stages follows the design; the settling time of the OR
// chains is this design's choice, sized as a multicycle allowance.
module sensor_ctrl
  import uvs_pkg::*;
#(
  parameter int unsigned HP_SETTLE = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_loaded,
  input  logic        search_sel,
  input  edges_t      edges_comb,
  input  logic        search_done,
  input  edges_t      edges_search,
  input  logic        calc_done,
  output logic        busy,
  output logic        hp_capture,
  output logic        search_start,
  output logic        calc_start,
  output edges_t      edges_q,
  output logic [15:0] exec_cycles
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_CAPTURE, S_LOCATE, S_SEARCH, S_CALC, S_WAIT_CALC} state_t;

  state_t      state;
  logic [7:0]  settle;
  logic        mode_search;
  logic [15:0] cyc;

  assign busy         = (state != S_IDLE);
  assign hp_capture   = (state == S_CAPTURE);
  assign search_start = (state == S_LOCATE) && mode_search;
  assign calc_start   = (state == S_CALC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      settle      <= '0;
      mode_search <= 1'b0;
      cyc         <= '0;
      edges_q     <= '0;
      exec_cycles <= '0;
    end else begin
      if (state != S_IDLE) cyc <= cyc + 1'b1;
      unique case (state)
        S_IDLE: if (frame_loaded) begin
          mode_search <= search_sel;
          settle      <= 8'(HP_SETTLE);
          cyc         <= 16'd1;
          state       <= S_SETTLE;
        end
        S_SETTLE: begin
          if (settle <= 8'd1) state <= S_CAPTURE;
          settle <= settle - 1'b1;
        end
        S_CAPTURE: state <= S_LOCATE;
        S_LOCATE: begin
          if (mode_search) state <= S_SEARCH;
          else begin
            edges_q <= edges_comb;
            state   <= S_CALC;
          end
        end
        S_SEARCH: if (search_done) begin
          edges_q <= edges_search;
          state   <= S_CALC;
        end
        S_CALC: state <= S_WAIT_CALC;
        S_WAIT_CALC: if (calc_done) begin
          exec_cycles <= cyc;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
