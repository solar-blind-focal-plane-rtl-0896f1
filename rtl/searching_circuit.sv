// Searching circuit: sequential edge locator and weighting in one.
//
// Instead of locating every edge at once, the circuit walks the projected
// registers one position per clock. For the vertical projection it steps from the
// left until it meets a 1 (its step count is RV); it then steps from the right
// until it meets a 1 again, which puts FV one past that position. The
// horizontal projection is searched in the same way for RH and FH. Because only
// the first 1 from each side matters, several fragments are reported as one
// large object.
//
// Timing: with d_V = FV - RV and d_H = FH - RH, a search takes
// (COLS + 2 - d_V) + (ROWS + 2 - d_H) clock cycles from the `start` edge to the
// `done` pulse. An empty image is detected after COLS steps of the first scan;
// the search then ends with `edges.present` = 0 and all positions 0.
//
// The scan order and the cycle count follow the design; handling of an empty
// image is this design's choice.
module searching_circuit
  import uvs_pkg::*;
#(
  parameter int unsigned ROWS = 250,
  parameter int unsigned COLS = 250
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [COLS-1:0] vproj,
  input  logic [ROWS-1:0] hproj,
  output logic            busy,
  output logic            done,
  output edges_t          edges
);

  typedef enum logic [2:0] {S_IDLE, S_VL, S_VR, S_HL, S_HR} state_t;

  state_t           state;
  logic [POS_W-1:0] idx;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      done  <= 1'b0;
      edges <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_VL;
          idx   <= '0;
          edges <= '0;
        end
        S_VL: begin
          if (vproj[idx]) begin
            edges.rv      <= idx;
            edges.present <= 1'b1;
            idx           <= POS_W'(COLS - 1);
            state         <= S_VR;
          end else if (idx == POS_W'(COLS - 1)) begin
            state <= S_IDLE;              // empty image
            done  <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        S_VR: begin
          if (vproj[idx]) begin
            edges.fv <= idx + 1'b1;
            idx      <= '0;
            state    <= S_HL;
          end else idx <= idx - 1'b1;
        end
        S_HL: begin
          if (hproj[idx]) begin
            edges.rh <= idx;
            idx      <= POS_W'(ROWS - 1);
            state    <= S_HR;
          end else if (idx == POS_W'(ROWS - 1)) begin
            state <= S_IDLE;              // cannot happen when vproj is set
            done  <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        S_HR: begin
          if (hproj[idx]) begin
            edges.fh <= idx + 1'b1;
            state    <= S_IDLE;
            done     <= 1'b1;
          end else idx <= idx - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
