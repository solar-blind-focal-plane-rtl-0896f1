// Binary image registers of the FPGA.
//
// One flip-flop per pixel. The register can be filled in two ways:
//  * in parallel, in a single clock, from the digitizing cells of the sensor
//    (`par_load`, `par_dg`). Those cells give 0 at an edge and 1 elsewhere; the
//    register stores the inverted value, so that a stored 1 means "edge" and the
//    mostly empty background is 0;
//  * one row at a time from the serial frame decoder (`row_we`, `row_idx`,
//    `row_bits`), whose rows already use 1 for the object.
// `img` is the registered image, read by the projection histogram; it changes
// one clock after a write.
//
// Parallel loading and the inversion follow the design; giving the parallel load
// priority when both writes come together is this design's choice.
module image_register #(
  parameter int unsigned ROWS = 250,
  parameter int unsigned COLS = 250
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    par_load,
  input  logic [COLS-1:0]         par_dg [ROWS],
  input  logic                    row_we,
  input  logic [$clog2(ROWS)-1:0] row_idx,
  input  logic [COLS-1:0]         row_bits,
  output logic [COLS-1:0]         img [ROWS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) img[r] <= '0;
    end else if (par_load) begin
      for (int r = 0; r < ROWS; r++) img[r] <= ~par_dg[r];
    end else if (row_we && int'(row_idx) < ROWS) begin
      img[row_idx] <= row_bits;
    end
  end

endmodule
