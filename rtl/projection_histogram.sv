// Projection histogram of a binary image, built from OR gates.
//
// Because the image is binary, projecting it onto an axis needs no adders: a row
// (or column) of the projection is 1 when any pixel in it is 1. Each row and each
// column is reduced by a chain of two-input OR gates in series, each gate taking
// the next pixel and the previous gate's output, so the projection settles after
// (max(ROWS, COLS) - 1) gate delays. `vproj` has one bit per column (the
// vertical projection, onto the x axis), `hproj` one bit per row (the horizontal
// projection, onto the y axis).
//
// The OR network is combinational. `capture` loads both projections into the
// projected registers `vproj_q`/`hproj_q`, which the edge search reads; the
// controller raises it only after the chains have had time to settle.
module projection_histogram #(
  parameter int unsigned ROWS = 250,
  parameter int unsigned COLS = 250
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] img [ROWS],
  input  logic            capture,
  output logic [COLS-1:0] vproj,
  output logic [ROWS-1:0] hproj,
  output logic [COLS-1:0] vproj_q,
  output logic [ROWS-1:0] hproj_q
);

  // Horizontal projection: one OR chain along each row. Gate c of the chain
  // combines pixel c with the output of gate c-1.
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [COLS-1:0] chain;
    assign chain[0] = img[r][0];
    for (genvar c = 1; c < COLS; c++) begin : g_or
      assign chain[c] = chain[c-1] | img[r][c];
    end
    assign hproj[r] = chain[COLS-1];
  end

  // Vertical projection: one OR chain down each column.
  for (genvar c = 0; c < COLS; c++) begin : g_col
    logic [ROWS-1:0] chain;
    assign chain[0] = img[0][c];
    for (genvar r = 1; r < ROWS; r++) begin : g_or
      assign chain[r] = chain[r-1] | img[r][c];
    end
    assign vproj[c] = chain[ROWS-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vproj_q <= '0;
      hproj_q <= '0;
    end else if (capture) begin
      vproj_q <= vproj;
      hproj_q <= hproj;
    end
  end

endmodule
