// Self-checking testbench of the OR projection histogram.
//
// Drives random sparse images, single pixels and an empty image, and compares
// the combinational projections with a row/column "any pixel set" computed in
// the testbench; also checks that the projected registers follow only on
// `capture`. Uses a 10 x 14 image.
module tb_projection_histogram;
  localparam int ROWS = 10, COLS = 14;
  logic clk = 0, rst_n = 0, capture = 0;
  logic [COLS-1:0] img [ROWS];
  logic [COLS-1:0] vproj, vproj_q;
  logic [ROWS-1:0] hproj, hproj_q;
  logic [COLS-1:0] ev;
  logic [ROWS-1:0] eh;
  int checks = 0, failures = 0;

  projection_histogram #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic reference();
    ev = '0; eh = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (img[r][c]) begin ev[c] = 1'b1; eh[r] = 1'b1; end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [COLS-1:0] old_v;
    logic [ROWS-1:0] old_h;
    for (int r = 0; r < ROWS; r++) img[r] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      for (int r = 0; r < ROWS; r++) begin
        img[r] = '0;
        if (k % 3 == 0) img[r] = COLS'($urandom) & COLS'($urandom) & COLS'($urandom);
      end
      if (k % 3 == 1) img[$urandom_range(0, ROWS - 1)][$urandom_range(0, COLS - 1)] = 1'b1;
      #1; reference();
      checks += 2;
      if (vproj !== ev) begin failures++; $display("vproj %b expected %b", vproj, ev); end
      if (hproj !== eh) begin failures++; $display("hproj %b expected %b", hproj, eh); end
      old_v = vproj_q; old_h = hproj_q;
      capture = (k % 2 == 0);
      @(posedge clk); #1; capture = 0;
      checks++;
      if (k % 2 == 0) begin
        if (vproj_q !== ev || hproj_q !== eh) begin failures++; $display("capture failed"); end
      end else if (vproj_q !== old_v || hproj_q !== old_h) begin
        failures++; $display("projected registers changed without capture");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
