// Self-checking testbench of the image registers.
//
// Checks reset to an empty image, row writes (only the addressed row changes),
// a parallel load that stores the inverted digitizer outputs in a single clock,
// and the priority of the parallel load over a simultaneous row write, against a
// reference image kept in the testbench. Uses an 8 x 12 image.
module tb_image_register;
  localparam int ROWS = 8, COLS = 12;
  logic clk = 0, rst_n = 0;
  logic par_load = 0;
  logic [COLS-1:0] par_dg [ROWS];
  logic row_we = 0;
  logic [$clog2(ROWS)-1:0] row_idx = 0;
  logic [COLS-1:0] row_bits = 0;
  logic [COLS-1:0] img [ROWS];
  logic [COLS-1:0] ref_img [ROWS];
  int checks = 0, failures = 0;

  image_register #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (img[r] !== ref_img[r]) begin
        failures++; $display("%s: row %0d got %b expected %b", what, r, img[r], ref_img[r]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) begin par_dg[r] = '1; ref_img[r] = '0; end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    compare("reset");
    for (int k = 0; k < 50; k++) begin
      row_idx = 3'($urandom_range(0, ROWS - 1));
      row_bits = COLS'($urandom);
      row_we = 1;
      @(posedge clk); #1;
      row_we = 0;
      ref_img[row_idx] = row_bits;
      compare("row write");
    end
    for (int k = 0; k < 10; k++) begin
      for (int r = 0; r < ROWS; r++) begin par_dg[r] = COLS'($urandom); ref_img[r] = ~par_dg[r]; end
      par_load = 1;
      row_we = (k % 2 == 0); row_idx = 1; row_bits = '1;   // loses against the parallel load
      @(posedge clk); #1;
      par_load = 0; row_we = 0;
      compare("parallel load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
