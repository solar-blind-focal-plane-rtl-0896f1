// Self-checking testbench of the compressed-frame decoder.
//
// Feeds byte streams directly (no serial line): frames of random
// (start, length) runs, runs clipped at the right border, empty rows, noise
// before the start byte and a frame whose stop byte is wrong. Each written row
// is compared with a row expanded independently in the testbench, and the
// number of rows, `frame_done` and `sync_err` are checked. Uses a 16 x 20
// image.
module tb_frame_decoder;
  localparam int ROWS = 16, COLS = 20;
  logic clk = 0, rst_n = 0;
  logic [7:0] byte_in = 0;
  logic byte_valid = 0;
  logic row_we;
  logic [$clog2(ROWS)-1:0] row_idx;
  logic [COLS-1:0] row_bits;
  logic frame_done, sync_err;
  int checks = 0, failures = 0;
  logic [COLS-1:0] expect_row [ROWS];
  int rows_seen = 0, n_done = 0, n_err = 0;

  frame_decoder #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (row_we) begin
      checks++;
      if (row_bits !== expect_row[row_idx] || int'(row_idx) != rows_seen) begin
        failures++;
        $display("row %0d (expected index %0d): got %b expected %b", row_idx, rows_seen, row_bits, expect_row[row_idx]);
      end
      rows_seen++;
    end
    if (frame_done) n_done++;
    if (sync_err) n_err++;
  end

  task automatic put(input logic [7:0] b);
    byte_in = b; byte_valid = 1; @(posedge clk);
    byte_valid = 0; repeat (2) @(posedge clk);
  endtask

  task automatic frame(input logic good_stop);
    int s, l;
    put(8'hFF);
    for (int r = 0; r < ROWS; r++) begin
      s = $urandom_range(0, COLS - 1);
      l = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, COLS);
      for (int c = 0; c < COLS; c++) expect_row[r][c] = (c >= s) && (c < s + l);
      put(8'(s)); put(8'(l));
    end
    put(good_stop ? 8'hFE : 8'h12);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (2) @(posedge clk);
    for (int f = 0; f < 20; f++) begin
      int d0, r0;
      d0 = n_done; r0 = n_err; rows_seen = 0;
      if (f % 5 == 3) begin put(8'h07); put(8'h00); end   // noise before sync
      frame(f % 7 != 6);
      repeat (3) @(posedge clk);
      checks++;
      if (rows_seen != ROWS) begin failures++; $display("frame %0d: %0d rows written", f, rows_seen); end
      checks++;
      if (f % 7 != 6) begin
        if (n_done != d0 + 1 || n_err != r0) begin failures++; $display("frame %0d: no frame_done", f); end
      end else begin
        if (n_done != d0 || n_err != r0 + 1) begin failures++; $display("frame %0d: bad stop not flagged", f); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
