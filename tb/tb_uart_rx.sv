// Self-checking testbench of the serial byte receiver.
//
// Sends random bytes as 8N1 frames at the configured bit time and compares each
// received byte with the one sent; checks that a byte appears at the middle of
// its stop bit, that a frame
// with a low stop bit raises `frame_err` and no `valid`, and that a short low
// glitch on the idle line is ignored. Runs at a reduced clock/baud ratio.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 1_000_000;
  localparam int unsigned BAUD   = 62_500;          // 16 clocks per bit
  localparam int unsigned DIV    = CLK_HZ / BAUD;

  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (valid) begin n_valid++; last = data; end
    if (frame_err) n_err++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rx = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (DIV) @(posedge clk); end
    rx = stop; repeat (DIV) @(posedge clk);
    rx = 1; repeat (DIV) @(posedge clk);
  endtask

  initial begin
    repeat (20 * DIV * 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int nv;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      b  = (k < 2) ? ((k == 0) ? 8'h00 : 8'hFF) : 8'($urandom);
      nv = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != nv + 1 || last !== b) begin
        failures++;
        $display("byte %0d: sent %02x got %02x (valid count %0d)", k, b, last, n_valid - nv);
      end
    end
    // latency: valid comes DIV/2 + sync after the stop bit begins
    begin
      int t0;
      fork
        send(8'hA5, 1'b1);
        begin
          // wait for the stop bit to start: 9 bit times after the start edge
          repeat (9 * DIV) @(posedge clk);
          t0 = 0;
          while (!valid) begin @(posedge clk); t0++; end
        end
      join
      checks++;
      if (t0 < DIV / 2 || t0 > DIV / 2 + 4) begin
        failures++; $display("stop-bit sampling at %0d cycles into the stop bit", t0);
      end
    end
    // bad stop bit
    nv = n_valid;
    send(8'h3C, 1'b0);
    checks++;
    if (n_err != 1 || n_valid != nv) begin failures++; $display("framing error not flagged"); end
    // glitch shorter than half a bit
    nv = n_valid;
    rx = 0; repeat (DIV / 4) @(posedge clk); rx = 1;
    repeat (20 * DIV) @(posedge clk);
    checks++;
    if (n_valid != nv || n_err != 1) begin failures++; $display("glitch accepted"); end
    // still works afterwards
    send(8'h5A, 1'b1);
    checks++;
    if (last !== 8'h5A) begin failures++; $display("no recovery after glitch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
