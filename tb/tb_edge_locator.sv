// Self-checking testbench of the edge locator.
//
// Applies every 10-bit projection and compares the rising and falling marks
// with marks derived in the testbench by walking the projection with an
// explicit previous-bit variable. Includes the 10-pixel example whose object
// covers positions 5 and 6 (rising mark at 5, falling mark at 7).
module tb_edge_locator;
  localparam int N = 10;
  logic [N-1:0] proj;
  logic [N-1:0] rise;
  logic [N:0]   fall;
  logic [N-1:0] er;
  logic [N:0]   ef;
  int checks = 0, failures = 0;

  edge_locator #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    proj = 10'b0001100000;   // positions 5 and 6
    #1;
    checks++;
    if (rise !== 10'b0000100000 || fall !== 11'b00010000000) begin
      failures++; $display("example: rise %b fall %b", rise, fall);
    end
    for (int v = 0; v < (1 << N); v++) begin
      logic prev;
      proj = N'(v);
      #1;
      er = '0; ef = '0; prev = 1'b0;
      for (int i = 0; i <= N; i++) begin
        logic cur;
        cur = (i < N) ? proj[i] : 1'b0;
        if (cur && !prev) er[i] = 1'b1;
        if (!cur && prev) ef[i] = 1'b1;
        prev = cur;
      end
      checks++;
      if (rise !== er || fall !== ef) begin
        failures++; $display("proj %b: rise %b/%b fall %b/%b", proj, rise, er, fall, ef);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
