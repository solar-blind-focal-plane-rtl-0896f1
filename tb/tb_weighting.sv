// Self-checking testbench of the weighting circuit.
//
// Builds rising/falling mark vectors from random projections (one or several
// runs, or none), feeds them to the weighting circuit and checks the first
// rising position, the last falling position and `found` against values
// computed from the run boundaries in the testbench. Includes the example with
// positions 5 and 7.
module tb_weighting;
  localparam int N = 16, W = 5;
  logic [N-1:0] rise;
  logic [N:0]   fall;
  logic         found;
  logic [W-1:0] r_pos, f_pos;
  int checks = 0, failures = 0;

  weighting #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rise = '0; fall = '0; rise[5] = 1; fall[7] = 1; #1;
    checks++;
    if (!found || r_pos != 5 || f_pos != 7) begin failures++; $display("example: %0d %0d", r_pos, f_pos); end
    for (int k = 0; k < 2000; k++) begin
      logic [N-1:0] p;
      int first, last;
      p = N'($urandom) & N'($urandom);
      if (k % 10 == 0) p = '0;
      rise = '0; fall = '0; first = -1; last = -1;
      for (int i = 0; i < N; i++) begin
        if (p[i] && (i == 0 || !p[i-1])) rise[i] = 1'b1;
        if (p[i] && first < 0) first = i;
        if (p[i]) last = i;
      end
      for (int i = 1; i <= N; i++) if (p[i-1] && (i == N || !p[i])) fall[i] = 1'b1;
      #1;
      checks++;
      if (first < 0) begin
        if (found || r_pos != 0 || f_pos != 0) begin failures++; $display("empty: found=%0d", found); end
      end else if (!found || int'(r_pos) != first || int'(f_pos) != last + 1) begin
        failures++; $display("p %b: r %0d/%0d f %0d/%0d", p, r_pos, first, f_pos, last + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
