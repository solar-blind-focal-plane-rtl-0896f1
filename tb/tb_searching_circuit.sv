// Self-checking testbench of the searching circuit.
//
// Drives random projections (single runs, several fragments, full width, edges
// touching the borders, empty) and checks RV, FV, RH, FH against the outermost
// set bits found in the testbench, and the search time against
// (COLS + 2 - d_V) + (ROWS + 2 - d_H) cycles, with d = F - R, or COLS cycles
// for an empty image. Uses 24 rows by 30 columns.
module tb_searching_circuit;
  import uvs_pkg::*;
  localparam int ROWS = 24, COLS = 30;
  logic clk = 0, rst_n = 0, start = 0;
  logic [COLS-1:0] vproj;
  logic [ROWS-1:0] hproj;
  logic busy, done;
  edges_t edges;
  int checks = 0, failures = 0;

  searching_circuit #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] runs(input int n, input int kind);
    logic [63:0] p;
    int s, l;
    p = '0;
    case (kind)
      0: ;
      1: p = '1;
      2: begin s = $urandom_range(0, n - 1); l = $urandom_range(1, n - s); for (int i = s; i < s + l; i++) p[i] = 1; end
      3: begin p[0] = 1; p[n-1] = 1; end
      default: p = 64'($urandom) & 64'($urandom);
    endcase
    for (int i = n; i < 64; i++) p[i] = 1'b0;
    if (kind > 0 && p == 0) p[$urandom_range(0, n - 1)] = 1'b1;
    return p;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      int kind, erv, efv, erh, efh, exp_cyc, cyc;
      kind  = (k < 5) ? k : 2 + (k % 3);
      vproj = COLS'(runs(COLS, kind));
      hproj = ROWS'(runs(ROWS, kind));
      erv = -1; efv = 0; erh = -1; efh = 0;
      for (int i = 0; i < COLS; i++) if (vproj[i]) begin if (erv < 0) erv = i; efv = i + 1; end
      for (int i = 0; i < ROWS; i++) if (hproj[i]) begin if (erh < 0) erh = i; efh = i + 1; end
      exp_cyc = (erv < 0) ? COLS : (COLS + 2 - (efv - erv)) + (ROWS + 2 - (efh - erh));
      start = 1; @(posedge clk); #1; start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks += 2;
      if (erv < 0) begin
        if (edges.present || edges.rv != 0 || edges.fv != 0) begin failures++; $display("empty image not reported"); end
      end else if (!edges.present || int'(edges.rv) != erv || int'(edges.fv) != efv ||
                   int'(edges.rh) != erh || int'(edges.fh) != efh) begin
        failures++;
        $display("edges %0d %0d %0d %0d expected %0d %0d %0d %0d", edges.rv, edges.fv, edges.rh, edges.fh, erv, efv, erh, efh);
      end
      if (cyc != exp_cyc) begin failures++; $display("search took %0d cycles, expected %0d", cyc, exp_cyc); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
