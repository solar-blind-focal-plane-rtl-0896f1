// Self-checking testbench of the frame controller.
//
// Plays the searching and calculation circuits with fixed latencies and checks,
// for both edge-location modes, that the projection is captured HP_SETTLE + 1
// cycles after a frame is loaded, that the search runs only in search mode, that
// the edge set passed to the calculation is the one of the selected mode, that
// busy covers the whole frame and that exec_cycles equals the measured time.
module tb_sensor_ctrl;
  import uvs_pkg::*;
  localparam int HP_SETTLE = 5, T_SEARCH = 13, T_CALC = 7;
  logic clk = 0, rst_n = 0;
  logic frame_loaded = 0, search_sel = 0, search_done = 0, calc_done = 0;
  edges_t edges_comb, edges_search, edges_q;
  logic busy, hp_capture, search_start, calc_start;
  logic [15:0] exec_cycles;
  int checks = 0, failures = 0;
  int cyc_capture, cyc_search, cyc_calc, n_search;
  edges_t calc_edges;

  sensor_ctrl #(.HP_SETTLE(HP_SETTLE)) dut (.*);

  always #5 clk = ~clk;

  // circuit stand-ins
  initial forever begin
    @(posedge clk);
    if (search_start) begin
      n_search++;
      repeat (T_SEARCH - 1) @(posedge clk);
      #1 search_done = 1; @(posedge clk); #1 search_done = 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (calc_start) begin
      calc_edges = edges_q;
      repeat (T_CALC - 1) @(posedge clk);
      #1 calc_done = 1; @(posedge clk); #1 calc_done = 0;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges_comb = '0; edges_search = '0; n_search = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    for (int f = 0; f < 8; f++) begin
      int cyc, nsearch0;
      logic mode;
      mode = f[0];
      edges_comb   = {1'b1, 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      edges_search = {1'b1, 8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)};
      nsearch0 = n_search;
      search_sel = mode; frame_loaded = 1;
      @(posedge clk); #1; frame_loaded = 0; search_sel = !mode;   // mode is sampled at the start
      cyc = 1; cyc_capture = -1;
      while (busy) begin
        if (hp_capture) cyc_capture = cyc;
        @(posedge clk); #1; cyc++;
      end
      checks += 4;
      if (cyc_capture != HP_SETTLE + 1) begin failures++; $display("capture at %0d", cyc_capture); end
      if ((n_search - nsearch0) != int'(mode)) begin failures++; $display("search runs %0d in mode %0d", n_search - nsearch0, mode); end
      if (calc_edges !== (mode ? edges_search : edges_comb)) begin failures++; $display("wrong edge set in mode %0d", mode); end
      if (int'(exec_cycles) != cyc - 1) begin failures++; $display("exec_cycles %0d measured %0d", exec_cycles, cyc - 1); end
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
