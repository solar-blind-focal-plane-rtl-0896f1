// Self-checking testbench of the calculation circuit.
//
// Sends sequences of edge sets (an object appearing, moving by fixed and random
// steps, growing, shrinking and disappearing) and compares each result with a
// model in the testbench written with real arithmetic: location, size, velocity
// = displacement x RATE_Q8 / 256 rounded, speed = floor(sqrt(vx^2 + vy^2)), direction
// = atan2 in degrees (within 1 degree) and the spreading status. Also checks
// the 22-cycle latency and the two speeds of the reference runs: 1 pixel per
// frame gives 71 pixel/s and 50 pixels per frame 3551 pixel/s at the default
// frame rate.
module tb_calculation_circuit;
  import uvs_pkg::*;
  localparam int RATE_Q8 = 18182;
  logic clk = 0, rst_n = 0, start = 0;
  edges_t edges;
  logic busy, done;
  info_t info;
  int checks = 0, failures = 0;

  calculation_circuit #(.RATE_Q8(RATE_Q8)) dut (.*);

  always #5 clk = ~clk;

  // model state
  int m_prev_present = 0, m_prev_ox = 0, m_prev_oy = 0, m_prev_oz = 0;

  task automatic run(input int present, input int rv, input int fv, input int rh, input int fh);
    int ox, oy, oz, dx, dy, vx, vy, op, od_i, cyc, sp;
    real od;
    edges.present = present[0];
    edges.rv = 8'(rv); edges.fv = 8'(fv); edges.rh = 8'(rh); edges.fh = 8'(fh);
    start = 1; @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    ox = (rv + fv) / 2; oy = (rh + fh) / 2; oz = (fv - rv) * (fh - rh);
    if (present != 0 && m_prev_present != 0) begin dx = ox - m_prev_ox; dy = oy - m_prev_oy; end
    else begin dx = 0; dy = 0; end
    vx = (dx * RATE_Q8 + 128) >>> 8; vy = (dy * RATE_Q8 + 128) >>> 8;
    op = int'($floor($sqrt(real'(vx) * vx + real'(vy) * vy)));
    if (vx * vx + vy * vy > 0 && (op + 1) * (op + 1) <= vx * vx + vy * vy) op++;
    od = (vx == 0 && vy == 0) ? 0.0 : $atan2(real'(vy), real'(vx)) * 180.0 / 3.14159265358979;
    if (od < 0) od += 360.0;
    if (present == 0) sp = SPREAD_LOST;
    else if (m_prev_present == 0) sp = (oz != 0) ? SPREAD_BIGGER : SPREAD_UNCHANGED;
    else if (oz > m_prev_oz) sp = SPREAD_BIGGER;
    else if (oz < m_prev_oz) sp = SPREAD_SMALLER;
    else sp = SPREAD_UNCHANGED;
    checks += 6;
    if (cyc != 22) begin failures++; $display("latency %0d cycles", cyc); end
    if (int'(info.ox) != ox || int'(info.oy) != oy || int'(info.oz) != oz || int'(info.present) != present) begin
      failures++; $display("ox %0d/%0d oy %0d/%0d oz %0d/%0d", info.ox, ox, info.oy, oy, info.oz, oz);
    end
    if (int'(info.vx) != vx || int'(info.vy) != vy) begin
      failures++; $display("v %0d,%0d expected %0d,%0d", info.vx, info.vy, vx, vy);
    end
    if (int'(info.op) != op) begin failures++; $display("op %0d expected %0d", info.op, op); end
    begin
      real diff;
      diff = real'(info.od) - od;
      if (diff > 180.0) diff -= 360.0;
      if (diff < -180.0) diff += 360.0;
      if (diff > 1.0 || diff < -1.0) begin failures++; $display("od %0d expected %f (v %0d,%0d)", info.od, od, vx, vy); end
    end
    if (int'(info.spread) != sp) begin failures++; $display("spread %0d expected %0d", info.spread, sp); end
    m_prev_present = present; m_prev_ox = ox; m_prev_oy = oy; m_prev_oz = oz;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // empty frames, then an object of 10 x 10 moving right by 1 pixel per frame
    run(0, 0, 0, 0, 0);
    run(1, 20, 30, 123, 133);
    run(1, 21, 31, 123, 133);
    checks++;
    if (info.op != 71 || info.od != 0 || info.oz != 100) begin failures++; $display("71 pixel/s case: op %0d od %0d oz %0d", info.op, info.od, info.oz); end
    run(1, 71, 81, 123, 133);
    checks++;
    if (info.op != 3551) begin failures++; $display("3551 pixel/s case: op %0d", info.op); end
    // largest displacement: 249 pixels
    run(1, 0, 1, 0, 2);
    run(1, 249, 250, 0, 2);
    checks++;
    if (info.op != 17685) begin failures++; $display("17685 pixel/s case: op %0d", info.op); end
    run(1, 100, 120, 100, 110);   // bigger
    run(1, 100, 110, 100, 110);   // smaller
    run(1, 90, 100, 90, 100);     // unchanged, moving up-left
    run(0, 0, 0, 0, 0);           // lost
    for (int k = 0; k < 400; k++) begin
      int rv, fv, rh, fh;
      rv = $urandom_range(0, 249); fv = $urandom_range(rv + 1, 250);
      rh = $urandom_range(0, 249); fh = $urandom_range(rh + 1, 250);
      run(($urandom_range(0, 9) == 0) ? 0 : 1, rv, fv, rh, fh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
