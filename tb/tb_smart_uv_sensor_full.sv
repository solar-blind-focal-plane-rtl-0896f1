// Full-size testbench of the UV motion sensor: 250 x 250 pixels, 100 MHz clock,
// 921600 bit/s serial link, every parameter at its default.
//
// Reproduces the reference speed runs with an object of 10 x 10 pixels on row
// 128 moving to the right: frames 1 pixel apart (71 pixel/s at 14.08 ms per
// frame) and 50 pixels apart (3551 pixel/s), delivered through the parallel
// sensor input and its edge detector. The serial path is exercised at a reduced
// size by tb_smart_uv_sensor: a 502-byte frame takes over half a million clock
// cycles, too many for this full-size model in a short simulation.
// Each result is compared with a model computed from the drawn object's
// bounding box, and the execution time of each frame is checked against the
// searching circuit's step count (about 5 microseconds per frame at 100 MHz).
module tb_smart_uv_sensor_full;
  import uvs_pkg::*;
  localparam int ROWS = 250, COLS = 250;
  localparam int CLK_HZ = 100_000_000, BAUD = 921_600, DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int PW = 8, ITH = 128, RATE_Q8 = 18182, HP_SETTLE = 10;

  logic clk = 0, rst_n = 0;
  logic src_sel = 0, search_sel = 0, uart_rx_i = 1, oeic_capture = 0;
  logic [PW-1:0] photo [ROWS][COLS];
  info_t info;
  logic info_valid, busy, frame_dropped, rx_frame_err, sync_err;
  logic [15:0] exec_cycles;

  smart_uv_sensor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_serial = 0, n_parallel = 0, n_switch = 0, n_search = 0, n_comb = 0, n_lost = 0;
  int n_bigger = 0, n_smaller = 0, n_unchanged = 0, n_dropped = 0, n_sync = 0, n_rxerr = 0, n_info = 0;
  info_t last_info;
  logic [15:0] last_exec;

  always @(posedge clk) if (rst_n) begin
    if (frame_dropped) n_dropped++;
    if (sync_err) n_sync++;
    if (rx_frame_err) n_rxerr++;
    if (info_valid) begin n_info++; last_info = info; last_exec = exec_cycles; end
  end

  // the scene
  logic obj [ROWS][COLS];
  // model state
  int m_prev_present = 0, m_prev_ox = 0, m_prev_oy = 0, m_prev_oz = 0;
  logic cur_src = 0;

  task automatic draw(input int kind, input int r0, input int c0, input int a, input int b);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        case (kind)
          0: obj[r][c] = 1'b0;
          1: obj[r][c] = (r - r0) * (r - r0) + (c - c0) * (c - c0) <= a * a;       // disc
          3: obj[r][c] = (2 * (r - r0) - a + 1) * (2 * (r - r0) - a + 1) +
                         (2 * (c - c0) - a + 1) * (2 * (c - c0) - a + 1) <= a * a; // disc of diameter a
          default: obj[r][c] = r >= r0 && r < r0 + a && c >= c0 && c < c0 + b;    // rectangle
        endcase
  endtask

  task automatic send_byte(input logic [7:0] b, input logic stop);
    uart_rx_i = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx_i = b[i]; repeat (DIV) @(posedge clk); end
    uart_rx_i = stop; repeat (DIV) @(posedge clk);
    uart_rx_i = 1; repeat (2) @(posedge clk);
  endtask

  task automatic send_serial(input logic good_stop);
    send_byte(8'hFF, 1);
    for (int r = 0; r < ROWS; r++) begin
      int s, l;
      s = 0; l = 0;
      for (int c = COLS - 1; c >= 0; c--) if (obj[r][c]) s = c;
      for (int c = 0; c < COLS; c++) if (obj[r][c]) l++;
      send_byte(8'(s), 1); send_byte(8'(l), 1);
    end
    send_byte(good_stop ? 8'hFE : 8'h55, 1);
  endtask

  task automatic capture_parallel(input logic double);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) photo[r][c] = obj[r][c] ? PW'(200) : PW'(0);
    @(posedge clk); #1;
    oeic_capture = 1; @(posedge clk); #1; oeic_capture = 0;
    if (double) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) photo[r][c] = PW'(0);
      repeat (3) @(posedge clk); #1;
      oeic_capture = 1; @(posedge clk); #1; oeic_capture = 0;
    end
  endtask

  // One frame through the sensor and its check.
  task automatic frame(input logic src, input logic mode, input logic double);
    int rv, fv, rh, fh, present, ox, oy, oz, dx, dy, vx, vy, op, sp, n0, t_sc, t_exp, d0;
    real od, diff;
    if (src != cur_src) n_switch++;
    cur_src = src;
    src_sel = src; search_sel = mode;
    n0 = n_info; d0 = n_dropped;
    if (src) capture_parallel(double); else send_serial(1'b1);
    while (n_info == n0) @(posedge clk);
    if (src) n_parallel++; else n_serial++;
    if (mode) n_search++; else n_comb++;
    // expected edges: bounding box of the object
    rv = -1; fv = 0; rh = -1; fh = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (obj[r][c]) begin
          if (rv < 0 || c < rv) rv = c;
          if (c + 1 > fv) fv = c + 1;
          if (rh < 0) rh = r;
          fh = r + 1;
        end
    present = (rv >= 0);
    if (!present) begin rv = 0; rh = 0; end
    ox = (rv + fv) / 2; oy = (rh + fh) / 2; oz = (fv - rv) * (fh - rh);
    if (present != 0 && m_prev_present != 0) begin dx = ox - m_prev_ox; dy = oy - m_prev_oy; end
    else begin dx = 0; dy = 0; end
    vx = (dx * RATE_Q8 + 128) >>> 8; vy = (dy * RATE_Q8 + 128) >>> 8;
    op = int'($floor($sqrt(real'(vx * vx + vy * vy))));
    if ((op + 1) * (op + 1) <= vx * vx + vy * vy) op++;
    od = (vx == 0 && vy == 0) ? 0.0 : $atan2(real'(vy), real'(vx)) * 180.0 / 3.14159265358979;
    if (od < 0) od += 360.0;
    if (!present) sp = SPREAD_LOST;
    else if (m_prev_present == 0) sp = (oz != 0) ? SPREAD_BIGGER : SPREAD_UNCHANGED;
    else if (oz > m_prev_oz) sp = SPREAD_BIGGER;
    else if (oz < m_prev_oz) sp = SPREAD_SMALLER;
    else sp = SPREAD_UNCHANGED;
    case (sp)
      SPREAD_LOST: n_lost++;
      SPREAD_BIGGER: n_bigger++;
      SPREAD_SMALLER: n_smaller++;
      default: n_unchanged++;
    endcase
    checks += 6;
    if (int'(last_info.present) != present || int'(last_info.ox) != ox || int'(last_info.oy) != oy ||
        int'(last_info.oz) != oz) begin
      failures++;
      $display("frame: present %0d/%0d ox %0d/%0d oy %0d/%0d oz %0d/%0d", last_info.present, present,
               last_info.ox, ox, last_info.oy, oy, last_info.oz, oz);
    end
    if (int'(last_info.vx) != vx || int'(last_info.vy) != vy) begin
      failures++; $display("v %0d,%0d expected %0d,%0d", last_info.vx, last_info.vy, vx, vy);
    end
    if (int'(last_info.op) != op) begin failures++; $display("op %0d expected %0d", last_info.op, op); end
    diff = real'(last_info.od) - od;
    if (diff > 180.0) diff -= 360.0;
    if (diff < -180.0) diff += 360.0;
    if (diff > 1.0 || diff < -1.0) begin failures++; $display("od %0d expected %f", last_info.od, od); end
    if (int'(last_info.spread) != sp) begin failures++; $display("spread %0d expected %0d", last_info.spread, sp); end
    // execution time: settle + capture + locate + calculation, plus the search steps
    t_sc  = !present ? COLS : (COLS + 2 - (fv - rv)) + (ROWS + 2 - (fh - rh));
    t_exp = HP_SETTLE + 3 + 22 + (mode ? t_sc + 1 : 0);
    if (int'(last_exec) != t_exp) begin
      failures++; $display("exec_cycles %0d expected %0d (mode %0d)", last_exec, t_exp, mode);
    end
    if (double) begin
      checks++;
      if (n_dropped != d0 + 1) begin failures++; $display("second capture not dropped"); end
    end
    m_prev_present = present; m_prev_ox = ox; m_prev_oy = oy; m_prev_oz = oz;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) photo[r][c] = '0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    // parallel input, 1 pixel per frame: 71 pixel/s
    draw(3, 123, 100, 10, 0); frame(1, 1, 0);
    checks++;
    if (last_info.oz != 100 || last_info.ox != 105 || last_info.oy != 128) begin
      failures++; $display("first frame: ox %0d oy %0d oz %0d", last_info.ox, last_info.oy, last_info.oz);
    end
    draw(3, 123, 101, 10, 0); frame(1, 0, 0);
    checks++;
    if (last_info.op != 71 || last_info.od != 0) begin failures++; $display("71 pixel/s run: op %0d od %0d", last_info.op, last_info.od); end
    // 50 pixels per frame: 3551 pixel/s
    draw(3, 123, 151, 10, 0); frame(1, 1, 0);
    checks++;
    if (last_info.op != 3551) begin failures++; $display("3551 pixel/s run: op %0d", last_info.op); end
    checks++;
    if (last_exec > 5000) begin failures++; $display("frame took %0d cycles, over 0.05 ms", last_exec); end
    checks++;
    if (n_parallel != 3) begin failures++; $display("%0d frames processed", n_parallel); end
    $display("last frame took %0d cycles", last_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
