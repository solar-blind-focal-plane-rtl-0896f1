// Direction workload: an object circling at 12.4 rad/s, sampled every 14.08 ms.
//
// A disc of diameter 10 pixels moves on a circle of radius 24 pixels around the
// centre of a 64 x 64 sensor, advancing 12.4 rad/s x 14.08 ms = 0.175 rad
// (10 degrees) per frame, for two revolutions, alternating serial and parallel
// frames and both edge-location circuits. Each result is checked against a
// model computed from the drawn object's bounding box. Over a revolution the
// measured direction must step through all four quadrants and wrap from near
// 360 degrees back to near 0 once, a sawtooth. The measured speed is a chord
// between two frames: for a 10 degree step it is 2 x 24 x sin(5 deg) = 4.18
// pixels per frame, 297 pixel/s against 298 pixel/s on the arc. Single frames
// scatter around that because positions are whole pixels; the mean over the run
// must lie within 10 percent of it.
module tb_direction_workload;
  import uvs_pkg::*;
  localparam int ROWS = 64, COLS = 64;
  localparam int CLK_HZ = 1_000_000, BAUD = 125_000, DIV = CLK_HZ / BAUD;
  localparam int PW = 8, ITH = 128, RATE_Q8 = 18182, HP_SETTLE = 10;

  logic clk = 0, rst_n = 0;
  logic src_sel = 0, search_sel = 0, uart_rx_i = 1, oeic_capture = 0;
  logic [PW-1:0] photo [ROWS][COLS];
  info_t info;
  logic info_valid, busy, frame_dropped, rx_frame_err, sync_err;
  logic [15:0] exec_cycles;

  smart_uv_sensor #(.ROWS(ROWS), .COLS(COLS), .CLK_HZ(CLK_HZ), .BAUD(BAUD), .PW(PW), .ITH(ITH),
                    .RATE_Q8(RATE_Q8), .HP_SETTLE(HP_SETTLE)) dut (.*);

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
    int quad [4];
    int wraps, prev_od, sum_op;
    real ang;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) photo[r][c] = '0;
    for (int q = 0; q < 4; q++) quad[q] = 0;
    wraps = 0; prev_od = -1; sum_op = 0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    for (int k = 0; k <= 72; k++) begin
      ang = 12.4 * 0.01408 * k;
      draw(3, 27 + int'($floor(24.0 * $sin(ang) + 0.5)), 27 + int'($floor(24.0 * $cos(ang) + 0.5)), 10, 0);
      frame(k[0], k[1], 0);
      if (k > 0) begin
        quad[last_info.od / 90]++;
        if (prev_od >= 270 && last_info.od < 90) wraps++;
        sum_op += int'(last_info.op);
        prev_od = last_info.od;
      end
    end
    checks += 3;
    if (quad[0] == 0 || quad[1] == 0 || quad[2] == 0 || quad[3] == 0) begin
      failures++; $display("quadrants %0d %0d %0d %0d", quad[0], quad[1], quad[2], quad[3]);
    end
    if (wraps != 2) begin failures++; $display("%0d wraps for two revolutions", wraps); end
    if (sum_op / 72 < 267 || sum_op / 72 > 327) begin failures++; $display("mean speed %0d pixel/s", sum_op / 72); end
    $display("mean speed %0d pixel/s", sum_op / 72);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
