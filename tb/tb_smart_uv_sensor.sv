// End-to-end testbench of the UV motion sensor at a reduced size.
//
// A 32 x 32 sensor with a fast serial link (8 clocks per bit). The testbench
// draws scenes (discs and rectangles), sends them as compressed serial frames or
// as photocurrents on the parallel input, and checks every result against a
// model computed here from the drawn object's bounding box: location, size,
// velocity, speed, direction (within 1 degree) and spreading status. It also
// checks the execution time of each frame against the searching circuit's
// step count, and makes each mechanism happen and counts it: serial and
// parallel frames, switching between them, both edge-location modes, an empty
// frame (object lost), bigger / smaller / unchanged objects, a parallel frame
// dropped while busy, a frame with a wrong stop byte and a serial byte with a
// bad stop bit. A mechanism that never happened counts as a failure.
module tb_smart_uv_sensor;
  import uvs_pkg::*;
  localparam int ROWS = 32, COLS = 32;
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
    int n_bad0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) photo[r][c] = '0;
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    // serial, combinational locator: a disc moving right by 2 pixels a frame
    for (int k = 0; k < 6; k++) begin draw(1, 12, 3 + 2 * k, 3, 0); frame(0, 0, 0); end
    // empty frame: object lost
    draw(0, 0, 0, 0, 0); frame(0, 0, 0);
    // serial, searching circuit: rectangle appears, grows, shrinks, stays
    draw(2, 4, 4, 5, 5); frame(0, 1, 0);
    draw(2, 4, 4, 8, 9); frame(0, 1, 0);
    draw(2, 6, 6, 3, 4); frame(0, 1, 0);
    draw(2, 7, 9, 3, 4); frame(0, 1, 0);
    // a frame with a wrong stop byte produces no result
    n_bad0 = n_info;
    draw(2, 1, 1, 3, 3); send_serial(1'b0);
    repeat (50) @(posedge clk);
    checks++;
    if (n_info != n_bad0 || n_sync != 1) begin failures++; $display("bad stop byte not rejected"); end
    // a byte with a bad stop bit
    send_byte(8'h00, 1'b0); repeat (20) @(posedge clk);
    // parallel input through the edge detector, both locators, a dropped frame
    for (int k = 0; k < 6; k++) begin
      draw(2, 2 + 3 * k, 25 - 3 * k, 4 + k, 3); frame(1, k[0], k == 2);
    end
    draw(1, 0, 0, 4, 0); frame(1, 1, 0);          // object cut by the corner
    draw(2, 0, 0, ROWS, COLS); frame(1, 0, 0);    // whole image lit
    draw(0, 0, 0, 0, 0); frame(1, 1, 0);          // lost, searching circuit
    // random mix
    for (int k = 0; k < 30; k++) begin
      draw(1 + (k % 2), $urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1), $urandom_range(1, 8), $urandom_range(1, 8));
      frame($urandom_range(0, 1), $urandom_range(0, 1), 0);
    end
    checks++;
    if (n_serial == 0 || n_parallel == 0 || n_switch == 0 || n_search == 0 || n_comb == 0 || n_lost == 0 ||
        n_bigger == 0 || n_smaller == 0 || n_unchanged == 0 || n_dropped == 0 || n_sync == 0 || n_rxerr == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("serial %0d parallel %0d switches %0d search %0d comb %0d lost %0d bigger %0d smaller %0d unchanged %0d dropped %0d sync_err %0d rx_err %0d",
             n_serial, n_parallel, n_switch, n_search, n_comb, n_lost, n_bigger, n_smaller, n_unchanged, n_dropped, n_sync, n_rxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
