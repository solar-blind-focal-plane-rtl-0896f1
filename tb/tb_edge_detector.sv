// Self-checking testbench of the edge detector model.
//
// Scenes are dark backgrounds with bright rectangles and discs of one
// intensity I, some touching the border. For such a scene the model's bipolar
// output is (8 - k) * I at a bright pixel with k bright neighbours and at most 0
// at a dark pixel, so a pixel must read 0 (edge) exactly when it is bright and
// (8 - k) * I > ITH. The testbench counts k itself and compares every pixel,
// for a high contrast (object outline found) and a low contrast (nothing found)
// intensity. Uses a 12 x 16 array.
module tb_edge_detector;
  localparam int ROWS = 12, COLS = 16, PW = 8, ITH = 128;
  logic [PW-1:0]   photo [ROWS][COLS];
  logic [COLS-1:0] dg    [ROWS];
  logic            bright [ROWS][COLS];
  int checks = 0, failures = 0, edges_seen = 0;

  edge_detector #(.ROWS(ROWS), .COLS(COLS), .PW(PW), .ITH(ITH)) dut (.*);

  task automatic scene(input int kind, input int inten);
    int r0, c0, h, w, rad;
    r0 = $urandom_range(0, ROWS - 1); c0 = $urandom_range(0, COLS - 1);
    h = $urandom_range(1, 6); w = $urandom_range(1, 8); rad = $urandom_range(1, 4);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (kind == 0) bright[r][c] = (r >= r0) && (r < r0 + h) && (c >= c0) && (c < c0 + w);
        else           bright[r][c] = (r - r0) * (r - r0) + (c - c0) * (c - c0) <= rad * rad;
        photo[r][c] = bright[r][c] ? PW'(inten) : '0;
      end
    #1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int k;
        logic exp_dg;
        k = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if ((dr != 0 || dc != 0) && r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS &&
                bright[r+dr][c+dc]) k++;
        exp_dg = !(bright[r][c] && (8 - k) * inten > ITH);
        checks++;
        if (!exp_dg) edges_seen++;
        if (dg[r][c] !== exp_dg) begin
          failures++; $display("pixel %0d,%0d: dg %0d expected %0d (k=%0d)", r, c, dg[r][c], exp_dg, k);
        end
      end
  endtask

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 60; k++) scene(k % 2, 200);
    checks++;
    if (edges_seen == 0) begin failures++; $display("no edge ever found"); end
    edges_seen = 0;
    for (int k = 0; k < 20; k++) scene(k % 2, 12);
    checks++;
    if (edges_seen != 0) begin failures++; $display("low-contrast scene produced edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
