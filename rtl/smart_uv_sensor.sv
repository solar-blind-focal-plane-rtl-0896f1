// Solar-blind UV motion sensor: image input, projection histogram and motion
// calculation for one moving object (a hydrogen flame).
//
// A focal plane of UV photodiodes with an edge detector under every pixel turns
// the scene into a binary edge image. Instead of scanning the image out, every
// pixel is wired to its own FPGA register, so a whole frame is taken in one
// clock. The image is reduced to two 1-D projections with OR chains, the outer
// edges of the projections give the object's bounding box (RV, FV, RH, FH), and
// the calculation circuit derives location, speed, direction, size and
// spreading status from two consecutive frames.
//
// Two image sources, chosen by `src_sel`:
//   0  serial link: frames compressed to one (start, length) run per row arrive
//      as bytes on `uart_rx_i` and are decoded row by row into the registers;
//   1  parallel: `photo` (digitized photocurrents) passes through the edge
//      detector model and is loaded in one clock on `oeic_capture`.
// `search_sel` picks the combinational edge locator + weighting (0) or the
// sequential searching circuit (1) for the next frame.
//
// Outputs: `info` with a one-cycle `info_valid` per processed frame,
// `exec_cycles` (cycles from a complete image to its result), `busy`, and
// one-cycle flags for a parallel frame dropped while busy (`frame_dropped`), a
// bad serial stop bit (`rx_frame_err`) and a frame without its stop byte
// (`sync_err`).
//
// Sizes, clock, link rate and the stage structure follow the design. The photo
// width, edge threshold, settling time of the OR chains and the drop policy are
// this design's own choices.
module smart_uv_sensor
  import uvs_pkg::*;
#(
  parameter int unsigned ROWS      = 250,
  parameter int unsigned COLS      = 250,
  parameter int unsigned CLK_HZ    = 100_000_000,
  parameter int unsigned BAUD      = 921_600,
  parameter int unsigned PW        = 8,
  parameter int          ITH       = 128,
  parameter int unsigned RATE_Q8   = 18182,
  parameter int unsigned HP_SETTLE = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          src_sel,
  input  logic          search_sel,
  input  logic          uart_rx_i,
  input  logic          oeic_capture,
  input  logic [PW-1:0] photo [ROWS][COLS],
  output info_t         info,
  output logic          info_valid,
  output logic [15:0]   exec_cycles,
  output logic          busy,
  output logic          frame_dropped,
  output logic          rx_frame_err,
  output logic          sync_err
);

  localparam int unsigned RW = $clog2(ROWS);

  // ---------------- serial path
  logic [7:0]      rx_byte;
  logic            rx_valid;
  logic            row_we;
  logic [RW-1:0]   row_idx;
  logic [COLS-1:0] row_bits;
  logic            dec_done;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .rx(uart_rx_i), .data(rx_byte), .valid(rx_valid), .frame_err(rx_frame_err)
  );

  frame_decoder #(.ROWS(ROWS), .COLS(COLS)) u_dec (
    .clk, .rst_n, .byte_in(rx_byte), .byte_valid(rx_valid && !src_sel),
    .row_we, .row_idx, .row_bits, .frame_done(dec_done), .sync_err
  );

  // ---------------- parallel path
  logic [COLS-1:0] dg [ROWS];

  edge_detector #(.ROWS(ROWS), .COLS(COLS), .PW(PW), .ITH(ITH)) u_edge (
    .photo, .dg
  );

  logic par_load;
  assign par_load      = src_sel && oeic_capture && !busy;
  assign frame_dropped = src_sel && oeic_capture && busy;

  // ---------------- image registers and projection
  logic [COLS-1:0] img [ROWS];
  logic [COLS-1:0] vproj, vproj_q;
  logic [ROWS-1:0] hproj, hproj_q;
  logic            hp_capture;

  image_register #(.ROWS(ROWS), .COLS(COLS)) u_img (
    .clk, .rst_n, .par_load, .par_dg(dg), .row_we(row_we && !src_sel), .row_idx, .row_bits, .img
  );

  projection_histogram #(.ROWS(ROWS), .COLS(COLS)) u_hist (
    .clk, .rst_n, .img, .capture(hp_capture), .vproj, .hproj, .vproj_q, .hproj_q
  );

  // ---------------- edge location, combinational (Fig. 5 style)
  logic [COLS-1:0] v_rise;
  logic [COLS:0]   v_fall;
  logic [ROWS-1:0] h_rise;
  logic [ROWS:0]   h_fall;
  edges_t          edges_comb;
  logic            v_found, h_found;

  edge_locator #(.N(COLS)) u_loc_v (.proj(vproj_q), .rise(v_rise), .fall(v_fall));
  edge_locator #(.N(ROWS)) u_loc_h (.proj(hproj_q), .rise(h_rise), .fall(h_fall));

  weighting #(.N(COLS), .W(POS_W)) u_wt_v (
    .rise(v_rise), .fall(v_fall), .found(v_found), .r_pos(edges_comb.rv), .f_pos(edges_comb.fv)
  );
  weighting #(.N(ROWS), .W(POS_W)) u_wt_h (
    .rise(h_rise), .fall(h_fall), .found(h_found), .r_pos(edges_comb.rh), .f_pos(edges_comb.fh)
  );
  assign edges_comb.present = v_found && h_found;

  // ---------------- edge location, searching circuit
  logic   search_start, search_done, search_busy;
  edges_t edges_search;

  searching_circuit #(.ROWS(ROWS), .COLS(COLS)) u_search (
    .clk, .rst_n, .start(search_start), .vproj(vproj_q), .hproj(hproj_q),
    .busy(search_busy), .done(search_done), .edges(edges_search)
  );

  // ---------------- control and calculation
  logic   frame_loaded;
  logic   calc_start, calc_done, calc_busy;
  edges_t edges_q;

  assign frame_loaded = par_load || (dec_done && !src_sel && !busy);

  sensor_ctrl #(.HP_SETTLE(HP_SETTLE)) u_ctrl (
    .clk, .rst_n, .frame_loaded, .search_sel, .edges_comb, .search_done, .edges_search,
    .calc_done, .busy, .hp_capture, .search_start, .calc_start, .edges_q, .exec_cycles
  );

  calculation_circuit #(.RATE_Q8(RATE_Q8)) u_calc (
    .clk, .rst_n, .start(calc_start), .edges(edges_q), .busy(calc_busy), .done(calc_done), .info
  );
  // One cycle after the calculation finishes, so that `exec_cycles` (updated by
  // the controller on `calc_done`) is valid together with `info`.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) info_valid <= 1'b0;
    else        info_valid <= calc_done;
  end

  // The controller never starts a stage that is still running.
  a_search_idle: assert property (@(posedge clk) disable iff (!rst_n) search_start |-> !search_busy);
  a_calc_idle:   assert property (@(posedge clk) disable iff (!rst_n) calc_start |-> !calc_busy);

endmodule
