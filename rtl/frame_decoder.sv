// Decoder for the compressed binary frames sent over the serial link.
//
// Each frame is START, then for every row r = 0 .. ROWS-1 two bytes (the column
// where the object begins in that row and its length in pixels), then STOP:
// 2*ROWS + 2 bytes, 502 for a 250 x 250 image. The decoder waits for START,
// expands every (start, length) pair into a full row of bits (1 where the object
// is, columns start .. start+length-1, clipped to the image) and writes it with
// `row_we`/`row_idx`/`row_bits` in the cycle after the length byte. After the
// last row it expects STOP: it then pulses `frame_done`, otherwise `sync_err`,
// and in both cases waits for the next START.
//
// The byte layout and its size are the design's; the START (0xFF) and STOP
// (0xFE) values are this design's own choice: neither can be a start column or a
// length of a 250-wide row, which keeps resynchronisation simple.
module frame_decoder #(
  parameter int unsigned ROWS       = 250,
  parameter int unsigned COLS       = 250,
  parameter logic [7:0]  START_BYTE = 8'hFF,
  parameter logic [7:0]  STOP_BYTE  = 8'hFE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              byte_in,
  input  logic                    byte_valid,
  output logic                    row_we,
  output logic [$clog2(ROWS)-1:0] row_idx,
  output logic [COLS-1:0]         row_bits,
  output logic                    frame_done,
  output logic                    sync_err
);

  localparam int unsigned RW = $clog2(ROWS);

  typedef enum logic [1:0] {S_SYNC, S_ADDR, S_LEN, S_STOP} state_t;

  state_t        state;
  logic [RW-1:0] row;
  logic [7:0]    addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_SYNC;
      row        <= '0;
      addr       <= '0;
      row_we     <= 1'b0;
      row_idx    <= '0;
      row_bits   <= '0;
      frame_done <= 1'b0;
      sync_err   <= 1'b0;
    end else begin
      row_we     <= 1'b0;
      frame_done <= 1'b0;
      sync_err   <= 1'b0;
      if (byte_valid) begin
        unique case (state)
          S_SYNC: if (byte_in == START_BYTE) begin
            state <= S_ADDR;
            row   <= '0;
          end
          S_ADDR: begin
            addr  <= byte_in;
            state <= S_LEN;
          end
          S_LEN: begin
            row_we  <= 1'b1;
            row_idx <= row;
            for (int c = 0; c < COLS; c++)
              row_bits[c] <= (c >= int'(addr)) && (c < int'(addr) + int'(byte_in));
            if (row == RW'(ROWS - 1)) state <= S_STOP;
            else begin
              row   <= row + 1'b1;
              state <= S_ADDR;
            end
          end
          S_STOP: begin
            state <= S_SYNC;
            if (byte_in == STOP_BYTE) frame_done <= 1'b1;
            else                      sync_err   <= 1'b1;
          end
        endcase
      end
    end
  end

endmodule
