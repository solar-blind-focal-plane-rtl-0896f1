// Serial byte receiver for the link that carries the compressed images.
//
// Standard asynchronous 8N1 frame, least significant bit first: the line idles
// high, a low start bit is followed by eight data bits and a high stop bit. The
// input is passed through two flip-flops, the start bit is checked at its middle,
// and every data bit is sampled at the middle of its bit time, DIV = CLK_HZ/BAUD
// clock cycles after the previous sample. A byte is presented on `data` with a
// one-cycle `valid` pulse at the middle of the stop bit; `frame_err` pulses
// instead when the stop bit is low.
//
// The link rate (921600 bit/s) and the 100 MHz clock are the design's figures;
// the 8N1 framing and the mid-bit sampling are this design's own choice.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 921_600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned DIV   = (CLK_HZ + BAUD/2) / BAUD;
  localparam int unsigned CNT_W = $clog2(DIV + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  state_t           state;
  logic [1:0]       sync;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;

  wire rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rx};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx_s) begin
          state <= S_START;
          cnt   <= CNT_W'(DIV / 2 - 1);
        end
        S_START: if (cnt == 0) begin
          if (!rx_s) begin
            state   <= S_DATA;
            cnt     <= CNT_W'(DIV - 1);
            bit_idx <= '0;
          end else begin
            state <= S_IDLE;          // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          shreg <= {rx_s, shreg[7:1]};
          cnt   <= CNT_W'(DIV - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          state <= S_IDLE;
          if (rx_s) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end

endmodule
