// uart_tx: serial transmitter of the input-output controller (8 data bits,
// no parity, 1 stop bit, line idle high).
//
// A one-clock `start` with `data` loads a 10-bit frame (start bit, data LSB
// first, stop bit) that is shifted out one bit every CLKS_PER_BIT clocks.
// `busy` rises in the clock after `start` and falls when the stop bit has
// been sent; `start` while busy is ignored. Frame format and baud rate are
// choices; the document only names the RS232 controller.
module uart_tx #(
  parameter int CLKS_PER_BIT = 434       // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       txd
);

  logic [9:0]  frame;
  logic [3:0]  nbits;
  logic [15:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        frame <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= 16'(CLKS_PER_BIT - 1);
        busy  <= 1'b1;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 16'd1;
    end else begin
      frame <= {1'b1, frame[9:1]};
      cnt   <= 16'(CLKS_PER_BIT - 1);
      nbits <= nbits - 4'd1;
      if (nbits == 4'd1) busy <= 1'b0;
    end
  end

  assign txd = busy ? frame[0] : 1'b1;

endmodule
