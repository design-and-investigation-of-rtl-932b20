// uart_rx: serial receiver of the input-output controller (8 data bits, no
// parity, 1 stop bit, line idle high).
//
// The line is synchronised with two flip-flops. A falling edge starts a
// frame; the start bit is checked at its middle and each data bit is sampled
// CLKS_PER_BIT clocks later, LSB first. A byte with a valid stop bit is
// placed in a one-byte holding register and `valid` is set until the core
// reads it (`pop`). A byte arriving while the register is still full
// replaces it and sets `overrun`. Frame format, baud rate and the one-byte
// buffer are choices; the document only names the RS232 controller.
module uart_rx #(
  parameter int CLKS_PER_BIT = 434       // 50 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  input  logic       pop,
  output logic       overrun
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e      state;
  logic [2:0]  sync;
  logic [15:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync    <= '1;
      state   <= IDLE;
      cnt     <= '0;
      bitn    <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
      overrun <= 1'b0;
    end else begin
      sync <= {sync[1:0], rxd};
      if (pop) valid <= 1'b0;
      unique case (state)
        IDLE: if (!sync[2]) begin
          state <= START;
          cnt   <= 16'(CLKS_PER_BIT / 2);
        end
        START: if (cnt == 0) begin
          if (!sync[2]) begin
            state <= DATA;
            cnt   <= 16'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else state <= IDLE;
        end else cnt <= cnt - 16'd1;
        DATA: if (cnt == 0) begin
          shreg <= {sync[2], shreg[7:1]};
          cnt   <= 16'(CLKS_PER_BIT - 1);
          bitn  <= bitn + 3'd1;
          if (bitn == 3'd7) state <= STOP;
        end else cnt <= cnt - 16'd1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (sync[2]) begin
            data  <= shreg;
            valid <= 1'b1;
            if (valid && !pop) overrun <= 1'b1;
          end
        end else cnt <= cnt - 16'd1;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
