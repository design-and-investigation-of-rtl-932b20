// core_io: the port decoder that connects one core's PORT_ID / IN_PORT /
// OUT_PORT / strobe interface to the system devices.
//
// Every core has the same decoder; the top ties off the devices a core does
// not use (only Core1 reaches the UART and the timer control, only Core5 the
// LCD and the timer snapshot). Port numbers are listed in mcsoc_pkg.
//
// Shared memory: OUTPUT to P_MEM_ROW / P_MEM_COL sets the row and column
// registers; the memory address is {row[5:0], col[5:0]}. INPUT from
// P_MEM_DATA returns the memory word at that address (the address is stable
// for the whole INPUT instruction, so the shared memory has served it by the
// end of the instruction). OUTPUT to P_MEM_DATA latches address and data and
// holds the write request for the next two clocks, so that the
// time-multiplexed memory serves it in one of them. A read of the word
// written by the immediately preceding instruction may return the old value.
//
// UART: INPUT from P_UART_DAT pops the received byte; OUTPUT to it starts a
// transmission. Timer: OUTPUT to P_TMR_CTRL gives a control write and, with
// bit2 set, a snapshot request. LCD: OUTPUT to P_LCD loads the LCD pin
// register. The port map and the row/column addressing are this design's
// choices; the document only shows which core connects to which device.
module core_io
  import mcsoc_pkg::*;
#(
  parameter int AW = MEM_AW
) (
  input  logic          clk,
  input  logic          reset,
  // processor side
  input  logic [7:0]    port_id,
  input  logic [7:0]    out_port,
  input  logic          write_strobe,
  input  logic          read_strobe,
  output logic [7:0]    in_port,
  // constants
  input  logic [7:0]    core_id,
  input  logic [7:0]    ncores,
  // shared memory port
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [7:0]    mem_din,
  output logic [AW-1:0] mem_raddr,
  input  logic [7:0]    mem_dout,
  // UART
  input  logic [7:0]    rx_data,
  input  logic          rx_valid,
  output logic          rx_pop,
  output logic [7:0]    tx_data,
  output logic          tx_start,
  input  logic          tx_busy,
  // timer
  output logic          tmr_we,
  output logic [1:0]    tmr_ctrl,
  output logic          tmr_snap,
  input  logic [31:0]   tmr_value,
  // LCD pins {DB7..DB4, 0, RW, RS, E}
  output logic [7:0]    lcd
);

  logic [7:0] row, col;
  logic [1:0] wr_hold;

  always_ff @(posedge clk) begin
    if (reset) begin
      row       <= '0;
      col       <= '0;
      wr_hold   <= '0;
      mem_waddr <= '0;
      mem_din   <= '0;
      lcd       <= '0;
    end else begin
      if (wr_hold != 0) wr_hold <= wr_hold - 2'd1;
      if (write_strobe) begin
        unique case (port_id)
          P_MEM_ROW:  row <= out_port;
          P_MEM_COL:  col <= out_port;
          P_MEM_DATA: begin
            mem_waddr <= AW'({row[5:0], col[5:0]});
            mem_din   <= out_port;
            wr_hold   <= 2'd2;
          end
          P_LCD:      lcd <= out_port;
          default: ;
        endcase
      end
    end
  end

  assign mem_we    = (wr_hold != 0);
  assign mem_raddr = AW'({row[5:0], col[5:0]});

  assign rx_pop   = read_strobe  && (port_id == P_UART_DAT);
  assign tx_start = write_strobe && (port_id == P_UART_DAT);
  assign tx_data  = out_port;
  assign tmr_we   = write_strobe && (port_id == P_TMR_CTRL);
  assign tmr_ctrl = out_port[1:0];
  assign tmr_snap = tmr_we && out_port[2];

  always_comb begin
    unique case (port_id)
      P_MEM_DATA: in_port = mem_dout;
      P_CORE_ID:  in_port = core_id;
      P_NCORES:   in_port = ncores;
      P_UART_ST:  in_port = {6'd0, tx_busy, rx_valid};
      P_UART_DAT: in_port = rx_data;
      8'h08:      in_port = tmr_value[7:0];
      8'h09:      in_port = tmr_value[15:8];
      8'h0A:      in_port = tmr_value[23:16];
      8'h0B:      in_port = tmr_value[31:24];
      default:    in_port = 8'h00;
    endcase
  end

endmodule
