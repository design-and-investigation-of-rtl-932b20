// mcsoc_top: the multi-core system on chip.
//
// Up to four compute cores (Core1..Core4) run the parallel Floyd-Warshall
// program against one shared data memory; a fifth core (Core5) shows the
// timer on the board's character LCD. Core1 also talks to the host computer
// through the RS232 input-output controller (uart_rx / uart_tx) and starts
// and stops the clock-pulse timer around the pure computation time.
//
// Each core reaches its devices through a core_io port decoder. The shared
// memory has four write and four read ports, one pair per compute core, and
// serves two cores per clock (see shared_mem). N_CORES sets how many compute
// cores are built (1, 2 or 4, the configurations the document measures); the
// memory ports of absent cores are idle.
//
// The board clock goes straight to the logic: the document's clock generator
// (a vendor DCM) has no stated output frequency, so it is left out. The LCD
// pins follow the 4-bit interface of the usual board display.
module mcsoc_top
  import mcsoc_pkg::*;
#(
  parameter int N_CORES      = 4,     // compute cores: 1, 2 or 4
  parameter int CLKS_PER_BIT = 434,   // 50 MHz / 115200 baud
  parameter int LCD_WAIT     = 2      // LCD delay units, see fw_prog_pkg
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       rs232_rxd,
  output logic       rs232_txd,
  output logic       lcd_e,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic [3:0] lcd_db
);

  // per-core port interface
  logic [7:0] port_id  [5];
  logic [7:0] out_port [5];
  logic [7:0] in_port  [5];
  logic       wr_stb   [5];
  logic       rd_stb   [5];

  // shared memory
  logic [3:0]        mem_we;
  logic [MEM_AW-1:0] mem_waddr [4];
  logic [7:0]        mem_din   [4];
  logic [MEM_AW-1:0] mem_raddr [4];
  logic [7:0]        mem_dout  [4];
  logic              clkdiv2;

  // devices
  logic [7:0]  rx_data, tx_data;
  logic        rx_valid, rx_pop, rx_overrun, tx_start, tx_busy;
  logic        tmr_we, tmr_snap, tmr_running;
  logic [1:0]  tmr_ctrl;
  logic [31:0] tmr_count, tmr_snapshot;
  logic [7:0]  lcd_pins;

  // per-core device outputs, only some of them used
  logic        c_mem_we  [5];
  logic [MEM_AW-1:0] c_waddr [5];
  logic [MEM_AW-1:0] c_raddr [5];
  logic [7:0]  c_din     [5];
  logic        c_rx_pop  [5];
  logic [7:0]  c_tx_data [5];
  logic        c_tx_start[5];
  logic        c_tmr_we  [5];
  logic [1:0]  c_tmr_ctrl[5];
  logic        c_tmr_snap[5];
  logic [7:0]  c_lcd     [5];
  logic        c_irq_ack [5];

  for (genvar c = 0; c < 5; c++) begin : g_core
    localparam bit PRESENT = (c < N_CORES) || (c == 4);
    localparam bit IS_C1   = (c == 0);
    localparam bit IS_C5   = (c == 4);
    if (PRESENT) begin : g_on
      mc_core #(.PROG(IS_C5 ? 1 : 0), .LCD_WAIT(LCD_WAIT)) u_core (
        .clk, .reset,
        .port_id(port_id[c]), .out_port(out_port[c]),
        .write_strobe(wr_stb[c]), .read_strobe(rd_stb[c]),
        .in_port(in_port[c]), .interrupt(1'b0), .interrupt_ack(c_irq_ack[c])
      );

      core_io u_io (
        .clk, .reset,
        .port_id(port_id[c]), .out_port(out_port[c]),
        .write_strobe(wr_stb[c]), .read_strobe(rd_stb[c]),
        .in_port(in_port[c]),
        .core_id(8'(c)), .ncores(8'(N_CORES)),
        .mem_we(c_mem_we[c]), .mem_waddr(c_waddr[c]), .mem_din(c_din[c]),
        .mem_raddr(c_raddr[c]), .mem_dout(IS_C5 ? 8'h00 : mem_dout[c % 4]),
        .rx_data(IS_C1 ? rx_data : 8'h00), .rx_valid(IS_C1 ? rx_valid : 1'b0),
        .rx_pop(c_rx_pop[c]),
        .tx_data(c_tx_data[c]), .tx_start(c_tx_start[c]),
        .tx_busy(IS_C1 ? tx_busy : 1'b0),
        .tmr_we(c_tmr_we[c]), .tmr_ctrl(c_tmr_ctrl[c]), .tmr_snap(c_tmr_snap[c]),
        .tmr_value(IS_C5 ? tmr_snapshot : 32'd0),
        .lcd(c_lcd[c])
      );
    end else begin : g_off
      assign port_id[c]    = '0;
      assign out_port[c]   = '0;
      assign wr_stb[c]     = 1'b0;
      assign rd_stb[c]     = 1'b0;
      assign in_port[c]    = '0;
      assign c_mem_we[c]   = 1'b0;
      assign c_waddr[c]    = '0;
      assign c_raddr[c]    = '0;
      assign c_din[c]      = '0;
      assign c_rx_pop[c]   = 1'b0;
      assign c_tx_data[c]  = '0;
      assign c_tx_start[c] = 1'b0;
      assign c_tmr_we[c]   = 1'b0;
      assign c_tmr_ctrl[c] = '0;
      assign c_tmr_snap[c] = 1'b0;
      assign c_lcd[c]      = '0;
      assign c_irq_ack[c]  = 1'b0;
    end
  end

  for (genvar p = 0; p < 4; p++) begin : g_memport
    assign mem_we[p]    = c_mem_we[p];
    assign mem_waddr[p] = c_waddr[p];
    assign mem_din[p]   = c_din[p];
    assign mem_raddr[p] = c_raddr[p];
  end

  shared_mem #(.AW(MEM_AW), .DW(8)) u_mem (
    .clk, .reset, .we(mem_we), .waddr(mem_waddr), .din(mem_din),
    .raddr(mem_raddr), .dout(mem_dout), .clkdiv2
  );

  // input-output controller, driven by Core1
  assign rx_pop   = c_rx_pop[0];
  assign tx_data  = c_tx_data[0];
  assign tx_start = c_tx_start[0];

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .reset, .rxd(rs232_rxd), .data(rx_data), .valid(rx_valid),
    .pop(rx_pop), .overrun(rx_overrun)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .reset, .data(tx_data), .start(tx_start), .busy(tx_busy),
    .txd(rs232_txd)
  );

  // clock-pulse timer: controlled by Core1, read by Core5
  assign tmr_we   = c_tmr_we[0];
  assign tmr_ctrl = c_tmr_ctrl[0];
  assign tmr_snap = c_tmr_snap[4];

  cycle_timer #(.WIDTH(32)) u_timer (
    .clk, .reset, .ctrl_we(tmr_we), .ctrl(tmr_ctrl), .snap(tmr_snap),
    .count(tmr_count), .snapshot(tmr_snapshot), .running(tmr_running)
  );

  // LCD, driven by Core5
  assign lcd_pins = c_lcd[4];
  assign lcd_e    = lcd_pins[0];
  assign lcd_rs   = lcd_pins[1];
  assign lcd_rw   = lcd_pins[2];
  assign lcd_db   = lcd_pins[7:4];

endmodule
