// tb_core_io: self-checking test of the per-core port decoder.
// Processor port cycles are generated as the core makes them (PORT_ID and
// OUT_PORT for two clocks, the strobe in the second). Checked: the row and
// column registers form the read address; a data write latches address and
// data and holds WE for exactly two clocks; IN_PORT returns memory data,
// core number, core count, UART status and data and the four timer bytes;
// a UART data read pops and a write starts the transmitter; timer control
// and snapshot writes; the LCD register.
module tb_core_io;
  import mcsoc_pkg::*;
  logic clk = 0, reset = 1;
  logic [7:0] port_id = 0, out_port = 0, in_port;
  logic write_strobe = 0, read_strobe = 0;
  logic [7:0] core_id = 8'd2, ncores = 8'd4;
  logic mem_we;
  logic [11:0] mem_waddr, mem_raddr;
  logic [7:0] mem_din, mem_dout;
  logic [7:0] rx_data = 8'h3C;
  logic rx_valid = 1, rx_pop, tx_start, tx_busy = 0;
  logic [7:0] tx_data;
  logic tmr_we, tmr_snap;
  logic [1:0] tmr_ctrl;
  logic [31:0] tmr_value = 32'hA1B2C3D4;
  logic [7:0] lcd;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  core_io dut (.*);

  assign mem_dout = mem_raddr[7:0] ^ {2'b0, mem_raddr[11:6]};

  int n_we = 0, n_pop = 0, n_txs = 0, n_tmr = 0, n_snap = 0;
  always @(posedge clk) if (!reset) begin
    if (mem_we) n_we++;
    if (rx_pop) n_pop++;
    if (tx_start) n_txs++;
    if (tmr_we) n_tmr++;
    if (tmr_snap) n_snap++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic out_cycle(input logic [7:0] p, input logic [7:0] v);
    @(negedge clk); port_id = p; out_port = v;
    @(negedge clk); write_strobe = 1;
    @(negedge clk); write_strobe = 0;
  endtask

  task automatic in_cycle(input logic [7:0] p, output logic [7:0] v);
    @(negedge clk); port_id = p;
    @(negedge clk); read_strobe = 1;
    v = in_port;
    @(negedge clk); read_strobe = 0;
  endtask

  initial begin
    logic [7:0] v;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int n = 0; n < 50; n++) begin
      logic [5:0] r, c;
      logic [7:0] d;
      r = 6'($urandom); c = 6'($urandom); d = 8'($urandom);
      out_cycle(P_MEM_ROW, {2'b0, r});
      out_cycle(P_MEM_COL, {2'b0, c});
      check(mem_raddr == {r, c}, "read address");
      in_cycle(P_MEM_DATA, v);
      check(v == ({2'b0, c} ^ {2'b0, r} ^ 8'(r << 6)), "memory read data");
      n_we = 0;
      out_cycle(P_MEM_DATA, d);
      check(mem_waddr == {r, c} && mem_din == d, "write address/data");
      @(negedge clk); @(negedge clk);
      check(n_we == 2, $sformatf("write held %0d clocks", n_we));
    end
    n_we = 0;
    in_cycle(P_CORE_ID, v);  check(v == 8'd2, "core id");
    in_cycle(P_NCORES, v);   check(v == 8'd4, "core count");
    tx_busy = 1;
    in_cycle(P_UART_ST, v);  check(v == 8'h03, "uart status");
    tx_busy = 0; rx_valid = 0;
    in_cycle(P_UART_ST, v);  check(v == 8'h00, "uart status idle");
    in_cycle(P_UART_DAT, v); check(v == 8'h3C && n_pop == 1, "uart rx read and pop");
    out_cycle(P_UART_DAT, 8'h77);
    check(n_txs == 1, "uart tx start");
    in_cycle(8'h08, v); check(v == 8'hD4, "timer byte 0");
    in_cycle(8'h09, v); check(v == 8'hC3, "timer byte 1");
    in_cycle(8'h0A, v); check(v == 8'hB2, "timer byte 2");
    in_cycle(8'h0B, v); check(v == 8'hA1, "timer byte 3");
    out_cycle(P_TMR_CTRL, 8'h03);
    check(n_tmr == 1 && n_snap == 0, "timer control");
    out_cycle(P_TMR_CTRL, 8'h04);
    check(n_tmr == 2 && n_snap == 1, "timer snapshot");
    out_cycle(P_LCD, 8'hA5);
    check(lcd == 8'hA5, "lcd register");
    in_cycle(8'h55, v); check(v == 8'h00, "unused port reads 0");
    check(n_we == 0, "no stray memory writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
