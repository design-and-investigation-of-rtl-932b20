// tb_mcsoc_top: end-to-end test of the multi-core system.
//
// Three systems with 1, 2 and 4 compute cores receive the same task over
// their serial inputs: N, then the N x N adjacency matrix row by row (0xFF =
// no edge). Each result matrix that comes back is compared with a reference
// Floyd-Warshall computed here (8-bit saturating sums). Tasks: the 6-node
// example graph, whose result is also compared with the printed result
// matrix, then a random 12-node graph and a random 20-node graph sent to the
// same running systems (so the cores return to the start of their program
// between tasks). For each task the timer count of the three systems gives
// the speed-up, which must come close to the number of cores for the larger
// graphs. Finally the LCD of each system must show the last timer value.
//
// Mechanisms counted: hint hand-shakes (compute core released / finished),
// cores spinning on a hint, shared-memory writes in each CLKdiv2 phase,
// writes through each of the four write ports, improved path written, saturated
// sum, timer start/stop, UART bytes both ways, LCD characters.
// Reduced parameters: 16 clocks per serial bit, LCD_WAIT = 1.
module tb_mcsoc_top;
  localparam int CPB = 16;
  localparam int NSYS = 3;
  localparam int NC [NSYS] = '{1, 2, 4};

  logic clk = 0, reset = 1;
  logic rxd = 1;
  logic txd [NSYS];
  logic lcd_e [NSYS], lcd_rs [NSYS], lcd_rw [NSYS];
  logic [3:0] lcd_db [NSYS];

  int checks = 0, failures = 0;

  always #5 clk = !clk;

  mcsoc_top #(.N_CORES(1), .CLKS_PER_BIT(CPB), .LCD_WAIT(1)) dut1 (
    .clk, .reset, .rs232_rxd(rxd), .rs232_txd(txd[0]),
    .lcd_e(lcd_e[0]), .lcd_rs(lcd_rs[0]), .lcd_rw(lcd_rw[0]), .lcd_db(lcd_db[0]));
  mcsoc_top #(.N_CORES(2), .CLKS_PER_BIT(CPB), .LCD_WAIT(1)) dut2 (
    .clk, .reset, .rs232_rxd(rxd), .rs232_txd(txd[1]),
    .lcd_e(lcd_e[1]), .lcd_rs(lcd_rs[1]), .lcd_rw(lcd_rw[1]), .lcd_db(lcd_db[1]));
  mcsoc_top #(.N_CORES(4), .CLKS_PER_BIT(CPB), .LCD_WAIT(1)) dut4 (
    .clk, .reset, .rs232_rxd(rxd), .rs232_txd(txd[2]),
    .lcd_e(lcd_e[2]), .lcd_rs(lcd_rs[2]), .lcd_rw(lcd_rw[2]), .lcd_db(lcd_db[2]));

  serial_sink #(.CLKS_PER_BIT(CPB)) sink1 (.clk, .txd(txd[0]));
  serial_sink #(.CLKS_PER_BIT(CPB)) sink2 (.clk, .txd(txd[1]));
  serial_sink #(.CLKS_PER_BIT(CPB)) sink4 (.clk, .txd(txd[2]));

  lcd_model lcd1 (.e(lcd_e[0]), .rs(lcd_rs[0]), .rw(lcd_rw[0]), .db(lcd_db[0]));
  lcd_model lcd2 (.e(lcd_e[1]), .rs(lcd_rs[1]), .rw(lcd_rw[1]), .db(lcd_db[1]));
  lcd_model lcd4 (.e(lcd_e[2]), .rs(lcd_rs[2]), .rw(lcd_rw[2]), .db(lcd_db[2]));

  // ------------------------------------------------------------ counters
  int n_hint_set = 0, n_hint_clr = 0, n_spin = 0, n_wr_ph0 = 0, n_wr_ph1 = 0;
  int n_port_wr [4] = '{0, 0, 0, 0};
  int n_improve = 0, n_sat = 0, n_tmr_start = 0, n_tmr_stop = 0;

  always @(posedge clk) if (!reset) begin
    // 4-core system
    for (int p = 0; p < 4; p++) if (dut4.mem_we[p]) n_port_wr[p]++;
    if (dut4.u_mem.we_for[0] || dut4.u_mem.we_for[1]) begin
      if (dut4.u_mem.clkdiv2) n_wr_ph1++; else n_wr_ph0++;
      for (int m = 0; m < 2; m++)
        if (dut4.u_mem.we_for[m] && dut4.u_mem.waddr_for[m][11:6] == 6'd63 &&
            dut4.u_mem.waddr_for[m][5:0] >= 2) begin
          if (dut4.u_mem.din_for[m] == 1) n_hint_set++; else n_hint_clr++;
        end
    end
    if (dut4.u_timer.ctrl_we && dut4.u_timer.ctrl[0] && !dut4.u_timer.running) n_tmr_start++;
    if (dut4.u_timer.ctrl_we && !dut4.u_timer.ctrl[0] && dut4.u_timer.running) n_tmr_stop++;
  end

  // cores waiting on a hint (worker reading its hint word as 0) and
  // relaxation events, watched on the processors of the 4-core system
  always @(posedge clk) if (!reset) begin
    if (dut4.g_core[1].g_on.u_io.read_strobe && dut4.g_core[1].g_on.u_io.port_id == 8'h02 &&
        dut4.g_core[1].g_on.u_io.mem_raddr[11:6] == 6'd63 &&
        dut4.g_core[1].g_on.u_io.mem_raddr[5:0] == 6'd2 &&
        dut4.g_core[1].g_on.u_io.in_port == 8'h00) n_spin++;
  end

  // improvement writes and saturations on Core1 of the 1-core system
  always @(posedge clk) if (!reset) begin
    if (dut1.g_core[0].g_on.u_io.write_strobe && dut1.g_core[0].g_on.u_io.port_id == 8'h02 &&
        dut1.u_timer.running) n_improve++;
    if (dut1.g_core[0].g_on.u_core.u_cpu.t1 &&
        dut1.g_core[0].g_on.u_core.u_cpu.op == 6'h19 &&
        dut1.g_core[0].g_on.u_core.u_cpu.sx == 4'd7 &&
        dut1.g_core[0].g_on.u_core.u_cpu.sum[8]) n_sat++;
  end

  // ------------------------------------------------------------ host side
  task automatic send_byte(input byte unsigned b);
    rxd = 0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1;
    repeat (CPB) @(posedge clk);
  endtask

  function automatic byte unsigned sat_add(byte unsigned x, byte unsigned y);
    int s = int'(x) + int'(y);
    return (s > 255) ? 8'hFF : 8'(s);
  endfunction

  byte unsigned A   [64][64];
  byte unsigned REF [64][64];

  task automatic reference(int n);
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) REF[i][j] = A[i][j];
    for (int k = 0; k < n; k++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (sat_add(REF[i][k], REF[k][j]) < REF[i][j]) REF[i][j] = sat_add(REF[i][k], REF[k][j]);
  endtask

  function automatic int timer_of(int s);
    case (s)
      0: return int'(dut1.u_timer.count);
      1: return int'(dut2.u_timer.count);
      default: return int'(dut4.u_timer.count);
    endcase
  endfunction

  function automatic int sink_size(int s);
    case (s)
      0: return sink1.bytes.size();
      1: return sink2.bytes.size();
      default: return sink4.bytes.size();
    endcase
  endfunction

  function automatic byte unsigned sink_pop(int s);
    case (s)
      0: return sink1.bytes.pop_front();
      1: return sink2.bytes.pop_front();
      default: return sink4.bytes.pop_front();
    endcase
  endfunction

  int t [NSYS];
  real sp2, sp4;

  task automatic run_task(int n, string name, real min_sp2, real min_sp4);
    int bad;
    reference(n);
    send_byte(8'(n));
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) send_byte(A[i][j]);
    for (int s = 0; s < NSYS; s++) begin
      bad = 0;
      while (sink_size(s) < n * n) @(posedge clk);
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          byte unsigned got = sink_pop(s);
          checks++;
          if (got != REF[i][j]) begin
            failures++;
            if (bad++ < 5)
              $display("FAIL %s sys%0d A[%0d][%0d]=%0d expected %0d", name, NC[s], i, j, got, REF[i][j]);
          end
        end
      t[s] = timer_of(s);
    end
    sp2 = real'(t[0]) / real'(t[1]);
    sp4 = real'(t[0]) / real'(t[2]);
    $display("%s: N=%0d cycles 1/2/4 cores = %0d / %0d / %0d, speed-up %.3f / %.3f",
             name, n, t[0], t[1], t[2], sp2, sp4);
    checks++;
    if (!(t[0] > t[1] && t[1] > t[2] && sp2 >= min_sp2 && sp4 >= min_sp4)) begin
      failures++;
      $display("FAIL %s: speed-up below %.2f / %.2f", name, min_sp2, min_sp4);
    end
  endtask

  // printed example graph and its printed result (255 = no path)
  localparam byte unsigned G6 [6][6] = '{
    '{  0,   2,   5, 255, 255, 255},
    '{255,   0,   7,   1, 255,   8},
    '{255, 255,   0,   4, 255, 255},
    '{255, 255, 255,   0,   3, 255},
    '{255, 255,   2, 255,   0,   3},
    '{255,   5, 255,   2,   4,   0}};
  localparam byte unsigned R6 [6][6] = '{
    '{  0,   2,   5,   3,   6,   9},
    '{255,   0,   6,   1,   4,   7},
    '{255,  15,   0,   4,   7,  10},
    '{255,  11,   5,   0,   3,   6},
    '{255,   8,   2,   5,   0,   3},
    '{255,   5,   6,   2,   4,   0}};

  task automatic random_graph(int n, int density);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i == j) A[i][j] = 0;
        else if (($urandom % 100) < density) A[i][j] = 8'(1 + $urandom % 60);
        else A[i][j] = 8'hFF;
  endtask

  function automatic string hex8(int v);
    string h;
    h = $sformatf("%08X", v);
    return h.toupper();
  endfunction

  initial begin
    repeat (10) @(posedge clk);
    reset = 0;
    repeat (50) @(posedge clk);

    // example graph
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) A[i][j] = G6[i][j];
    reference(6);
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
      checks++;
      if (REF[i][j] != R6[i][j]) begin
        failures++;
        $display("FAIL reference model disagrees with printed result at %0d,%0d", i, j);
      end
    end
    run_task(6, "example", 1.0, 1.0);

    random_graph(12, 25);
    run_task(12, "random12", 1.6, 2.6);

    random_graph(20, 15);
    run_task(20, "random20", 1.85, 3.3);

    // the LCD of every system must come to show its final timer value
    begin
      int waited = 0;
      while (waited < 400000 && !(lcd1.text(8) == hex8(t[0]) && lcd2.text(8) == hex8(t[1]) &&
                                  lcd4.text(8) == hex8(t[2]))) begin
        @(posedge clk);
        waited++;
      end
      checks += 3;
      if (lcd1.text(8) != hex8(t[0])) begin failures++; $display("FAIL lcd1 '%s' vs %s", lcd1.text(8), hex8(t[0])); end
      if (lcd2.text(8) != hex8(t[1])) begin failures++; $display("FAIL lcd2 '%s' vs %s", lcd2.text(8), hex8(t[1])); end
      if (lcd4.text(8) != hex8(t[2])) begin failures++; $display("FAIL lcd4 '%s' vs %s", lcd4.text(8), hex8(t[2])); end
      $display("LCD shows %s / %s / %s", lcd1.text(8), lcd2.text(8), lcd4.text(8));
    end

    $display("mechanisms: hint_set=%0d hint_clear=%0d spin=%0d wr_phase0=%0d wr_phase1=%0d port_writes=%p improve=%0d saturate=%0d timer_start=%0d timer_stop=%0d lcd_chars=%0d",
             n_hint_set, n_hint_clr, n_spin, n_wr_ph0, n_wr_ph1, n_port_wr, n_improve, n_sat,
             n_tmr_start, n_tmr_stop, lcd4.n_chars);
    checks += 10;
    if (n_hint_set == 0) begin failures++; $display("FAIL no hint set"); end
    if (n_hint_clr == 0) begin failures++; $display("FAIL no hint cleared"); end
    if (n_spin == 0)     begin failures++; $display("FAIL no core waited on a hint"); end
    if (n_wr_ph0 == 0)   begin failures++; $display("FAIL no write in phase 0"); end
    if (n_wr_ph1 == 0)   begin failures++; $display("FAIL no write in phase 1"); end
    if (n_port_wr[0] == 0 || n_port_wr[1] == 0 || n_port_wr[2] == 0 || n_port_wr[3] == 0) begin
      failures++; $display("FAIL a shared-memory write port was never used");
    end
    if (n_improve == 0)  begin failures++; $display("FAIL no path improved"); end
    if (n_sat == 0)      begin failures++; $display("FAIL no saturated sum"); end
    if (n_tmr_start != 3 || n_tmr_stop != 3) begin failures++; $display("FAIL timer start/stop count"); end
    if (lcd4.n_chars == 0) begin failures++; $display("FAIL no LCD characters"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
