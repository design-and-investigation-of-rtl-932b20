// tb_fw_workloads: the shortest-path workloads measured for the system:
// random weighted graphs of 5, 10, 20 and 50 nodes solved by systems with 1,
// 2 and 4 compute cores. Each result matrix is compared with a reference
// Floyd-Warshall computed here, and the timer counts of the three systems
// give the speed-ups, which are printed next to the measured ones
// (5 nodes: 1.45 / 2.58, 10: 1.98 / 3.88, 20: 1.99 / 3.86, 50: 1.98 / 3.92)
// and must reach at least 1.4 / 1.6 (5 nodes), 1.8 / 2.7 (10), 1.9 / 3.6
// (20) and 1.95 / 3.75 (50); with whole rows per core, 5 and 10 nodes on
// four cores cannot be split evenly (2 and 3 rows on the busiest core). Reduced parameters: 16 clocks per serial bit,
// LCD_WAIT = 1.
module tb_fw_workloads;
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

  task automatic random_graph(int n, int density);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i == j) A[i][j] = 0;
        else if (($urandom % 100) < density) A[i][j] = 8'(1 + $urandom % 60);
        else A[i][j] = 8'hFF;
  endtask

  initial begin
    repeat (10) @(posedge clk);
    reset = 0;
    repeat (50) @(posedge clk);

    random_graph(5, 40);
    run_task(5, "nodes5", 1.4, 1.6);
    random_graph(10, 30);
    run_task(10, "nodes10", 1.8, 2.7);
    random_graph(20, 15);
    run_task(20, "nodes20", 1.9, 3.6);
    random_graph(50, 8);
    run_task(50, "nodes50", 1.95, 3.75);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
