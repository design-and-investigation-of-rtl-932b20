// tb_mcsoc_full: the system at its default parameters (four compute cores,
// 115200 baud at a 50 MHz clock, LCD delays for 50 MHz) solving the 6-node
// example graph end to end. The host sends N = 6 and the adjacency matrix
// over RS232; the 36 result bytes must equal the printed shortest-path
// matrix; the timer must have counted the computation only (non-zero and far
// shorter than the whole run); and the LCD must then show that count in hex.
module tb_mcsoc_full;
  localparam int CPB = 434;
  logic clk = 0, reset = 1, rxd = 1, txd;
  logic lcd_e, lcd_rs, lcd_rw;
  logic [3:0] lcd_db;
  int checks = 0, failures = 0;
  always #10 clk = !clk;   // 50 MHz

  mcsoc_top dut (.clk, .reset, .rs232_rxd(rxd), .rs232_txd(txd),
                 .lcd_e, .lcd_rs, .lcd_rw, .lcd_db);
  serial_sink #(.CLKS_PER_BIT(CPB)) sink (.clk, .txd);
  lcd_model lcd (.e(lcd_e), .rs(lcd_rs), .rw(lcd_rw), .db(lcd_db));

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

  task automatic send_byte(input byte unsigned b);
    rxd = 0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1;
    repeat (CPB) @(posedge clk);
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int t, w;
    string want;
    repeat (10) @(posedge clk);
    reset = 0;
    send_byte(8'd6);
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) send_byte(G6[i][j]);
    while (sink.bytes.size() < 36) @(posedge clk);
    for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) begin
      byte unsigned got;
      got = sink.bytes.pop_front();
      checks++;
      if (got != R6[i][j]) begin
        failures++;
        $display("FAIL A[%0d][%0d] = %0d, expected %0d", i, j, got, R6[i][j]);
      end
    end
    t = int'(dut.u_timer.count);
    $display("computation took %0d clocks; result received after %0d clocks", t, cyc);
    checks++;
    if (t == 0 || t > cyc / 10) begin failures++; $display("FAIL timer count %0d", t); end
    want = $sformatf("%08X", t);
    want = want.toupper();
    w = 0;
    while (lcd.text(8) != want && w < 2_000_000) begin @(posedge clk); w++; end
    $display("LCD shows %s", lcd.text(8));
    checks++;
    if (lcd.text(8) != want) begin failures++; $display("FAIL LCD '%s' expected %s", lcd.text(8), want); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
