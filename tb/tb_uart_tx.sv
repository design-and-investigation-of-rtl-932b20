// tb_uart_tx: self-checking test of the serial transmitter.
// Random bytes are started one after another as soon as `busy` falls; the
// line is sampled in the middle of each bit by an independent receiver here,
// which checks start bit, data (LSB first), stop bit and the bit length of
// CLKS_PER_BIT = 20 clocks. A start while busy must be ignored, and a whole
// frame must take 10 bit times.
module tb_uart_tx;
  localparam int CPB = 20;
  logic clk = 0, reset = 1, start = 0;
  logic [7:0] data = 0;
  logic busy, txd;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  byte unsigned sent [$];
  int nrx = 0;

  // receiver
  initial begin
    logic [7:0] b;
    int t0;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (txd != 0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      checks += 2;
      if (txd != 1) begin failures++; $display("FAIL stop bit"); end
      if (sent.size() == 0 || b != sent.pop_front()) begin failures++; $display("FAIL data %02x", b); end
      nrx++;
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    int t_start;
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (txd != 1 || busy) begin failures++; $display("FAIL idle line"); end
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      data = 8'($urandom);
      start = 1;
      sent.push_back(data);
      t_start = cyc;
      @(negedge clk);
      start = 0;
      if (n == 50) begin
        // ignored while busy
        repeat (5) @(negedge clk);
        data = 8'hFF; start = 1;
        @(negedge clk) start = 0;
      end
      while (busy) @(negedge clk);
      checks++;
      if (cyc - t_start != 10 * CPB + 1) begin
        failures++;
        $display("FAIL frame took %0d clocks", cyc - t_start);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (nrx != 100) begin failures++; $display("FAIL received %0d frames", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
