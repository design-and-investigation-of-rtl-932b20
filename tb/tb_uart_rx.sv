// tb_uart_rx: self-checking test of the serial receiver.
// Random bytes are sent as 8N1 frames at CLKS_PER_BIT = 20 with random idle
// gaps; each must appear on `data` with `valid` within one bit time after the
// stop bit and be cleared by `pop`. A frame with a bad stop bit must be
// dropped, a short glitch must not start a frame, and two bytes without a
// pop in between must raise `overrun`.
module tb_uart_rx;
  localparam int CPB = 20;
  logic clk = 0, reset = 1, rxd = 1, pop = 0;
  logic [7:0] data;
  logic valid, overrun;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic send(input logic [7:0] b, input logic stopbit);
    rxd = 0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stopbit;
    repeat (CPB) @(posedge clk);
    rxd = 1;
  endtask

  task automatic expect_byte(input logic [7:0] b);
    int w;
    w = 0;
    while (!valid && w < CPB) begin @(posedge clk); w++; end
    checks++;
    if (!valid || data != b) begin
      failures++;
      $display("FAIL expected %02x valid=%0d data=%02x", b, valid, data);
    end
    @(negedge clk) pop = 1;
    @(negedge clk) pop = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid not cleared by pop"); end
  endtask

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    reset = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      b = 8'($urandom);
      send(b, 1'b1);
      expect_byte(b);
      repeat ($urandom % 40) @(posedge clk);
    end
    // bad stop bit: no byte
    send(8'h5A, 1'b0);
    repeat (3 * CPB) @(posedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL framing error accepted"); end
    // glitch shorter than half a bit
    rxd = 0; repeat (CPB / 4) @(posedge clk); rxd = 1;
    repeat (12 * CPB) @(posedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL glitch accepted"); end
    // overrun
    checks++;
    if (overrun) begin failures++; $display("FAIL early overrun"); end
    send(8'h01, 1'b1); repeat (CPB) @(posedge clk);
    send(8'h02, 1'b1); repeat (CPB) @(posedge clk);
    checks += 2;
    if (!overrun) begin failures++; $display("FAIL no overrun"); end
    if (data != 8'h02) begin failures++; $display("FAIL overrun data %02x", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
