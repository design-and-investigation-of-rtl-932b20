// serial_sink: testbench receiver for the system's RS232 output (8N1,
// CLKS_PER_BIT clocks per bit). Each received byte is pushed to `bytes`.
module serial_sink #(
  parameter int CLKS_PER_BIT = 434
) (
  input logic clk,
  input logic txd
);
  byte unsigned bytes [$];

  initial begin
    byte unsigned b;
    forever begin
      @(negedge txd);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS_PER_BIT) @(posedge clk);
        b[i] = txd;
      end
      repeat (CLKS_PER_BIT) @(posedge clk);
      bytes.push_back(b);
    end
  end
endmodule
