// tb_shared_mem: self-checking test of the four-port shared memory.
//
// Traffic is applied in two-clock slots aligned to CLKdiv2, the way the
// processors use the memory: during a slot each port either holds a write
// request (WE, address, data) or a read address. At the end of the slot
// every read port must show the contents the memory had at the start of the
// slot (read addresses avoid the words written in the same slot), and the
// writes are applied to a reference array with the higher port winning a
// clash. A 16-word memory makes clashes frequent; directed slots check that
// port 2 beats port 1 and port 4 beats port 3 on the same word, and that all
// four ports write in one slot.
module tb_shared_mem;
  localparam int AW = 4;
  logic clk = 0, reset = 1;
  logic [3:0]    we;
  logic [AW-1:0] waddr [4];
  logic [7:0]    din   [4];
  logic [AW-1:0] raddr [4];
  logic [7:0]    dout  [4];
  logic          clkdiv2;

  int checks = 0, failures = 0;
  always #5 clk = !clk;

  shared_mem #(.AW(AW), .DW(8)) dut (.*);

  logic [7:0] ref_mem [2**AW];
  int n_clash = 0, n_all4 = 0;

  task automatic slot(input logic [3:0] w, input logic [AW-1:0] wa [4],
                      input logic [7:0] d [4], input logic [AW-1:0] ra [4]);
    logic [7:0] exp [4];
    we = w;
    for (int p = 0; p < 4; p++) begin
      waddr[p] = wa[p]; din[p] = d[p]; raddr[p] = ra[p];
      exp[p] = ref_mem[ra[p]];
    end
    @(posedge clk);
    #1;
    @(negedge clk);
    for (int p = 0; p < 4; p++) if (!w[p]) begin
      checks++;
      if (dout[p] != exp[p]) begin
        failures++;
        $display("FAIL port %0d read %0h at %0h expected %0h", p + 1, dout[p], ra[p], exp[p]);
      end
    end
    @(posedge clk);
    #1;
    for (int p = 0; p < 4; p++) if (w[p]) ref_mem[wa[p]] = d[p];
  endtask

  initial begin
    logic [3:0] w;
    logic [AW-1:0] wa [4], ra [4];
    logic [7:0] d [4];
    we = '0;
    for (int p = 0; p < 4; p++) begin waddr[p] = '0; din[p] = '0; raddr[p] = '0; end
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    // align: slots start when clkdiv2 is 0 after the edge
    @(negedge clk);
    while (clkdiv2 != 1'b1) @(negedge clk);
    @(posedge clk); #1;
    // directed: ports 1,2 and 3,4 on the same word, all four writing
    wa = '{4'd3, 4'd3, 4'd5, 4'd5}; d = '{8'h11, 8'h22, 8'h33, 8'h44};
    ra = '{4'd0, 4'd0, 4'd0, 4'd0};
    slot(4'b1111, wa, d, ra);
    n_all4++;
    wa = '{4'd0, 4'd0, 4'd0, 4'd0}; d = '{8'h0, 8'h0, 8'h0, 8'h0};
    ra = '{4'd3, 4'd5, 4'd3, 4'd5};
    slot(4'b0000, wa, d, ra);
    checks += 2;
    if (dout[0] != 8'h22) begin failures++; $display("FAIL port 2 should win word 3"); end
    if (dout[1] != 8'h44) begin failures++; $display("FAIL port 4 should win word 5"); end
    // random traffic
    for (int s = 0; s < 3000; s++) begin
      for (int p = 0; p < 4; p++) begin
        w[p] = ($urandom % 2) == 0;
        wa[p] = AW'($urandom % 6);
        d[p] = 8'($urandom);
      end
      for (int p = 0; p < 4; p++) begin
        int tries;
        tries = 0;
        do begin
          ra[p] = AW'($urandom);
          tries++;
        end while (tries < 50 && ((w[0] && wa[0] == ra[p]) || (w[1] && wa[1] == ra[p]) ||
                                  (w[2] && wa[2] == ra[p]) || (w[3] && wa[3] == ra[p])));
        if (tries >= 50) w = '0;
      end
      for (int p = 0; p < 4; p++) for (int q = p + 1; q < 4; q++)
        if (w[p] && w[q] && wa[p] == wa[q]) n_clash++;
      if (w == 4'b1111) n_all4++;
      slot(w, wa, d, ra);
    end
    // final read-back of every word through every port
    for (int a = 0; a < 2**AW; a++) begin
      wa = '{4'd0, 4'd0, 4'd0, 4'd0};
      ra = '{AW'(a), AW'(a), AW'(a), AW'(a)};
      slot(4'b0000, wa, d, ra);
    end
    $display("clashes=%0d all-four-writing slots=%0d", n_clash, n_all4);
    checks++;
    if (n_clash == 0 || n_all4 < 2) begin failures++; $display("FAIL traffic too thin"); end
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
