// tb_cycle_timer: self-checking test of the clock-pulse timer.
// Random sequences of clear, run and stop writes and snapshot requests are
// applied; a cycle-by-cycle reference counter in this testbench must match
// `count`, and after each snapshot request `snapshot` must hold the count of
// that clock. A run of exactly 1000 clocks must count 1000.
module tb_cycle_timer;
  logic clk = 0, reset = 1, ctrl_we = 0, snap = 0;
  logic [1:0] ctrl = 0;
  logic [31:0] count, snapshot;
  logic running;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  cycle_timer #(.WIDTH(32)) dut (.*);

  longint unsigned ref_cnt = 0, ref_snap = 0;
  bit ref_run = 0;

  always @(posedge clk) if (!reset) begin
    // reference update with this clock's inputs
    if (snap) ref_snap = ref_cnt;
    if (ctrl_we && ctrl[1]) ref_cnt = 0;
    else if (ref_run) ref_cnt++;
    if (ctrl_we) ref_run = ctrl[0];
  end

  always @(negedge clk) if (!reset) begin
    checks++;
    if (count != 32'(ref_cnt) || snapshot != 32'(ref_snap) || running != ref_run) begin
      failures++;
      if (failures < 5) $display("FAIL count %0d/%0d snap %0d/%0d", count, ref_cnt, snapshot, ref_snap);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // exact 1000-clock run
    ctrl_we = 1; ctrl = 2'b11;
    @(negedge clk) ctrl_we = 0;
    repeat (999) @(negedge clk);
    ctrl_we = 1; ctrl = 2'b00;
    @(negedge clk) ctrl_we = 0;
    checks++;
    if (count != 1000) begin failures++; $display("FAIL 1000-clock run counted %0d", count); end
    for (int n = 0; n < 5000; n++) begin
      ctrl_we = ($urandom % 20) == 0;
      ctrl    = 2'($urandom);
      snap    = ($urandom % 10) == 0;
      @(negedge clk);
    end
    ctrl_we = 0; snap = 0;
    @(negedge clk);
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
