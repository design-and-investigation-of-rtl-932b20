// tb_mc_core: self-checking test of one core (processor + program memory)
// running the LCD display program with LCD_WAIT = 1.
// The testbench answers the timer-byte ports with a known value, decodes the
// LCD port writes (nibbles latched on the falling edge of E, RS = bit 1) and
// checks: the first port write clears the pins; the power-up wait before
// the first E pulse is at least 9 x 41 delay units of about 1020 clocks; the
// set-up nibbles 3, 3, 3, 2 and commands 28, 06, 0C, 01 arrive in order;
// then each refresh sends a snapshot request (timer control bit2), the
// cursor command 80 and eight characters spelling the timer value in hex.
module tb_mc_core;
  import mcsoc_pkg::*;
  logic clk = 0, reset = 1;
  logic [7:0] port_id, out_port, in_port;
  logic write_strobe, read_strobe, interrupt_ack;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  mc_core #(.PROG(1), .LCD_WAIT(1)) dut (
    .clk, .reset, .port_id, .out_port, .write_strobe, .read_strobe,
    .in_port, .interrupt(1'b0), .interrupt_ack);

  logic [31:0] tval = 32'h12AB09F3;
  always_comb begin
    case (port_id)
      8'h08: in_port = tval[7:0];
      8'h09: in_port = tval[15:8];
      8'h0A: in_port = tval[23:16];
      8'h0B: in_port = tval[31:24];
      default: in_port = 8'h00;
    endcase
  end

  logic [7:0] lcd = 0;
  int cyc = 0, first_e = -1, nwr = 0, nsnap = 0;
  logic [3:0] nib [$];
  always @(posedge clk) begin
    cyc++;
    if (write_strobe && port_id == P_TMR_CTRL && out_port[2]) nsnap++;
    if (write_strobe && port_id == P_LCD) begin
      nwr++;
      if (nwr == 1) begin
        checks++;
        if (out_port != 0) begin failures++; $display("FAIL first LCD write %02x", out_port); end
      end
      if (out_port[0] && first_e < 0) first_e = cyc;
      if (lcd[0] && !out_port[0]) nib.push_back({lcd[7:4]});
      lcd <= out_port;
    end
  end

  initial begin
    string line;
    logic [7:0] bytes_ [$];
    bit rs_ [$];
    repeat (4) @(posedge clk);
    reset = 0;
    // wait for set-up (4 nibbles) + 4 commands + (1 cursor + 8 chars) x 2
    while (nib.size() < 4 + 8 + 2 * 18 && cyc < 3_000_000) @(posedge clk);
    checks++;
    if (first_e < 9 * 41 * 1000) begin failures++; $display("FAIL power-up wait %0d clocks", first_e); end
    checks++;
    if (nib.size() < 48) begin failures++; $display("FAIL only %0d nibbles", nib.size()); end
    else begin
      checks += 4;
      if (nib[0] != 3 || nib[1] != 3 || nib[2] != 3 || nib[3] != 2) begin failures++; $display("FAIL set-up nibbles"); end
      for (int i = 4; i + 1 < nib.size(); i += 2) bytes_.push_back({nib[i], nib[i + 1]});
      if (bytes_[0] != 8'h28 || bytes_[1] != 8'h06 || bytes_[2] != 8'h0C || bytes_[3] != 8'h01) begin
        failures++; $display("FAIL set-up commands %02x %02x %02x %02x", bytes_[0], bytes_[1], bytes_[2], bytes_[3]);
      end
      for (int r = 0; r < 2; r++) begin
        if (bytes_[4 + 9 * r] != 8'h80) begin failures++; $display("FAIL cursor command"); end
        line = "";
        for (int i = 0; i < 8; i++) line = {line, string'(bytes_[5 + 9 * r + i])};
        $display("refresh %0d shows %s", r, line);
        if (line != "12AB09F3") begin failures++; $display("FAIL text %s", line); end
      end
      checks++;
      if (nsnap < 2) begin failures++; $display("FAIL snapshot requests %0d", nsnap); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_500_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
