// tb_prog_rom: self-checking test of the program memory.
// Both images are read through the ROM port. Checked: the one-clock read
// latency; the first words of each program against hand-encoded values
// (INPUT s5,03 / INPUT s4,04 / COMPARE s5,00 and LOAD s9,00 / OUTPUT s9,10
// / LOAD sC,09); that every word up to the end of each program carries a
// defined opcode; that every JUMP/CALL target lies inside the program; and
// that the rest of the memory is zero.
module tb_prog_rom;
  import mcsoc_pkg::*;
  logic clk = 0;
  paddr_t address = 0;
  instr_t ins_fw, ins_lcd;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  prog_rom #(.PROG(0))                rom_fw  (.clk, .address, .instruction(ins_fw));
  prog_rom #(.PROG(1), .LCD_WAIT(2))  rom_lcd (.clk, .address, .instruction(ins_lcd));

  instr_t fw [1024], lc [1024];

  function automatic bit known(instr_t w);
    logic [4:0] o;
    o = w[17:13];
    return o inside {5'h00, 5'h02, 5'h03, 5'h05, 5'h06, 5'h07, 5'h09, 5'h0A, 5'h0C, 5'h0D,
                     5'h0E, 5'h0F, 5'h10, 5'h15, 5'h16, 5'h17, 5'h18, 5'h1A, 5'h1C, 5'h1E};
  endfunction

  task automatic check_image(instr_t img [1024], string name);
    int last;
    last = 0;
    for (int i = 0; i < 1024; i++) if (img[i] != 0) last = i;
    checks++;
    if (last < 20 || last > 1000) begin failures++; $display("FAIL %s length %0d", name, last); end
    for (int i = 0; i <= last; i++) begin
      checks++;
      if (!known(img[i])) begin failures++; $display("FAIL %s word %0d = %05h", name, i, img[i]); end
      if (img[i][17:13] inside {5'h18, 5'h1A}) begin
        checks++;
        if (int'(img[i][9:0]) > last) begin failures++; $display("FAIL %s target at %0d", name, i); end
      end
    end
    $display("%s: %0d words", name, last + 1);
  endtask

  initial begin
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk) address = paddr_t'(a);
      @(posedge clk); #1;
      fw[a] = ins_fw;
      lc[a] = ins_lcd;
      // latency: the word appears only after the clock edge
      if (a > 0) begin
        @(negedge clk) address = paddr_t'(a - 1);
        #1;
        checks++;
        if (ins_fw != fw[a]) begin failures++; $display("FAIL read latency at %0d", a); end
      end
    end
    checks += 6;
    if (fw[0] != 18'h04503) begin failures++; $display("FAIL fw[0] %05h", fw[0]); end
    if (fw[1] != 18'h04404) begin failures++; $display("FAIL fw[1] %05h", fw[1]); end
    if (fw[2] != 18'h14500) begin failures++; $display("FAIL fw[2] %05h", fw[2]); end
    if (lc[0] != 18'h00900) begin failures++; $display("FAIL lcd[0] %05h", lc[0]); end
    if (lc[1] != 18'h2C910) begin failures++; $display("FAIL lcd[1] %05h", lc[1]); end
    if (lc[2] != 18'h00C09) begin failures++; $display("FAIL lcd[2] %05h", lc[2]); end
    check_image(fw, "floyd-warshall");
    check_image(lc, "lcd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
