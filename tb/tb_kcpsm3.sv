// tb_kcpsm3: self-checking test of the processor core.
//
// A test program, assembled here with the mcsoc_pkg helpers, exercises
// LOAD, ADD/ADDCY/SUB/SUBCY, AND/OR/XOR, all ten shifts and rotates,
// STORE/FETCH (constant and register address), INPUT/OUTPUT (constant and
// register port), COMPARE/TEST with conditional jumps, CALL/RETURN and an
// interrupt with RETURNI. Results leave through OUTPUT and are compared with
// values computed by an independent model in this testbench. The two clocks
// per instruction are checked from the spacing of write strobes, and the
// interrupt acknowledge and vector are checked too.
module tb_kcpsm3;
  import mcsoc_pkg::*;
`include "asm_macros.svh"

  logic clk = 0, reset = 1;
  paddr_t address;
  instr_t instruction;
  logic [7:0] port_id, out_port, in_port;
  logic write_strobe, read_strobe, interrupt = 0, interrupt_ack;

  int checks = 0, failures = 0;
  always #5 clk = !clk;

  kcpsm3 dut (.*);

  image_t img;
  always_ff @(posedge clk) instruction <= img[address];
  assign in_port = port_id ^ 8'hA5;

  typedef enum int {L_FAIL, L_SUB, L_ISR, L_IDLE, L_DONE, L_NLAB} lab_e;
  localparam logic [3:0] SHS [10] = '{SH_SR0, SH_SLA, SH_RR, SH_SRX, SH_RL,
                                      SH_SL1, SH_SRA, SH_SLX, SH_SR1, SH_SL0};

  task automatic build();
    int lab [L_NLAB];
    int pc;
    for (int i = 0; i < L_NLAB; i++) lab[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 1024; i++) img[i] = '0;
      pc = 0;
      `EMIT(ld_k(0, 8'h5A))
      `EMIT(ld_k(1, 8'hC3))
      `EMIT(add_r(0, 1))          // 1D, C=1
      `EMIT(out_k(0, 8'h20))
      `EMIT(addc_k(0, 8'h00))     // 1E, C=0
      `EMIT(out_k(0, 8'h21))
      `EMIT(sub_k(0, 8'h20))      // FE, C=1
      `EMIT(subc_k(0, 8'h01))     // FC, C=0
      `EMIT(out_k(0, 8'h22))
      `EMIT(and_k(0, 8'h0F))
      `EMIT(or_k(0, 8'h30))
      `EMIT(xor_r(0, 1))
      `EMIT(out_k(0, 8'h23))      // FF
      `EMIT(ld_k(2, 8'h81))
      for (int n = 0; n < 10; n++) begin
        `EMIT(shift(2, SHS[n]))
        `EMIT(out_k(2, 8'h30 + n))
      end
      `EMIT(st_k(0, 8'h3F))
      `EMIT(fe_k(3, 8'h3F))
      `EMIT(out_k(3, 8'h25))      // FF
      `EMIT(ld_k(4, 8'h05))
      `EMIT(st_r(1, 4))
      `EMIT(fe_k(5, 8'h05))
      `EMIT(out_k(5, 8'h26))      // C3
      `EMIT(in_k(6, 8'h40))       // E5
      `EMIT(out_r(6, 4))          // port 05
      `EMIT(cmp_k(6, 8'hE5))
      `EMIT(jcc(C_NZ, lab[L_FAIL]))
      `EMIT(cmp_k(6, 8'hE6))
      `EMIT(jcc(C_NC, lab[L_FAIL]))
      `EMIT(test_k(6, 8'h03))
      `EMIT(jcc(C_Z, lab[L_FAIL]))
      `EMIT(jcc(C_NC, lab[L_FAIL]))
      `EMIT(call(lab[L_SUB]))
      `EMIT(out_k(7, 8'h27))      // 77
      `EMIT(eint(1))
      `LABEL(L_IDLE)
      `EMIT(add_k(9, 1))
      `EMIT(cmp_k(10, 8'h99))
      `EMIT(jcc(C_NZ, lab[L_IDLE]))
      `EMIT(out_k(10, 8'h29))     // 99 after the interrupt
      `LABEL(L_DONE)
      `EMIT(jmp(lab[L_DONE]))
      `LABEL(L_FAIL)
      `EMIT(out_k(0, 8'hEE))
      `EMIT(jmp(lab[L_FAIL]))
      `LABEL(L_SUB)
      `EMIT(ld_k(7, 8'h70))
      `EMIT(add_k(7, 8'h07))
      `EMIT(cmp_k(7, 8'h77))
      `EMIT(retcc(C_Z))
      `EMIT(jmp(lab[L_FAIL]))
      `LABEL(L_ISR)
      `EMIT(ld_k(10, 8'h99))
      `EMIT(out_k(10, 8'h28))
      `EMIT(reti(0))
      img[INT_VECTOR] = jmp(lab[L_ISR]);
    end
  endtask

  // independent model of the shift/rotate results
  function automatic logic [8:0] shmodel(logic [7:0] v, logic c, logic [3:0] s);
    case (s)
      SH_SR0: return {v[0], 1'b0, v[7:1]};
      SH_SR1: return {v[0], 1'b1, v[7:1]};
      SH_SRX: return {v[0], v[7], v[7:1]};
      SH_SRA: return {v[0], c, v[7:1]};
      SH_RR:  return {v[0], v[0], v[7:1]};
      SH_SL0: return {v[7], v[6:0], 1'b0};
      SH_SL1: return {v[7], v[6:0], 1'b1};
      SH_SLX: return {v[7], v[6:0], v[0]};
      SH_SLA: return {v[7], v[6:0], c};
      default: return {v[7], v[6:0], v[7]};  // RL
    endcase
  endfunction

  logic [7:0] exp_val [256];
  bit         exp_set [256];
  int         seen    [256];
  int         last_wr_cycle = -1, cyc = 0, gap_20_21 = 0;
  int         ack_count = 0;
  logic       ack_vector_ok = 0;

  always @(posedge clk) begin
    cyc++;
    if (write_strobe) begin
      seen[port_id]++;
      if (port_id == 8'h21) gap_20_21 = cyc - last_wr_cycle;
      last_wr_cycle = cyc;
      checks++;
      if (!exp_set[port_id] || exp_val[port_id] != out_port) begin
        failures++;
        $display("FAIL port %02x got %02x expected %02x (set=%0d)", port_id, out_port,
                 exp_val[port_id], exp_set[port_id]);
      end
    end
    if (interrupt_ack && !reset) begin
      ack_count++;
      ack_vector_ok = (dut.pc == INT_VECTOR);
    end
  end

  initial begin
    logic [7:0] v;
    logic c;
    logic [8:0] r;
    build();
    for (int i = 0; i < 256; i++) begin exp_set[i] = 0; seen[i] = 0; exp_val[i] = 0; end
    exp_val[8'h20] = 8'h1D; exp_val[8'h21] = 8'h1E; exp_val[8'h22] = 8'hFC;
    exp_val[8'h23] = 8'hFF; exp_val[8'h25] = 8'hFF; exp_val[8'h26] = 8'hC3;
    exp_val[8'h05] = 8'hE5; exp_val[8'h27] = 8'h77; exp_val[8'h28] = 8'h99;
    exp_val[8'h29] = 8'h99;
    foreach (exp_val[i]) if (exp_val[i] != 0) exp_set[i] = 1;
    // the carry entering the shift chain is the one left by XOR (cleared)
    v = 8'h81; c = 1'b0;
    for (int n = 0; n < 10; n++) begin
      r = shmodel(v, c, SHS[n]);
      c = r[8]; v = r[7:0];
      exp_val[8'h30 + n] = v; exp_set[8'h30 + n] = 1;
    end
    repeat (4) @(posedge clk);
    reset = 0;
    wait (seen[8'h27] == 1);
    repeat (20) @(posedge clk);
    interrupt = 1;
    repeat (4) @(posedge clk);
    interrupt = 0;
    wait (seen[8'h29] == 1);
    repeat (20) @(posedge clk);
    foreach (exp_set[i]) if (exp_set[i]) begin
      checks++;
      if (seen[i] != 1) begin failures++; $display("FAIL port %02x written %0d times", i, seen[i]); end
    end
    checks++;
    if (seen[8'hEE] != 0) begin failures++; $display("FAIL program took a failure branch"); end
    checks++;
    if (gap_20_21 != 4) begin failures++; $display("FAIL instruction spacing %0d clocks for 2 instructions", gap_20_21); end
    checks++;
    if (ack_count != 1 || !ack_vector_ok) begin failures++; $display("FAIL interrupt ack %0d vector %0d", ack_count, ack_vector_ok); end
    checks++;
    if (dut.ie !== 1'b0) begin failures++; $display("FAIL RETURNI 0 left interrupts enabled"); end
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
