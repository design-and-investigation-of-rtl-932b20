// kcpsm3: 8-bit soft processor core (KCPSM3 style) used for all five cores.
//
// Structure: sixteen 8-bit registers, a 64-byte scratch pad memory, an ALU
// for arithmetic, logic, shift and rotate, ZERO and CARRY flags with shadow
// copies for interrupts, a 10-bit program counter with a 32-entry return
// stack, port address control (PORT_ID, READ_STROBE, WRITE_STROBE) and
// interrupt control. The document gives this block structure and says that
// every instruction takes two clock periods; the instruction encoding is the
// published KCPSM3 one (see mcsoc_pkg) and the stack depth of 32 is a choice.
//
// Timing: each instruction occupies two clocks, phase T0 and T1. The program
// memory is synchronous: `address` shows the current PC in T0 and the next PC
// in T1, so the next instruction word is present at the start of its T0.
// PORT_ID and OUT_PORT are valid in both phases of INPUT/OUTPUT; WRITE_STROBE
// and READ_STROBE are high in T1, and INPUT samples IN_PORT at the end of T1.
// All results, flags and the PC update at the end of T1.
//
// Interrupt: when interrupts are enabled and INTERRUPT is high at the end of
// an instruction (other than CALL, RETURN or RETURNI), the address of the
// following instruction is pushed, the flags are saved, interrupts are
// disabled and execution continues at 0x3FF; INTERRUPT_ACK pulses for one
// clock. RETURNI pops the address, restores the flags and sets the enable
// from instr[0].
module kcpsm3
  import mcsoc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  output paddr_t     address,
  input  instr_t     instruction,
  output logic [7:0] port_id,
  output logic [7:0] out_port,
  output logic       write_strobe,
  output logic       read_strobe,
  input  logic [7:0] in_port,
  input  logic       interrupt,
  output logic       interrupt_ack
);

  logic       t1;                  // second clock of the instruction
  logic [7:0] regs [16];
  logic [7:0] spm  [64];
  paddr_t     pc;
  paddr_t     stack [32];
  logic [4:0] sp;
  logic       zf, cf, zf_sh, cf_sh, ie;

  // ---------------------------------------------------------------- decode
  logic [5:0] op;
  logic [3:0] sx, sy;
  logic [7:0] a, b;
  logic [1:0] cond;
  logic       cond_ok;

  assign op   = instruction[17:12];
  assign sx   = instruction[11:8];
  assign sy   = instruction[7:4];
  assign cond = instruction[11:10];
  assign a    = regs[sx];
  assign b    = op[0] ? regs[sy] : instruction[7:0];

  always_comb begin
    unique case (cond)
      2'd0: cond_ok = zf;
      2'd1: cond_ok = !zf;
      2'd2: cond_ok = cf;
      default: cond_ok = !cf;
    endcase
    if (!op[0]) cond_ok = 1'b1;
  end

  // ---------------------------------------------------------------- ALU
  logic [7:0] res;
  logic       wr_reg, upd_z, upd_c, new_c, shin;
  logic [8:0] sum;

  always_comb begin
    res    = b;
    wr_reg = 1'b0;
    upd_z  = 1'b0;
    upd_c  = 1'b0;
    new_c  = 1'b0;
    sum    = '0;
    shin   = 1'b0;
    unique case (op[5:1])
      OP_LOAD[5:1]:  begin res = b; wr_reg = 1'b1; end
      OP_INPUT[5:1]: begin res = in_port; wr_reg = 1'b1; end
      OP_FETCH[5:1]: begin res = spm[b[5:0]]; wr_reg = 1'b1; end
      OP_AND[5:1]:   begin res = a & b; wr_reg = 1'b1; upd_z = 1'b1; upd_c = 1'b1; end
      OP_OR[5:1]:    begin res = a | b; wr_reg = 1'b1; upd_z = 1'b1; upd_c = 1'b1; end
      OP_XOR[5:1]:   begin res = a ^ b; wr_reg = 1'b1; upd_z = 1'b1; upd_c = 1'b1; end
      OP_TEST[5:1]:  begin res = a & b; upd_z = 1'b1; upd_c = 1'b1; new_c = ^(a & b); end
      OP_COMPARE[5:1], OP_SUB[5:1], OP_SUBCY[5:1]: begin
        sum   = {1'b0, a} - {1'b0, b} - {8'd0, (op[5:1] == OP_SUBCY[5:1]) && cf};
        res   = sum[7:0];
        new_c = sum[8];
        wr_reg = (op[5:1] != OP_COMPARE[5:1]);
        upd_z = 1'b1; upd_c = 1'b1;
      end
      OP_ADD[5:1], OP_ADDCY[5:1]: begin
        sum   = {1'b0, a} + {1'b0, b} + {8'd0, (op[5:1] == OP_ADDCY[5:1]) && cf};
        res   = sum[7:0];
        new_c = sum[8];
        wr_reg = 1'b1; upd_z = 1'b1; upd_c = 1'b1;
      end
      OP_SHIFT[5:1]: begin
        unique case (instruction[2:1])
          2'b11:   shin = instruction[0];
          2'b10:   shin = a[0];      // SLX, RR
          2'b01:   shin = a[7];      // RL, SRX
          default: shin = cf;
        endcase
        if (instruction[3]) begin res = {shin, a[7:1]}; new_c = a[0]; end
        else                begin res = {a[6:0], shin}; new_c = a[7]; end
        wr_reg = 1'b1; upd_z = 1'b1; upd_c = 1'b1;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- flow
  paddr_t pc_next;
  logic   do_push, do_pop, is_stack_op, take_irq, ie_next;
  paddr_t push_val;

  always_comb begin
    pc_next  = pc + 10'd1;
    do_push  = 1'b0;
    do_pop   = 1'b0;
    push_val = pc + 10'd1;
    ie_next  = ie;
    is_stack_op = (op[5:1] == OP_CALL[5:1]) || (op[5:1] == OP_RETURN[5:1]) ||
                  (op[5:1] == OP_RETURNI[5:1]);
    unique case (op[5:1])
      OP_JUMP[5:1]:    if (cond_ok) pc_next = instruction[9:0];
      OP_CALL[5:1]:    if (cond_ok) begin pc_next = instruction[9:0]; do_push = 1'b1; end
      OP_RETURN[5:1]:  if (cond_ok) begin pc_next = stack[sp - 5'd1]; do_pop = 1'b1; end
      OP_RETURNI[5:1]: begin pc_next = stack[sp - 5'd1]; do_pop = 1'b1; ie_next = instruction[0]; end
      OP_INTCTL[5:1]:  ie_next = instruction[0];
      default: ;
    endcase
    take_irq = ie_next && interrupt && !is_stack_op;
    if (take_irq) begin
      push_val = pc_next;
      pc_next  = INT_VECTOR;
      do_push  = 1'b1;
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (reset) begin
      t1    <= 1'b0;
      pc    <= '0;
      sp    <= '0;
      zf    <= 1'b0;
      cf    <= 1'b0;
      zf_sh <= 1'b0;
      cf_sh <= 1'b0;
      ie    <= 1'b0;
      interrupt_ack <= 1'b0;
      for (int r = 0; r < 16; r++) regs[r] <= '0;
    end else begin
      t1 <= !t1;
      interrupt_ack <= 1'b0;
      if (t1) begin
        pc <= pc_next;
        ie <= take_irq ? 1'b0 : ie_next;
        if (wr_reg) regs[sx] <= res;
        if (op[5:1] == OP_STORE[5:1]) spm[b[5:0]] <= a;
        if (op[5:1] == OP_RETURNI[5:1]) begin
          zf <= zf_sh;
          cf <= cf_sh;
        end else begin
          if (upd_z) zf <= (res == 8'd0);
          if (upd_c) cf <= new_c;
        end
        if (take_irq) begin
          // flags as this instruction leaves them
          zf_sh <= upd_z ? (res == 8'd0) : zf;
          cf_sh <= upd_c ? new_c : cf;
          interrupt_ack <= 1'b1;
        end
        if (do_push) begin
          stack[sp] <= push_val;
          sp <= sp + 5'd1;
        end else if (do_pop) begin
          sp <= sp - 5'd1;
        end
      end
    end
  end

  assign address      = t1 ? pc_next : pc;
  assign port_id      = b;
  assign out_port     = a;
  assign write_strobe = t1 && (op[5:1] == OP_OUTPUT[5:1]);
  assign read_strobe  = t1 && (op[5:1] == OP_INPUT[5:1]);

endmodule
