// mcsoc_pkg: types, instruction encodings and I/O port map shared by the
// multi-core system.
//
// The cores are 8-bit processors in the style of the KCPSM3 soft processor:
// 18-bit instruction words, 16 registers s0..sF, a 64-byte scratch pad and a
// 10-bit program address. The opcode field is instr[17:12]; for ALU, INPUT,
// OUTPUT, FETCH and STORE an odd opcode takes its second operand from
// register sY = instr[7:4], an even one from the constant instr[7:0].
// JUMP, CALL and RETURN use an odd opcode for their conditional form with the
// condition in instr[11:10] (Z, NZ, C, NC). The encoding follows the
// published KCPSM3 one; the document itself only shows the block structure.
//
// The small assembler functions below (ld_k, add_r, jmp, ...) let the
// program memories build their images in SystemVerilog.
package mcsoc_pkg;

  typedef logic [17:0] instr_t;
  typedef logic [9:0]  paddr_t;
  typedef instr_t      image_t [1024];

  // opcodes, instr[17:12] (register forms are the constant form + 1)
  localparam logic [5:0] OP_LOAD    = 6'h00;
  localparam logic [5:0] OP_INPUT   = 6'h04;
  localparam logic [5:0] OP_FETCH   = 6'h06;
  localparam logic [5:0] OP_AND     = 6'h0A;
  localparam logic [5:0] OP_OR      = 6'h0C;
  localparam logic [5:0] OP_XOR     = 6'h0E;
  localparam logic [5:0] OP_TEST    = 6'h12;
  localparam logic [5:0] OP_COMPARE = 6'h14;
  localparam logic [5:0] OP_ADD     = 6'h18;
  localparam logic [5:0] OP_ADDCY   = 6'h1A;
  localparam logic [5:0] OP_SUB     = 6'h1C;
  localparam logic [5:0] OP_SUBCY   = 6'h1E;
  localparam logic [5:0] OP_SHIFT   = 6'h20;
  localparam logic [5:0] OP_RETURN  = 6'h2A;
  localparam logic [5:0] OP_OUTPUT  = 6'h2C;
  localparam logic [5:0] OP_STORE   = 6'h2E;
  localparam logic [5:0] OP_CALL    = 6'h30;
  localparam logic [5:0] OP_JUMP    = 6'h34;
  localparam logic [5:0] OP_RETURNI = 6'h38;
  localparam logic [5:0] OP_INTCTL  = 6'h3C;

  // shift / rotate sub-codes, instr[3:0]
  localparam logic [3:0] SH_SLA = 4'h0, SH_RL = 4'h2, SH_SLX = 4'h4,
                         SH_SL0 = 4'h6, SH_SL1 = 4'h7, SH_SRA = 4'h8,
                         SH_SRX = 4'hA, SH_RR = 4'hC, SH_SR0 = 4'hE,
                         SH_SR1 = 4'hF;

  // jump conditions, instr[11:10]
  typedef enum logic [1:0] {C_Z = 2'd0, C_NZ = 2'd1, C_C = 2'd2, C_NC = 2'd3} cond_e;

  // interrupt vector
  localparam paddr_t INT_VECTOR = 10'h3FF;

  // ---------------------------------------------------------------- port map
  localparam logic [7:0] P_MEM_ROW  = 8'h00; // W: shared-memory row register
  localparam logic [7:0] P_MEM_COL  = 8'h01; // W: shared-memory column register
  localparam logic [7:0] P_MEM_DATA = 8'h02; // R/W: shared memory at {row,col}
  localparam logic [7:0] P_CORE_ID  = 8'h03; // R: 0 for Core1 .. 4 for Core5
  localparam logic [7:0] P_NCORES   = 8'h04; // R: number of compute cores
  localparam logic [7:0] P_UART_ST  = 8'h05; // R: bit0 rx byte ready, bit1 tx busy
  localparam logic [7:0] P_UART_DAT = 8'h06; // R: rx byte (pops it), W: tx byte
  localparam logic [7:0] P_TMR_CTRL = 8'h07; // W: bit0 run, bit1 clear, bit2 snapshot
  localparam logic [7:0] P_TMR_B0   = 8'h08; // R: snapshot bits 7:0 .. 0x0B bits 31:24
  localparam logic [7:0] P_LCD      = 8'h10; // W: LCD pins {DB7..DB4, 1'b0, RW, RS, E}

  // shared-memory addressing: {row[5:0], col[5:0]}; row 63 holds control words
  localparam int MEM_AW   = 12;
  localparam int CTL_ROW  = 63;
  localparam int CTL_N    = 0;   // number of graph nodes
  localparam int CTL_K    = 1;   // current Floyd-Warshall step k
  localparam int CTL_HINT = 1;   // column CTL_HINT + w holds Hint_w, w = 1..3

  // ---------------------------------------------------------------- assembler
  function automatic instr_t enc_k(logic [5:0] op, int x, int k);
    return {op, 4'(x), 8'(k)};
  endfunction
  function automatic instr_t enc_r(logic [5:0] op, int x, int y);
    return {op | 6'h01, 4'(x), 4'(y), 4'h0};
  endfunction
  function automatic instr_t enc_a(logic [5:0] op, bit c, cond_e cd, int a);
    return {op | {5'd0, c}, cd, 10'(a)};
  endfunction

  function automatic instr_t ld_k  (int x, int k); return enc_k(OP_LOAD, x, k);    endfunction
  function automatic instr_t ld_r  (int x, int y); return enc_r(OP_LOAD, x, y);    endfunction
  function automatic instr_t and_k (int x, int k); return enc_k(OP_AND, x, k);     endfunction
  function automatic instr_t or_k  (int x, int k); return enc_k(OP_OR, x, k);      endfunction
  function automatic instr_t or_r  (int x, int y); return enc_r(OP_OR, x, y);      endfunction
  function automatic instr_t xor_k (int x, int k); return enc_k(OP_XOR, x, k);     endfunction
  function automatic instr_t xor_r (int x, int y); return enc_r(OP_XOR, x, y);     endfunction
  function automatic instr_t and_r (int x, int y); return enc_r(OP_AND, x, y);     endfunction
  function automatic instr_t test_k(int x, int k); return enc_k(OP_TEST, x, k);    endfunction
  function automatic instr_t cmp_k (int x, int k); return enc_k(OP_COMPARE, x, k); endfunction
  function automatic instr_t cmp_r (int x, int y); return enc_r(OP_COMPARE, x, y); endfunction
  function automatic instr_t add_k (int x, int k); return enc_k(OP_ADD, x, k);     endfunction
  function automatic instr_t add_r (int x, int y); return enc_r(OP_ADD, x, y);     endfunction
  function automatic instr_t addc_k(int x, int k); return enc_k(OP_ADDCY, x, k);   endfunction
  function automatic instr_t sub_k (int x, int k); return enc_k(OP_SUB, x, k);     endfunction
  function automatic instr_t sub_r (int x, int y); return enc_r(OP_SUB, x, y);     endfunction
  function automatic instr_t subc_k(int x, int k); return enc_k(OP_SUBCY, x, k);   endfunction
  function automatic instr_t in_k  (int x, logic [7:0] p); return enc_k(OP_INPUT, x, int'(p)); endfunction
  function automatic instr_t in_r  (int x, int y); return enc_r(OP_INPUT, x, y);   endfunction
  function automatic instr_t out_k (int x, logic [7:0] p); return enc_k(OP_OUTPUT, x, int'(p)); endfunction
  function automatic instr_t out_r (int x, int y); return enc_r(OP_OUTPUT, x, y);  endfunction
  function automatic instr_t st_k  (int x, int a); return enc_k(OP_STORE, x, a);   endfunction
  function automatic instr_t st_r  (int x, int y); return enc_r(OP_STORE, x, y);   endfunction
  function automatic instr_t fe_k  (int x, int a); return enc_k(OP_FETCH, x, a);   endfunction
  function automatic instr_t fe_r  (int x, int y); return enc_r(OP_FETCH, x, y);   endfunction
  function automatic instr_t shift (int x, logic [3:0] s); return {OP_SHIFT, 4'(x), 4'h0, s}; endfunction
  function automatic instr_t jmp   (int a);            return enc_a(OP_JUMP, 1'b0, C_Z, a); endfunction
  function automatic instr_t jcc   (cond_e c, int a);  return enc_a(OP_JUMP, 1'b1, c, a);   endfunction
  function automatic instr_t call  (int a);            return enc_a(OP_CALL, 1'b0, C_Z, a); endfunction
  function automatic instr_t callcc(cond_e c, int a);  return enc_a(OP_CALL, 1'b1, c, a);   endfunction
  function automatic instr_t ret   ();                 return enc_a(OP_RETURN, 1'b0, C_Z, 0); endfunction
  function automatic instr_t retcc (cond_e c);         return enc_a(OP_RETURN, 1'b1, c, 0);   endfunction
  function automatic instr_t reti  (bit en);           return {OP_RETURNI, 11'd0, en};       endfunction
  function automatic instr_t eint  (bit en);           return {OP_INTCTL, 11'd0, en};        endfunction

endpackage
