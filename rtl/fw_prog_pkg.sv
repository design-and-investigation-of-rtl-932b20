// fw_prog_pkg: the two programs held in the cores' program memories.
//
// fw_image(): Floyd-Warshall all-pairs shortest paths, one image for the
// compute cores Core1..Core4, which branch on their core number. It follows
// the document's parallel flow chart:
//   Core1 receives N and the N x N adjacency matrix over the UART into the
//   shared memory, clears and starts the timer, and for k = 0..N-1 publishes
//   k, sets Hint_w = 1 for every other core w, relaxes its own rows, then
//   waits until every Hint_w is back to 0. It then stops the timer and sends
//   the result matrix back over the UART, and waits for the next task.
//   Core w (w = 1..3) waits for Hint_w = 1, reads N and k, relaxes its rows
//   and clears Hint_w.
// The relaxation is A[i][j] = min(A[i][j], A[i][k] + A[k][j]). Core c works
// on rows i = c, c + P, c + 2P, ... (P = number of compute cores); the
// document does not say how the matrix is divided. With N not a multiple of
// P the cores get unequal row counts, which limits the speed-up for small N
// (10 nodes on 4 cores: 3 rows on the busiest core instead of 2.5). Weights are 8-bit, 0xFF means
// "no edge" and the sum saturates at 0xFF. Matrix element (i, j) lives at
// shared-memory row i, column j; row 63 holds N, k and the Hint flags.
//
// lcd_image(wait): Core5 initialises the board's character LCD in 4-bit mode
// and then repeatedly takes a timer snapshot and writes it as eight hex
// digits on line 1. `wait` sets the delay loops: one unit is about 1020
// clocks, a character needs `wait` units, a clear 41 * wait units, and the
// power-up wait is 9 clear delays (with wait = 2 at 50 MHz: 41 us, 1.7 ms,
// 15 ms).
package fw_prog_pkg;
  import mcsoc_pkg::*;
`include "asm_macros.svh"

  // register use
  localparam int RI = 0, RJ = 1, RK = 2, RN = 3, RP = 4, RID = 5,
                 RAIK = 6, RSUM = 7, RAIJ = 8, RT = 9, RT2 = 10, RW = 11;

  typedef enum int {
    F_START, F_MASTER, F_RXROW, F_RXCOL, F_KLOOP, F_SETH, F_HDONE, F_WAIT,
    F_ALLDONE, F_TXROW, F_TXCOL, F_RXBYTE, F_TXBYTE, F_WORKER, F_ROWS,
    F_RROW, F_RCOL, F_NOSAT, F_SKIP, F_RDONE, F_NLAB
  } fw_lab_e;

  function automatic image_t fw_image();
    image_t img;
    int     lab [F_NLAB];
    int     pc;
    for (int i = 0; i < F_NLAB; i++) lab[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 1024; i++) img[i] = '0;
      pc = 0;
      `LABEL(F_START)
      `EMIT(in_k(RID, P_CORE_ID))
      `EMIT(in_k(RP, P_NCORES))
      `EMIT(cmp_k(RID, 0))
      `EMIT(jcc(C_NZ, lab[F_WORKER]))
      // ---------------- Core1: receive the task
      `LABEL(F_MASTER)
      `EMIT(call(lab[F_RXBYTE]))
      `EMIT(ld_r(RN, RT))
      `EMIT(ld_k(RI, 0))
      `LABEL(F_RXROW)
      `EMIT(ld_k(RJ, 0))
      `LABEL(F_RXCOL)
      `EMIT(call(lab[F_RXBYTE]))
      `EMIT(out_k(RI, P_MEM_ROW))
      `EMIT(out_k(RJ, P_MEM_COL))
      `EMIT(out_k(RT, P_MEM_DATA))
      `EMIT(add_k(RJ, 1))
      `EMIT(cmp_r(RJ, RN))
      `EMIT(jcc(C_C, lab[F_RXCOL]))
      `EMIT(add_k(RI, 1))
      `EMIT(cmp_r(RI, RN))
      `EMIT(jcc(C_C, lab[F_RXROW]))
      // store N, clear and start the timer
      `EMIT(ld_k(RT, CTL_ROW))
      `EMIT(out_k(RT, P_MEM_ROW))
      `EMIT(ld_k(RT, CTL_N))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(out_k(RN, P_MEM_DATA))
      `EMIT(ld_k(RT, 'h02))
      `EMIT(out_k(RT, P_TMR_CTRL))
      `EMIT(ld_k(RT, 'h01))
      `EMIT(out_k(RT, P_TMR_CTRL))
      `EMIT(ld_k(RK, 0))
      // ---------------- Core1: one step k
      `LABEL(F_KLOOP)
      `EMIT(ld_k(RT, CTL_ROW))
      `EMIT(out_k(RT, P_MEM_ROW))
      `EMIT(ld_k(RT, CTL_K))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(out_k(RK, P_MEM_DATA))
      `EMIT(ld_k(RW, 1))
      `LABEL(F_SETH)
      `EMIT(cmp_r(RW, RP))
      `EMIT(jcc(C_NC, lab[F_HDONE]))
      `EMIT(ld_r(RT, RW))
      `EMIT(add_k(RT, CTL_HINT))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(ld_k(RT, 1))
      `EMIT(out_k(RT, P_MEM_DATA))
      `EMIT(add_k(RW, 1))
      `EMIT(jmp(lab[F_SETH]))
      `LABEL(F_HDONE)
      `EMIT(call(lab[F_ROWS]))
      `EMIT(ld_k(RT, CTL_ROW))
      `EMIT(out_k(RT, P_MEM_ROW))
      `EMIT(ld_k(RW, 1))
      `LABEL(F_WAIT)
      `EMIT(cmp_r(RW, RP))
      `EMIT(jcc(C_NC, lab[F_ALLDONE]))
      `EMIT(ld_r(RT, RW))
      `EMIT(add_k(RT, CTL_HINT))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(in_k(RT2, P_MEM_DATA))
      `EMIT(cmp_k(RT2, 0))
      `EMIT(jcc(C_NZ, lab[F_WAIT]))
      `EMIT(add_k(RW, 1))
      `EMIT(jmp(lab[F_WAIT]))
      `LABEL(F_ALLDONE)
      `EMIT(add_k(RK, 1))
      `EMIT(cmp_r(RK, RN))
      `EMIT(jcc(C_C, lab[F_KLOOP]))
      // ---------------- Core1: stop the timer, send the result
      `EMIT(ld_k(RT, 'h00))
      `EMIT(out_k(RT, P_TMR_CTRL))
      `EMIT(ld_k(RI, 0))
      `LABEL(F_TXROW)
      `EMIT(ld_k(RJ, 0))
      `LABEL(F_TXCOL)
      `EMIT(out_k(RI, P_MEM_ROW))
      `EMIT(out_k(RJ, P_MEM_COL))
      `EMIT(in_k(RT, P_MEM_DATA))
      `EMIT(call(lab[F_TXBYTE]))
      `EMIT(add_k(RJ, 1))
      `EMIT(cmp_r(RJ, RN))
      `EMIT(jcc(C_C, lab[F_TXCOL]))
      `EMIT(add_k(RI, 1))
      `EMIT(cmp_r(RI, RN))
      `EMIT(jcc(C_C, lab[F_TXROW]))
      `EMIT(jmp(lab[F_MASTER]))
      // ---------------- UART subroutines (byte in RT)
      `LABEL(F_RXBYTE)
      `EMIT(in_k(RT, P_UART_ST))
      `EMIT(test_k(RT, 'h01))
      `EMIT(jcc(C_Z, lab[F_RXBYTE]))
      `EMIT(in_k(RT, P_UART_DAT))
      `EMIT(ret())
      `LABEL(F_TXBYTE)
      `EMIT(in_k(RT2, P_UART_ST))
      `EMIT(test_k(RT2, 'h02))
      `EMIT(jcc(C_NZ, lab[F_TXBYTE]))
      `EMIT(out_k(RT, P_UART_DAT))
      `EMIT(ret())
      // ---------------- Core2..Core4
      `LABEL(F_WORKER)
      `EMIT(ld_k(RT, CTL_ROW))
      `EMIT(out_k(RT, P_MEM_ROW))
      `EMIT(ld_r(RT, RID))
      `EMIT(add_k(RT, CTL_HINT))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(in_k(RT2, P_MEM_DATA))
      `EMIT(cmp_k(RT2, 1))
      `EMIT(jcc(C_NZ, lab[F_WORKER]))
      `EMIT(ld_k(RT, CTL_N))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(in_k(RN, P_MEM_DATA))
      `EMIT(ld_k(RT, CTL_K))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(in_k(RK, P_MEM_DATA))
      `EMIT(call(lab[F_ROWS]))
      `EMIT(ld_k(RT, CTL_ROW))
      `EMIT(out_k(RT, P_MEM_ROW))
      `EMIT(ld_r(RT, RID))
      `EMIT(add_k(RT, CTL_HINT))
      `EMIT(out_k(RT, P_MEM_COL))
      `EMIT(ld_k(RT, 0))
      `EMIT(out_k(RT, P_MEM_DATA))
      `EMIT(jmp(lab[F_WORKER]))
      // ---------------- relax own rows for step k
      `LABEL(F_ROWS)
      `EMIT(ld_r(RI, RID))
      `LABEL(F_RROW)
      `EMIT(cmp_r(RI, RN))
      `EMIT(jcc(C_NC, lab[F_RDONE]))
      `EMIT(out_k(RI, P_MEM_ROW))
      `EMIT(out_k(RK, P_MEM_COL))
      `EMIT(in_k(RAIK, P_MEM_DATA))
      `EMIT(ld_k(RJ, 0))
      `LABEL(F_RCOL)
      `EMIT(out_k(RK, P_MEM_ROW))
      `EMIT(out_k(RJ, P_MEM_COL))
      `EMIT(in_k(RSUM, P_MEM_DATA))
      `EMIT(add_r(RSUM, RAIK))
      `EMIT(jcc(C_NC, lab[F_NOSAT]))
      `EMIT(ld_k(RSUM, 'hFF))
      `LABEL(F_NOSAT)
      `EMIT(out_k(RI, P_MEM_ROW))
      `EMIT(in_k(RAIJ, P_MEM_DATA))
      `EMIT(cmp_r(RSUM, RAIJ))
      `EMIT(jcc(C_NC, lab[F_SKIP]))
      `EMIT(out_k(RSUM, P_MEM_DATA))
      `LABEL(F_SKIP)
      `EMIT(add_k(RJ, 1))
      `EMIT(cmp_r(RJ, RN))
      `EMIT(jcc(C_C, lab[F_RCOL]))
      `EMIT(add_r(RI, RP))
      `EMIT(jmp(lab[F_RROW]))
      `LABEL(F_RDONE)
      `EMIT(ret())
    end
    return img;
  endfunction

  // ------------------------------------------------------------------ LCD
  // register use: s0 byte to write, s1 timer byte, s2 digit, s3 RS bit,
  // s9 pin value, sA/sB delay counters, sC repeat counter
  typedef enum int {
    D_START, D_PWR, D_LOOP, D_HEX2, D_HEXDIG, D_LETTER, D_PUT, D_CMD, D_DATA,
    D_WRBYTE, D_NIB, D_INIT3, D_DELAY, D_D1, D_D2, D_LONG, D_NLAB
  } lcd_lab_e;

  function automatic image_t lcd_image(int wait_units);
    image_t img;
    int     lab [D_NLAB];
    int     pc;
    int     dl;
    dl = 41 * wait_units;
    if (dl > 255) dl = 255;
    for (int i = 0; i < D_NLAB; i++) lab[i] = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 1024; i++) img[i] = '0;
      pc = 0;
      `LABEL(D_START)
      `EMIT(ld_k(9, 0))
      `EMIT(out_k(9, P_LCD))
      // power-up wait
      `EMIT(ld_k(12, 9))
      `LABEL(D_PWR)
      `EMIT(call(lab[D_LONG]))
      `EMIT(sub_k(12, 1))
      `EMIT(jcc(C_NZ, lab[D_PWR]))
      // 4-bit interface set-up: nibbles 3, 3, 3, 2
      `EMIT(ld_k(3, 0))
      `EMIT(ld_k(12, 3))
      `LABEL(D_INIT3)
      `EMIT(ld_k(0, 'h30))
      `EMIT(call(lab[D_NIB]))
      `EMIT(call(lab[D_LONG]))
      `EMIT(sub_k(12, 1))
      `EMIT(jcc(C_NZ, lab[D_INIT3]))
      `EMIT(ld_k(0, 'h20))
      `EMIT(call(lab[D_NIB]))
      `EMIT(call(lab[D_LONG]))
      // function set, entry mode, display on, clear
      `EMIT(ld_k(0, 'h28))
      `EMIT(call(lab[D_CMD]))
      `EMIT(ld_k(0, 'h06))
      `EMIT(call(lab[D_CMD]))
      `EMIT(ld_k(0, 'h0C))
      `EMIT(call(lab[D_CMD]))
      `EMIT(ld_k(0, 'h01))
      `EMIT(call(lab[D_CMD]))
      `EMIT(call(lab[D_LONG]))
      // display loop: snapshot, cursor to line 1, 8 hex digits
      `LABEL(D_LOOP)
      `EMIT(ld_k(9, 'h04))
      `EMIT(out_k(9, P_TMR_CTRL))
      `EMIT(ld_k(0, 'h80))
      `EMIT(call(lab[D_CMD]))
      `EMIT(in_k(1, 'h0B))
      `EMIT(call(lab[D_HEX2]))
      `EMIT(in_k(1, 'h0A))
      `EMIT(call(lab[D_HEX2]))
      `EMIT(in_k(1, 'h09))
      `EMIT(call(lab[D_HEX2]))
      `EMIT(in_k(1, 'h08))
      `EMIT(call(lab[D_HEX2]))
      `EMIT(jmp(lab[D_LOOP]))
      // two hex digits of s1
      `LABEL(D_HEX2)
      `EMIT(ld_r(2, 1))
      `EMIT(shift(2, SH_SR0))
      `EMIT(shift(2, SH_SR0))
      `EMIT(shift(2, SH_SR0))
      `EMIT(shift(2, SH_SR0))
      `EMIT(call(lab[D_HEXDIG]))
      `EMIT(ld_r(2, 1))
      `EMIT(and_k(2, 'h0F))
      `LABEL(D_HEXDIG)
      `EMIT(cmp_k(2, 10))
      `EMIT(jcc(C_NC, lab[D_LETTER]))
      `EMIT(add_k(2, 'h30))
      `EMIT(jmp(lab[D_PUT]))
      `LABEL(D_LETTER)
      `EMIT(add_k(2, 'h37))
      `LABEL(D_PUT)
      `EMIT(ld_r(0, 2))
      `EMIT(jmp(lab[D_DATA]))
      // byte writes: RS = 0 for a command, 1 for data
      `LABEL(D_CMD)
      `EMIT(ld_k(3, 'h00))
      `EMIT(jmp(lab[D_WRBYTE]))
      `LABEL(D_DATA)
      `EMIT(ld_k(3, 'h02))
      `LABEL(D_WRBYTE)
      `EMIT(call(lab[D_NIB]))
      `EMIT(shift(0, SH_SL0))
      `EMIT(shift(0, SH_SL0))
      `EMIT(shift(0, SH_SL0))
      `EMIT(shift(0, SH_SL0))
      `EMIT(call(lab[D_NIB]))
      `EMIT(ld_k(10, wait_units))
      `EMIT(jmp(lab[D_DELAY]))
      // one nibble (s0[7:4]) with an E pulse
      `LABEL(D_NIB)
      `EMIT(ld_r(9, 0))
      `EMIT(and_k(9, 'hF0))
      `EMIT(or_r(9, 3))
      `EMIT(out_k(9, P_LCD))
      `EMIT(or_k(9, 'h01))
      `EMIT(out_k(9, P_LCD))
      `EMIT(ld_k(10, 1))
      `EMIT(call(lab[D_DELAY]))
      `EMIT(xor_k(9, 'h01))
      `EMIT(out_k(9, P_LCD))
      `EMIT(ret())
      // delays: sA units of about 1020 clocks
      `LABEL(D_LONG)
      `EMIT(ld_k(10, dl))
      `LABEL(D_DELAY)
      `LABEL(D_D1)
      `EMIT(ld_k(11, 'hFF))
      `LABEL(D_D2)
      `EMIT(sub_k(11, 1))
      `EMIT(jcc(C_NZ, lab[D_D2]))
      `EMIT(sub_k(10, 1))
      `EMIT(jcc(C_NZ, lab[D_D1]))
      `EMIT(ret())
    end
    return img;
  endfunction

endpackage
