// Assembler helpers for the program images built in fw_prog_pkg.
// EMIT places one instruction word at the current address and advances it;
// LABEL records the current address under a label index. A program is built
// twice: the first pass only collects label addresses, the second uses them.
`ifndef ASM_MACROS_SVH
`define ASM_MACROS_SVH
`define EMIT(ins) begin img[pc] = (ins); pc = pc + 1; end
`define LABEL(l) lab[l] = pc;
`endif
