// mc_core: one processor core of the system, a KCPSM3-style processor with
// its own program memory (the "Core1".."Core5" boxes of the block scheme).
//
// The processor fetches from the private 1024-word program memory; its port
// interface (PORT_ID, IN_PORT, OUT_PORT, READ/WRITE_STROBE) is brought out
// for the port decoder. PROG selects the program: 0 for the Floyd-Warshall
// compute program, 1 for the LCD display program. Interrupts are unused in
// this system and the input is brought out for completeness.
module mc_core
  import mcsoc_pkg::*;
#(
  parameter int PROG     = 0,
  parameter int LCD_WAIT = 2
) (
  input  logic       clk,
  input  logic       reset,
  output logic [7:0] port_id,
  output logic [7:0] out_port,
  output logic       write_strobe,
  output logic       read_strobe,
  input  logic [7:0] in_port,
  input  logic       interrupt,
  output logic       interrupt_ack
);

  paddr_t address;
  instr_t instruction;

  prog_rom #(.PROG(PROG), .LCD_WAIT(LCD_WAIT)) u_rom (
    .clk, .address, .instruction
  );

  kcpsm3 u_cpu (
    .clk, .reset, .address, .instruction, .port_id, .out_port,
    .write_strobe, .read_strobe, .in_port, .interrupt, .interrupt_ack
  );

endmodule
