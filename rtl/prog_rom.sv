// prog_rom: the 1024 x 18 program memory of one core.
//
// A synchronous-read ROM: `instruction` shows the word at the `address`
// presented on the previous clock edge, as the processor expects. Its
// contents are computed at elaboration by fw_prog_pkg: PROG = 0 selects the
// Floyd-Warshall program of the compute cores, PROG = 1 the LCD program of
// Core5 (LCD_WAIT sets that program's delay loops). The size of 1024 words
// is the document's; the programs follow its flow chart (see fw_prog_pkg).
module prog_rom
  import mcsoc_pkg::*;
#(
  parameter int PROG     = 0,
  parameter int LCD_WAIT = 2
) (
  input  logic   clk,
  input  paddr_t address,
  output instr_t instruction
);

  localparam image_t IMAGE = (PROG == 0) ? fw_prog_pkg::fw_image()
                                         : fw_prog_pkg::lcd_image(LCD_WAIT);

  always_ff @(posedge clk) instruction <= IMAGE[address];

endmodule
