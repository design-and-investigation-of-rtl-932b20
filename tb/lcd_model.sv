// lcd_model: behavioural model of the board's character LCD for testbenches
// (not synthesizable). It decodes the 4-bit interface: on each falling edge
// of E the upper data nibble is latched, two nibbles make a byte, RS = 0
// selects a command (0x01 clear, 0x80 | a cursor address, other commands
// only counted) and RS = 1 a character written at the cursor. The four single set-up nibbles of
// the 4-bit initialisation pair up as two commands, which are only counted.
// Line 1 is kept as a 16-character string. Interface timing is not checked.
module lcd_model (
  input  logic       e,
  input  logic       rs,
  input  logic       rw,
  input  logic [3:0] db
);
  byte unsigned line1 [16];
  int   cursor   = 0;
  bit   have_hi  = 0;
  logic [3:0] hi;
  int   n_cmds   = 0;
  int   n_chars  = 0;
  int   n_nibbles = 0;

  initial for (int i = 0; i < 16; i++) line1[i] = 8'h20;

  always @(negedge e) begin
    n_nibbles++;
    if (!rw) begin
      if (!have_hi) begin
        hi = db;
        have_hi = 1;
      end else begin
        have_hi = 0;
        if (rs) begin
          if (cursor < 16) line1[cursor] = {hi, db};
          cursor++;
          n_chars++;
        end else begin
          n_cmds++;
          if ({hi, db} == 8'h01) begin
            for (int i = 0; i < 16; i++) line1[i] = 8'h20;
            cursor = 0;
          end else if (hi[3]) cursor = int'({hi[2:0], db});
        end
      end
    end
  end

  function automatic string text(int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(line1[i])};
    return s;
  endfunction
endmodule
