// shared_mem: common data memory with four write ports and four read ports,
// one of each per compute core.
//
// As in the document's multiport memory scheme, the four ports are built
// from one inner memory with two write and two read ports. A divide-by-two
// phase signal (CLKdiv2) selects which pair of external ports the inner
// memory serves: ports 1 and 2 in phase 0, ports 3 and 4 in phase 1. Each
// port is therefore served once every two clocks, which matches the two
// clocks a processor instruction takes.
//
// Reads: the inner read ports are asynchronous. DOUTn shows the inner read
// data while port n is being served and holds the value captured at the end
// of that clock otherwise, so a read address that is stable for two clocks
// always gives current data at the end of the second clock. Writes: WEn is
// sampled while port n is served; a requester keeps WEn high for two clocks
// to be sure of one serving phase. If both ports of one pair write the same
// address in the same phase, the higher-numbered port wins (a choice; the
// document does not discuss conflicts). The array starts zeroed, as FPGA
// block RAM does after configuration.
module shared_mem #(
  parameter int AW = 12,           // address bits (4096 bytes)
  parameter int DW = 8             // data bits
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [3:0]    we,
  input  logic [AW-1:0] waddr [4],
  input  logic [DW-1:0] din   [4],
  input  logic [AW-1:0] raddr [4],
  output logic [DW-1:0] dout  [4],
  output logic          clkdiv2
);

  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (reset) clkdiv2 <= 1'b0;
    else       clkdiv2 <= !clkdiv2;
  end

  // port pair selection ("...for4" signals of the scheme)
  logic          we_for    [2];
  logic [AW-1:0] waddr_for [2];
  logic [DW-1:0] din_for   [2];
  logic [AW-1:0] raddr_for [2];
  logic [DW-1:0] dout_for  [2];
  logic [DW-1:0] dout_q    [4];

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      we_for[m]    = we[{clkdiv2, 1'(m)}];
      waddr_for[m] = waddr[{clkdiv2, 1'(m)}];
      din_for[m]   = din[{clkdiv2, 1'(m)}];
      raddr_for[m] = raddr[{clkdiv2, 1'(m)}];
      dout_for[m]  = mem[raddr_for[m]];
    end
  end

  always_ff @(posedge clk) begin
    if (we_for[0]) mem[waddr_for[0]] <= din_for[0];
    if (we_for[1]) mem[waddr_for[1]] <= din_for[1];
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < 2; m++) dout_q[{clkdiv2, 1'(m)}] <= dout_for[m];
  end

  always_comb begin
    for (int p = 0; p < 4; p++)
      dout[p] = (clkdiv2 == p[1]) ? dout_for[p[0]] : dout_q[p];
  end

endmodule
