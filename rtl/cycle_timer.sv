// cycle_timer: the "counter of clock pulses" that measures the pure
// computation time of a task.
//
// Core1 controls it through its control port: bit1 clears the count, bit0
// lets it count one per clock while set (it is written 1 when computation
// starts and 0 when it ends, so UART transfers are not counted). Core5 asks
// for a snapshot (bit2 of its own control write) and then reads the four
// bytes of `snapshot`, which stay stable while the counter keeps running.
// The 32-bit width and the snapshot register are choices; the document gives
// only the timer's purpose.
module cycle_timer #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ctrl_we,    // from Core1
  input  logic [1:0]       ctrl,       // {clear, run}
  input  logic             snap,       // from Core5
  output logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] snapshot,
  output logic             running
);

  always_ff @(posedge clk) begin
    if (reset) begin
      count    <= '0;
      snapshot <= '0;
      running  <= 1'b0;
    end else begin
      if (ctrl_we) running <= ctrl[0];
      if (ctrl_we && ctrl[1]) count <= '0;
      else if (running)       count <= count + 1'b1;
      if (snap) snapshot <= count;
    end
  end

endmodule
