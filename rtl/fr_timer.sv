// Free-running time base of the tester node.
//
// A 32-bit counter that advances by one on every clock while enabled. With the
// 40 MHz system clock one tick is 25 ns, which over-samples the 100 ns bit time
// of a 10 Mbit/s FlexRay bus. Every monitoring module draws its timestamp from
// this counter and the replay extractor compares recorded timestamps with it.
// The enable and the synchronous clear are this implementation's additions so
// that the host can start the time base at a known value.
//
// Timing: time_o shows the count registered at the last clock edge; a clear
// takes effect on the next edge and has priority over counting.
module fr_timer #(
  parameter int unsigned TS_W = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            clr,
  output logic [TS_W-1:0] time_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      time_o <= '0;
    else if (clr)    time_o <= '0;
    else if (en)     time_o <= time_o + 1'b1;
  end

endmodule
