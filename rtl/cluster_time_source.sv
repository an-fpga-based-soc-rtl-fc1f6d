// Cluster-time recording source.
//
// The controller keeps a synchronized cluster time, corrected by the clock
// synchronization from the start instants of the static slots. Recording it
// once per communication cycle lets the host follow the system time and map
// the local timer's timestamps onto it. At every cycle start this source
// captures the cycle count and the cluster time in macroticks and emits a
// two-word packet to its monitoring module:
//   word 0: {10'b0, cycle_count}   word 1: macrotick
// The length (2) is announced with the first word. That the cluster time is
// recorded per cycle follows the design; the two-word contents are this
// implementation's choice.
//
// Timing: the packet's first word leaves one cycle after cycle_start, the
// second right after it; the monitoring module takes its timestamp at the
// first word.
module cluster_time_source
  import fr_tester_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cycle_start,
  input  logic [CYC_W-1:0] cycle_count,
  input  logic [HW-1:0]    macrotick,
  output src16_t           src
);

  logic [1:0]    phase;   // 0 idle, 1 first word, 2 second word
  logic [HW-1:0] mt_q;
  logic [CYC_W-1:0] cyc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      mt_q  <= '0;
      cyc_q <= '0;
    end else begin
      if (cycle_start) begin
        phase <= 2'd1;
        mt_q  <= macrotick;
        cyc_q <= cycle_count;
      end else if (phase == 2'd1) phase <= 2'd2;
      else                        phase <= 2'd0;
    end
  end

  always_comb begin
    src           = '0;
    src.valid     = phase != 2'd0;
    src.sop       = phase == 2'd1;
    src.eop       = phase == 2'd2;
    src.len_valid = phase == 2'd1;
    src.len16     = LEN_W'(2);
    src.data      = (phase == 2'd1) ? HW'(cyc_q) : mt_q;
  end

endmodule
