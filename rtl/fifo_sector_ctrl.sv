// Sector bookkeeping of the monitor FIFO.
//
// The monitor DPRAM is used as a ring of N_SEC sectors of SECTOR_WORDS words.
// Packets are written out of order (see temporal_order_table), so a sector
// counts as full only when the last_written_pointer, below which every word
// has been written, has moved past its end. The sector's dirty bit is then set:
// it holds valid data the host has not read yet. The host clears dirty bits
// by writing ones (host_clr) after reading the sectors.
//
// Interrupts: irq_thr is high while at least `threshold` sectors are dirty
// (threshold 0 disables it); irq_ovf is set by an overflow event from the
// arbiter and stays set until the host clears it. Dirty bits, a programmable
// threshold, an interrupt only once a whole sector is filled and the overflow
// interrupt follow the design; the count-of-dirty-sectors reading of the
// threshold is this implementation's.
//
// Timing: a retire in cycle t sets the dirty bit at the edge ending cycle t;
// irq_thr follows one cycle later. A packet is at most one sector long, so one
// retire closes at most one sector.
module fifo_sector_ctrl #(
  parameter int unsigned DPRAM_WORDS  = 2048,
  parameter int unsigned SECTOR_WORDS = 256,
  localparam int unsigned AW     = $clog2(DPRAM_WORDS),
  localparam int unsigned N_SEC  = DPRAM_WORDS / SECTOR_WORDS,
  localparam int unsigned SEC_SH = $clog2(SECTOR_WORDS),
  localparam int unsigned CNT_W  = $clog2(N_SEC + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             retire_vld,
  input  logic [AW-1:0]    lwp_new,      // last_written_pointer after the retire
  input  logic [N_SEC-1:0] host_clr,
  input  logic [CNT_W-1:0] threshold,
  input  logic             overflow_evt,
  input  logic             ovf_clr,
  output logic [N_SEC-1:0] dirty,
  output logic [AW-1:0]    lwp,
  output logic [CNT_W-1:0] n_dirty,
  output logic             irq_thr,
  output logic             irq_ovf
);

  logic [AW-SEC_SH-1:0] old_sec, new_sec;
  assign old_sec = lwp[AW-1:SEC_SH];
  assign new_sec = lwp_new[AW-1:SEC_SH];

  always_comb begin
    n_dirty = '0;
    for (int s = 0; s < N_SEC; s++) n_dirty = n_dirty + CNT_W'(dirty[s]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty   <= '0;
      lwp     <= '0;
      irq_thr <= 1'b0;
      irq_ovf <= 1'b0;
    end else begin
      automatic logic [N_SEC-1:0] nd;
      nd = dirty & ~host_clr;
      if (retire_vld) begin
        lwp <= lwp_new;
        if (new_sec != old_sec) nd[old_sec] = 1'b1;
      end
      dirty   <= nd;
      irq_thr <= (threshold != 0) && (n_dirty >= threshold);
      if (overflow_evt)  irq_ovf <= 1'b1;
      else if (ovf_clr)  irq_ovf <= 1'b0;
    end
  end

endmodule
