// Configuration interface registers between the host processor and the
// tester fabric.
//
// A word-addressed register bus (host_addr, host_wr, host_wdata; host_rdata
// is combinational) carries all control and status that is not packet data.
// Register map (word addresses):
//   0 CTRL        rw [0] timer enable, [3] replay enable, [4] replay
//                    synchronous mode; write-only pulses: [1] timer clear,
//                    [2] arm triggers
//   1 TRIG_MODE   rw two bits per monitoring module (trg_mode_e)
//   2 TRIG_MATCH  rw [10:0] frame ID, [21:16] cycle count
//   3 IRQ_THRESH  rw number of dirty monitor sectors that raises the interrupt
//   4 MON_DIRTY   r  monitor FIFO dirty bits; write 1 to clear (sector read)
//   5 STATUS      r  [0] overflow interrupt, [1] packet lost, [15:8] active
//                    triggers, [31:16] last_written_pointer;
//                    write 1 to bit 0 / bit 1 to clear them
//   6 REPLAY_VLD  r  replay FIFO sectors holding data; write 1 to mark a
//                    sector filled (the extractor clears it after use)
//   7 TIMER       r  current timer value
// That configuration and control pass through a set of dedicated registers
// follows the design; the bus and the map are this implementation's.
//
// Timing: a write takes effect at the clock edge that ends the write cycle;
// pulse outputs are high for that one cycle.
module config_regs
  import fr_tester_pkg::*;
#(
  parameter int unsigned N_MON = 5,
  parameter int unsigned N_SEC = 8,
  parameter int unsigned AW    = 11,
  localparam int unsigned CNT_W = $clog2(N_SEC + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [3:0]         host_addr,
  input  logic               host_wr,
  input  logic [DW-1:0]      host_wdata,
  output logic [DW-1:0]      host_rdata,
  // control
  output logic               timer_en,
  output logic               timer_clr,
  output logic               arm,
  output logic [2*N_MON-1:0] trig_mode,
  output logic [ID_W-1:0]    trig_id,
  output logic [CYC_W-1:0]   trig_cycle,
  output logic [CNT_W-1:0]   threshold,
  output logic [N_SEC-1:0]   mon_clr,
  output logic               ovf_clr,
  output logic               replay_en,
  output logic               replay_sync,
  output logic [N_SEC-1:0]   replay_set,
  // status
  input  logic [TS_W-1:0]    time_now,
  input  logic [N_SEC-1:0]   mon_dirty,
  input  logic               irq_ovf,
  input  logic [N_MON-1:0]   lost,
  input  logic [N_MON-1:0]   active,
  input  logic [AW-1:0]      lwp,
  input  logic [N_SEC-1:0]   replay_valid
);

  logic lost_q;
  logic wr_ctrl, wr_stat;

  assign wr_ctrl    = host_wr && host_addr == 4'd0;
  assign wr_stat    = host_wr && host_addr == 4'd5;
  assign timer_clr  = wr_ctrl && host_wdata[1];
  assign arm        = wr_ctrl && host_wdata[2];
  assign mon_clr    = (host_wr && host_addr == 4'd4) ? host_wdata[N_SEC-1:0] : '0;
  assign replay_set = (host_wr && host_addr == 4'd6) ? host_wdata[N_SEC-1:0] : '0;
  assign ovf_clr    = wr_stat && host_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_en    <= 1'b0;
      replay_en   <= 1'b0;
      replay_sync <= 1'b0;
      trig_mode   <= '0;
      trig_id     <= '0;
      trig_cycle  <= '0;
      threshold   <= '0;
      lost_q      <= 1'b0;
    end else begin
      if (wr_ctrl) begin
        timer_en    <= host_wdata[0];
        replay_en   <= host_wdata[3];
        replay_sync <= host_wdata[4];
      end
      if (host_wr && host_addr == 4'd1) trig_mode <= host_wdata[2*N_MON-1:0];
      if (host_wr && host_addr == 4'd2) begin
        trig_id    <= host_wdata[ID_W-1:0];
        trig_cycle <= host_wdata[16 +: CYC_W];
      end
      if (host_wr && host_addr == 4'd3) threshold <= host_wdata[CNT_W-1:0];
      if (|lost)                            lost_q <= 1'b1;
      else if (wr_stat && host_wdata[1])    lost_q <= 1'b0;
    end
  end

  always_comb begin
    host_rdata = '0;
    unique case (host_addr)
      4'd0: host_rdata = DW'({replay_sync, replay_en, 2'b00, timer_en});
      4'd1: host_rdata = DW'(trig_mode);
      4'd2: host_rdata = DW'({trig_cycle, 5'b0, trig_id});
      4'd3: host_rdata = DW'(threshold);
      4'd4: host_rdata = DW'(mon_dirty);
      4'd5: begin
        host_rdata[0]     = irq_ovf;
        host_rdata[1]     = lost_q;
        host_rdata[15:8]  = 8'(active);
        host_rdata[31:16] = 16'(lwp);
      end
      4'd6: host_rdata = DW'(replay_valid);
      4'd7: host_rdata = time_now;
      default: host_rdata = '0;
    endcase
  end

endmodule
