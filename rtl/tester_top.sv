// FlexRay tester node: monitoring and replay fabric between a FlexRay
// communication controller and the host processor.
//
// The controller's host interface is replaced by this fabric. On the receive
// side five monitoring modules record, in parallel:
//   0  frames received on channel A            (identifier PKT_FRAME_A)
//   1  frames received on channel B            (PKT_FRAME_B)
//   2  the synchronized cluster time per cycle (PKT_CLUSTER_TIME)
//   3  receive status per frame                (PKT_STATUS)
//   4  the frame IDs seen per cycle            (PKT_ID_PREVIEW)
// Each module is enabled by the programmable trigger, stamps its packets with
// the free-running timer at their start and, once a packet is complete, writes
// it through the DPRAM arbiter into the monitor DPRAM. The temporal order table
// assigns every packet its place so that the FIFO holds packets in the order
// of their timestamps, even when a short frame on one channel finishes before a
// long one on the other. The sector controller tells the host, by interrupt and
// dirty bits, which sectors are complete, and stops monitoring on overflow.
//
// On the transmit side the host writes recorded packets into the replay DPRAM;
// the extractor forwards each frame, at its timestamp or at its cycle/slot, to
// the injection module of its channel, which feeds the controller's transmit
// path with 16-bit words.
//
// Interface: cc_* are the controller's receive events, word streams and
// schedule state, and its transmit streams; host_* are the host's register bus
// and its ports of the two DPRAMs (it reads the monitor FIFO and writes the
// replay FIFO). irq_mon combines the threshold and overflow interrupts.
// Clock: 40 MHz, one timer tick (25 ns) per cycle.
module tester_top
  import fr_tester_pkg::*;
#(
  parameter int unsigned N_ROWS       = 8,
  parameter int unsigned DPRAM_WORDS  = 2048,
  parameter int unsigned SECTOR_WORDS = 256,
  parameter int unsigned MAX_DATA16   = 130,
  parameter int unsigned MAX_IDS      = 32,
  localparam int unsigned N_MON = 5,
  localparam int unsigned AW    = $clog2(DPRAM_WORDS),
  localparam int unsigned N_SEC = DPRAM_WORDS / SECTOR_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  // controller receive path, channel A and B
  input  src16_t            cc_rx_a,
  input  logic [ID_W-1:0]   cc_rx_id_a,
  input  logic              cc_rx_end_a,
  input  rx_flags_t         cc_rx_flags_a,
  input  src16_t            cc_rx_b,
  input  logic [ID_W-1:0]   cc_rx_id_b,
  input  logic              cc_rx_end_b,
  input  rx_flags_t         cc_rx_flags_b,
  // controller schedule state
  input  logic              cc_cycle_start,
  input  logic [CYC_W-1:0]  cc_cycle_count,
  input  logic [HW-1:0]     cc_macrotick,
  input  logic [ID_W-1:0]   cc_slot_id,
  // controller transmit path, index 0 = channel A, 1 = channel B
  output logic [1:0]        cc_tx_valid,
  input  logic [1:0]        cc_tx_ready,
  output logic [1:0]        cc_tx_sop,
  output logic [1:0]        cc_tx_eop,
  output logic [HW-1:0]     cc_tx_data  [2],
  output logic [LEN_W-1:0]  cc_tx_len16 [2],
  // host register bus
  input  logic [3:0]        host_addr,
  input  logic              host_wr,
  input  logic [DW-1:0]     host_wdata,
  output logic [DW-1:0]     host_rdata,
  // host port of the monitor FIFO (read)
  input  logic [AW-1:0]     host_mon_addr,
  output logic [DW-1:0]     host_mon_rdata,
  // host port of the replay FIFO (write)
  input  logic              host_rpl_we,
  input  logic [AW-1:0]     host_rpl_addr,
  input  logic [DW-1:0]     host_rpl_wdata,
  output logic [DW-1:0]     host_rpl_rdata,
  // interrupts
  output logic              irq_mon,
  output logic              irq_ovf
);

  localparam int unsigned ROW_W = (N_ROWS > 1) ? $clog2(N_ROWS) : 1;
  localparam int unsigned CNT_W = $clog2(N_SEC + 1);
  localparam logic [7:0] MON_ID [N_MON] = '{PKT_FRAME_A, PKT_FRAME_B, PKT_CLUSTER_TIME,
                                            PKT_STATUS, PKT_ID_PREVIEW};

  // ------------------------------------------------------------ configuration
  logic               timer_en, timer_clr, arm, ovf_clr, replay_en, replay_sync, irq_thr;
  logic [2*N_MON-1:0] trig_mode;
  logic [ID_W-1:0]    trig_id;
  logic [CYC_W-1:0]   trig_cycle;
  logic [CNT_W-1:0]   threshold;
  logic [N_SEC-1:0]   mon_clr, replay_set, replay_clr, replay_valid, mon_dirty;
  logic [TS_W-1:0]    time_now;
  logic [N_MON-1:0]   active, lost;
  logic [AW-1:0]      lwp, lwp_new;
  logic               overflow, retire_vld;

  fr_timer #(.TS_W(TS_W)) u_timer (
    .clk, .rst_n, .en(timer_en), .clr(timer_clr), .time_o(time_now)
  );

  trigger_unit #(.N_MON(N_MON)) u_trigger (
    .clk, .rst_n, .arm, .mode(trig_mode), .match_id(trig_id), .match_cycle(trig_cycle),
    .rx_start_a(cc_rx_a.valid && cc_rx_a.sop), .rx_id_a(cc_rx_id_a),
    .rx_start_b(cc_rx_b.valid && cc_rx_b.sop), .rx_id_b(cc_rx_id_b),
    .cycle_start(cc_cycle_start), .cycle_count(cc_cycle_count),
    .stop(overflow), .active
  );

  config_regs #(.N_MON(N_MON), .N_SEC(N_SEC), .AW(AW)) u_regs (
    .clk, .rst_n, .host_addr, .host_wr, .host_wdata, .host_rdata,
    .timer_en, .timer_clr, .arm, .trig_mode, .trig_id, .trig_cycle, .threshold,
    .mon_clr, .ovf_clr, .replay_en, .replay_sync, .replay_set,
    .time_now, .mon_dirty, .irq_ovf, .lost, .active, .lwp, .replay_valid
  );

  // ------------------------------------------------------------ sources
  src16_t src [N_MON];
  assign src[0] = cc_rx_a;
  assign src[1] = cc_rx_b;

  cluster_time_source u_ct_src (
    .clk, .rst_n, .cycle_start(cc_cycle_start), .cycle_count(cc_cycle_count),
    .macrotick(cc_macrotick), .src(src[2])
  );

  status_source u_st_src (
    .clk, .rst_n,
    .rx_end_a(cc_rx_end_a), .rx_id_a(cc_rx_id_a), .rx_flags_a(cc_rx_flags_a),
    .rx_end_b(cc_rx_end_b), .rx_id_b(cc_rx_id_b), .rx_flags_b(cc_rx_flags_b),
    .src(src[3])
  );

  id_preview_source #(.MAX_IDS(MAX_IDS)) u_id_src (
    .clk, .rst_n,
    .rx_start_a(cc_rx_a.valid && cc_rx_a.sop), .rx_id_a(cc_rx_id_a),
    .rx_start_b(cc_rx_b.valid && cc_rx_b.sop), .rx_id_b(cc_rx_id_b),
    .cycle_start(cc_cycle_start), .src(src[4])
  );

  // ------------------------------------------------------------ monitors
  logic [N_MON-1:0]  reg_req, reg_ok, len_vld, xfer_req, xfer_gnt, out_valid, out_last;
  logic [ROW_W-1:0]  reg_row [N_MON];
  logic [ROW_W-1:0]  len_row [N_MON];
  logic [SIZE_W-1:0] len_pl  [N_MON];
  logic [ROW_W-1:0]  xfer_row [N_MON];
  logic [DW-1:0]     out_data [N_MON];
  logic [AW-1:0]     row_off [N_ROWS];
  logic [SIZE_W-1:0] row_pl  [N_ROWS];
  logic [N_ROWS-1:0] row_off_valid;

  for (genvar m = 0; m < N_MON; m++) begin : g_mon
    monitor_unit #(.PKT_ID(MON_ID[m]), .MAX_DATA16(MAX_DATA16), .N_ROWS(N_ROWS)) u_mon (
      .clk, .rst_n, .active(active[m]), .timestamp(time_now), .src(src[m]),
      .reg_req(reg_req[m]), .reg_row(reg_row[m]), .reg_ok(reg_ok[m]),
      .len_vld(len_vld[m]), .len_row(len_row[m]), .len_pl(len_pl[m]),
      .row_off_valid,
      .xfer_req(xfer_req[m]), .xfer_row(xfer_row[m]), .xfer_gnt(xfer_gnt[m]),
      .out_valid(out_valid[m]), .out_data(out_data[m]), .out_last(out_last[m]),
      .lost(lost[m])
    );
  end

  logic [$clog2(N_ROWS+1)-1:0] row_to [N_ROWS];
  logic [$clog2(N_ROWS+1)-1:0] temporal_order;
  logic                        done_vld;
  logic [ROW_W-1:0]            done_row;

  temporal_order_table #(.N_MON(N_MON), .N_ROWS(N_ROWS), .DPRAM_WORDS(DPRAM_WORDS)) u_table (
    .clk, .rst_n, .reg_req, .reg_row, .reg_ok, .len_vld, .len_row, .len_pl,
    .done_vld, .done_row, .row_off, .row_pl, .row_off_valid, .row_to, .temporal_order,
    .retire_vld, .last_written_ptr(lwp_new)
  );

  logic          mon_we;
  logic [AW-1:0] mon_waddr;
  logic [DW-1:0] mon_wdata, mon_a_rdata;

  dpram_arbiter #(.N_MON(N_MON), .N_ROWS(N_ROWS), .DPRAM_WORDS(DPRAM_WORDS),
                  .SECTOR_WORDS(SECTOR_WORDS)) u_arb (
    .clk, .rst_n, .req(xfer_req), .req_row(xfer_row), .gnt(xfer_gnt),
    .mon_valid(out_valid), .mon_data(out_data), .mon_last(out_last),
    .row_off, .row_pl, .sector_dirty(mon_dirty),
    .we(mon_we), .waddr(mon_waddr), .wdata(mon_wdata),
    .done_vld, .done_row, .overflow
  );

  logic [CNT_W-1:0] n_dirty;
  logic             retire_q;   // the table's pointer is valid one cycle after a removal

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) retire_q <= 1'b0;
    else        retire_q <= retire_vld;
  end

  fifo_sector_ctrl #(.DPRAM_WORDS(DPRAM_WORDS), .SECTOR_WORDS(SECTOR_WORDS)) u_sectors (
    .clk, .rst_n, .retire_vld(retire_q), .lwp_new, .host_clr(mon_clr), .threshold,
    .overflow_evt(overflow), .ovf_clr, .dirty(mon_dirty), .lwp, .n_dirty,
    .irq_thr, .irq_ovf
  );

  dpram #(.WORDS(DPRAM_WORDS), .DW(DW)) u_mon_ram (
    .clk,
    .a_we(mon_we), .a_addr(mon_waddr), .a_wdata(mon_wdata), .a_rdata(mon_a_rdata),
    .b_we(1'b0), .b_addr(host_mon_addr), .b_wdata('0), .b_rdata(host_mon_rdata)
  );

  assign irq_mon = irq_thr || irq_ovf;

  // ------------------------------------------------------------ replay
  logic [AW-1:0]    rpl_addr, rpl_ptr;
  logic [DW-1:0]    rpl_rdata;
  logic [1:0]       inj_ready, inj_valid;
  logic             inj_sop, inj_last, fired;
  logic [DW-1:0]    inj_data;
  logic [LEN_W-1:0] inj_len16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) replay_valid <= '0;
    else        replay_valid <= (replay_valid & ~replay_clr) | replay_set;
  end

  dpram #(.WORDS(DPRAM_WORDS), .DW(DW)) u_rpl_ram (
    .clk,
    .a_we(1'b0), .a_addr(rpl_addr), .a_wdata('0), .a_rdata(rpl_rdata),
    .b_we(host_rpl_we), .b_addr(host_rpl_addr), .b_wdata(host_rpl_wdata), .b_rdata(host_rpl_rdata)
  );

  replay_extractor #(.DPRAM_WORDS(DPRAM_WORDS), .SECTOR_WORDS(SECTOR_WORDS)) u_extract (
    .clk, .rst_n, .en(replay_en), .sync_mode(replay_sync), .time_now,
    .cycle_count(cc_cycle_count), .slot_id(cc_slot_id),
    .rd_addr(rpl_addr), .rd_data(rpl_rdata), .sector_valid(replay_valid), .sector_clr(replay_clr),
    .inj_ready, .inj_valid, .inj_sop, .inj_last, .inj_data, .inj_len16, .fired, .rd_ptr(rpl_ptr)
  );

  for (genvar c = 0; c < 2; c++) begin : g_inj
    injection_unit #(.MAX_DATA16(MAX_DATA16)) u_inj (
      .clk, .rst_n, .in_ready(inj_ready[c]), .in_valid(inj_valid[c]), .in_sop(inj_sop),
      .in_last(inj_last), .in_data(inj_data), .in_len16(inj_len16),
      .tx_valid(cc_tx_valid[c]), .tx_ready(cc_tx_ready[c]), .tx_sop(cc_tx_sop[c]),
      .tx_eop(cc_tx_eop[c]), .tx_data(cc_tx_data[c]), .tx_len16(cc_tx_len16[c])
    );
  end

endmodule
