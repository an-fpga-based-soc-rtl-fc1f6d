// Monitoring module: records one kind of event stream into packets for the
// monitor FIFO.
//
// The module receives 16-bit words from the communication controller (or from
// a recording source such as the cluster-time, status or ID-preview source) and
// collects each packet in one of two alternating queues, each large enough for
// one maximum-sized packet. While one queue waits for the DPRAM the other can
// already fill. The queue packs two 16-bit words into one 32-bit host word and,
// when sent, is preceded by a header word (identifier, 16-bit word count, size
// in 32-bit words) and the timestamp drawn when the first word arrived.
//
// Temporal order: at the first word (sop) the module registers the packet in
// the temporal order table, which hands back a row (rule E1). As soon as the
// length is known, announced by the source or counted at eop, the packet
// size goes to that row (rule E2a). When the queue is complete and the table
// has computed the row's DPRAM offset, the module requests the DPRAM arbiter
// and, while granted, presents one word per cycle (header, timestamp, data).
//
// The two queues, the 16-to-32 bit re-arrangement, the header and timestamp
// and the per-packet registration follow the design. The rest is this
// implementation's choice: a packet whose sop finds both queues busy, no free
// table row or the trigger inactive is dropped (`lost` pulses if the module is
// active); words beyond an announced length are dropped; missing words are sent
// as zero.
//
// Timing: the word stream is accepted every cycle with no back-pressure. The
// transfer of a packet of `size` words takes exactly `size` granted cycles.
module monitor_unit
  import fr_tester_pkg::*;
#(
  parameter logic [7:0]  PKT_ID     = 8'h01,
  parameter int unsigned MAX_DATA16 = 130,
  parameter int unsigned N_ROWS     = 8,
  localparam int unsigned ROW_W     = (N_ROWS > 1) ? $clog2(N_ROWS) : 1,
  localparam int unsigned Q_WORDS   = (MAX_DATA16 + 1) / 2,
  localparam int unsigned QA_W      = $clog2(Q_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              active,
  input  logic [TS_W-1:0]   timestamp,
  input  src16_t            src,
  // temporal order table
  output logic              reg_req,
  input  logic [ROW_W-1:0]  reg_row,
  input  logic              reg_ok,
  output logic              len_vld,
  output logic [ROW_W-1:0]  len_row,
  output logic [SIZE_W-1:0] len_pl,
  input  logic [N_ROWS-1:0] row_off_valid,
  // DPRAM arbiter
  output logic              xfer_req,
  output logic [ROW_W-1:0]  xfer_row,
  input  logic              xfer_gnt,
  output logic              out_valid,
  output logic [DW-1:0]     out_data,
  output logic              out_last,
  output logic              lost
);

  // queue storage and per-queue state
  logic [DW-1:0]     mem [2][Q_WORDS];
  logic [1:0]        q_busy, q_full;
  logic [ROW_W-1:0]  q_row [2];
  logic [TS_W-1:0]   q_ts  [2];
  logic [LEN_W-1:0]  q_len [2];
  logic [LEN_W-1:0]  q_rcv [2];   // 16-bit words actually received
  logic              wq, xq;

  // capture state (the queue being filled is wq)
  logic              capturing;
  logic [LEN_W-1:0]  cap_cnt;
  logic [LEN_W-1:0]  cap_len;
  logic              cap_len_sent;
  logic [ROW_W-1:0]  cap_row;

  // transfer state
  logic [SIZE_W-1:0] oidx;

  // ---------------------------------------------------------------- capture
  logic             sop_seen, start, in_pkt, store, len_known;
  logic [LEN_W-1:0] idx, limit, cnt_after, ann_len;
  logic [ROW_W-1:0] cur_row;

  always_comb begin
    sop_seen  = src.valid && src.sop;
    reg_req   = sop_seen && active && !q_busy[wq];
    start     = reg_req && reg_ok;
    lost      = sop_seen && active && !start;
    in_pkt    = start || (capturing && src.valid && !src.sop);
    idx       = start ? '0 : cap_cnt;
    cur_row   = start ? reg_row : cap_row;
    ann_len   = (int'(src.len16) > MAX_DATA16) ? LEN_W'(MAX_DATA16) : src.len16;
    len_known = start ? 1'b0 : cap_len_sent;
    limit     = len_known ? cap_len : LEN_W'(MAX_DATA16);
    if (src.len_valid && !len_known) limit = ann_len;
    store     = in_pkt && (idx < limit);
    cnt_after = store ? idx + 1'b1 : idx;

    len_vld = 1'b0;
    len_pl  = '0;
    len_row = cur_row;
    if (in_pkt && !len_known) begin
      if (src.len_valid) begin
        len_vld = 1'b1;
        len_pl  = size_of_len(ann_len);
      end else if (src.eop) begin
        len_vld = 1'b1;
        len_pl  = size_of_len(cnt_after);
      end
    end else if (capturing && sop_seen && !cap_len_sent) begin
      // packet closed by a new sop before its eop
      len_vld = 1'b1;
      len_pl  = size_of_len(cap_cnt);
    end
  end

  // ---------------------------------------------------------------- transfer
  logic [SIZE_W-1:0] xsize;
  logic [LEN_W-1:0]  dword;
  logic [DW-1:0]     raw;
  logic [LEN_W-1:0]  nvalid;

  always_comb begin
    xsize     = size_of_len(q_len[xq]);
    xfer_row  = q_row[xq];
    xfer_req  = q_full[xq] && row_off_valid[q_row[xq]];
    out_valid = xfer_gnt;
    out_last  = xfer_gnt && (oidx == xsize - 1'b1);
    dword     = LEN_W'(oidx - SIZE_W'(HDR_WORDS));
    raw       = mem[xq][dword < LEN_W'(Q_WORDS) ? QA_W'(dword) : '0];
    nvalid    = (q_rcv[xq] < q_len[xq]) ? q_rcv[xq] : q_len[xq];
    if (oidx == 0)      out_data = make_header(PKT_ID, q_len[xq]);
    else if (oidx == 1) out_data = q_ts[xq];
    else begin
      // 16-bit halves beyond the packet length are sent as zero
      out_data[HW-1:0]  = ({1'b0, dword, 1'b0}       < {2'b0, nvalid}) ? raw[HW-1:0]  : '0;
      out_data[DW-1:HW] = ({1'b0, dword, 1'b0} + 1'b1 < {2'b0, nvalid}) ? raw[DW-1:HW] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (store) begin
      if (idx[0]) mem[wq][QA_W'(idx >> 1)][DW-1:HW] <= src.data;
      else        mem[wq][QA_W'(idx >> 1)][HW-1:0]  <= src.data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_busy       <= '0;
      q_full       <= '0;
      q_row        <= '{default: '0};
      q_ts         <= '{default: '0};
      q_len        <= '{default: '0};
      q_rcv        <= '{default: '0};
      wq           <= 1'b0;
      xq           <= 1'b0;
      capturing    <= 1'b0;
      cap_cnt      <= '0;
      cap_len      <= '0;
      cap_len_sent <= 1'b0;
      cap_row      <= '0;
      oidx         <= '0;
    end else begin
      if (in_pkt) begin
        cap_cnt <= cnt_after;
        if (start) begin
          q_busy[wq]   <= 1'b1;
          q_row[wq]    <= reg_row;
          q_ts[wq]     <= timestamp;
          cap_row      <= reg_row;
          cap_len_sent <= 1'b0;
          capturing    <= 1'b1;
        end
        if (len_vld) begin
          cap_len_sent <= 1'b1;
          cap_len      <= src.len_valid ? ann_len : cnt_after;
        end
        if (src.eop) begin
          capturing   <= 1'b0;
          q_full[wq]  <= 1'b1;
          q_len[wq]   <= len_known ? cap_len : (src.len_valid ? ann_len : cnt_after);
          q_rcv[wq]   <= cnt_after;
          wq          <= ~wq;
        end
      end else if (capturing && src.valid && src.sop) begin
        // a new sop while a packet is open: the open packet is closed here
        capturing  <= 1'b0;
        q_full[wq] <= 1'b1;
        q_len[wq]  <= cap_len_sent ? cap_len : cap_cnt;
        q_rcv[wq]  <= cap_cnt;
        wq         <= ~wq;
      end

      if (xfer_gnt) begin
        if (out_last) begin
          oidx       <= '0;
          q_full[xq] <= 1'b0;
          q_busy[xq] <= 1'b0;
          xq         <= ~xq;
        end else begin
          oidx <= oidx + 1'b1;
        end
      end
    end
  end

endmodule
