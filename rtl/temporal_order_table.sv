// Temporal order table: address generation for the monitor FIFO.
//
// Packets from several monitoring modules overlap in time: a long frame on
// channel A can start first and finish after several short frames on channel
// B. The host must find them in the FIFO in the order of their start
// timestamps. Instead of holding the short packets back, each packet is given
// its final DPRAM offset, behind all packets that started earlier, and is
// written as soon as it is complete.
//
// Each row holds a temporal order value `to`, a packet length `pl` (32-bit
// words) and an offset `off`. The rules:
//   E1a/E1b  at a packet start (reg_req) the global count `temporal_order` is
//            incremented and stored as the new row's `to`. Several starts in
//            one cycle get consecutive values in module index order.
//   E2a      the packet length is written to `pl` when it becomes known.
//   E2b      off_i = (off_p + pl_p) mod DPRAM_WORDS, where p is the row whose
//            `to` is one less; for the row with to = 1, p is the last removed
//            row, whose off and pl are kept (both 0 after reset, so the first
//            packet lands at offset 0).
//   R1a-c    removing a row decrements every larger `to`, clears the row's
//            `to` and decrements `temporal_order`.
// These rules follow the design. The table is a pool of N_ROWS rows handed out
// per packet. A row whose packet has been written (done_vld) is removed only
// once it holds to = 1, i.e. in temporal order. Removing a written row while an
// earlier one is pending would leave a later packet with the wrong predecessor
// and let it overwrite the removed packet's region. The removal also moves
// `last_written_ptr` to off + pl of the removed row: every word below it has
// been written, which is what the sector dirty bits need.
//
// Timing: reg_row/reg_ok answer combinationally in the cycle of reg_req. An
// offset appears one cycle after its predecessor's offset and length are
// known. A done row that holds to = 1 is removed on the next clock edge.
module temporal_order_table
  import fr_tester_pkg::*;
#(
  parameter int unsigned N_MON       = 5,
  parameter int unsigned N_ROWS      = 8,
  parameter int unsigned DPRAM_WORDS = 2048,
  localparam int unsigned ROW_W = (N_ROWS > 1) ? $clog2(N_ROWS) : 1,
  localparam int unsigned AW    = $clog2(DPRAM_WORDS),
  localparam int unsigned TO_W  = $clog2(N_ROWS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // registration (E1)
  input  logic [N_MON-1:0]   reg_req,
  output logic [ROW_W-1:0]   reg_row [N_MON],
  output logic [N_MON-1:0]   reg_ok,
  // packet length (E2a)
  input  logic [N_MON-1:0]   len_vld,
  input  logic [ROW_W-1:0]   len_row [N_MON],
  input  logic [SIZE_W-1:0]  len_pl  [N_MON],
  // written packets
  input  logic               done_vld,
  input  logic [ROW_W-1:0]   done_row,
  // row contents
  output logic [AW-1:0]      row_off [N_ROWS],
  output logic [SIZE_W-1:0]  row_pl  [N_ROWS],
  output logic [N_ROWS-1:0]  row_off_valid,
  output logic [TO_W-1:0]    row_to  [N_ROWS],
  output logic [TO_W-1:0]    temporal_order,
  // removal
  output logic               retire_vld,
  output logic [AW-1:0]      last_written_ptr
);

  logic [N_ROWS-1:0] in_use, pl_valid, done;
  logic [AW-1:0]     last_off;
  logic [SIZE_W-1:0] last_pl;

  // ------------------------------------------------------------ removal pick
  logic [ROW_W-1:0] ret_row;
  always_comb begin
    retire_vld = 1'b0;
    ret_row    = '0;
    for (int r = 0; r < N_ROWS; r++) begin
      if (in_use[r] && done[r] && row_to[r] == TO_W'(1)) begin
        retire_vld = 1'b1;
        ret_row    = ROW_W'(r);
      end
    end
  end

  // ------------------------------------------------------------ E1 allocation
  logic [TO_W-1:0]   base;
  logic [TO_W-1:0]   new_to [N_MON];
  logic [N_ROWS-1:0] taken;
  logic [TO_W-1:0]   nalloc;
  always_comb begin
    base   = temporal_order - TO_W'(retire_vld);
    taken  = in_use;
    nalloc = '0;
    for (int m = 0; m < N_MON; m++) begin
      reg_ok[m]  = 1'b0;
      reg_row[m] = '0;
      new_to[m]  = '0;
      if (reg_req[m]) begin
        for (int r = 0; r < N_ROWS; r++) begin
          if (!reg_ok[m] && !taken[r]) begin
            reg_ok[m]  = 1'b1;
            reg_row[m] = ROW_W'(r);
            taken[r]   = 1'b1;
          end
        end
        if (reg_ok[m]) begin
          nalloc    = nalloc + 1'b1;
          new_to[m] = base + nalloc;
        end
      end
    end
  end

  // ------------------------------------------------------------ E2b offsets
  logic [N_ROWS-1:0] pred_ok;
  logic [AW-1:0]     pred_end [N_ROWS];
  always_comb begin
    for (int i = 0; i < N_ROWS; i++) begin
      pred_ok[i]  = 1'b0;
      pred_end[i] = '0;
      if (row_to[i] == TO_W'(1)) begin
        pred_ok[i]  = 1'b1;
        pred_end[i] = last_off + AW'(last_pl);
      end else begin
        for (int j = 0; j < N_ROWS; j++) begin
          if (in_use[j] && row_to[j] == row_to[i] - 1'b1) begin
            pred_ok[i]  = row_off_valid[j] && pl_valid[j];
            pred_end[i] = row_off[j] + AW'(row_pl[j]);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_use           <= '0;
      pl_valid         <= '0;
      done             <= '0;
      row_off_valid    <= '0;
      row_off          <= '{default: '0};
      row_pl           <= '{default: '0};
      row_to           <= '{default: '0};
      temporal_order   <= '0;
      last_off         <= '0;
      last_pl          <= '0;
      last_written_ptr <= '0;
    end else begin
      // E2b: offset once the predecessor is complete
      for (int i = 0; i < N_ROWS; i++) begin
        if (in_use[i] && !row_off_valid[i] && pred_ok[i]) begin
          row_off[i]       <= pred_end[i];
          row_off_valid[i] <= 1'b1;
        end
      end
      // R1a-c
      if (retire_vld) begin
        for (int r = 0; r < N_ROWS; r++) begin
          if (in_use[r] && row_to[r] > TO_W'(1)) row_to[r] <= row_to[r] - 1'b1;
        end
        row_to[ret_row]        <= '0;
        in_use[ret_row]        <= 1'b0;
        done[ret_row]          <= 1'b0;
        pl_valid[ret_row]      <= 1'b0;
        row_off_valid[ret_row] <= 1'b0;
        last_off               <= row_off[ret_row];
        last_pl                <= row_pl[ret_row];
        last_written_ptr       <= row_off[ret_row] + AW'(row_pl[ret_row]);
      end
      // E1a/E1b
      for (int m = 0; m < N_MON; m++) begin
        if (reg_ok[m]) begin
          in_use[reg_row[m]]        <= 1'b1;
          row_to[reg_row[m]]        <= new_to[m];
          pl_valid[reg_row[m]]      <= 1'b0;
          done[reg_row[m]]          <= 1'b0;
          row_off_valid[reg_row[m]] <= 1'b0;
        end
      end
      // E2a (after E1: a length announced with the first word is kept)
      for (int m = 0; m < N_MON; m++) begin
        if (len_vld[m]) begin
          row_pl[len_row[m]]   <= len_pl[m];
          pl_valid[len_row[m]] <= 1'b1;
        end
      end
      if (done_vld) done[done_row] <= 1'b1;
      temporal_order <= base + nalloc;
    end
  end

endmodule
