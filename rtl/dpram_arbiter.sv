// Write arbiter of the monitor FIFO DPRAM.
//
// Monitoring modules request the single fabric write port of the monitor DPRAM
// when a queue holds a complete packet whose offset is known. The arbiter
// grants the port strictly in the order the requests arrived; requests raised
// in the same cycle are ordered by module index. While a module is granted it
// presents one word per cycle and the arbiter writes them to off, off+1, ...,
// off+pl-1 (modulo the DPRAM size), where off and pl come from the module's
// row in the temporal order table. After the last word it reports the row as
// written (done_vld) so that the table can remove it in order.
//
// Grant in request order and the address range off..off+pl follow the design.
// Overflow handling is this implementation's reading of it: if the first or
// last word of a packet falls into a sector whose dirty bit is still set (the
// host has not yet read it), the packet is drained from its queue without
// being written, the row is still reported done so the order is kept, and
// `overflow` pulses; the trigger unit then stops all monitoring. A packet is
// never longer than a sector, so checking both ends covers every sector it
// touches.
//
// Timing: a request seen in cycle t can be granted from cycle t+2 at the
// earliest (one cycle to queue it, one to start). When the queue is not empty
// the next packet starts right after the last word of the current one.
module dpram_arbiter
  import fr_tester_pkg::*;
#(
  parameter int unsigned N_MON        = 5,
  parameter int unsigned N_ROWS       = 8,
  parameter int unsigned DPRAM_WORDS  = 2048,
  parameter int unsigned SECTOR_WORDS = 256,
  localparam int unsigned ROW_W = (N_ROWS > 1) ? $clog2(N_ROWS) : 1,
  localparam int unsigned MON_W = (N_MON > 1) ? $clog2(N_MON) : 1,
  localparam int unsigned AW    = $clog2(DPRAM_WORDS),
  localparam int unsigned N_SEC = DPRAM_WORDS / SECTOR_WORDS,
  localparam int unsigned SEC_SH = $clog2(SECTOR_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_MON-1:0]  req,
  input  logic [ROW_W-1:0]  req_row [N_MON],
  output logic [N_MON-1:0]  gnt,
  input  logic [N_MON-1:0]  mon_valid,
  input  logic [DW-1:0]     mon_data [N_MON],
  input  logic [N_MON-1:0]  mon_last,
  input  logic [AW-1:0]     row_off [N_ROWS],
  input  logic [SIZE_W-1:0] row_pl  [N_ROWS],
  input  logic [N_SEC-1:0]  sector_dirty,
  output logic              we,
  output logic [AW-1:0]     waddr,
  output logic [DW-1:0]     wdata,
  output logic              done_vld,
  output logic [ROW_W-1:0]  done_row,
  output logic              overflow
);

  // request order queue
  logic [MON_W-1:0] ord   [N_MON];
  logic [MON_W:0]   cnt;
  logic [N_MON-1:0] queued;

  logic             busy, skip;
  logic [MON_W-1:0] cur;
  logic [ROW_W-1:0] cur_row;
  logic [AW-1:0]    addr;

  // start of the next packet
  logic             pop;
  logic [MON_W-1:0] head;
  logic [ROW_W-1:0] head_row;
  logic [AW-1:0]    head_off, head_end;
  logic             head_dirty;
  logic             fin;

  always_comb begin
    fin        = busy && mon_valid[cur] && mon_last[cur];
    pop        = (!busy || fin) && cnt != 0;
    head       = ord[0];
    head_row   = req_row[head];
    head_off   = row_off[head_row];
    head_end   = head_off + AW'(row_pl[head_row]) - 1'b1;
    head_dirty = sector_dirty[head_off[AW-1:SEC_SH]] || sector_dirty[head_end[AW-1:SEC_SH]];

    gnt = '0;
    if (busy) gnt[cur] = 1'b1;
    we       = busy && mon_valid[cur] && !skip;
    waddr    = addr;
    wdata    = mon_data[cur];
    done_vld = fin;
    done_row = cur_row;
    overflow = pop && head_dirty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ord     <= '{default: '0};
      cnt     <= '0;
      queued  <= '0;
      busy    <= 1'b0;
      skip    <= 1'b0;
      cur     <= '0;
      cur_row <= '0;
      addr    <= '0;
    end else begin
      automatic logic [MON_W-1:0] nord [N_MON];
      automatic logic [MON_W:0]   ncnt;
      automatic logic [N_MON-1:0] nqueued;
      nord    = ord;
      ncnt    = cnt;
      nqueued = queued;
      if (fin) nqueued[cur] = 1'b0;
      if (pop) begin
        for (int k = 0; k < N_MON - 1; k++) nord[k] = ord[k+1];
        ncnt = ncnt - 1'b1;
      end
      for (int m = 0; m < N_MON; m++) begin
        if (req[m] && !queued[m]) begin
          nord[ncnt[MON_W-1:0]] = MON_W'(m);
          ncnt       = ncnt + 1'b1;
          nqueued[m] = 1'b1;
        end
      end
      ord    <= nord;
      cnt    <= ncnt;
      queued <= nqueued;

      if (pop) begin
        busy    <= 1'b1;
        cur     <= head;
        cur_row <= head_row;
        addr    <= head_off;
        skip    <= head_dirty;
      end else if (fin) begin
        busy <= 1'b0;
      end else if (busy && mon_valid[cur]) begin
        addr <= addr + 1'b1;
      end
    end
  end

endmodule
