// Data extraction module of the replay unit.
//
// The host fills the replay DPRAM with packets in the same format the monitor
// produces (header, timestamp, data) and marks each filled sector valid. The
// extractor walks through the FIFO, one word at a time and never into a sector
// that is not marked valid, and releases each sector (sector_clr) when it has
// read past its end. For a frame packet it waits until the packet is due and
// then forwards its data words to the injection module of the frame's
// channel:
//   asynchronous mode (the tester dictates the timing): due when the timer
//     has reached the timestamp;
//   synchronous mode (the cluster dictates the timing): due when the
//     timestamp's cycle count [21:16] and slot ID [10:0] equal the current
//     cycle count and slot ID of the bus schedule.
// Identifier PKT_FRAME_A goes to injection module 0, PKT_FRAME_B to module 1,
// other recorded packets are skipped and PKT_PAD is a one-word filler.
//
// The two timing modes and the comparison with the monitoring timer follow the
// design. The bit positions of the synchronous timestamp are this
// implementation's choice. In asynchronous mode the comparison is "timer minus
// timestamp is not negative" rather than plain equality, so that a packet read
// after its instant is sent at once instead of after a full timer wrap.
//
// Timing: every word costs two cycles (address, then data from the
// synchronous RAM port). A due frame is forwarded only when the target
// injection module has a free queue (inj_ready); once started it is
// forwarded without pause.
module replay_extractor
  import fr_tester_pkg::*;
#(
  parameter int unsigned DPRAM_WORDS  = 2048,
  parameter int unsigned SECTOR_WORDS = 256,
  localparam int unsigned AW     = $clog2(DPRAM_WORDS),
  localparam int unsigned N_SEC  = DPRAM_WORDS / SECTOR_WORDS,
  localparam int unsigned SEC_SH = $clog2(SECTOR_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              sync_mode,
  input  logic [TS_W-1:0]   time_now,
  input  logic [CYC_W-1:0]  cycle_count,
  input  logic [ID_W-1:0]   slot_id,
  // replay DPRAM read port
  output logic [AW-1:0]     rd_addr,
  input  logic [DW-1:0]     rd_data,
  input  logic [N_SEC-1:0]  sector_valid,
  output logic [N_SEC-1:0]  sector_clr,
  // towards the injection modules
  input  logic [1:0]        inj_ready,
  output logic [1:0]        inj_valid,
  output logic              inj_sop,
  output logic              inj_last,
  output logic [DW-1:0]     inj_data,
  output logic [LEN_W-1:0]  inj_len16,
  output logic              fired,
  output logic [AW-1:0]     rd_ptr
);

  typedef enum logic [2:0] {S_FETCH, S_HDR, S_TS, S_WAIT, S_DATA} state_e;

  state_e            st, after;     // `after`: state that consumes the fetched word
  logic              reading;       // address issued last cycle
  logic [7:0]        pid;
  logic [LEN_W-1:0]  len16;
  logic [SIZE_W-1:0] remain;
  logic [TS_W-1:0]   ts;
  logic              fwd, ch, first;

  logic due, can_read, word_in;
  logic [AW-1:0] ptr_nx;

  assign due      = sync_mode ? (ts[21:16] == cycle_count && ts[10:0] == slot_id)
                              : ($signed(time_now - ts) >= 0);
  assign can_read = en && sector_valid[rd_ptr[AW-1:SEC_SH]];
  assign word_in  = reading;                 // rd_data holds word rd_ptr
  assign ptr_nx   = rd_ptr + 1'b1;
  assign rd_addr  = rd_ptr;

  always_comb begin
    inj_valid  = '0;
    inj_sop    = first;
    inj_last   = remain == SIZE_W'(1);
    inj_data   = rd_data;
    inj_len16  = len16;
    sector_clr = '0;
    if (word_in && st == S_DATA && fwd) inj_valid[ch] = 1'b1;
    if (word_in && ptr_nx[AW-1:SEC_SH] != rd_ptr[AW-1:SEC_SH]) sector_clr[rd_ptr[AW-1:SEC_SH]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_FETCH;
      after   <= S_HDR;
      reading <= 1'b0;
      pid     <= '0;
      len16   <= '0;
      remain  <= '0;
      ts      <= '0;
      fwd     <= 1'b0;
      ch      <= 1'b0;
      first   <= 1'b0;
      rd_ptr  <= '0;
      fired   <= 1'b0;
    end else begin
      fired   <= 1'b0;
      reading <= 1'b0;
      if (word_in) rd_ptr <= ptr_nx;
      unique case (st)
        S_FETCH: begin
          // issue the read of the next word once its sector is valid
          if (!reading && can_read && !(after == S_DATA && first && fwd && !inj_ready[ch])) begin
            reading <= 1'b1;
            st      <= after;
          end
        end
        S_HDR: if (word_in) begin
          pid    <= rd_data[31:24];
          len16  <= rd_data[23:16];
          remain <= rd_data[15:0] - SIZE_W'(HDR_WORDS);
          if (rd_data[31:24] == PKT_PAD || rd_data[15:0] < SIZE_W'(HDR_WORDS)) begin
            after <= S_HDR;
          end else begin
            after <= S_TS;
          end
          st <= S_FETCH;
        end
        S_TS: if (word_in) begin
          ts    <= rd_data;
          fwd   <= pid == PKT_FRAME_A || pid == PKT_FRAME_B;
          ch    <= pid == PKT_FRAME_B;
          first <= 1'b1;
          st    <= (remain == 0) ? S_FETCH : S_WAIT;
          after <= (remain == 0) ? S_HDR : S_DATA;
        end
        S_WAIT: begin
          if (!fwd || due) begin
            fired <= fwd;
            st    <= S_FETCH;
          end
        end
        S_DATA: if (word_in) begin
          first  <= 1'b0;
          remain <= remain - 1'b1;
          after  <= (remain == SIZE_W'(1)) ? S_HDR : S_DATA;
          st     <= S_FETCH;
        end
        default: st <= S_FETCH;
      endcase
    end
  end

endmodule
