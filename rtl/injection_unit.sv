// Injection module of the replay unit.
//
// Receives frames to be sent from the data extraction module as 32-bit words
// and hands them to the FlexRay protocol engine as 16-bit words. Like a
// monitoring module in the opposite direction it has two alternating queues,
// each holding one maximum-sized frame, so that one frame can be taken over
// while the protocol engine is still reading the previous one.
//
// Input side: in_ready is high while the next queue is free; a frame is
// written word by word (in_valid) from in_sop to in_last, with its length in
// 16-bit words (in_len16) given at in_sop. Output side: a valid/ready stream of
// 16-bit words (tx_*), lower half of each 32-bit word first, with tx_sop on the
// first and tx_eop on the last word and the length on tx_len16 throughout.
// Two queues and a state machine towards the protocol engine follow the
// design; the two handshakes are this implementation's choice, as the protocol
// engine's transmit interface is not part of the design.
//
// Timing: a frame written in cycles t..t+k can be offered from cycle t+k+1.
// One 16-bit word leaves per cycle in which tx_valid and tx_ready are high.
module injection_unit
  import fr_tester_pkg::*;
#(
  parameter int unsigned MAX_DATA16 = 130,
  localparam int unsigned Q_WORDS   = (MAX_DATA16 + 1) / 2,
  localparam int unsigned QA_W      = $clog2(Q_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             in_ready,
  input  logic             in_valid,
  input  logic             in_sop,
  input  logic             in_last,
  input  logic [DW-1:0]    in_data,
  input  logic [LEN_W-1:0] in_len16,
  output logic             tx_valid,
  input  logic             tx_ready,
  output logic             tx_sop,
  output logic             tx_eop,
  output logic [HW-1:0]    tx_data,
  output logic [LEN_W-1:0] tx_len16
);

  logic [DW-1:0]    mem [2][Q_WORDS];
  logic [1:0]       q_full;
  logic [LEN_W-1:0] q_len [2];
  logic             wq, rq;
  logic [QA_W-1:0]  widx;
  logic [LEN_W-1:0] ridx;
  logic [DW-1:0]    rword;
  logic [QA_W-1:0]  waddr;

  assign in_ready = !q_full[wq];
  assign waddr    = in_sop ? '0 : widx;
  assign rword    = mem[rq][QA_W'(ridx >> 1)];
  assign tx_valid = q_full[rq];
  assign tx_sop   = ridx == '0;
  assign tx_eop   = ridx == q_len[rq] - 1'b1;
  assign tx_data  = ridx[0] ? rword[DW-1:HW] : rword[HW-1:0];
  assign tx_len16 = q_len[rq];

  always_ff @(posedge clk) begin
    if (in_valid && !q_full[wq] && int'(waddr) < Q_WORDS) mem[wq][waddr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_full <= '0;
      q_len  <= '{default: '0};
      wq     <= 1'b0;
      rq     <= 1'b0;
      widx   <= '0;
      ridx   <= '0;
    end else begin
      if (in_valid && !q_full[wq]) begin
        widx <= waddr + 1'b1;
        if (in_sop) q_len[wq] <= (int'(in_len16) > MAX_DATA16) ? LEN_W'(MAX_DATA16) :
                                 (in_len16 == '0) ? LEN_W'(1) : in_len16;
        if (in_last) begin
          q_full[wq] <= 1'b1;
          wq         <= ~wq;
        end
      end
      if (tx_valid && tx_ready) begin
        if (tx_eop) begin
          ridx       <= '0;
          q_full[rq] <= 1'b0;
          rq         <= ~rq;
        end else begin
          ridx <= ridx + 1'b1;
        end
      end
    end
  end

endmodule
