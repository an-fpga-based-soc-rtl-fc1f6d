// Status recording source ("health" indicator).
//
// For every frame end reported by the controller on channel A or B, this
// source records whether the controller's checks succeeded (header CRC, frame
// CRC, syntax, content) together with the frame ID, and emits a four-word
// packet to its monitoring module:
//   word 0: {valid_a, 4'b0, id_a}   word 1: {12'b0, flags_a}
//   word 2: {valid_b, 4'b0, id_b}   word 3: {12'b0, flags_b}
// valid_x tells whether channel x contributed. Frame ends of both channels
// that arrive while a packet is being sent are collected and go out together
// in the next packet; a second frame end on the same channel before then
// replaces the first. Recording the check results as status follows the
// design; the word layout and the merging are this implementation's choice.
//
// Timing: the first word of a packet is presented in the second cycle after
// a frame end (or right after the previous packet) and the packet takes four
// cycles.
module status_source
  import fr_tester_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_end_a,
  input  logic [ID_W-1:0] rx_id_a,
  input  rx_flags_t       rx_flags_a,
  input  logic            rx_end_b,
  input  logic [ID_W-1:0] rx_id_b,
  input  rx_flags_t       rx_flags_b,
  output src16_t          src
);

  typedef struct packed {
    logic            v;
    logic [ID_W-1:0] id;
    rx_flags_t       fl;
  } chst_t;

  chst_t      pend_a, pend_b, send_a, send_b;
  logic [2:0] phase;     // 0 idle, 1..4 word being sent

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_a <= '0; pend_b <= '0; send_a <= '0; send_b <= '0;
      phase  <= '0;
    end else begin
      automatic chst_t na = pend_a, nb = pend_b;
      if (phase == 3'd0 || phase == 3'd4) begin
        if (na.v || nb.v) begin
          send_a <= na; send_b <= nb;
          na = '0; nb = '0;
          phase <= 3'd1;
        end else phase <= 3'd0;
      end else phase <= phase + 1'b1;
      if (rx_end_a) na = '{v: 1'b1, id: rx_id_a, fl: rx_flags_a};
      if (rx_end_b) nb = '{v: 1'b1, id: rx_id_b, fl: rx_flags_b};
      pend_a <= na;
      pend_b <= nb;
    end
  end

  always_comb begin
    src           = '0;
    src.valid     = phase != 3'd0;
    src.sop       = phase == 3'd1;
    src.eop       = phase == 3'd4;
    src.len_valid = phase == 3'd1;
    src.len16     = LEN_W'(4);
    unique case (phase)
      3'd1:    src.data = {send_a.v, 4'b0, send_a.id};
      3'd2:    src.data = {12'b0, send_a.fl};
      3'd3:    src.data = {send_b.v, 4'b0, send_b.id};
      3'd4:    src.data = {12'b0, send_b.fl};
      default: src.data = '0;
    endcase
  end

endmodule
