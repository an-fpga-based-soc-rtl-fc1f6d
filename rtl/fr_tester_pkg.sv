// Shared types and constants of the FlexRay tester node.
//
// Every record that travels through the monitor FIFO or the replay FIFO is a
// packet of 32-bit words:
//   word 0 : {identifier[31:24], count of 16-bit payload words[23:16], size[15:0]}
//   word 1 : 32-bit timestamp, drawn when the recorded event started
//   word 2+: payload, two 16-bit controller words per 32-bit word, the earlier
//            16-bit word in bits [15:0]
// `size` counts 32-bit words including the two header words. The header
// fields (identifier, size, timestamp) follow the design; their bit positions
// are this implementation's choice.
package fr_tester_pkg;

  localparam int unsigned TS_W   = 32;  // timestamp width
  localparam int unsigned HW     = 16;  // controller word width
  localparam int unsigned DW     = 32;  // host word width
  localparam int unsigned ID_W   = 11;  // FlexRay frame ID width
  localparam int unsigned CYC_W  = 6;   // FlexRay cycle counter width
  localparam int unsigned LEN_W  = 8;   // count of 16-bit words in a packet
  localparam int unsigned SIZE_W = 16;  // packet size field
  localparam int unsigned HDR_WORDS = 2;

  // Packet identifiers, one per kind of monitoring module.
  typedef enum logic [7:0] {
    PKT_PAD          = 8'h00,  // one-word filler in the replay FIFO
    PKT_FRAME_A      = 8'h01,
    PKT_FRAME_B      = 8'h02,
    PKT_CLUSTER_TIME = 8'h03,
    PKT_STATUS       = 8'h04,
    PKT_ID_PREVIEW   = 8'h05
  } pkt_id_e;

  // 16-bit word stream from the controller (or from a recording source) into
  // a monitoring module. `sop` comes with the first word and `eop` with the
  // last; `len_valid` announces the packet length in 16-bit words as soon as
  // it is known (for a FlexRay frame: after the header).
  typedef struct packed {
    logic             sop;
    logic             valid;
    logic [HW-1:0]    data;
    logic             eop;
    logic             len_valid;
    logic [LEN_W-1:0] len16;
  } src16_t;

  // Trigger modes, two bits per monitoring module.
  typedef enum logic [1:0] {
    TRG_OFF       = 2'd0,
    TRG_IMMEDIATE = 2'd1,
    TRG_FRAME_ID  = 2'd2,
    TRG_CYCLE     = 2'd3
  } trg_mode_e;

  // Receive status flags reported by the controller per frame.
  typedef struct packed {
    logic content_err;
    logic syntax_err;
    logic frame_crc_ok;
    logic header_crc_ok;
  } rx_flags_t;

  function automatic logic [SIZE_W-1:0] size_of_len(input logic [LEN_W-1:0] len16);
    return SIZE_W'(HDR_WORDS) + SIZE_W'((int'(len16) + 1) >> 1);
  endfunction

  function automatic logic [DW-1:0] make_header(input logic [7:0] id,
                                                 input logic [LEN_W-1:0] len16);
    return {id, len16, size_of_len(len16)};
  endfunction

endpackage
