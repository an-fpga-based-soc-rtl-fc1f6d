// ID-preview recording source.
//
// Collects the IDs of all frames seen on the bus during one communication
// cycle so that post-processing software learns which nodes were active
// without scanning the whole log. Each frame start on channel A or B appends
// an entry {channel, 4'b0, id} (channel 0 = A, 1 = B) to the current bank;
// at the next cycle start the banks swap and the filled bank is sent as one
// packet, its length announced with the first word. A cycle without frames
// gives no packet. Up to MAX_IDS entries are kept per cycle; further ones are
// dropped. The ID-preview packet follows the design; one packet per cycle,
// the entry format and the two banks are this implementation's choice.
//
// Timing: the packet starts one cycle after cycle_start and sends one entry
// per cycle. A cycle start while a packet is still being sent does not swap;
// the current bank then keeps collecting.
module id_preview_source
  import fr_tester_pkg::*;
#(
  parameter int unsigned MAX_IDS = 32,
  localparam int unsigned IW = $clog2(MAX_IDS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx_start_a,
  input  logic [ID_W-1:0] rx_id_a,
  input  logic            rx_start_b,
  input  logic [ID_W-1:0] rx_id_b,
  input  logic            cycle_start,
  output src16_t          src
);

  logic [HW-1:0] bank [2][MAX_IDS];
  logic [IW-1:0] fill [2];
  logic          cb;        // bank being collected
  logic          sending;
  logic [IW-1:0] sidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill    <= '{default: '0};
      cb      <= 1'b0;
      sending <= 1'b0;
      sidx    <= '0;
    end else begin
      automatic logic [IW-1:0] n = fill[cb];
      if (rx_start_a && n < IW'(MAX_IDS)) begin
        bank[cb][n[$clog2(MAX_IDS)-1:0]] <= {1'b0, 4'b0, rx_id_a};
        n = n + 1'b1;
      end
      if (rx_start_b && n < IW'(MAX_IDS)) begin
        bank[cb][n[$clog2(MAX_IDS)-1:0]] <= {1'b1, 4'b0, rx_id_b};
        n = n + 1'b1;
      end
      fill[cb] <= n;

      if (sending) begin
        if (sidx == fill[~cb] - 1'b1) begin
          sending   <= 1'b0;
          fill[~cb] <= '0;
        end
        sidx <= sidx + 1'b1;
      end
      if (cycle_start && !sending && n != 0) begin
        cb      <= ~cb;
        sending <= 1'b1;
        sidx    <= '0;
      end
    end
  end

  always_comb begin
    src           = '0;
    src.valid     = sending;
    src.sop       = sending && sidx == '0;
    src.eop       = sending && sidx == fill[~cb] - 1'b1;
    src.len_valid = src.sop;
    src.len16     = LEN_W'(fill[~cb]);
    src.data      = bank[~cb][sidx[$clog2(MAX_IDS)-1:0]];
  end

endmodule
