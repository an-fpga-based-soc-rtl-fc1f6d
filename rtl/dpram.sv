// Dual-port RAM between the tester fabric and the host processor.
//
// Two such blocks carry the data: one is the monitor FIFO (fabric writes,
// host reads) and one the replay FIFO (host writes, fabric reads). On the
// original platform these are hard dual-port memories of the processor stripe;
// here the block is an array with two independent synchronous ports, each with
// a write enable. The size is this implementation's choice.
//
// Timing: read data appears one clock after the address (read-before-write on
// the same port). A simultaneous write to one address from both ports leaves
// port B's value.
module dpram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
