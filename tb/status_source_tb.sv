// Testbench of status_source: frame ends on one channel, on both in one
// cycle, during a packet (collected for the next packet), and twice on the
// same channel during a packet (the later one replaces the earlier). Each
// packet is compared word by word with the layout {valid, id} / {flags} per
// channel. Also checked: a packet starts two cycles after the frame end and
// lasts four consecutive cycles, and the source is silent with no frame end.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 500 cycles.
module status_source_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0, ea = 0, eb = 0;
  logic [10:0] ida = 0, idb = 0;
  rx_flags_t fa = '0, fb = '0;
  src16_t src;
  int checks = 0, failures = 0;

  status_source dut (.clk, .rst_n, .rx_end_a(ea), .rx_id_a(ida), .rx_flags_a(fa),
                     .rx_end_b(eb), .rx_id_b(idb), .rx_flags_b(fb), .src);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collector
  logic [15:0] pk [$][$];
  logic [15:0] cur [$];
  int cyc = 0, sop_cyc [$], n_valid = 0;
  // cyc counts clock edges; it is advanced in the same process that samples
  // the output, so both see one consistent edge index
  always @(posedge clk) begin
    if (rst_n && src.valid) begin
    n_valid++;
    if (src.sop) begin
      sop_cyc.push_back(cyc);
      cur.delete();
      if (!(src.len_valid && src.len16 == 4)) begin failures++; $display("FAIL: length"); end
    end
    cur.push_back(src.data);
      if (src.eop) pk.push_back(cur);
    end
    cyc++;
  end

  function automatic bit same(input logic [15:0] a [$], input logic [15:0] b [4]);
    if (a.size() != 4) return 0;
    for (int i = 0; i < 4; i++) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // channel A only
    repeat (10) @(negedge clk);
    check(n_valid == 0, "silent without frame ends");
    ea = 1; ida = 11'd5; fa = 4'b0011; @(negedge clk); ea = 0;
    begin
      int t_end;
      t_end = cyc;
      repeat (8) @(negedge clk);
      check(sop_cyc.size() == 1 && sop_cyc[0] == t_end + 1,  // frame end sampled at edge t_end-1, sop at edge t_end+1
            $sformatf("packet starts two cycles after the frame end (%0d vs %0d)", sop_cyc.size() ? sop_cyc[0] : -1, t_end));
      check(n_valid == 4, $sformatf("four words, got %0d", n_valid));
    end
    // both channels in one cycle
    ea = 1; ida = 11'd100; fa = 4'b0001; eb = 1; idb = 11'd200; fb = 4'b0100;
    @(negedge clk); ea = 0; eb = 0;
    @(negedge clk);
    // during that packet: channel B ends, collected for the next packet
    eb = 1; idb = 11'd7; fb = 4'b1000; @(negedge clk); eb = 0;
    repeat (12) @(negedge clk);
    check(pk.size() == 3, $sformatf("three packets, got %0d", pk.size()));
    check(sop_cyc.size() == 3 && sop_cyc[2] == sop_cyc[1] + 4, "collected packet follows without a gap");
    // two frame ends on channel A during one packet: only the later is kept
    eb = 1; idb = 11'd9; fb = 4'b0001; @(negedge clk); eb = 0;
    ea = 1; ida = 11'd20; fa = 4'b0010; @(negedge clk);
    ida = 11'd21; fa = 4'b0011; @(negedge clk); ea = 0;
    repeat (12) @(negedge clk);
    check(pk.size() == 5, $sformatf("five packets, got %0d", pk.size()));
    check(n_valid == 4 * pk.size(), "every packet four words long");
    if (pk.size() >= 3) begin
      check(same(pk[0], '{16'h8005, 16'h0003, 16'h0000, 16'h0000}), "channel A only");
      check(same(pk[1], '{16'h8064, 16'h0001, 16'h80C8, 16'h0004}), "both channels");
      check(same(pk[2], '{16'h0000, 16'h0000, 16'h8007, 16'h0008}), "collected during a packet");
    end
    if (pk.size() == 5) begin
      check(same(pk[3], '{16'h0000, 16'h0000, 16'h8009, 16'h0001}), "channel B only");
      check(same(pk[4], '{16'h8015, 16'h0003, 16'h0000, 16'h0000}), "later frame end replaces the earlier");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
