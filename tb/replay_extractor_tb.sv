// Testbench of replay_extractor with a 64-word replay DPRAM of four 16-word
// sectors. The testbench writes recorded packets through the host port and
// checks: a pad word is skipped, frame A is forwarded no earlier than its
// timestamp and within a few cycles of it, a status packet is skipped without
// waiting, a late frame is forwarded at once, the extractor stops at a sector
// not marked valid and releases sector 0 after reading past it, a busy
// injection module delays forwarding, and in synchronous mode a frame waits
// for its cycle count and slot ID.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 4000 cycles.
module replay_extractor_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en = 0, sync_mode = 0;
  logic [31:0] t = 0;
  logic [5:0] cyc = 0;
  logic [10:0] slot = 0;
  logic [5:0] rd_addr, rd_ptr;
  logic [31:0] rd_data;
  logic [3:0] valid = 0, clr;
  logic [1:0] inj_ready = 2'b11, inj_valid;
  logic inj_sop, inj_last, fired;
  logic [31:0] inj_data;
  logic [7:0] inj_len16;
  logic hwe = 0;
  logic [5:0] haddr = 0;
  logic [31:0] hwdata = 0, hrdata;
  int checks = 0, failures = 0;

  dpram #(.WORDS(64), .DW(32)) ram (.clk, .a_we(1'b0), .a_addr(rd_addr), .a_wdata('0), .a_rdata(rd_data),
                                    .b_we(hwe), .b_addr(haddr), .b_wdata(hwdata), .b_rdata(hrdata));
  replay_extractor #(.DPRAM_WORDS(64), .SECTOR_WORDS(16)) dut (
    .clk, .rst_n, .en, .sync_mode, .time_now(t), .cycle_count(cyc), .slot_id(slot),
    .rd_addr, .rd_data, .sector_valid(valid), .sector_clr(clr),
    .inj_ready, .inj_valid, .inj_sop, .inj_last, .inj_data, .inj_len16, .fired, .rd_ptr);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    t <= t + 1;
    valid <= valid & ~clr;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // forwarded frames: channel, first-word time, words
  int f_ch [$], f_t [$];
  logic [31:0] f_w [$][$];
  logic [31:0] cw [$];
  int n_clr0 = 0;
  always @(posedge clk) begin
    if (clr[0]) n_clr0++;
    if (|inj_valid) begin
      if (inj_sop) begin cw.delete(); f_ch.push_back(inj_valid[1] ? 1 : 0); f_t.push_back(int'(t)); end
      cw.push_back(inj_data);
      if (inj_last) f_w.push_back(cw);
    end
  end

  int wp = 0;
  task automatic put(input logic [31:0] w);
    @(negedge clk); hwe = 1; haddr = 6'(wp); hwdata = w; wp++;
    @(negedge clk); hwe = 0;
  endtask
  task automatic pkt(input logic [7:0] id, input logic [31:0] ts, input int nw, input int base);
    put(make_header(id, 8'(2 * nw)));
    put(ts);
    for (int i = 0; i < nw; i++) put(32'(base + i));
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    put(32'h0);                                  // pad                 0
    pkt(PKT_FRAME_A, 32'd400, 2, 32'hA0);        // frame A, ts 400     1..4
    pkt(PKT_STATUS,  32'd10,  2, 32'h50);        // skipped             5..8
    pkt(PKT_FRAME_B, 32'd420, 3, 32'hB0);        // frame B, ts 420     9..13
    pkt(PKT_FRAME_A, 32'd5,   1, 32'hC0);        // late frame          14..16 (crosses into sector 1)
    while (wp < 32) put(32'h0);                  // pads to the end of sector 1
    pkt(PKT_FRAME_B, {10'b0, 6'd5, 5'b0, 11'd17}, 1, 32'hD0);   // synchronous  32..34
    @(negedge clk); valid = 4'b0001; en = 1;
    wait (t >= 600);
    check(f_ch.size() == 2, $sformatf("two frames before sector 1 is valid, got %0d", f_ch.size()));
    check(rd_ptr == 16, "stopped at the invalid sector");
    check(n_clr0 == 1 && valid[0] == 0, "sector 0 released");
    if (f_ch.size() == 2) begin
      check(f_ch[0] == 0 && f_t[0] >= 400 && f_t[0] <= 406, $sformatf("frame A due at 400, sent at %0d", f_t[0]));
      check(f_ch[1] == 1 && f_t[1] >= 420 && f_t[1] <= 426, $sformatf("frame B due at 420, sent at %0d", f_t[1]));
      check(f_w[0].size() == 2 && f_w[0][0] == 32'hA0 && f_w[0][1] == 32'hA1, "frame A data");
      check(f_w[1].size() == 3 && f_w[1][2] == 32'hB2, "frame B data");
    end
    // busy injection module: the late frame waits for it
    inj_ready = 2'b10;
    @(negedge clk); valid[1] = 1;
    repeat (30) @(negedge clk);
    check(f_ch.size() == 2, "waits for a free injection queue");
    inj_ready = 2'b11;
    repeat (30) @(negedge clk);
    check(f_ch.size() == 3 && f_ch[2] == 0, "late frame forwarded at once");
    // synchronous mode
    sync_mode = 1; cyc = 6'd5; slot = 11'd16;
    @(negedge clk); valid[2] = 1;
    repeat (40) @(negedge clk);
    check(f_ch.size() == 3, "synchronous frame waits for its slot");
    slot = 11'd17;
    repeat (10) @(negedge clk);
    check(f_ch.size() == 4 && f_ch[3] == 1 && f_w[3][0] == 32'hD0, "synchronous frame sent in cycle 5 slot 17");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
