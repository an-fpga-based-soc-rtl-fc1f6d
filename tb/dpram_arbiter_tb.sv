// Testbench of dpram_arbiter. Three modelled monitoring modules raise
// requests at chosen cycles and stream numbered words while granted; row
// offsets and lengths are set by the testbench. Checked: grants in order of
// request (not of index), ties by index, write addresses off..off+pl-1 with
// wrap, data passed through, done reports, and a packet aimed at a dirty
// sector drained without writes and flagged as overflow.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 2000 cycles.
module dpram_arbiter_tb;
  import fr_tester_pkg::*;
  localparam int NM = 3, NR = 4, WORDS = 64, SEC = 16;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] req = 0, gnt, mon_valid, mon_last;
  logic [1:0] req_row [NM];
  logic [31:0] mon_data [NM];
  logic [5:0] row_off [NR];
  logic [15:0] row_pl [NR];
  logic [3:0] dirty = 0;
  logic we, done_vld, overflow;
  logic [5:0] waddr;
  logic [31:0] wdata;
  logic [1:0] done_row;
  int checks = 0, failures = 0;

  dpram_arbiter #(.N_MON(NM), .N_ROWS(NR), .DPRAM_WORDS(WORDS), .SECTOR_WORDS(SEC)) dut (
    .clk, .rst_n, .req, .req_row, .gnt, .mon_valid, .mon_data, .mon_last,
    .row_off, .row_pl, .sector_dirty(dirty), .we, .waddr, .wdata, .done_vld, .done_row, .overflow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // modelled modules: while granted, word k = {module, k}; drop the request
  // after the last word
  int k [NM];
  for (genvar m = 0; m < NM; m++) begin : g_m
    assign mon_valid[m] = gnt[m];
    assign mon_data[m]  = {8'(m), 24'(k[m])};
    assign mon_last[m]  = gnt[m] && k[m] == int'(row_pl[req_row[m]]) - 1;
    always @(posedge clk) begin
      if (gnt[m]) begin
        if (mon_last[m]) begin k[m] <= 0; req[m] <= 1'b0; end
        else k[m] <= k[m] + 1;
      end
    end
  end

  // log of writes and done reports
  int wr_mod [$], wr_idx [$], wr_addr [$];
  int dones [$];
  int n_ovf = 0;
  always @(posedge clk) begin
    if (we) begin wr_mod.push_back(int'(wdata[31:24])); wr_idx.push_back(int'(wdata[23:0])); wr_addr.push_back(int'(waddr)); end
    if (done_vld) dones.push_back(int'(done_row));
    if (overflow) n_ovf++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_mod [$], exp_idx [$], exp_addr [$];
  task automatic expect_pkt(input int m, input int row);
    for (int i = 0; i < int'(row_pl[row]); i++) begin
      exp_mod.push_back(m); exp_idx.push_back(i); exp_addr.push_back((int'(row_off[row]) + i) % WORDS);
    end
  endtask

  initial begin
    k = '{default: 0};
    req_row = '{2'd0, 2'd1, 2'd2};
    row_off = '{6'd0, 6'd5, 6'd60, 6'd20};
    row_pl  = '{16'd5, 16'd3, 16'd6, 16'd4};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // module 2 requests first, then 1 and 0 together
    req[2] = 1;
    @(negedge clk);
    req[1] = 1; req[0] = 1;
    expect_pkt(2, 2); expect_pkt(0, 0); expect_pkt(1, 1);
    repeat (40) @(negedge clk);
    check(dones.size() == 3 && dones[0] == 2 && dones[1] == 0 && dones[2] == 1, "grant in request order, ties by index");
    check(wr_addr.size() == exp_addr.size(), $sformatf("write count %0d vs %0d", wr_addr.size(), exp_addr.size()));
    for (int i = 0; i < exp_addr.size() && i < wr_addr.size(); i++)
      check(wr_addr[i] == exp_addr[i] && wr_mod[i] == exp_mod[i] && wr_idx[i] == exp_idx[i],
            $sformatf("write %0d: addr %0d mod %0d idx %0d", i, wr_addr[i], wr_mod[i], wr_idx[i]));
    // overflow: row 3 starts in sector 1, which is dirty
    dirty = 4'b0010;
    req_row[0] = 2'd3;
    wr_addr.delete();
    req[0] = 1;
    repeat (20) @(negedge clk);
    check(n_ovf == 1, "overflow flagged");
    check(wr_addr.size() == 0, "no write into a dirty sector");
    check(dones.size() == 4 && dones[3] == 3, "skipped packet still reported done");
    check(req == 0, "skipped packet drained");
    // back-to-back requests keep the port busy
    dirty = 0;
    req_row[0] = 2'd0; req_row[1] = 2'd1;
    @(negedge clk); req[0] = 1; req[1] = 1;
    repeat (20) @(negedge clk);
    check(wr_addr.size() == 8, "both packets written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
