// Testbench of temporal_order_table, built around the overlapping packets of
// the design's temporal-order example: a1 starts on channel A, b1 and b2 start
// later on channel B and are complete before a1 is. Expected offsets follow
// off_i = off_pred + pl_pred worked out by hand; the DPRAM is shrunk to 32
// words so that the modulo wrap is exercised. Also checked: temporal order
// values after registration and removal, two registrations in one cycle,
// removal strictly in temporal order with last_written_ptr, reuse of the
// kept last row after the table empties, and a full table.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 2000 cycles.
module temporal_order_table_tb;
  import fr_tester_pkg::*;
  localparam int NM = 3, NR = 8, DW_ = 32;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] reg_req = 0, reg_ok, len_vld = 0;
  logic [2:0] reg_row [NM];
  logic [2:0] len_row [NM];
  logic [15:0] len_pl [NM];
  logic done_vld = 0;
  logic [2:0] done_row = 0;
  logic [4:0] row_off [NR];
  logic [15:0] row_pl [NR];
  logic [NR-1:0] row_off_valid;
  logic [3:0] row_to [NR];
  logic [3:0] temporal_order;
  logic retire_vld;
  logic [4:0] lwp;
  int checks = 0, failures = 0;

  temporal_order_table #(.N_MON(NM), .N_ROWS(NR), .DPRAM_WORDS(DW_)) dut (
    .clk, .rst_n, .reg_req, .reg_row, .reg_ok, .len_vld, .len_row, .len_pl,
    .done_vld, .done_row, .row_off, .row_pl, .row_off_valid, .row_to, .temporal_order,
    .retire_vld, .last_written_ptr(lwp));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lwps [$];
  logic ret_q = 0;
  always @(posedge clk) begin
    ret_q <= retire_vld;
    if (ret_q) lwps.push_back(int'(lwp));
  end

  logic [2:0] got_row;
  task automatic reg1(input int m, output logic [2:0] row);
    @(negedge clk);
    reg_req = '0; reg_req[m] = 1;
    #1 check(reg_ok[m], $sformatf("registration of module %0d accepted", m));
    row = reg_row[m];
    @(negedge clk); reg_req = '0;
  endtask
  task automatic setlen(input int m, input logic [2:0] row, input int pl);
    @(negedge clk);
    len_vld = '0; len_vld[m] = 1; len_row[m] = row; len_pl[m] = 16'(pl);
    @(negedge clk); len_vld = '0;
  endtask
  task automatic done(input logic [2:0] row);
    @(negedge clk); done_vld = 1; done_row = row;
    @(negedge clk); done_vld = 0;
  endtask
  task automatic settle(); repeat (4) @(negedge clk); endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] ra1, rb1, rb2, rc, rd, re, rx;
  initial begin
    len_row = '{default: '0}; len_pl = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    reg1(0, ra1);                        // a1: E1a/E1b
    check(temporal_order == 1 && row_to[ra1] == 1, "a1 gets temporal order 1");
    settle();
    check(row_off_valid[ra1] && row_off[ra1] == 0, "off_0 = 0 for the first packet");
    reg1(1, rb1);                        // b1
    check(row_to[rb1] == 2 && temporal_order == 2, "b1 gets temporal order 2");
    settle();
    check(!row_off_valid[rb1], "b1 offset waits for a1's length");
    setlen(0, ra1, 10);                  // a1 header seen: E2a
    setlen(1, rb1, 4);
    settle();
    check(row_off_valid[rb1] && row_off[rb1] == 10, "b1 placed after a1 (E2b)");
    done(rb1);                           // b1 written before a1
    settle();
    check(lwps.size() == 0, "b1 not removed while a1 is pending");
    reg1(1, rb2);                        // b2 starts while a1 still open
    setlen(1, rb2, 5);
    settle();
    check(row_to[rb2] == 3 && row_off[rb2] == 14, "b2 placed after b1");
    // two registrations in one cycle: module index order
    @(negedge clk); reg_req = 3'b101;
    #1 check(reg_ok == 3'b101 && reg_row[0] != reg_row[2], "two rows in one cycle");
    rc = reg_row[0]; rd = reg_row[2];
    @(negedge clk); reg_req = '0;
    check(row_to[rc] == 4 && row_to[rd] == 5 && temporal_order == 5, "same-cycle order by index");
    setlen(0, rc, 3);
    setlen(2, rd, 12);
    settle();
    check(row_off[rc] == 19 && row_off[rd] == 22, "c and d offsets");
    done(rd);                            // latest finishes first
    done(ra1);                           // a1 done: a1 then b1 leave in order
    settle();
    check(lwps.size() == 2 && lwps[0] == 10 && lwps[1] == 14, "a1 then b1 removed");
    check(lwps.size() == 2 && lwps[1] > lwps[0], "removal in temporal order");
    check(lwp == 14, "last_written_ptr after b1");
    check(row_to[rb2] == 1 && row_to[rc] == 2 && row_to[rd] == 3 && temporal_order == 3, "R1a/R1c decrement");
    check(row_to[ra1] == 0 && row_to[rb1] == 0, "R1b clears removed rows");
    done(rb2); done(rc);
    settle();
    check(lwps.size() == 5, "b2, c, d removed");
    check(lwp == 5'((22 + 12) % 32), "last_written_ptr wraps modulo DPRAM size");
    check(temporal_order == 0, "table empty");
    reg1(0, re);                         // uses the kept last row
    settle();
    check(row_off[re] == 5'(34 % 32) && row_to[re] == 1, "offset from the last removed row");
    // fill the table
    for (int i = 0; i < NR - 1; i++) reg1(1, rx);
    @(negedge clk); reg_req = 3'b001;
    #1 check(!reg_ok[0], "full table refuses a registration");
    @(negedge clk); reg_req = '0;
    check(temporal_order == 8, "eight rows in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
