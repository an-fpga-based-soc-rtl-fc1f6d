// Testbench of monitor_unit. The testbench plays the temporal order table
// (hands out rows, reports offsets as known) and the DPRAM arbiter (grants
// the port and collects the words). A reference model builds every expected
// packet from the 16-bit words driven in: header, start timestamp, packed
// data with zero padding. Covered: length announced with the first word,
// announced later, not announced (counted at eop), announced longer than sent,
// odd lengths, two queues filled while the port is withheld, a third packet
// lost, no free table row, request held back until the offset is known, and
// one word per granted cycle.
//
// Timing: 10 ns clock. A watchdog ends the run, counted as a failure, after 3000 cycles.
module monitor_unit_tb;
  import fr_tester_pkg::*;
  localparam int MAXD = 20;
  localparam logic [7:0] ID = 8'h02;

  logic clk = 0, rst_n = 0, active = 0;
  logic [31:0] ts = 0;
  src16_t src;
  logic reg_req, reg_ok, len_vld, xfer_req, xfer_gnt, out_valid, out_last, lost;
  logic [2:0] reg_row, len_row, xfer_row;
  logic [15:0] len_pl;
  logic [7:0] row_off_valid;
  logic [31:0] out_data;
  int checks = 0, failures = 0;

  monitor_unit #(.PKT_ID(ID), .MAX_DATA16(MAXD), .N_ROWS(8)) dut (
    .clk, .rst_n, .active, .timestamp(ts), .src, .reg_req, .reg_row, .reg_ok,
    .len_vld, .len_row, .len_pl, .row_off_valid, .xfer_req, .xfer_row, .xfer_gnt,
    .out_valid, .out_data, .out_last, .lost);

  always #5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------- table model
  logic [2:0] next_row = 0;
  logic       table_full = 0;
  logic [15:0] pl_of_row [8];
  assign reg_ok  = !table_full;
  assign reg_row = next_row;
  always @(posedge clk) begin
    if (reg_req && reg_ok) next_row <= next_row + 1;
    if (len_vld) pl_of_row[len_row] <= len_pl;
  end

  // ---------------------------------------------------------- arbiter model
  logic allow = 1;
  logic gnt_q = 0;
  int   gnt_cycles = 0;
  logic [31:0] got [$];
  logic [2:0]  got_row [$];
  assign xfer_gnt = gnt_q;
  always @(posedge clk) begin
    if (!gnt_q && xfer_req && allow) begin
      gnt_q <= 1;
      got_row.push_back(xfer_row);
    end
    if (gnt_q) begin
      gnt_cycles++;
      check(out_valid, "word every granted cycle");
      got.push_back(out_data);
      if (out_last) gnt_q <= 0;
    end
  end

  // ---------------------------------------------------------- reference
  logic [31:0] exp [$];
  int n_lost = 0;
  always @(posedge clk) if (lost) n_lost++;

  function automatic void model(input logic [15:0] w [], input int nsent, input int ann,
                                input logic [31:0] t0);
    int len, nv;
    len = (ann >= 0) ? (ann > MAXD ? MAXD : ann) : (nsent > MAXD ? MAXD : nsent);
    nv  = (nsent < len) ? nsent : len;
    exp.push_back({ID, 8'(len), 16'(2 + (len + 1) / 2)});
    exp.push_back(t0);
    for (int k = 0; k < (len + 1) / 2; k++) begin
      logic [15:0] lo, hi;
      lo = (2*k < nv) ? w[2*k] : 16'h0;
      hi = (2*k+1 < nv) ? w[2*k+1] : 16'h0;
      exp.push_back({hi, lo});
    end
  endfunction

  // drive a packet: nsent words, length announced at word `ann_at` (-1: never)
  task automatic send(input int nsent, input int ann, input int ann_at, input bit expect_ok);
    logic [15:0] w [];
    logic [31:0] t0;
    w = new[nsent];
    foreach (w[i]) w[i] = 16'($urandom);
    for (int i = 0; i < nsent; i++) begin
      @(negedge clk);
      src = '0;
      src.valid = 1;
      src.sop = (i == 0);
      src.eop = (i == nsent - 1);
      src.data = w[i];
      src.len_valid = (i == ann_at);
      src.len16 = 8'(ann);
      if (i == 0) t0 = ts;
    end
    @(negedge clk);
    src = '0;
    if (expect_ok) model(w, nsent, ann_at >= 0 ? ann : -1, t0);
  endtask

  task automatic drain();
    allow = 1;
    repeat (60) @(posedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src = '0;
    row_off_valid = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // inactive: ignored silently
    send(4, 4, 0, 0);
    active = 1;
    // back to back: the second queue takes a packet while the first is sent
    send(6, 6, 0, 1);            // announced at sop, even
    send(5, 5, 2, 1);            // announced mid-packet, odd
    drain();
    send(7, -1, -1, 1);          // never announced: counted
    drain();
    send(3, 6, 0, 1);            // announced longer than sent: zero padding
    drain();
    send(25, 25, 0, 1);          // longer than a queue: clipped to MAXD
    drain();
    check(got.size() == exp.size(), $sformatf("word count %0d vs %0d", got.size(), exp.size()));
    // both queues fill while the port is withheld; the third packet is lost
    allow = 0;
    send(4, 4, 0, 1);
    send(2, 2, 0, 1);
    send(3, 3, 0, 0);
    check(n_lost == 1, "third packet lost while both queues are full");
    drain();
    // no free table row
    table_full = 1;
    send(2, 2, 0, 0);
    table_full = 0;
    check(n_lost == 2, "packet lost without table row");
    // request waits for the offset
    row_off_valid = '0;
    send(2, 2, 0, 1);
    repeat (10) @(posedge clk);
    check(!xfer_req, "no request before offset known");
    row_off_valid = '1;
    drain();
    check(pl_of_row[0] == 16'(2 + 3), "length reported to table (row 0)");
    check(pl_of_row[2] == 16'(2 + 4), "counted length reported at eop (row 2)");
    check(got.size() == exp.size(), $sformatf("total words %0d vs %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d got %h exp %h", i, got[i], exp[i]));
    check(gnt_cycles == exp.size(), "one word per granted cycle");
    for (int i = 0; i < got_row.size(); i++)
      check(got_row[i] == 3'(i), $sformatf("transfer %0d uses its own row", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
