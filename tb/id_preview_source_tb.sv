// Testbench of id_preview_source: frame IDs from both channels are collected
// per cycle and sent at the next cycle start; an empty cycle sends nothing;
// entries beyond MAX_IDS are dropped.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 2000 cycles.
module id_preview_source_tb;
  import fr_tester_pkg::*;
  localparam int MAXI = 8;
  logic clk = 0, rst_n = 0, sa = 0, sb = 0, cs = 0;
  logic [10:0] ida = 0, idb = 0;
  src16_t src;
  int checks = 0, failures = 0;

  id_preview_source #(.MAX_IDS(MAXI)) dut (.clk, .rst_n, .rx_start_a(sa), .rx_id_a(ida),
    .rx_start_b(sb), .rx_id_b(idb), .cycle_start(cs), .src);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] pk [$][$];
  logic [15:0] cur [$];
  int lens [$];
  always @(posedge clk) if (src.valid) begin
    if (src.sop) begin cur.delete(); lens.push_back(int'(src.len16)); end
    cur.push_back(src.data);
    if (src.eop) pk.push_back(cur);
  end

  logic [15:0] exp [$][$];
  logic [15:0] e [$];
  task automatic frame(input bit ch, input int id);
    @(negedge clk);
    if (!ch) begin sa = 1; ida = 11'(id); end else begin sb = 1; idb = 11'(id); end
    if (e.size() < MAXI) e.push_back({ch, 4'b0, 11'(id)});
    @(negedge clk); sa = 0; sb = 0;
  endtask
  task automatic cycle_start();
    @(negedge clk); cs = 1; @(negedge clk); cs = 0;
    if (e.size() > 0) exp.push_back(e);
    e.delete();
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(0, 1); frame(1, 1); frame(0, 3);
    // both channels in the same cycle: A first
    @(negedge clk); sa = 1; ida = 11'd9; sb = 1; idb = 11'd10; @(negedge clk); sa = 0; sb = 0;
    e.push_back({1'b0, 4'b0, 11'd9}); e.push_back({1'b1, 4'b0, 11'd10});
    cycle_start();
    repeat (15) @(negedge clk);
    cycle_start();                    // empty cycle
    for (int i = 0; i < 12; i++) frame(i % 2 == 1, 20 + i);   // overfull
    cycle_start();
    frame(1, 2047);
    repeat (15) @(negedge clk);
    cycle_start();
    repeat (15) @(negedge clk);
    check(pk.size() == exp.size(), $sformatf("packets %0d vs %0d", pk.size(), exp.size()));
    for (int p = 0; p < pk.size() && p < exp.size(); p++) begin
      check(lens[p] == exp[p].size(), $sformatf("packet %0d announced length", p));
      check(pk[p].size() == exp[p].size(), $sformatf("packet %0d length", p));
      for (int i = 0; i < pk[p].size() && i < exp[p].size(); i++)
        check(pk[p][i] == exp[p][i], $sformatf("packet %0d entry %0d: %h vs %h", p, i, pk[p][i], exp[p][i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
