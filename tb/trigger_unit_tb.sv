// Testbench of trigger_unit: each of the four modes, re-arming and the stop
// on overflow.
//
// Timing: 10 ns clock. A watchdog ends the run, counted as a failure, after 500 cycles.
module trigger_unit_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0;
  logic arm = 0, stop = 0;
  logic [9:0] mode = '0;
  logic [10:0] match_id = 11'd42, id_a = '0, id_b = '0;
  logic [5:0] match_cycle = 6'd7, cyc = '0;
  logic sa = 0, sb = 0, cs = 0;
  logic [4:0] active;
  int checks = 0, failures = 0;

  trigger_unit #(.N_MON(5)) dut (.clk, .rst_n, .arm, .mode, .match_id, .match_cycle,
    .rx_start_a(sa), .rx_id_a(id_a), .rx_start_b(sb), .rx_id_b(id_b),
    .cycle_start(cs), .cycle_count(cyc), .stop, .active);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (active=%b)", what, active); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(); rst_n = 1; tick();
    // module0 off, 1 immediate, 2 frame id, 3 cycle, 4 immediate
    mode = {TRG_IMMEDIATE, TRG_CYCLE, TRG_FRAME_ID, TRG_IMMEDIATE, TRG_OFF};
    tick();
    check(active == 5'b00000, "nothing before arm");
    arm = 1; tick(); arm = 0;
    check(active == 5'b00000, "arm clears");
    tick();
    check(active == 5'b10010, "immediate modes start after arm");
    // wrong id, then right id on channel B
    sa = 1; id_a = 11'd41; tick(); sa = 0;
    tick();
    check(active[2] == 0, "wrong frame id does not fire");
    sb = 1; id_b = 11'd42; tick(); sb = 0;
    check(active[2] == 1, "frame id on channel B fires");
    cs = 1; cyc = 6'd6; tick(); cs = 0;
    check(active[3] == 0, "wrong cycle does not fire");
    cs = 1; cyc = 6'd7; tick(); cs = 0;
    check(active[3] == 1, "matching cycle fires");
    check(active[0] == 0, "off stays off");
    // a later event leaves the state alone
    sa = 1; id_a = 11'd42; tick(); sa = 0;
    check(active == 5'b11110, "sticky");
    stop = 1; tick(); stop = 0;
    check(active == 5'b00000, "overflow stops all");
    tick();
    check(active == 5'b00000, "stays stopped until re-armed");
    arm = 1; tick(); arm = 0; tick();
    check(active == 5'b10010, "re-arm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
