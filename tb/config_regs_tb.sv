// Testbench of config_regs: writes and reads back every register, checks
// the one-cycle pulses (timer clear, arm, dirty clear, replay set, overflow
// clear) and the sticky lost flag.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 500 cycles.
module config_regs_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] addr = 0;
  logic wr = 0;
  logic [31:0] wdata = 0, rdata;
  logic timer_en, timer_clr, arm, ovf_clr, replay_en, replay_sync;
  logic [9:0] trig_mode;
  logic [10:0] trig_id;
  logic [5:0] trig_cycle;
  logic [3:0] threshold;
  logic [7:0] mon_clr, replay_set;
  logic [31:0] time_now = 32'hCAFE0001;
  logic [7:0] mon_dirty = 8'h5A, replay_valid = 8'h81;
  logic irq_ovf = 1;
  logic [4:0] lost = 0, active = 5'b10101;
  logic [10:0] lwp = 11'd1234;
  int checks = 0, failures = 0;
  int n_clr = 0, n_arm = 0;

  config_regs #(.N_MON(5), .N_SEC(8), .AW(11)) dut (
    .clk, .rst_n, .host_addr(addr), .host_wr(wr), .host_wdata(wdata), .host_rdata(rdata),
    .timer_en, .timer_clr, .arm, .trig_mode, .trig_id, .trig_cycle, .threshold,
    .mon_clr, .ovf_clr, .replay_en, .replay_sync, .replay_set,
    .time_now, .mon_dirty, .irq_ovf, .lost, .active, .lwp, .replay_valid);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (timer_clr) n_clr++;
    if (arm) n_arm++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (rdata=%h)", what, rdata); end
  endtask
  task automatic write(input int a, input logic [31:0] d);
    @(negedge clk); addr = 4'(a); wr = 1; wdata = d;
    @(negedge clk); wr = 0;
  endtask
  task automatic read(input int a);
    @(negedge clk); addr = 4'(a); #1;
  endtask

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
    read(0); check(rdata == 0, "CTRL reset");
    write(0, 32'h0000_001F);
    check(timer_en && replay_en && replay_sync, "CTRL bits");
    check(n_clr == 1 && n_arm == 1, "clear and arm pulse once");
    read(0); check(rdata == 32'h19, "CTRL read back without pulse bits");
    write(1, 32'h0000_02D9); read(1); check(rdata == 32'h2D9 && trig_mode == 10'h2D9, "TRIG_MODE");
    write(2, 32'h0015_0123); read(2); check(trig_id == 11'h123 && trig_cycle == 6'h15 && rdata == 32'h0015_0123, "TRIG_MATCH");
    write(3, 32'h3); read(3); check(threshold == 3 && rdata == 3, "IRQ_THRESH");
    read(4); check(rdata == 32'h5A, "MON_DIRTY read");
    @(negedge clk); addr = 4; wr = 1; wdata = 32'h42; #1;
    check(mon_clr == 8'h42, "MON_DIRTY write-one-to-clear pulse");
    @(negedge clk); wr = 0; #1;
    check(mon_clr == 0, "pulse ends");
    @(negedge clk); addr = 6; wr = 1; wdata = 32'h03; #1;
    check(replay_set == 8'h03, "REPLAY_VLD set pulse");
    @(negedge clk); wr = 0;
    read(6); check(rdata == 32'h81, "REPLAY_VLD read");
    read(7); check(rdata == 32'hCAFE0001, "TIMER read");
    @(negedge clk); lost = 5'b00100; @(negedge clk); lost = 0;
    read(5); check(rdata == {16'd1234, 8'b00010101, 6'b0, 1'b1, 1'b1}, "STATUS");
    @(negedge clk); addr = 5; wr = 1; wdata = 32'h3; #1;
    check(ovf_clr, "overflow clear pulse");
    @(negedge clk); wr = 0;
    read(5); check(rdata[1] == 0, "lost flag cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
