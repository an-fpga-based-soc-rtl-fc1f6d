// Testbench of fifo_sector_ctrl with 4 sectors of 16 words. A sequence of
// retires moves the last_written_pointer; a sector must turn dirty exactly
// when the pointer passes its end, the threshold interrupt must follow the
// number of dirty sectors, host clears must remove dirty bits, and the
// overflow interrupt must hold until cleared.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 500 cycles.
module fifo_sector_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic retire_vld = 0, overflow_evt = 0, ovf_clr = 0;
  logic [5:0] lwp_new = 0, lwp;
  logic [3:0] host_clr = 0, dirty;
  logic [2:0] threshold = 0, n_dirty;
  logic irq_thr, irq_ovf;
  int checks = 0, failures = 0;

  fifo_sector_ctrl #(.DPRAM_WORDS(64), .SECTOR_WORDS(16)) dut (
    .clk, .rst_n, .retire_vld, .lwp_new, .host_clr, .threshold, .overflow_evt, .ovf_clr,
    .dirty, .lwp, .n_dirty, .irq_thr, .irq_ovf);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (dirty=%b)", what, dirty); end
  endtask

  task automatic retire(input int p);
    @(negedge clk); retire_vld = 1; lwp_new = 6'(p);
    @(negedge clk); retire_vld = 0;
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
    threshold = 2;
    retire(10);
    check(dirty == 4'b0000 && lwp == 10, "sector 0 not yet full");
    retire(16);
    check(dirty == 4'b0001, "sector 0 full at its end");
    @(negedge clk);
    check(!irq_thr, "one dirty sector below threshold 2");
    retire(20); retire(31);
    check(dirty == 4'b0001, "sector 1 still filling");
    retire(37);
    check(dirty == 4'b0011, "sector 1 full");
    @(negedge clk);
    check(irq_thr, "threshold reached");
    @(negedge clk); host_clr = 4'b0001; @(negedge clk); host_clr = 0;
    @(negedge clk);
    check(dirty == 4'b0010 && !irq_thr, "host read sector 0");
    retire(50); retire(60); retire(3);       // wrap through sector 3 to 0
    check(dirty == 4'b1110, "wrap sets sectors 2 and 3");
    check(n_dirty == 3, "count of dirty sectors");
    threshold = 0;
    repeat (2) @(negedge clk);
    check(!irq_thr, "threshold 0 disables the interrupt");
    @(negedge clk); overflow_evt = 1; @(negedge clk); overflow_evt = 0;
    repeat (3) @(negedge clk);
    check(irq_ovf, "overflow interrupt held");
    @(negedge clk); ovf_clr = 1; @(negedge clk); ovf_clr = 0;
    check(!irq_ovf, "overflow interrupt cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
