// Testbench of cluster_time_source: every cycle start must yield one packet
// of two words, cycle count then macrotick, with the length announced on the
// first word and the packet starting one clock after the cycle start.
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 2000 cycles.
module cluster_time_source_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0, cs = 0;
  logic [5:0] cyc = 0;
  logic [15:0] mt = 0;
  src16_t src;
  int checks = 0, failures = 0;

  cluster_time_source dut (.clk, .rst_n, .cycle_start(cs), .cycle_count(cyc), .macrotick(mt), .src);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int npk = 0;
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
    for (int c = 0; c < 20; c++) begin
      logic [5:0] ec; logic [15:0] em;
      repeat (3 + $urandom_range(0, 5)) @(negedge clk);
      ec = 6'(c * 7); em = 16'($urandom);
      cyc = ec; mt = em; cs = 1;
      @(negedge clk); cs = 0; cyc = '1; mt = '1;   // inputs change after the event
      check(src.valid && src.sop && !src.eop && src.len_valid && src.len16 == 2 && src.data == 16'(ec),
            $sformatf("packet %0d word 0", c));
      @(negedge clk);
      check(src.valid && !src.sop && src.eop && src.data == em, $sformatf("packet %0d word 1", c));
      @(negedge clk);
      check(!src.valid, "idle after the packet");
      npk++;
    end
    check(npk == 20, "twenty packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
