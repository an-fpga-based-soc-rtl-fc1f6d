// Testbench of dpram: independent writes and reads on both ports, one-cycle
// read latency, data written on one port visible on the other.
//
// Timing: 10 ns clock. A watchdog ends the run, counted as a failure, after 1000 cycles.
module dpram_tb;
  localparam int W = 64;
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  dpram #(.WORDS(W), .DW(32)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
                                   .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pat(input int i); return 32'hA5000000 ^ (i * 32'h01010101); endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // port A writes the even words, port B the odd ones, in the same cycles
    for (int i = 0; i < W; i += 2) begin
      @(negedge clk);
      a_we = 1; a_addr = 6'(i);   a_wdata = pat(i);
      b_we = 1; b_addr = 6'(i+1); b_wdata = pat(i+1);
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // read every word on both ports, A ascending, B descending
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      a_addr = 6'(i); b_addr = 6'(W-1-i);
      @(posedge clk); #1;
      check(a_rdata == pat(i), $sformatf("port A word %0d", i));
      check(b_rdata == pat(W-1-i), $sformatf("port B word %0d", W-1-i));
    end
    // read latency: the old value is seen in the cycle of a write
    @(negedge clk); a_we = 1; a_addr = 6'd3; a_wdata = 32'h12345678;
    @(posedge clk); #1;
    check(a_rdata == pat(3), "read-before-write");
    @(negedge clk); a_we = 0;
    @(posedge clk); #1;
    check(a_rdata == 32'h12345678, "new value next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
