// Testbench of injection_unit: frames of odd and even length written as
// 32-bit words come out as 16-bit words, lower half first, with sop/eop and
// the length, under a random ready pattern; two frames fit while the output is
// stalled and the third must wait (in_ready low).
//
// Timing: 10 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 3000 cycles.
module injection_unit_tb;
  import fr_tester_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_ready, in_valid = 0, in_sop = 0, in_last = 0;
  logic [31:0] in_data = 0;
  logic [7:0] in_len16 = 0, tx_len16;
  logic tx_valid, tx_ready = 0, tx_sop, tx_eop;
  logic [15:0] tx_data;
  int checks = 0, failures = 0;

  injection_unit #(.MAX_DATA16(16)) dut (.clk, .rst_n, .in_ready, .in_valid, .in_sop, .in_last,
    .in_data, .in_len16, .tx_valid, .tx_ready, .tx_sop, .tx_eop, .tx_data, .tx_len16);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] exp [$];
  logic [15:0] got [$];
  int n_sop = 0, n_eop = 0, bad_len = 0;
  int cur_len;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    got.push_back(tx_data);
    if (tx_sop) begin n_sop++; cur_len = int'(tx_len16); end
    if (tx_eop) n_eop++;
  end

  task automatic frame(input int len16);
    int nw = (len16 + 1) / 2;
    logic [15:0] h [];
    h = new[2 * nw];
    foreach (h[i]) h[i] = 16'($urandom);
    for (int i = 0; i < len16; i++) exp.push_back(h[i]);
    while (!in_ready) @(negedge clk);
    for (int w = 0; w < nw; w++) begin
      in_valid = 1; in_sop = (w == 0); in_last = (w == nw - 1);
      in_data = {h[2*w+1], h[2*w]}; in_len16 = 8'(len16);
      @(negedge clk);
    end
    in_valid = 0; in_sop = 0; in_last = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame(5);
    frame(8);
    @(negedge clk);
    check(!in_ready, "both queues full while the output is stalled");
    check(tx_valid && tx_sop && tx_len16 == 5, "first frame offered with its length");
    fork
      frame(3);
      begin
        for (int i = 0; i < 400; i++) begin
          @(negedge clk); tx_ready = ($urandom_range(0, 2) != 0);
        end
        tx_ready = 1;
      end
    join
    repeat (20) @(negedge clk);
    check(got.size() == exp.size(), $sformatf("words %0d vs %0d", got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d %h vs %h", i, got[i], exp[i]));
    check(n_sop == 3 && n_eop == 3, "three frames with sop and eop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
