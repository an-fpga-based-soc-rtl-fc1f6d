// End-to-end testbench of tester_top at its default sizes (2048-word FIFOs
// of 256-word sectors, 8 table rows, 130-word frames).
//
// A modelled communication controller runs 12 communication cycles of 1500
// clocks. In each cycle channel A carries a long frame that starts first and
// a very long dynamic frame; channel B carries three short frames that start
// after the long A frame and end before it (the overtaking case of the
// temporal-order problem) and a 130-word dynamic frame. In cycle 3 the long A
// frame announces no length, so the B frames cannot be placed until it ends:
// both B queues fill and the third B frame is lost. A modelled host services
// the threshold interrupt, reads every full sector and clears its dirty bit,
// and at the end reads the rest up to the last_written_pointer. The host's
// byte stream is parsed and checked: timestamps never decrease, every frame
// arrives with its data and with a timestamp that matches its start, the
// cluster time starts at the cycle chosen by the trigger, the status and
// ID-preview packets report every frame.
// Then the host stops reading until the FIFO overflows and monitoring stops.
// Finally it writes frames into the replay FIFO: two frames replayed at
// their timestamps (asynchronous mode) and one at its cycle and slot
// (synchronous mode), checked on the transmit outputs.
// Every mechanism is counted; one that never happened counts as a failure.
//
// Timing: 25 ns clock; stimulus changes after the falling edge and outputs
// are sampled at the rising edge. A watchdog ends the run, counted as a
// failure, after 400000 cycles.
module tester_top_tb;
  import fr_tester_pkg::*;

  localparam int CYC_LEN = 1500;
  localparam int N_CYC   = 12;
  localparam int LOSS_CYC = 3;

  logic clk = 0, rst_n = 0;
  src16_t cc_rx_a, cc_rx_b;
  logic [10:0] cc_rx_id_a = 0, cc_rx_id_b = 0;
  logic cc_rx_end_a = 0, cc_rx_end_b = 0;
  rx_flags_t cc_rx_flags_a = '0, cc_rx_flags_b = '0;
  logic cc_cycle_start = 0;
  logic [5:0] cc_cycle_count = 0;
  logic [15:0] cc_macrotick = 0;
  logic [10:0] cc_slot_id = 0;
  logic [1:0] cc_tx_valid, cc_tx_ready = 2'b11, cc_tx_sop, cc_tx_eop;
  logic [15:0] cc_tx_data [2];
  logic [7:0] cc_tx_len16 [2];
  logic [3:0] host_addr = 0;
  logic host_wr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic [10:0] host_mon_addr = 0, host_rpl_addr = 0;
  logic [31:0] host_mon_rdata, host_rpl_wdata = 0, host_rpl_rdata;
  logic host_rpl_we = 0;
  logic irq_mon, irq_ovf;

  tester_top dut (.*);

  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned tb_time = 0;
  always @(posedge clk) tb_time <= tb_time + 1;

  // ------------------------------------------------------------ mechanisms
  int n_overtake = 0, n_lost = 0, n_thr_irq = 0, n_dirty_clr = 0, n_wrap = 0;
  int n_ovf = 0, n_trig_cycle = 0, n_async = 0, n_sync = 0, n_late_len = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    irq_q <= irq_mon;
    if (irq_mon && !irq_q) n_thr_irq++;
  end

  // ------------------------------------------------------------ host bus
  task automatic reg_wr(input int a, input logic [31:0] d);
    @(negedge clk); host_addr = 4'(a); host_wr = 1; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask
  task automatic reg_rd(input int a, output logic [31:0] d);
    @(negedge clk); host_addr = 4'(a); #1 d = host_rdata;
  endtask

  // ------------------------------------------------------------ controller model
  typedef struct {
    int          ch;
    int          id;
    logic [15:0] w [$];
    int unsigned t_sop;
    bit          kept;
  } frame_t;
  frame_t sent [$];
  int open_a = -1, open_b = -1;   // index in sent[] of the open frame per channel
  int ids_cycle [$];               // IDs started in the current cycle
  int ids_per_cycle [$][$];

  task automatic drive_frame(input int ch, input int id, input int n16, input int ann_at, input bit kept);
    frame_t f;
    int idx;
    f.ch = ch; f.id = id; f.kept = kept;
    f.w.push_back(16'(id));
    for (int i = 1; i < n16; i++) f.w.push_back(16'($urandom));
    for (int i = 0; i < n16; i++) begin
      src16_t s;
      s = '0;
      s.valid = 1; s.sop = (i == 0); s.eop = (i == n16 - 1); s.data = f.w[i];
      s.len_valid = (i == ann_at); s.len16 = 8'(n16);
      @(negedge clk);
      if (i == 0) begin
        f.t_sop = tb_time;
        sent.push_back(f);
        idx = sent.size() - 1;
        ids_cycle.push_back({ch, 4'b0, 11'(id)});
        if (ch == 0) open_a = idx; else open_b = idx;
      end
      if (ch == 0) begin cc_rx_a = s; cc_rx_id_a = 11'(id); end
      else         begin cc_rx_b = s; cc_rx_id_b = 11'(id); end
      if (i == n16 - 1) begin
        // frame end: status event; count overtaking of an earlier open frame
        if (ch == 0) begin cc_rx_end_a = 1; cc_rx_flags_a = 4'b0011; open_a = -1;
          if (open_b >= 0 && sent[open_b].t_sop < sent[idx].t_sop) n_overtake++; end
        else begin cc_rx_end_b = 1; cc_rx_flags_b = 4'b0011; open_b = -1;
          if (open_a >= 0 && sent[open_a].t_sop < sent[idx].t_sop) n_overtake++; end
      end
      @(negedge clk);
      if (ch == 0) begin cc_rx_a = '0; cc_rx_end_a = 0; end
      else         begin cc_rx_b = '0; cc_rx_end_b = 0; end
    end
  endtask

  task automatic comm_cycle(input int c);
    bit loss;
    loss = (c == LOSS_CYC);
    @(negedge clk);
    cc_cycle_start = 1; cc_cycle_count = 6'(c); cc_macrotick = 16'(c * 1000);
    if (ids_cycle.size() > 0) ids_per_cycle.push_back(ids_cycle);
    ids_cycle.delete();
    @(negedge clk);
    cc_cycle_start = 0;
    fork
      begin   // channel A
        repeat (20) @(negedge clk);
        drive_frame(0, 1, 40, loss ? -1 : 2, 1);
        if (loss) n_late_len++;
        repeat (60) @(negedge clk);
        drive_frame(0, 10 + c, 100, 2, 1);
      end
      begin   // channel B
        repeat (30) @(negedge clk);
        drive_frame(1, 2, 8, 2, 1);
        repeat (2) @(negedge clk);
        drive_frame(1, 3, 6, 2, 1);
        repeat (2) @(negedge clk);
        drive_frame(1, 4, 4, 2, !loss);
        if (loss) n_lost++;
        repeat (100) @(negedge clk);
        drive_frame(1, 11, 130, 2, 1);
      end
    join
    while (tb_time % CYC_LEN != 0) @(negedge clk);
  endtask

  // ------------------------------------------------------------ host model
  logic [31:0] stream [$];
  int host_sec = 0;
  int unsigned host_ptr = 0;
  bit host_service = 1;
  bit in_service = 0;
  task automatic read_words(input int first, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); host_mon_addr = 11'((first + i) % 2048);
      @(posedge clk); #1 stream.push_back(host_mon_rdata);
    end
  endtask
  task automatic service();
    logic [31:0] d;
    reg_rd(4, d);
    while (d[host_sec]) begin
      read_words(host_sec * 256, 256);
      reg_wr(4, 32'(1) << host_sec);
      n_dirty_clr++;
      host_sec = (host_sec + 1) % 8;
      host_ptr += 256;
      if (host_sec == 0) n_wrap++;
      reg_rd(4, d);
    end
  endtask

  // ------------------------------------------------------------ parsing
  int n_frames_ok = 0, n_ct = 0, n_status = 0, n_idp = 0;
  task automatic parse();
    int p = 0, fa = 0;
    logic [31:0] last_ts = 0;
    int offset = 0;
    bit have_off = 0;
    int kept_idx [$];
    int idp_seen = 0;
    for (int i = 0; i < sent.size(); i++) if (sent[i].kept) kept_idx.push_back(i);
    while (p < stream.size()) begin
      logic [7:0] id; logic [7:0] len16; int size;
      logic [31:0] ts;
      logic [15:0] d16 [$];
      id = stream[p][31:24]; len16 = stream[p][23:16]; size = int'(stream[p][15:0]);
      if (size < 2 || p + size > stream.size()) begin
        check(0, $sformatf("malformed packet at word %0d: %h", p, stream[p]));
        break;
      end
      ts = stream[p+1];
      check(ts >= last_ts, $sformatf("temporal order at word %0d: %0d after %0d", p, ts, last_ts));
      last_ts = ts;
      for (int k = 0; k < int'(len16); k++) d16.push_back(k[0] ? stream[p+2+k/2][31:16] : stream[p+2+k/2][15:0]);
      case (id)
        PKT_FRAME_A, PKT_FRAME_B: begin
          if (fa < kept_idx.size()) begin
            frame_t f;
            bit same;
            f = sent[kept_idx[fa]];
            if (!have_off) begin offset = int'(ts) - int'(f.t_sop); have_off = 1; end
            same = (d16.size() == f.w.size()) && (id == (f.ch ? PKT_FRAME_B : PKT_FRAME_A));
            for (int k = 0; same && k < d16.size(); k++) same = (d16[k] == f.w[k]);
            check(same, $sformatf("frame %0d (id %0d ch %0d) contents", fa, f.id, f.ch));
            check(int'(ts) - int'(f.t_sop) == offset, $sformatf("frame %0d timestamp", fa));
            if (same) n_frames_ok++;
          end else check(0, "more frames than sent");
          fa++;
        end
        PKT_CLUSTER_TIME: begin
          if (n_ct == 0) begin
            check(d16[0] == 16'd1, $sformatf("cluster time starts at the trigger cycle, got %0d", d16[0]));
            if (d16[0] == 16'd1) n_trig_cycle++;
          end
          check(d16.size() == 2 && d16[1] == 16'(int'(d16[0]) * 1000), "cluster time value");
          n_ct++;
        end
        PKT_STATUS: begin
          check(d16.size() == 4 && (d16[0][15] || d16[2][15]), "status packet reports a frame");
          n_status++;
        end
        PKT_ID_PREVIEW: begin
          if (idp_seen < ids_per_cycle.size()) begin
            bit same;
            same = d16.size() == ids_per_cycle[idp_seen].size();
            for (int k = 0; same && k < d16.size(); k++) same = (int'(d16[k]) == ids_per_cycle[idp_seen][k]);
            check(same, $sformatf("ID preview %0d", idp_seen));
          end
          idp_seen++;
          n_idp++;
        end
        default: check(0, $sformatf("unknown identifier %h", id));
      endcase
      p += size;
    end
    check(fa == kept_idx.size(), $sformatf("frames in FIFO %0d vs %0d", fa, kept_idx.size()));
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ host process
  initial begin
    forever begin
      @(negedge clk);
      if (host_service && irq_mon && !irq_ovf) begin
        in_service = 1;
        service();
        in_service = 0;
      end
    end
  end

  // replay receive side
  int rx_ch [$], rx_t [$];
  logic [15:0] rx_w [$][$];
  logic [15:0] rcur [2][$];
  for (genvar c = 0; c < 2; c++) begin : g_tx
    always @(posedge clk) if (cc_tx_valid[c] && cc_tx_ready[c]) begin
      if (cc_tx_sop[c]) begin rcur[c].delete(); rx_ch.push_back(c); rx_t.push_back(int'(tb_time)); end
      rcur[c].push_back(cc_tx_data[c]);
      if (cc_tx_eop[c]) rx_w.push_back(rcur[c]);
    end
  end

  // ------------------------------------------------------------ main
  initial begin
    logic [31:0] d, tnow;
    int lwp, words;
    cc_rx_a = '0; cc_rx_b = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // modules 0,1,3,4 immediate; module 2 (cluster time) from cycle 1
    reg_wr(1, {TRG_IMMEDIATE, TRG_IMMEDIATE, TRG_CYCLE, TRG_IMMEDIATE, TRG_IMMEDIATE});
    reg_wr(2, {10'b0, 6'd1, 5'b0, 11'd0});
    reg_wr(3, 1);
    reg_wr(0, 32'h7);             // timer on, clear, arm
    while (tb_time % CYC_LEN != 0) @(negedge clk);
    for (int c = 0; c < N_CYC; c++) comm_cycle(c);
    // one more cycle start flushes the ID preview of the last cycle
    @(negedge clk); cc_cycle_start = 1; cc_cycle_count = 6'(N_CYC); cc_macrotick = 16'(N_CYC * 1000);
    ids_per_cycle.push_back(ids_cycle); ids_cycle.delete();
    @(negedge clk); cc_cycle_start = 0;
    repeat (400) @(negedge clk);
    host_service = 0;
    while (in_service) @(negedge clk);
    service();
    reg_rd(5, d);
    check(d[1] == 1, "lost packet flagged in STATUS");
    check(d[0] == 0, "no overflow while the host keeps up");
    lwp = int'(d[26:16]);
    words = (lwp - int'(host_ptr % 2048) + 2048) % 2048;
    read_words(int'(host_ptr % 2048), words);
    parse();
    check(n_frames_ok == N_CYC * 6 - 1, $sformatf("frames intact: %0d", n_frames_ok));
    check(n_ct == N_CYC, $sformatf("cluster time packets %0d", n_ct - 0));
    check(n_status > 0 && n_idp == N_CYC, $sformatf("status %0d, ID preview %0d", n_status, n_idp));

    // ---- overflow: the host stops reading
    for (int c = N_CYC + 1; c < N_CYC + 24 && !irq_ovf; c++) comm_cycle(c);
    check(irq_ovf, "overflow interrupt");
    if (irq_ovf) n_ovf++;
    reg_rd(5, d);
    check(d[0] == 1 && d[15:8] == 0, "overflow flagged and monitoring stopped");
    lwp = int'(d[26:16]);
    comm_cycle(40);
    reg_rd(5, d);
    check(int'(d[26:16]) == lwp, "nothing recorded after the stop");

    // ---- replay: sector 0 holds two frames for asynchronous replay (and a
    // status packet that is skipped), sector 1 one frame for synchronous
    // replay; the rest is padding
    reg_rd(7, tnow);
    begin
      logic [31:0] img [512];
      foreach (img[i]) img[i] = 32'h0;
      img[1] = make_header(PKT_FRAME_A, 8'd5); img[2] = tnow + 2000;
      img[3] = 32'h2222_1111; img[4] = 32'h4444_3333; img[5] = 32'h0000_5555;
      img[6] = make_header(PKT_STATUS, 8'd4); img[7] = tnow + 2050;
      img[8] = 32'h1; img[9] = 32'h2;
      img[10] = make_header(PKT_FRAME_B, 8'd4); img[11] = tnow + 2500;
      img[12] = 32'hBBBB_AAAA; img[13] = 32'hDDDD_CCCC;
      img[256] = make_header(PKT_FRAME_B, 8'd2); img[257] = {10'b0, 6'd9, 5'b0, 11'd21};
      img[258] = 32'h5678_1234;
      foreach (img[i]) begin
        @(negedge clk); host_rpl_we = 1; host_rpl_addr = 11'(i); host_rpl_wdata = img[i];
      end
      @(negedge clk); host_rpl_we = 0;
      reg_wr(6, 32'h1);                   // sector 0 holds data
      reg_wr(0, 32'h9);                   // timer on, replay on, asynchronous
      wait (rx_w.size() == 2);
      check(rx_ch[0] == 0 && rx_w[0].size() == 5 && rx_w[0][0] == 16'h1111 && rx_w[0][4] == 16'h5555, "replayed frame A");
      check(rx_ch[1] == 1 && rx_w[1].size() == 4 && rx_w[1][3] == 16'hDDDD, "replayed frame B");
      check(rx_t[1] - rx_t[0] >= 495 && rx_t[1] - rx_t[0] <= 510, $sformatf("replay spacing %0d ticks", rx_t[1] - rx_t[0]));
      if (rx_w.size() == 2 && rx_ch[0] == 0) n_async += 2;
      repeat (600) @(negedge clk);
      reg_rd(6, d);
      check(d[1:0] == 2'b00, "replay sector 0 released after use");
      // synchronous mode: frame for cycle 9, slot 21
      reg_wr(0, 32'h19);
      cc_cycle_count = 6'd9; cc_slot_id = 11'd20;
      reg_wr(6, 32'h2);
      repeat (1500) @(negedge clk);
      check(rx_w.size() == 2, "synchronous frame waits for its slot");
      cc_slot_id = 11'd21;
      repeat (50) @(negedge clk);
      check(rx_w.size() == 3 && rx_ch[2] == 1 && rx_w[2][0] == 16'h1234 && rx_w[2][1] == 16'h5678, "synchronous replay");
      if (rx_w.size() == 3) n_sync++;
    end

    $display("mechanisms: overtake=%0d late_length=%0d lost=%0d threshold_irq=%0d dirty_clear=%0d wrap=%0d overflow=%0d cycle_trigger=%0d replay_async=%0d replay_sync=%0d",
             n_overtake, n_late_len, n_lost, n_thr_irq, n_dirty_clr, n_wrap, n_ovf, n_trig_cycle, n_async, n_sync);
    check(n_overtake > 0, "overtaking packets happened");
    check(n_late_len > 0, "late length happened");
    check(n_lost > 0, "lost packet happened");
    check(n_thr_irq > 0, "threshold interrupt happened");
    check(n_dirty_clr > 0, "dirty clear happened");
    check(n_wrap > 0, "FIFO wrap happened");
    check(n_ovf > 0, "overflow happened");
    check(n_trig_cycle > 0, "cycle trigger happened");
    check(n_async > 0, "asynchronous replay happened");
    check(n_sync > 0, "synchronous replay happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
