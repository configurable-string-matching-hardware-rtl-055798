// End-to-end testbench of the accelerator at its default size: eight channels of 512
// states and 512-word packet buffers. Each channel gets its own random pattern set
// (tables built by the reference model and written over the host bus). Rounds of
// packets are then written into all eight buffers and all eight channels started, so
// that they scan at the same time; every interrupt, match ID and RAP is checked
// against direct string search, and each channel's scan time against 4 cycles per
// word. The first round uses eight 1500-byte packets and checks that the eight FSMs
// together take close to 8 bytes (64 bits) per clock. Mechanisms counted: parallel
// scanning, buffer wrap-around, start held off by the write bit, a table write dropped
// during a scan, empty-buffer start, packets with and without a match.
module tb_ids_accel_top;
  import ac_model_pkg::*;
  localparam int unsigned N = 8, SW = 9, MW = 8, D = 512;
  localparam int unsigned CAW = SW + 10, AW = CAW + 3;
  localparam int unsigned TREE = 1 << (CAW - 1);

  logic clk = 0, rst_n = 0;
  logic h_valid = 0, h_we = 0;
  logic [AW-1:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic [N-1:0] irq, busy, match_valid, wr_blocked;
  logic [N-1:0][MW-1:0] match_id;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_parallel = 0, n_wrap = 0, n_holdoff = 0, n_blocked = 0, n_empty = 0;
  int n_match = 0, n_nomatch = 0;
  int busy_rise [N], irq_rise [N];
  logic [N-1:0] busy_q = '0, irq_q = '0;

  ids_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (&busy) n_parallel++;
    if (|wr_blocked) n_blocked++;
    for (int i = 0; i < N; i++) begin
      if (busy[i] && !busy_q[i]) busy_rise[i] = cyc;
      if (irq[i] && !irq_q[i]) irq_rise[i] = cyc;
    end
    busy_q <= busy;
    irq_q <= irq;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic wr(int ch, int a, logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 1; h_addr = AW'((ch << CAW) | a); h_wdata = d;
    @(negedge clk); h_valid = 0; h_we = 0;
  endtask

  task automatic rd(int ch, int a, output logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 0; h_addr = AW'((ch << CAW) | a);
    @(negedge clk); h_valid = 0; d = h_rdata;
  endtask

  function automatic int inc(int p);
    return (p == D - 1) ? 2 : p + 1;
  endfunction

  ac_table m [N];
  int nw [N], expid [N], wap [N];

  // write a packet of len bytes into channel ch at its RAP, remember the expectation
  task automatic put_packet(int ch, int len, string alpha);
    byte pkt[$];
    logic [31:0] d;
    int p;
    for (int i = 0; i < len; i++) pkt.push_back(alpha[$urandom_range(0, alpha.len() - 1)]);
    while (pkt.size() % 4 != 0) pkt.push_back(8'h00);
    nw[ch] = pkt.size() / 4;
    rd(ch, 0, d);
    p = int'(d);
    for (int w = 0; w < nw[ch]; w++) begin
      wr(ch, p, {pkt[4*w], pkt[4*w+1], pkt[4*w+2], pkt[4*w+3]});
      if (w < nw[ch] - 1) begin
        if (p == D - 1) n_wrap++;
        p = inc(p);
      end
    end
    wr(ch, 1, 32'(p));
    wap[ch] = p;
    expid[ch] = 0;
    for (int i = 0; i < pkt.size(); i++)
      if (expid[ch] == 0) expid[ch] = m[ch].naive_match(pkt, i);
  endtask

  task automatic run_round(int minlen, int maxlen, bit disturb, bit rate_check);
    logic [31:0] d;
    int first, last, bytes;
    for (int ch = 0; ch < N; ch++) put_packet(ch, $urandom_range(minlen, maxlen), "abcdef");
    for (int ch = 0; ch < N; ch++) wr(ch, TREE + 0, 32'h1);
    if (disturb) wr(3, TREE + 2 + 5, 32'h0);
    while (irq != '1) @(posedge clk);
    @(posedge clk);
    first = busy_rise[0]; last = irq_rise[0]; bytes = 0;
    for (int ch = 0; ch < N; ch++) begin
      check(irq_rise[ch] - busy_rise[ch] == 4 * nw[ch] + 2,
            $sformatf("ch %0d scan time %0d for %0d words", ch, irq_rise[ch] - busy_rise[ch], nw[ch]));
      rd(ch, TREE + 1, d);
      check(int'(d) == expid[ch], $sformatf("ch %0d match %0d expected %0d", ch, d, expid[ch]));
      if (expid[ch] != 0) n_match++; else n_nomatch++;
      rd(ch, 0, d);
      check(int'(d) == inc(wap[ch]), $sformatf("ch %0d RAP", ch));
      wr(ch, TREE + 0, 32'h0);
      if (busy_rise[ch] < first) first = busy_rise[ch];
      if (irq_rise[ch] > last) last = irq_rise[ch];
      bytes += 4 * nw[ch];
    end
    check(irq == '0, "all interrupts acknowledged");
    if (rate_check) begin
      real rate;
      rate = real'(bytes) / real'(last - first);
      $display("aggregate rate %0.2f bytes per cycle over %0d cycles", rate, last - first);
      check(rate > 7.9, "eight FSMs take close to 8 bytes per clock");
    end
  endtask

  initial begin
    logic [31:0] d;
    string alpha;
    alpha = "abcd";
    for (int ch = 0; ch < N; ch++) begin
      string pats[$];
      pats = {};
      for (int k = 0; k < 10; k++) begin
        string s;
        int l;
        s = "";
        l = $urandom_range(4, 9);
        for (int i = 0; i < l; i++) s = {s, string'(alpha[$urandom_range(0, 3)])};
        pats.push_back(s);
      end
      m[ch] = new();
      m[ch].build(pats, 128);
      check(m[ch].nstates <= 128, "pattern set fits the model");
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ch = 0; ch < N; ch++) begin
      wr(ch, TREE + 0, 32'h4000_0000);
      for (int s = 0; s < m[ch].nstates; s++)
        for (int c = 0; c < 256; c++)
          wr(ch, TREE + 2 + (s << 8) + c, 32'(m[ch].entry(s, c, MW)));
    end
    // read back one entry of every channel
    for (int ch = 0; ch < N; ch++) begin
      rd(ch, TREE + 2 + 256 + 8'h61, d);
      check(d == 32'(m[ch].entry(1, 8'h61, MW)), $sformatf("ch %0d table read-back", ch));
    end
    // start while write is still set: held off
    wr(2, TREE + 0, 32'h4000_0001);
    repeat (8) @(posedge clk);
    check(busy == '0, "start held off by write bit");
    if (busy == '0) n_holdoff++;
    for (int ch = 0; ch < N; ch++) wr(ch, TREE + 0, 32'h0);
    // empty-buffer start
    wr(6, TREE + 0, 32'h1);
    while (!irq[6]) @(posedge clk);
    rd(6, TREE + 1, d);
    check(d == 0, "empty buffer gives no match");
    n_empty++;
    wr(6, TREE + 0, 32'h0);

    run_round(1500, 1500, 0, 1);
    run_round(1, 1500, 1, 0);
    run_round(200, 1500, 0, 0);
    run_round(1, 40, 0, 0);

    check(n_parallel > 0, "all eight FSMs scanned at once");
    check(n_wrap > 0, "buffer wrap-around");
    check(n_holdoff > 0, "write-bit hold-off");
    check(n_blocked > 0, "table write dropped during a scan");
    check(n_empty > 0, "empty-buffer start");
    check(n_match > 0 && n_nomatch > 0, "packets with and without a match");
    $display("parallel=%0d wrap=%0d holdoff=%0d blocked=%0d empty=%0d match=%0d nomatch=%0d",
             n_parallel, n_wrap, n_holdoff, n_blocked, n_empty, n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
