// Testbench of one accelerator channel, driven only through its host port as the
// host software would: load the tables of a random pattern set (built by the
// reference model) with the `write` bit set, write packets into the circular buffer,
// move WAP, set `start`, wait for the interrupt and read the match ID. The expected ID
// is the first match found by direct string search over the packet. Also checks the
// scan time (4 cycles per word plus 3), wrap-around of the buffer, a start held off by
// the `write` bit, a table write dropped during a scan, and an empty-buffer start.
module tb_accel_channel;
  import ac_model_pkg::*;
  localparam int unsigned SW = 9, MW = 8, D = 64;
  localparam int unsigned TAW = SW + 9, CAW = TAW + 1;
  localparam int unsigned TREE = 1 << TAW;

  logic clk = 0, rst_n = 0;
  logic h_valid = 0, h_we = 0;
  logic [CAW-1:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic irq, busy, match_valid, wr_blocked;
  logic [MW-1:0] match_id;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_wrap = 0, n_holdoff = 0, n_blocked = 0, n_match = 0, n_nomatch = 0;

  accel_channel #(.STATE_W(SW), .MATCH_W(MW), .PKT_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (wr_blocked) n_blocked++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 1; h_addr = CAW'(a); h_wdata = d;
    @(negedge clk); h_valid = 0; h_we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 0; h_addr = CAW'(a);
    @(negedge clk); h_valid = 0; d = h_rdata;
  endtask

  task automatic load_tables(ac_table m);
    wr(TREE + 0, 32'h4000_0000);
    for (int s = 0; s < m.nstates; s++)
      for (int c = 0; c < 256; c++)
        wr(TREE + 2 + (s << 8) + c, 32'(m.entry(s, c, MW)));
    wr(TREE + 0, 32'h0);
    // read back a sample of the entries
    for (int k = 0; k < 20; k++) begin
      logic [31:0] d;
      int s, c;
      s = $urandom_range(0, m.nstates - 1);
      c = $urandom_range(0, 255);
      rd(TREE + 2 + (s << 8) + c, d);
      check(d == 32'(m.entry(s, c, MW)), "table read-back");
    end
  endtask

  function automatic int inc(int p);
    return (p == D - 1) ? 2 : p + 1;
  endfunction

  // write one packet at RAP, start, wait for irq, check the result and the time
  task automatic run_packet(ac_table m, byte pkt[$], bit disturb);
    logic [31:0] d;
    int rap, p, nw, t0, exp_id;
    byte padded[$];
    padded = pkt;
    while (padded.size() % 4 != 0) padded.push_back(8'h00);
    nw = padded.size() / 4;
    rd(0, d); rap = int'(d);
    p = rap;
    for (int w = 0; w < nw; w++) begin
      wr(p, {padded[4*w], padded[4*w+1], padded[4*w+2], padded[4*w+3]});
      if (w < nw - 1 && p == D - 1) n_wrap++;
      if (w < nw - 1) p = inc(p);
    end
    wr(1, 32'(p));
    exp_id = 0;
    for (int i = 0; i < padded.size(); i++)
      if (exp_id == 0) exp_id = m.naive_match(padded, i);
    wr(TREE + 0, 32'h1);
    t0 = cyc;
    if (disturb) begin
      // the host breaks the rule and writes a table entry during the scan
      wr(TREE + 2, 32'h0);
    end
    while (!irq) @(posedge clk);
    check(cyc - t0 == 4 * nw + 3, $sformatf("scan time %0d cycles for %0d words", cyc - t0, nw));
    rd(TREE + 1, d);
    check(int'(d) == exp_id, $sformatf("match ID %0d expected %0d", d, exp_id));
    if (exp_id != 0) n_match++; else n_nomatch++;
    rd(TREE + 0, d);
    check(d == 32'h0, "start and used cleared");
    rd(0, d);
    check(int'(d) == inc(p), "RAP one past WAP");
    wr(TREE + 0, 32'h0);          // acknowledge: clears irq
    check(!irq, "irq cleared");
  endtask

  initial begin
    ac_table m;
    string pats[$];
    byte pkt[$];
    logic [31:0] d;
    int t0;
    string alpha;
    alpha = "abcde";
    for (int k = 0; k < 12; k++) begin
      string s;
      int l;
      s = "";
      l = $urandom_range(3, 7);
      for (int i = 0; i < l; i++) s = {s, string'(alpha[$urandom_range(0, 3)])};
      pats.push_back(s);
    end
    pats.push_back("abcd");
    m = new();
    m.build(pats, 128);
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_tables(m);

    // write bit holds a start off
    wr(TREE + 0, 32'h4000_0001);
    t0 = cyc;
    repeat (10) @(posedge clk);
    check(!busy && !irq, "no scan while write is set");
    if (!busy) n_holdoff++;
    wr(TREE + 0, 32'h0000_0001);    // clear write, keep start: the empty buffer completes
    while (!irq) @(posedge clk);
    rd(TREE + 1, d);
    check(d == 0, "empty buffer gives no match");
    wr(TREE + 0, 32'h0);

    // fixed packet with a known pattern
    pkt = {};
    for (int i = 0; i < 3; i++) pkt.push_back("e");
    pkt.push_back("a"); pkt.push_back("b"); pkt.push_back("c"); pkt.push_back("d");
    run_packet(m, pkt, 0);

    // random packets, lengths up to 120 bytes, enough to wrap the buffer many times
    for (int n = 0; n < 40; n++) begin
      int len;
      pkt = {};
      len = $urandom_range(1, 120);
      for (int i = 0; i < len; i++) pkt.push_back(alpha[$urandom_range(0, 4)]);
      run_packet(m, pkt, n == 5);
    end
    // packets of bytes no pattern uses
    pkt = {};
    for (int i = 0; i < 40; i++) pkt.push_back("z");
    run_packet(m, pkt, 0);

    check(n_wrap > 0, "buffer wrap-around happened");
    check(n_holdoff > 0, "write-bit hold-off happened");
    check(n_blocked > 0, "table write during scan was dropped");
    check(n_match > 0 && n_nomatch > 0, "packets with and without matches");
    $display("wrap=%0d holdoff=%0d blocked=%0d match=%0d nomatch=%0d",
             n_wrap, n_holdoff, n_blocked, n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
