// Workload testbench at the default size: each of the eight FSMs gets a rule class of
// the size measured for the Snort rule set of October 2003 (strings, states): FTP
// (49, 268), SMTP (24, 362), ICMP (11, 138), Oracle (25, 265), Web-Frontpage (34,
// 367), and three classes of 500 characters, the configuration used for the 10 Gbit/s
// figure. The real rule strings are not available, so each class is made of random
// lowercase strings whose total length is the class's state count minus one (few
// shared prefixes, so the state count comes out close to the measured one). Packets
// are random text with copies of class strings planted in them. Checks: every class
// fits in 512 states, every packet's first match ID and scan time, and an aggregate
// rate of close to 8 bytes per clock.
module tb_ids_workload;
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
  int busy_rise [N], irq_rise [N];
  logic [N-1:0] busy_q = '0, irq_q = '0;
  int n_match = 0, n_nomatch = 0;

  ids_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) begin
      if (busy[i] && !busy_q[i]) busy_rise[i] = cyc;
      if (irq[i] && !irq_q[i]) irq_rise[i] = cyc;
    end
    busy_q <= busy;
    irq_q <= irq;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // one write per clock while called back to back; idle() ends a burst
  task automatic wr(int ch, int a, logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 1; h_addr = AW'((ch << CAW) | a); h_wdata = d;
  endtask
  task automatic idle();
    @(negedge clk); h_valid = 0; h_we = 0;
  endtask
  task automatic rd(int ch, int a, output logic [31:0] d);
    @(negedge clk); h_valid = 1; h_we = 0; h_addr = AW'((ch << CAW) | a);
    @(negedge clk); h_valid = 0; d = h_rdata;
  endtask

  function automatic int inc(int p);
    return (p == D - 1) ? 2 : p + 1;
  endfunction

  string cname [N] = '{"FTP", "SMTP", "ICMP", "Oracle", "Web-Frontpage", "500 chars A", "500 chars B", "500 chars C"};
  int nstr [N]   = '{49, 24, 11, 25, 34, 40, 40, 40};
  int nstate [N] = '{268, 362, 138, 265, 367, 501, 501, 501};
  ac_table m [N];
  int nw [N], expid [N], wap [N];

  task automatic put_packet(int ch, int len);
    byte pkt[$];
    logic [31:0] d;
    int p;
    for (int i = 0; i < len; i++) pkt.push_back(8'h61 + 8'($urandom_range(0, 25)));
    // plant up to three class strings
    for (int k = 0; k < 3; k++) if ($urandom_range(0, 3) != 0) begin
      string s;
      int at;
      s = m[ch].pats[$urandom_range(0, m[ch].pats.size() - 1)];
      if (s.len() < len) begin
        at = $urandom_range(0, len - s.len());
        for (int i = 0; i < s.len(); i++) pkt[at + i] = s[i];
      end
    end
    while (pkt.size() % 4 != 0) pkt.push_back(8'h00);
    nw[ch] = pkt.size() / 4;
    rd(ch, 0, d);
    p = int'(d);
    for (int w = 0; w < nw[ch]; w++) begin
      wr(ch, p, {pkt[4*w], pkt[4*w+1], pkt[4*w+2], pkt[4*w+3]});
      if (w < nw[ch] - 1) p = inc(p);
    end
    wr(ch, 1, 32'(p));
    idle();
    wap[ch] = p;
    expid[ch] = 0;
    for (int i = 0; i < pkt.size(); i++)
      if (expid[ch] == 0) expid[ch] = m[ch].naive_match(pkt, i);
  endtask

  initial begin
    logic [31:0] d;
    int first, last, bytes;
    // build the classes
    for (int ch = 0; ch < N; ch++) begin
      string pats[$];
      int chars, left;
      pats = {};
      chars = nstate[ch] - 1;
      left = chars;
      for (int k = 0; k < nstr[ch]; k++) begin
        string s;
        int l;
        l = (k == nstr[ch] - 1) ? left : $urandom_range(3, 2 * chars / nstr[ch] - 3);
        if (l > left - (nstr[ch] - 1 - k)) l = left - (nstr[ch] - 1 - k);
        if (l < 1) l = 1;
        left -= l;
        s = "";
        for (int i = 0; i < l; i++) s = {s, string'(8'h61 + 8'($urandom_range(0, 25)))};
        pats.push_back(s);
      end
      m[ch] = new();
      m[ch].build(pats, 2 ** SW);
      check(m[ch].nstates <= 2 ** SW, $sformatf("%s fits in %0d states", cname[ch], 2 ** SW));
      $display("class %-14s strings %0d states %0d (measured class: %0d)", cname[ch], nstr[ch], m[ch].nstates, nstate[ch]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ch = 0; ch < N; ch++) begin
      wr(ch, TREE + 0, 32'h4000_0000);
      for (int s = 0; s < m[ch].nstates; s++)
        for (int c = 0; c < 256; c++)
          wr(ch, TREE + 2 + (s << 8) + c, 32'(m[ch].entry(s, c, MW)));
      wr(ch, TREE + 0, 32'h0);
    end
    idle();

    for (int round = 0; round < 6; round++) begin
      for (int ch = 0; ch < N; ch++) put_packet(ch, (round == 0) ? 1500 : $urandom_range(40, 1500));
      for (int ch = 0; ch < N; ch++) wr(ch, TREE + 0, 32'h1);
      idle();
      while (irq != '1) @(posedge clk);
      @(posedge clk);
      first = busy_rise[0]; last = irq_rise[0]; bytes = 0;
      for (int ch = 0; ch < N; ch++) begin
        check(irq_rise[ch] - busy_rise[ch] == 4 * nw[ch] + 2, $sformatf("%s scan time", cname[ch]));
        rd(ch, TREE + 1, d);
        check(int'(d) == expid[ch], $sformatf("%s match %0d expected %0d", cname[ch], d, expid[ch]));
        if (expid[ch] != 0) n_match++; else n_nomatch++;
        wr(ch, TREE + 0, 32'h0);
        idle();
        if (busy_rise[ch] < first) first = busy_rise[ch];
        if (irq_rise[ch] > last) last = irq_rise[ch];
        bytes += 4 * nw[ch];
      end
      if (round == 0) begin
        real rate;
        rate = real'(bytes) / real'(last - first);
        $display("aggregate rate %0.2f bytes per cycle", rate);
        check(rate > 7.9, "eight FSMs take close to 8 bytes per clock");
      end
    end
    check(n_match > 0, "planted strings were found");
    $display("packets with match %0d, without %0d", n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
