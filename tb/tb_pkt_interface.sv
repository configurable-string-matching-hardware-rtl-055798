// Testbench of the packet interface. The testbench holds the packet words and RAP/WAP
// itself and plays the parser with random ready. Checks: no scan while `write` is
// set; scan_begin and restart pulse at the start; words arrive in order from RAP to
// WAP, wrapping from the end of the buffer to word 2; `last` only on the WAP word; RAP
// ends one past WAP; scan_done comes one cycle after the last byte; a start on an
// empty buffer completes at once.
module tb_pkt_interface;
  localparam int unsigned D = 32, AW = 5;
  logic clk = 0, rst_n = 0;
  logic start = 0, write_bit = 0;
  logic scan_begin, scan_done, restart, busy;
  logic [AW-1:0] rap = AW'(2), wap = AW'(1), a_raddr, rap_wdata;
  logic [31:0] a_rdata;
  logic rap_we;
  logic word_valid, word_ready = 0, word_last;
  logic [31:0] word;
  logic byte_last_done = 0;
  int checks = 0, failures = 0;
  logic [31:0] mem [D];

  pkt_interface #(.DEPTH(D)) dut (.*);

  assign a_rdata = mem[a_raddr];
  always @(posedge clk) if (rap_we) rap <= rap_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int inc(int p);
    return (p == D - 1) ? 2 : p + 1;
  endfunction

  // one scan of n words starting at the current RAP
  task automatic scan(int n);
    int p, got;
    bit saw_begin;
    p = int'(rap);
    for (int i = 0; i < n; i++) begin
      mem[p] = $urandom;
      if (i == n - 1) wap = AW'(p);
      p = inc(p);
    end
    p = int'(rap);
    @(negedge clk); start = 1;
    #1 saw_begin = scan_begin && restart;
    check(saw_begin, "scan_begin and restart at start");
    @(negedge clk);
    got = 0;
    while (got < n) begin
      word_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (word_valid && word_ready) begin
        check(word == mem[p], $sformatf("word %0d of %0d", got, n));
        check(word_last == (got == n - 1), "last flag");
        p = inc(p);
        got++;
      end
      @(negedge clk);
    end
    word_ready = 0;
    check(rap == AW'(p), "RAP one past WAP");
    repeat (3) begin #1 check(!scan_done && busy, "waits for last byte"); @(negedge clk); end
    byte_last_done = 1; @(negedge clk); byte_last_done = 0;
    #1 check(scan_done, "scan_done after last byte");
    @(negedge clk); start = 0;
    #1 check(!busy, "idle again");
  endtask

  initial begin
    for (int i = 0; i < D; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write bit holds the scan off
    @(negedge clk); write_bit = 1; start = 1;
    repeat (5) begin #1 check(!scan_begin && !busy, "held off by write bit"); @(negedge clk); end
    start = 0; write_bit = 0;
    // empty buffer
    @(negedge clk); start = 1;
    #1 check(scan_begin, "begin on empty buffer");
    @(negedge clk); #1 check(scan_done, "empty buffer done at once");
    @(negedge clk); start = 0;
    // several scans, enough words to wrap around the 30-word data area
    scan(5);
    scan(17);
    scan(29);
    scan(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
