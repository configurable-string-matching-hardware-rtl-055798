// Testbench of the parser: random words with random gaps on the input side and
// random back-pressure on the output side. Checks that the bytes come out most
// significant first, in order, that `last` marks exactly the fourth byte of a word
// flagged last, and that with no gaps and no back-pressure N words give 4*N bytes in
// 4*N consecutive cycles.
module tb_byte_parser;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [31:0] in_word = '0;
  logic out_valid, out_ready = 0, out_last;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;

  byte_parser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte exp_q[$];
  bit  exp_last_q[$];
  bit  gaps = 1;
  int  nbytes = 0, first_cycle = -1, last_cycle = -1, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    byte e; bit el;
    e = exp_q.pop_front();
    el = exp_last_q.pop_front();
    checks++;
    if (out_byte !== e || out_last !== el) begin
      failures++;
      $display("FAIL byte %h exp %h last %b exp %b", out_byte, e, out_last, el);
    end
    if (first_cycle < 0) first_cycle = cyc;
    last_cycle = cyc;
    nbytes++;
  end

  // output back-pressure
  always @(negedge clk) out_ready <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic push_words(int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] w;
      bit l;
      w = $urandom;
      l = (i == n - 1);
      @(negedge clk);
      while (gaps && $urandom_range(0, 2) == 0) @(negedge clk);
      in_valid = 1; in_word = w; in_last = l;
      for (int b = 3; b >= 0; b--) begin
        exp_q.push_back(w[8*b +: 8]);
        exp_last_q.push_back(l && b == 0);
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    push_words(300);
    wait (exp_q.size() == 0);
    // full-rate run
    gaps = 0;
    repeat (4) @(posedge clk);
    nbytes = 0; first_cycle = -1;
    fork
      push_words(50);
    join_none
    // keep in_valid asserted back to back: push_words waits on in_ready each word
    wait (nbytes == 200);
    checks++;
    if (last_cycle - first_cycle != 199) begin
      failures++;
      $display("FAIL full rate: 200 bytes over %0d cycles", last_cycle - first_cycle + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
