// Testbench of the match FSM. Loads the 13-state table of the strings
// {hers, she, the, there} (IDs 1..4, states numbered idle, h, he, her, hers, s, sh,
// she, t, th, the, ther, there; bytes other than e, h, r, s, t lead to idle), checks
// that the reference builder gives the same table, then streams random text and
// compares the match output of every byte, in the same cycle, with a direct string
// search. Also checks restart to the initial state and a non-zero initial state.
module tb_ac_match_fsm;
  import ac_model_pkg::*;

  localparam int unsigned SW = 9;
  localparam int unsigned MW = 8;

  logic clk = 0, rst_n = 0;
  logic tbl_we = 0, tbl_re = 0;
  logic [SW+MW-1:0] tbl_rdata;
  logic [SW+8-1:0] tbl_addr = '0;
  logic [SW+MW-1:0] tbl_wdata = '0;
  logic restart = 0;
  logic [SW-1:0] init_state = '0;
  logic byte_valid = 0;
  logic [7:0] byte_data = '0;
  logic match_valid;
  logic [MW-1:0] match_id;
  logic [SW-1:0] state;

  int checks = 0, failures = 0;

  ac_match_fsm #(.STATE_W(SW), .MATCH_W(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next state / match ID for columns e, h, r, s, t
  int tns [13][5] = '{
    '{0,1,0,5,8}, '{2,1,0,5,8}, '{0,1,3,5,8}, '{0,1,0,4,8}, '{0,6,0,5,8},
    '{0,6,0,5,8}, '{7,1,0,5,8}, '{0,1,3,5,8}, '{0,9,0,5,8}, '{10,1,0,5,8},
    '{0,1,11,5,8}, '{12,1,0,4,8}, '{0,1,0,5,8}};
  int tid [13][5] = '{
    '{0,0,0,0,0}, '{0,0,0,0,0}, '{0,0,0,0,0}, '{0,0,0,1,0}, '{0,0,0,0,0},
    '{0,0,0,0,0}, '{2,0,0,0,0}, '{0,0,0,0,0}, '{0,0,0,0,0}, '{3,0,0,0,0},
    '{0,0,0,0,0}, '{4,0,0,1,0}, '{0,0,0,0,0}};
  byte cols [5] = '{"e", "h", "r", "s", "t"};

  function automatic int col_of(int c);
    for (int k = 0; k < 5; k++) if (int'(cols[k]) == c) return k;
    return -1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(byte b, output int id);
    byte_valid = 1;
    byte_data  = b;
    #1;
    id = match_valid ? int'(match_id) : 0;
    @(posedge clk);
    #1;
    byte_valid = 0;
  endtask

  initial begin
    ac_table m;
    string pats[$];
    byte text[$];
    int id, exp_id, nmatch;
    pats = '{"hers", "she", "the", "there"};
    m = new();
    m.build(pats, 16);
    check(m.nstates == 13, "model state count");
    for (int s = 0; s < 13; s++)
      for (int c = 0; c < 256; c++) begin
        int k, ens, eid;
        k   = col_of(c);
        ens = (k < 0) ? 0 : tns[s][k];
        eid = (k < 0) ? 0 : tid[s][k];
        if (k >= 0) check(m.delta[s*256+c] == ens && m.outid[ens] == eid, "model vs table");
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(state == '0, "reset state is idle");

    // load the table
    for (int s = 0; s < 13; s++)
      for (int c = 0; c < 256; c++) begin
        int k;
        k = col_of(c);
        tbl_we    = 1;
        tbl_addr  = (SW+8)'((s << 8) | c);
        tbl_wdata = (SW+MW)'(((k < 0 ? 0 : tns[s][k]) << MW) | (k < 0 ? 0 : tid[s][k]));
        @(posedge clk); #1;
      end
    tbl_we = 0;
    // read back two entries: ther --s--> hers (1), sh --e--> she (2)
    tbl_re = 1; tbl_addr = (SW+8)'((11 << 8) | 8'h73);
    @(posedge clk); #1;
    check(tbl_rdata == (SW+MW)'((4 << MW) | 1), "read back ther,s");
    tbl_addr = (SW+8)'((6 << 8) | 8'h65);
    @(posedge clk); #1;
    check(tbl_rdata == (SW+MW)'((7 << MW) | 2), "read back sh,e");
    tbl_re = 0;

    // fixed text with every pattern: "ushers" gives she then hers, "there" gives the, there
    begin
      string fixed;
      fixed = "ushersxthere";
      text = {};
      for (int i = 0; i < fixed.len(); i++) text.push_back(fixed[i]);
    end
    restart = 1; @(posedge clk); #1; restart = 0;
    foreach (text[i]) begin
      send(text[i], id);
      check(id == m.naive_match(text, i), $sformatf("fixed text pos %0d id %0d", i, id));
    end

    // random text over the pattern alphabet plus one other byte
    restart = 1; @(posedge clk); #1; restart = 0;
    text = {};
    nmatch = 0;
    for (int i = 0; i < 4000; i++) begin
      byte b;
      int r;
      r = $urandom_range(0, 5);
      b = (r == 5) ? "x" : cols[r];
      text.push_back(b);
      send(b, id);
      exp_id = m.naive_match(text, i);
      if (exp_id != 0) nmatch++;
      check(id == exp_id, $sformatf("random pos %0d got %0d exp %0d", i, id, exp_id));
    end
    check(nmatch > 20, "random text produced matches");

    // restart in the middle of "the": the 'e' after restart must not match
    restart = 1; @(posedge clk); #1; restart = 0;
    send("t", id); send("h", id);
    restart = 1; @(posedge clk); #1; restart = 0;
    check(state == '0, "restart returns to initial state");
    send("e", id);
    check(id == 0, "no match after restart");

    // a byte presented together with restart is not consumed
    restart = 1; byte_valid = 1; byte_data = "s"; #1;
    check(!match_valid, "no match while restarting");
    @(posedge clk); #1; restart = 0; byte_valid = 0;
    check(state == '0, "byte ignored during restart");

    // non-zero initial state: start in 'th', then 'e' completes "the"
    init_state = SW'(9);
    restart = 1; @(posedge clk); #1; restart = 0;
    check(state == SW'(9), "initial state loaded");
    send("e", id);
    check(id == 3, "match from non-zero initial state");
    check(state == SW'(10), "state after e is 'the'");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
