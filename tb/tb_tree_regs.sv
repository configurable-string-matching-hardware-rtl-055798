// Testbench of the tree SRAM control: control-word writes and reads (used, write,
// start at bits 31, 30, 0), table writes passed on with index = word - 2, table
// writes dropped while `used` is set, capture of the first match of a scan, the
// result in the match-ID word, start cleared and irq raised at scan_done, irq cleared
// by the next control-word write.
module tb_tree_regs;
  localparam int unsigned SW = 9, MW = 8, AW = SW + 9;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_re = 0;
  logic [AW-1:0] h_addr = '0;
  logic [31:0] h_wdata = '0, h_rdata;
  logic start, write_bit, used, tbl_we, tbl_re, wr_blocked, irq;
  logic [SW+MW-1:0] tbl_rdata;
  logic [SW+8-1:0] tbl_addr;
  logic [SW+MW-1:0] tbl_wdata;
  logic scan_begin = 0, match_valid = 0, scan_done = 0;
  logic [MW-1:0] match_id = '0;
  int checks = 0, failures = 0;

  tree_regs #(.STATE_W(SW), .MATCH_W(MW)) dut (.*);

  always #5 clk = ~clk;
  // table RAM stand-in: registered read returning a function of the index
  always @(posedge clk) if (tbl_re) tbl_rdata <= (SW+MW)'(tbl_addr * 3 + 1);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic hwrite(int a, logic [31:0] d, output bit we_seen, output int wa);
    @(negedge clk); h_we = 1; h_addr = AW'(a); h_wdata = d;
    #1; we_seen = tbl_we; wa = int'(tbl_addr);
    @(negedge clk); h_we = 0;
  endtask

  task automatic hread(int a, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_addr = AW'(a);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  initial begin
    bit we; int wa; logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(!start && !write_bit && !used && !irq, "reset values");
    hwrite(0, 32'h4000_0000, we, wa);
    check(write_bit && !start, "write bit set");
    hread(0, d); check(d == 32'h4000_0000, "control word readback");
    hwrite(2 + 1234, 32'h1abcd, we, wa);
    check(we && wa == 1234 && tbl_wdata == 17'h1abcd, "table write index = word - 2");
    hread(2 + 777, d);
    check(d == 32'(777 * 3 + 1), "table read returns table RAM data");
    hread(0, d);
    check(d == 32'h4000_0000, "register read after table read");
    hwrite(1, 32'h55, we, wa);
    check(!we, "match-ID word is not a table entry");
    hwrite(0, 32'h0000_0001, we, wa);
    check(start && !write_bit, "start set, write cleared");
    // scan with matches 0, 7, 3: first match (7) is kept
    @(negedge clk); scan_begin = 1; @(negedge clk); scan_begin = 0;
    check(used, "used set at scan begin");
    hread(0, d); check(d == 32'h8000_0001, "control word shows used and start");
    @(negedge clk); h_we = 1; h_addr = AW'(5); h_wdata = 32'h1; #1;
    check(!tbl_we && wr_blocked, "table write blocked while used");
    @(negedge clk); h_we = 0;
    @(negedge clk); match_valid = 1; match_id = 7;
    @(negedge clk); match_id = 3;
    @(negedge clk); match_valid = 0;
    @(negedge clk); scan_done = 1; @(negedge clk); scan_done = 0;
    check(!start && !used && irq, "done: start and used cleared, irq raised");
    hread(1, d); check(d == 32'd7, "first match ID stored");
    hwrite(0, 32'h0, we, wa);
    check(!irq, "irq cleared by control write");
    // scan without matches stores 0
    hwrite(0, 32'h1, we, wa);
    @(negedge clk); scan_begin = 1; @(negedge clk); scan_begin = 0;
    @(negedge clk); scan_done = 1; @(negedge clk); scan_done = 0;
    hread(1, d); check(d == 32'd0, "no match stores 0");
    // match in the same cycle as scan_done is kept
    hwrite(0, 32'h1, we, wa);
    @(negedge clk); scan_begin = 1; @(negedge clk); scan_begin = 0;
    @(negedge clk); scan_done = 1; match_valid = 1; match_id = 9;
    @(negedge clk); scan_done = 0; match_valid = 0;
    hread(1, d); check(d == 32'd9, "match on the last cycle stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
