// Testbench of the packet SRAM: pointer reset values, host writes and one-cycle reads
// of data words, host writes of RAP and WAP, accelerator updates of RAP (with
// priority over a host write in the same cycle), and the combinational accelerator
// read port.
module tb_packet_sram;
  localparam int unsigned D = 64;
  localparam int unsigned AW = 6;
  logic clk = 0, rst_n = 0;
  logic h_we = 0, h_re = 0;
  logic [AW-1:0] h_addr = '0, a_raddr = '0, rap_wdata = '0, rap, wap;
  logic [31:0] h_wdata = '0, h_rdata, a_rdata;
  logic rap_we = 0;
  int checks = 0, failures = 0;

  packet_sram #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string s);
    checks++; if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic hwrite(int a, logic [31:0] d);
    @(negedge clk); h_we = 1; h_re = 0; h_addr = AW'(a); h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask

  task automatic hread(int a, output logic [31:0] d);
    @(negedge clk); h_re = 1; h_addr = AW'(a);
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask

  initial begin
    logic [31:0] shadow [D];
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check(rap == AW'(2) && wap == AW'(1), "reset pointers: empty buffer");
    for (int a = 2; a < D; a++) begin
      shadow[a] = $urandom;
      hwrite(a, shadow[a]);
    end
    for (int a = 2; a < D; a++) begin
      hread(a, d);
      check(d == shadow[a], $sformatf("host read word %0d", a));
      a_raddr = AW'(a); #1;
      check(a_rdata == shadow[a], $sformatf("accelerator read word %0d", a));
    end
    hwrite(1, 32'd40);
    check(wap == AW'(40), "host writes WAP");
    hread(1, d); check(d == 32'd40, "host reads WAP");
    hwrite(0, 32'd7);
    check(rap == AW'(7), "host writes RAP");
    // accelerator update of RAP
    @(negedge clk); rap_we = 1; rap_wdata = AW'(9);
    @(negedge clk); rap_we = 0;
    check(rap == AW'(9), "accelerator writes RAP");
    hread(0, d); check(d == 32'd9, "host reads RAP");
    // same-cycle conflict: accelerator wins
    @(negedge clk); rap_we = 1; rap_wdata = AW'(11); h_we = 1; h_addr = 0; h_wdata = 32'd3;
    @(negedge clk); rap_we = 0; h_we = 0;
    check(rap == AW'(11), "accelerator update has priority");
    // a write to a pointer word does not change data words
    a_raddr = AW'(2); #1;
    check(a_rdata == shadow[2], "data word 2 untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
