// Testbench of the state-table memory: random writes kept in a shadow array, then
// reads of written and overwritten entries through the combinational lookup port and
// through the registered host read port,
// including a read of an entry in the cycle it is being rewritten (old value until
// the clock edge).
module tb_state_table_ram;
  localparam int unsigned SW = 9;
  localparam int unsigned MW = 8;

  logic clk = 0;
  logic h_we = 0, h_re = 0;
  logic [SW+8-1:0] h_addr = '0, raddr = '0;
  logic [SW+MW-1:0] h_wdata = '0, h_rdata, rdata;
  int checks = 0, failures = 0;

  state_table_ram #(.STATE_W(SW), .MATCH_W(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SW+MW-1:0] shadow [int];
    int a;
    for (int i = 0; i < 3000; i++) begin
      a = $urandom_range(0, 2**(SW+8) - 1);
      if (i < 20) a = i;                       // some addresses written twice
      @(negedge clk);
      h_we = 1; h_addr = (SW+8)'(a); h_wdata = (SW+MW)'($urandom);
      shadow[a] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    // overwrite the first 20 again
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      h_we = 1; h_addr = (SW+8)'(i); h_wdata = (SW+MW)'($urandom);
      shadow[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    foreach (shadow[k]) begin
      raddr = (SW+8)'(k);
      #1;
      checks++;
      if (rdata !== shadow[k]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", k, rdata, shadow[k]);
      end
    end
    // host read port: data one cycle after the request
    foreach (shadow[k]) begin
      @(negedge clk); h_re = 1; h_addr = (SW+8)'(k);
      @(negedge clk); h_re = 0;
      checks++;
      if (h_rdata !== shadow[k]) begin
        failures++;
        $display("FAIL host read addr %0d got %h exp %h", k, h_rdata, shadow[k]);
      end
    end
    // read during write: old value before the edge, new value after
    @(negedge clk);
    raddr = 5; h_addr = 5; h_wdata = ~shadow[5]; h_we = 1;
    #1; checks++; if (rdata !== shadow[5]) failures++;
    @(posedge clk); #1; h_we = 0;
    checks++; if (rdata !== ~shadow[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
