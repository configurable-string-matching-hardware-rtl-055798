// Packet SRAM: a circular buffer of packet words shared by the host and the accelerator.
//
// Word 0 holds RAP, the read address pointer, which the accelerator updates and which
// points to the next word to read. Word 1 holds WAP, the write address pointer, which
// the host updates and which points to the last word it wrote. Words 2 .. DEPTH-1 form
// the circular data area; a pointer that passes DEPTH-1 wraps to 2. The two pointer
// words are kept in registers so that both sides see them at once; the data words are
// an array with one write port (host) and two read ports.
//
// Host port: write in the cycle of h_we; read data h_rdata is valid the cycle after
// h_re. Accelerator port: a_raddr -> a_rdata is combinational; rap_we loads RAP and
// takes priority over a host write to word 0 in the same cycle. The pointer layout
// follows the architecture description; the depth, the pointer reset values (RAP = 2,
// WAP = 1, i.e. empty) and the port timing are this design's choices.
module packet_sram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host port
  input  logic                      h_we,
  input  logic                      h_re,
  input  logic [AW-1:0]             h_addr,
  input  logic [sm_pkg::WORD_W-1:0] h_wdata,
  output logic [sm_pkg::WORD_W-1:0] h_rdata,
  // accelerator port
  input  logic [AW-1:0]             a_raddr,
  output logic [sm_pkg::WORD_W-1:0] a_rdata,
  input  logic                      rap_we,
  input  logic [AW-1:0]             rap_wdata,
  output logic [AW-1:0]             rap,
  output logic [AW-1:0]             wap
);
  import sm_pkg::*;

  logic [WORD_W-1:0] mem [DEPTH];
  logic [AW-1:0]     rap_q, wap_q;

  always_ff @(posedge clk) begin
    if (h_we && h_addr >= AW'(PKT_DATA_FIRST)) mem[h_addr] <= h_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rap_q <= AW'(PKT_DATA_FIRST);
      wap_q <= AW'(PKT_DATA_FIRST - 1);
    end else begin
      if (rap_we)                                       rap_q <= rap_wdata;
      else if (h_we && h_addr == AW'(PKT_RAP_ADDR))     rap_q <= h_wdata[AW-1:0];
      if (h_we && h_addr == AW'(PKT_WAP_ADDR))          wap_q <= h_wdata[AW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    h_rdata <= '0;
    else if (h_re) begin
      if (h_addr == AW'(PKT_RAP_ADDR))      h_rdata <= WORD_W'(rap_q);
      else if (h_addr == AW'(PKT_WAP_ADDR)) h_rdata <= WORD_W'(wap_q);
      else                                  h_rdata <= mem[h_addr];
    end
  end

  assign a_rdata = mem[a_raddr];
  assign rap     = rap_q;
  assign wap     = wap_q;

endmodule
