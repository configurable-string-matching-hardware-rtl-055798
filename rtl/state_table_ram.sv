// State-table memory of one Aho-Corasick matcher.
//
// One entry per (current state, input byte) pair holds the next state and the match ID
// produced on that transition (0 = no match): entry = {next_state, match_id}. The entry
// index is {state, byte}, so the memory has 2**(STATE_W+8) entries of STATE_W+MATCH_W
// bits, the size given by (log2 s + log2 n) * s * c bits with c = 256 input symbols.
//
// Host port: synchronous read/write, one access per cycle, used by the host to load
// the tables ("tree data") and to read them back (h_rdata valid the cycle after h_re).
// Lookup port: asynchronous read, so that the FSM can take one byte per clock with the
// table output feeding the state register directly. The asynchronous lookup, the
// registered host read and the full 8-bit alphabet are this design's choices. The contents are not reset; the
// host loads every entry of every state it uses before starting a scan.
module state_table_ram #(
  parameter int unsigned STATE_W = 9,
  parameter int unsigned MATCH_W = 8
) (
  input  logic                       clk,
  // host port (table load and read-back)
  input  logic                       h_we,
  input  logic                       h_re,
  input  logic [STATE_W+8-1:0]       h_addr,
  input  logic [STATE_W+MATCH_W-1:0] h_wdata,
  output logic [STATE_W+MATCH_W-1:0] h_rdata,
  // lookup port (FSM)
  input  logic [STATE_W+8-1:0]       raddr,
  output logic [STATE_W+MATCH_W-1:0] rdata
);

  localparam int unsigned DEPTH = 2 ** (STATE_W + 8);

  logic [STATE_W+MATCH_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
  end

  always_ff @(posedge clk) begin
    if (h_re) h_rdata <= mem[h_addr];
  end

  assign rdata = mem[raddr];

endmodule
