// String-matching accelerator for intrusion detection: NUM_FSM independent channels,
// each an Aho-Corasick state machine with its own state-table RAM and packet buffer,
// on one memory-mapped host port.
//
// Throughput grows with the number of FSMs working in parallel: each channel scans
// one byte per clock, so eight channels take 64 input bits per clock. The host hands
// different packets to different channels and loads each channel's tables (the same
// rule class in all, or one class per channel). The upper address bits select the
// channel, the rest is the channel's own address map (see accel_channel). Read data
// comes one cycle after the read, from the channel that was read.
//
// Following the description: eight parallel FSMs, one byte per FSM per clock, tables
// in RAM written by the host, one interrupt per finished packet. This design's
// choices: one packet buffer and one table copy per FSM, the address map, the sizes
// (512 states and 8-bit match IDs for classes of about 500 characters, 512-word
// packet buffers) and one interrupt line per channel.
module ids_accel_top #(
  parameter int unsigned NUM_FSM   = 8,
  parameter int unsigned STATE_W   = 9,
  parameter int unsigned MATCH_W   = 8,
  parameter int unsigned PKT_DEPTH = 512,
  parameter int unsigned CAW       = STATE_W + 10,
  parameter int unsigned CHW       = (NUM_FSM > 1) ? $clog2(NUM_FSM) : 1,
  parameter int unsigned AW        = CHW + CAW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host (CLAW) bus
  input  logic                      h_valid,
  input  logic                      h_we,
  input  logic [AW-1:0]             h_addr,
  input  logic [sm_pkg::WORD_W-1:0] h_wdata,
  output logic [sm_pkg::WORD_W-1:0] h_rdata,
  // one interrupt per channel
  output logic [NUM_FSM-1:0]        irq,
  // observation of the channels
  output logic [NUM_FSM-1:0]        busy,
  output logic [NUM_FSM-1:0]        match_valid,
  output logic [NUM_FSM-1:0][MATCH_W-1:0] match_id,
  output logic [NUM_FSM-1:0]        wr_blocked
);
  import sm_pkg::*;

  logic [CHW-1:0] ch_sel, ch_sel_q;
  logic [NUM_FSM-1:0][WORD_W-1:0] ch_rdata;

  assign ch_sel = h_addr[AW-1 -: CHW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                ch_sel_q <= '0;
    else if (h_valid && !h_we) ch_sel_q <= ch_sel;
  end

  for (genvar i = 0; i < NUM_FSM; i++) begin : g_ch
    accel_channel #(
      .STATE_W  (STATE_W),
      .MATCH_W  (MATCH_W),
      .PKT_DEPTH(PKT_DEPTH),
      .TAW      (CAW - 1),
      .CAW      (CAW)
    ) u_ch (
      .clk, .rst_n,
      .h_valid    (h_valid && ch_sel == CHW'(i)),
      .h_we,
      .h_addr     (h_addr[CAW-1:0]),
      .h_wdata,
      .h_rdata    (ch_rdata[i]),
      .irq        (irq[i]),
      .busy       (busy[i]),
      .match_valid(match_valid[i]),
      .match_id   (match_id[i]),
      .wr_blocked (wr_blocked[i])
    );
  end

  assign h_rdata = ch_rdata[ch_sel_q];

endmodule
