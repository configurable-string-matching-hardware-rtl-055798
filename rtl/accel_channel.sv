// One string-matching accelerator channel: packet SRAM, tree SRAM control, packet
// interface, parser and Aho-Corasick match FSM behind one memory-mapped host port.
//
// The host sees the channel as memory. The top address bit selects the region:
// 0 = packet SRAM (word 0 RAP, word 1 WAP, words 2.. circular packet data),
// 1 = tree SRAM (word 0 control, word 1 match ID, words 2.. state-table entries,
//     entry index {state, byte} = word offset - 2, readable and writable).
// The host loads the tables with the `write` bit set, writes a packet into the
// circular buffer, moves WAP to its last word and sets `start`. The channel then
// streams the words from RAP through WAP into the FSM, one byte per clock, keeps the
// first match ID, writes it into the match-ID word, clears `start` and raises irq.
//
// Host port: h_valid with h_we selects a write or a read; read data h_rdata is valid
// one cycle after the read. The block split (interface, parser, match with its SRAM,
// packet SRAM with two pointers, tree SRAM with its control word) follows the
// architecture figures; the address map and handshakes are this design's choices.
module accel_channel #(
  parameter int unsigned STATE_W   = 9,
  parameter int unsigned MATCH_W   = 8,
  parameter int unsigned PKT_DEPTH = 512,
  parameter int unsigned TAW       = STATE_W + 9,
  parameter int unsigned CAW       = TAW + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      h_valid,
  input  logic                      h_we,
  input  logic [CAW-1:0]            h_addr,
  input  logic [sm_pkg::WORD_W-1:0] h_wdata,
  output logic [sm_pkg::WORD_W-1:0] h_rdata,
  output logic                      irq,
  // observation of the channel's activity
  output logic                      busy,
  output logic                      match_valid,
  output logic [MATCH_W-1:0]        match_id,
  output logic                      wr_blocked
);
  import sm_pkg::*;

  localparam int unsigned PAW = $clog2(PKT_DEPTH);

  logic sel_tree, sel_tree_q;
  logic p_we, p_re, t_we, t_re;
  logic [WORD_W-1:0] p_rdata, t_rdata;

  assign sel_tree = h_addr[CAW-1];
  assign p_we = h_valid &&  h_we && !sel_tree;
  assign p_re = h_valid && !h_we && !sel_tree;
  assign t_we = h_valid &&  h_we &&  sel_tree;
  assign t_re = h_valid && !h_we &&  sel_tree;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  sel_tree_q <= 1'b0;
    else if (h_valid && !h_we)   sel_tree_q <= sel_tree;
  end
  assign h_rdata = sel_tree_q ? t_rdata : p_rdata;

  // packet SRAM
  logic [PAW-1:0]    rap, wap, a_raddr, rap_wdata;
  logic [WORD_W-1:0] a_rdata;
  logic              rap_we;

  packet_sram #(.DEPTH(PKT_DEPTH)) u_pkt (
    .clk, .rst_n,
    .h_we(p_we), .h_re(p_re), .h_addr(h_addr[PAW-1:0]), .h_wdata, .h_rdata(p_rdata),
    .a_raddr, .a_rdata, .rap_we, .rap_wdata, .rap, .wap
  );

  // tree SRAM control words and table gate
  logic start, write_bit, used;
  logic tbl_we, tbl_re;
  logic [STATE_W+8-1:0]       tbl_addr;
  logic [STATE_W+MATCH_W-1:0] tbl_wdata, tbl_rdata;
  logic scan_begin, scan_done, restart;

  tree_regs #(.STATE_W(STATE_W), .MATCH_W(MATCH_W), .AW(TAW)) u_tree (
    .clk, .rst_n,
    .h_we(t_we), .h_re(t_re), .h_addr(h_addr[TAW-1:0]), .h_wdata, .h_rdata(t_rdata),
    .start, .write_bit, .used,
    .tbl_we, .tbl_re, .tbl_addr, .tbl_wdata, .tbl_rdata, .wr_blocked,
    .scan_begin, .match_valid, .match_id, .scan_done, .irq
  );

  // interface
  logic              word_valid, word_ready, word_last;
  logic [WORD_W-1:0] word;
  logic              byte_valid, byte_last;
  logic [7:0]        byte_data;

  pkt_interface #(.DEPTH(PKT_DEPTH)) u_if (
    .clk, .rst_n,
    .start, .write_bit, .scan_begin, .scan_done, .restart, .busy,
    .rap, .wap, .a_raddr, .a_rdata, .rap_we, .rap_wdata,
    .word_valid, .word_ready, .word, .word_last,
    .byte_last_done(byte_valid && byte_last)
  );

  // parser
  byte_parser u_parser (
    .clk, .rst_n,
    .in_valid(word_valid), .in_ready(word_ready), .in_word(word), .in_last(word_last),
    .out_valid(byte_valid), .out_ready(1'b1), .out_byte(byte_data), .out_last(byte_last)
  );

  // match FSM; the root state is state 0
  ac_match_fsm #(.STATE_W(STATE_W), .MATCH_W(MATCH_W)) u_match (
    .clk, .rst_n,
    .tbl_we, .tbl_re, .tbl_addr, .tbl_wdata, .tbl_rdata,
    .restart, .init_state('0),
    .byte_valid, .byte_data,
    .match_valid, .match_id, .state()
  );

  // The host must not change the tables while a scan uses them.
  a_no_table_write_in_scan: assert property (@(posedge clk) disable iff (!rst_n)
    !(used && t_we && h_addr[TAW-1:0] >= TAW'(TREE_TBL_FIRST)))
    else $warning("table write dropped: tables are in use");

endmodule
