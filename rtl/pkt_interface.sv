// Packet interface: reads one packet range out of the circular packet SRAM and
// sequences a scan.
//
// When the host has set `start` and `write` is clear, the interface begins a scan: it
// pulses scan_begin (the tree control marks the tables as used) and restart (the match
// FSM returns to its initial state). It then presents the word at RAP to the parser and,
// each time the parser takes it, advances RAP by one, wrapping from DEPTH-1 back to
// word 2. The word at WAP, the last one the host wrote, is flagged as last; after it
// has been taken the interface waits until the parser reports that the last byte has
// gone to the FSM, then pulses scan_done for one cycle and returns to idle. A start on
// an empty buffer (RAP one past WAP) completes at once with no match.
//
// Interface: rap/wap in, rap_we/rap_wdata out to the packet SRAM; a_raddr/a_rdata read
// the packet word combinationally; word_valid/word_ready/word/word_last towards the
// parser; byte_last_done from the parser. Timing: one word per parser request with no
// bubble, so the FSM sees one byte per clock for the whole packet; two cycles of
// overhead per scan (begin and done). The RAP/WAP meaning follows the description;
// the handshake and the inclusive end at WAP are this design's choices.
module pkt_interface #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // tree control bits
  input  logic                      start,
  input  logic                      write_bit,
  output logic                      scan_begin,
  output logic                      scan_done,
  output logic                      restart,
  output logic                      busy,
  // packet SRAM
  input  logic [AW-1:0]             rap,
  input  logic [AW-1:0]             wap,
  output logic [AW-1:0]             a_raddr,
  input  logic [sm_pkg::WORD_W-1:0] a_rdata,
  output logic                      rap_we,
  output logic [AW-1:0]             rap_wdata,
  // parser
  output logic                      word_valid,
  input  logic                      word_ready,
  output logic [sm_pkg::WORD_W-1:0] word,
  output logic                      word_last,
  input  logic                      byte_last_done
);
  import sm_pkg::*;

  scan_state_e state_q, state_d;

  function automatic logic [AW-1:0] ptr_inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? AW'(PKT_DATA_FIRST) : p + AW'(1);
  endfunction

  logic empty;
  assign empty = (rap == ptr_inc(wap));

  always_comb begin
    state_d    = state_q;
    scan_begin = 1'b0;
    scan_done  = 1'b0;
    restart    = 1'b0;
    word_valid = 1'b0;
    rap_we     = 1'b0;
    unique case (state_q)
      SCAN_IDLE: begin
        if (start && !write_bit) begin
          scan_begin = 1'b1;
          restart    = 1'b1;
          state_d    = empty ? SCAN_DONE : SCAN_RUN;
        end
      end
      SCAN_RUN: begin
        word_valid = 1'b1;
        if (word_ready) begin
          rap_we = 1'b1;
          if (rap == wap) state_d = SCAN_DRAIN;
        end
      end
      SCAN_DRAIN: begin
        if (byte_last_done) state_d = SCAN_DONE;
      end
      SCAN_DONE: begin
        scan_done = 1'b1;
        state_d   = SCAN_IDLE;
      end
      default: state_d = SCAN_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= SCAN_IDLE;
    else        state_q <= state_d;
  end

  assign a_raddr   = rap;
  assign word      = a_rdata;
  assign word_last = (rap == wap);
  assign rap_wdata = ptr_inc(rap);
  assign busy      = (state_q != SCAN_IDLE);

endmodule
