// Parser: turns the packet words into the byte stream of the match FSM.
//
// A word taken from the interface is held in a register and its four bytes are
// presented one per clock, most significant byte first (the byte order of the
// big-endian 32-bit host). A new word is taken in the cycle the last byte of the
// current one goes out, so a packet streams at one byte per clock without gaps. The
// last byte of a word flagged `last` is marked with byte_last.
//
// Interface: in_valid/in_ready/in_word/in_last from the packet interface;
// out_valid/out_ready/out_byte/out_last towards the FSM. Timing: one cycle from word
// acceptance to its first byte. Only the block's place between the interface and the
// match FSM is given; its function here (word-to-byte serialisation) is this design's
// reading of that place, as the FSM takes 8 bits per step and the host bus is 32 bits.
module byte_parser (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [sm_pkg::WORD_W-1:0] in_word,
  input  logic                      in_last,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [7:0]                out_byte,
  output logic                      out_last
);
  import sm_pkg::*;

  localparam int unsigned CW = $clog2(BYTES_PER_WORD);

  logic [WORD_W-1:0] word_q;
  logic              full_q, last_q;
  logic [CW-1:0]     cnt_q;
  logic              final_byte;

  assign final_byte = full_q && out_ready && (cnt_q == CW'(BYTES_PER_WORD - 1));
  assign in_ready   = !full_q || final_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q <= '0;
      full_q <= 1'b0;
      last_q <= 1'b0;
      cnt_q  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        word_q <= in_word;
        last_q <= in_last;
        full_q <= 1'b1;
        cnt_q  <= '0;
      end else if (final_byte) begin
        full_q <= 1'b0;
        cnt_q  <= '0;
      end else if (full_q && out_ready) begin
        cnt_q <= cnt_q + CW'(1);
      end
    end
  end

  assign out_valid = full_q;
  assign out_byte  = word_q[WORD_W-1 - BYTE_W*cnt_q -: BYTE_W];
  assign out_last  = full_q && last_q && (cnt_q == CW'(BYTES_PER_WORD - 1));

endmodule
