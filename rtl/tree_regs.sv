// Tree SRAM control: the control word, the match-ID word and the gate for table writes.
//
// The tree SRAM region starts with a control word holding three bits: `used` (the
// accelerator is reading the tables, so the host must not change them), `write` (the
// host is writing the tables, so the accelerator must not use them) and `start` (the
// host asks for a scan of the packet buffer). The second word holds the match ID of the
// last scan. The words after them are state-table entries, which are passed on to the
// match FSM's RAM, and read back from it.
//
// Host port: h_we/h_re/h_addr/h_wdata, read data h_rdata one cycle after h_re. A host
// write to the control word sets `write` and `start` from its data bits and clears a
// pending interrupt; `used` is read-only for the host. Accelerator side: scan_begin
// sets `used` and clears the match capture; while `used` is set each reported match
// whose capture is still empty is kept (the first match of the scan); scan_done clears
// `start` and `used`, copies the capture into the match-ID word and raises irq.
//
// Following the description: the three bits and their meaning, the match ID in the
// second word, start cleared and an interrupt raised at the end of a scan. This
// design's choices: the bit positions (used = 31, write = 30, start = 0), keeping the
// first match of a scan, dropping table writes while `used` is set (reported on
// wr_blocked), a level interrupt cleared by the next control-word write. Table reads
// are passed to the table RAM (tbl_re) and its registered data is returned in h_rdata
// one cycle later, like the other words.
module tree_regs #(
  parameter int unsigned STATE_W = 9,
  parameter int unsigned MATCH_W = 8,
  parameter int unsigned AW      = STATE_W + 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host port
  input  logic                       h_we,
  input  logic                       h_re,
  input  logic [AW-1:0]              h_addr,
  input  logic [sm_pkg::WORD_W-1:0]  h_wdata,
  output logic [sm_pkg::WORD_W-1:0]  h_rdata,
  // control bits
  output logic                       start,
  output logic                       write_bit,
  output logic                       used,
  // table load towards the match FSM
  output logic                       tbl_we,
  output logic                       tbl_re,
  output logic [STATE_W+8-1:0]       tbl_addr,
  output logic [STATE_W+MATCH_W-1:0] tbl_wdata,
  input  logic [STATE_W+MATCH_W-1:0] tbl_rdata,
  output logic                       wr_blocked,
  // accelerator side
  input  logic                       scan_begin,
  input  logic                       match_valid,
  input  logic [MATCH_W-1:0]         match_id,
  input  logic                       scan_done,
  output logic                       irq
);
  import sm_pkg::*;

  logic               start_q, write_q, used_q, irq_q;
  logic [MATCH_W-1:0] capture_q, result_q;
  logic               ctrl_wr, tbl_hit, tbl_rd, tbl_rd_q;
  logic [WORD_W-1:0]  reg_rdata;

  assign ctrl_wr = h_we && (h_addr == AW'(TREE_CTRL_ADDR));
  assign tbl_hit = h_we && (h_addr >= AW'(TREE_TBL_FIRST));
  assign tbl_rd  = h_re && (h_addr >= AW'(TREE_TBL_FIRST));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q   <= 1'b0;
      write_q   <= 1'b0;
      used_q    <= 1'b0;
      irq_q     <= 1'b0;
      capture_q <= '0;
      result_q  <= '0;
    end else begin
      if (ctrl_wr) begin
        write_q <= h_wdata[CTRL_WRITE_BIT];
        start_q <= h_wdata[CTRL_START_BIT];
        irq_q   <= 1'b0;
      end
      if (scan_begin) begin
        used_q    <= 1'b1;
        capture_q <= '0;
      end else if (used_q && match_valid && capture_q == '0) begin
        capture_q <= match_id;
      end
      if (scan_done) begin
        start_q  <= 1'b0;
        used_q   <= 1'b0;
        irq_q    <= 1'b1;
        result_q <= (match_valid && capture_q == '0) ? match_id : capture_q;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rdata <= '0;
      tbl_rd_q  <= 1'b0;
    end else if (h_re) begin
      tbl_rd_q <= tbl_rd;
      if (h_addr == AW'(TREE_CTRL_ADDR)) begin
        reg_rdata                 <= '0;
        reg_rdata[CTRL_USED_BIT]  <= used_q;
        reg_rdata[CTRL_WRITE_BIT] <= write_q;
        reg_rdata[CTRL_START_BIT] <= start_q;
      end else if (h_addr == AW'(TREE_MATCH_ADDR)) begin
        reg_rdata <= WORD_W'(result_q);
      end else begin
        reg_rdata <= '0;
      end
    end
  end

  assign h_rdata = tbl_rd_q ? WORD_W'(tbl_rdata) : reg_rdata;

  assign tbl_we     = tbl_hit && !used_q;
  assign tbl_re     = tbl_rd;
  assign wr_blocked = tbl_hit && used_q;
  assign tbl_addr   = (STATE_W+8)'(h_addr - AW'(TREE_TBL_FIRST));
  assign tbl_wdata  = h_wdata[STATE_W+MATCH_W-1:0];

  assign start     = start_q;
  assign write_bit = write_q;
  assign used      = used_q;
  assign irq       = irq_q;

endmodule
