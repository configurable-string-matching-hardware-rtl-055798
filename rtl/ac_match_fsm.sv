// Match block: a Mealy finite-state machine that runs an Aho-Corasick automaton
// stored as a state table in RAM.
//
// Every input byte is looked up together with the current state: the table entry at
// {state, byte} gives the next state and the match ID of the transition (0 = no
// match). The next state goes through a multiplexer into the state register; the
// multiplexer selects the initial state instead while `restart` is high, which is how
// a new packet starts from the root of the automaton. A string match is reported in
// the same cycle as the byte that completes it (Mealy output).
//
// Interface:
//   tbl_we/tbl_re/tbl_addr     table access (R/W), entry {next_state, match_id} at {state, byte}
//   tbl_wdata, tbl_rdata       write data; read data one cycle after tbl_re
//   restart, init_state        load init_state into the state register (priority over bytes)
//   byte_valid, byte_data      one input byte per clock
//   match_valid, match_id      match output for the byte presented this cycle
//   state                      current state register
// Timing: one byte per cycle, match output combinational from the byte, state updates
// at the following clock edge. The structure (control logic, RAM, reset multiplexer,
// state register fed back to the RAM address) follows the match block diagram; the
// port handshake and the choice that a byte presented together with restart is ignored
// are this design's own. Reset clears the state register to 0, the root state.
module ac_match_fsm #(
  parameter int unsigned STATE_W = 9,
  parameter int unsigned MATCH_W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // table access
  input  logic                       tbl_we,
  input  logic                       tbl_re,
  input  logic [STATE_W+8-1:0]       tbl_addr,
  input  logic [STATE_W+MATCH_W-1:0] tbl_wdata,
  output logic [STATE_W+MATCH_W-1:0] tbl_rdata,
  // control
  input  logic                       restart,
  input  logic [STATE_W-1:0]         init_state,
  // byte stream
  input  logic                       byte_valid,
  input  logic [7:0]                 byte_data,
  // result
  output logic                       match_valid,
  output logic [MATCH_W-1:0]         match_id,
  output logic [STATE_W-1:0]         state
);

  logic [STATE_W-1:0]         state_q;
  logic [STATE_W+MATCH_W-1:0] entry;
  logic [STATE_W-1:0]         next_state;
  logic [MATCH_W-1:0]         entry_id;
  logic                       advance;

  // Control logic: a byte is consumed when it is valid and no restart is requested.
  assign advance = byte_valid && !restart;

  state_table_ram #(
    .STATE_W(STATE_W),
    .MATCH_W(MATCH_W)
  ) u_ram (
    .clk    (clk),
    .h_we   (tbl_we),
    .h_re   (tbl_re),
    .h_addr (tbl_addr),
    .h_wdata(tbl_wdata),
    .h_rdata(tbl_rdata),
    .raddr({state_q, byte_data}),
    .rdata(entry)
  );

  assign {next_state, entry_id} = entry;

  // Reset multiplexer in front of the state register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state_q <= '0;
    else if (restart) state_q <= init_state;
    else if (advance) state_q <= next_state;
  end

  assign match_id    = advance ? entry_id : '0;
  assign match_valid = advance && (entry_id != '0);
  assign state       = state_q;

endmodule
