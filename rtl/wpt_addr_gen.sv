// wpt_addr_gen: one address generator of the reconfigurable WPT AG.
//
// As in the design, it is two FSM + counter pairs and a mux. Counter 0
// (driven by FSM 0) walks along a line, adding inc per advance; counter 1
// (driven by FSM 1) counts lines. The mux routes them to Row_Address and
// Col_Address: for a row pass counter 1 gives the row and counter 0 the
// column, for a column pass the other way round. The initial values of both
// counters and the mux select come from the pass descriptor; the line-length,
// line-count and inc inputs and the advance handshake are this design's
// choices (the FSMs start on start and move on adv rather than at fixed time
// slots).
//
// Interface: start (one cycle, while idle) loads the counters; each adv moves
// to the next position. busy stays high until the position after the last
// one of the last line; line_first / line_last flag the ends of a line.
// Timing: addresses are registered; adv at edge t gives the next address
// after edge t.
module wpt_addr_gen
  import rdwt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             adv,
  input  logic             col_pass,
  input  logic [ROW_W-1:0] row0,
  input  logic [COL_W-1:0] col0,
  input  logic [LEN_W-1:0] n_pos,     // positions per line
  input  logic [LEN_W-1:0] n_lines,
  input  logic [1:0]       inc,       // counter-0 increment
  output logic [ROW_W-1:0] row_addr,
  output logic [COL_W-1:0] col_addr,
  output logic             busy,
  output logic             line_first,
  output logic             line_last
);
  localparam int CW = (ROW_W > COL_W) ? ROW_W : COL_W;

  typedef enum logic {C_IDLE, C_RUN} cnt_state_e;
  cnt_state_e fsm0, fsm1;

  logic [CW-1:0]    cnt0, cnt1, cnt0_init;
  logic [LEN_W-1:0] pos, line;

  assign busy       = (fsm1 == C_RUN);
  assign line_first = busy && (pos == '0);
  assign line_last  = busy && (pos == n_pos - 1'b1);

  always_comb cnt0_init = col_pass ? CW'(row0) : CW'(col0);

  // FSM 0 / counter 0: position along the line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm0 <= C_IDLE; cnt0 <= '0; pos <= '0;
    end else if (start && fsm1 == C_IDLE) begin
      fsm0 <= C_RUN; cnt0 <= cnt0_init; pos <= '0;
    end else if (adv && fsm0 == C_RUN) begin
      if (pos == n_pos - 1'b1) begin
        pos  <= '0;
        cnt0 <= cnt0_init;
        if (line == n_lines - 1'b1) fsm0 <= C_IDLE;
      end else begin
        pos  <= pos + 1'b1;
        cnt0 <= cnt0 + CW'(inc);
      end
    end
  end

  // FSM 1 / counter 1: line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm1 <= C_IDLE; cnt1 <= '0; line <= '0;
    end else if (start && fsm1 == C_IDLE) begin
      fsm1 <= C_RUN; cnt1 <= col_pass ? CW'(col0) : CW'(row0); line <= '0;
    end else if (adv && fsm1 == C_RUN && pos == n_pos - 1'b1) begin
      if (line == n_lines - 1'b1) fsm1 <= C_IDLE;
      else begin
        line <= line + 1'b1;
        cnt1 <= cnt1 + 1'b1;
      end
    end
  end

  // address mux
  always_comb begin
    if (col_pass) begin
      row_addr = cnt0[ROW_W-1:0];
      col_addr = cnt1[COL_W-1:0];
    end else begin
      row_addr = cnt1[ROW_W-1:0];
      col_addr = cnt0[COL_W-1:0];
    end
  end
endmodule
