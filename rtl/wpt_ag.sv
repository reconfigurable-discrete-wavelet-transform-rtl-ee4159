// wpt_ag: the reconfigurable WPT address generator.
//
// Two address generators (wpt_addr_gen), as in the design: the input address
// generator produces the read address of each sample pair for the Input Unit,
// the output address generator the write address of each coefficient pair for
// the Output Unit. Both are loaded from the current pass descriptor, which
// selects row or column lines and gives the counters' initial values: the
// input side walks the source region two samples per position (the even
// sample's address; the odd one is next to it), the output side walks the
// destination region one position per low/high coefficient pair.
//
// Timing: start loads both generators; in_adv / out_adv step them
// independently, so the output side trails the input side by the PE array's
// latency.
module wpt_ag
  import rdwt_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  pass_t            pass,
  input  logic             start,
  // input address generator (read addresses to the Input Unit)
  input  logic             in_adv,
  output logic [ROW_W-1:0] in_row,
  output logic [COL_W-1:0] in_col,
  output logic             in_busy,
  output logic             in_line_first,
  output logic             in_line_last,
  // output address generator (write addresses to the Output Unit)
  input  logic             out_adv,
  output logic [ROW_W-1:0] out_row,
  output logic [COL_W-1:0] out_col,
  output logic             out_busy
);
  logic [LEN_W-1:0] half;
  assign half = pass.len >> 1;

  wpt_addr_gen u_in_ag (
    .clk, .rst_n, .start, .adv(in_adv), .col_pass(pass.col_pass),
    .row0(pass.src_row), .col0(pass.src_col), .n_pos(half), .n_lines(pass.n_lines),
    .inc(2'd2), .row_addr(in_row), .col_addr(in_col), .busy(in_busy),
    .line_first(in_line_first), .line_last(in_line_last)
  );

  logic unused_first, unused_last;
  wpt_addr_gen u_out_ag (
    .clk, .rst_n, .start, .adv(out_adv), .col_pass(pass.col_pass),
    .row0(pass.dst_row), .col0(pass.dst_col), .n_pos(half), .n_lines(pass.n_lines),
    .inc(2'd1), .row_addr(out_row), .col_addr(out_col), .busy(out_busy),
    .line_first(unused_first), .line_last(unused_last)
  );
endmodule
