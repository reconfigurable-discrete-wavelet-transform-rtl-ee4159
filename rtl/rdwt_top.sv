// rdwt_top: reconfigurable discrete wavelet transform processor.
//
// The processor computes forward DWTs of a frame held in an external frame
// memory, with a wavelet filter and a decomposition structure that are both
// chosen at run time from context memories. Its parts, as in the design:
//   - Reconfigurable DWT PE Array (dwt_pe_array): the wavelet filter, a
//     linear array of two lifting PEs that fold up to four lifting steps;
//   - PE Context Memory (pe_context_mem): PLA of default filters + RAM;
//   - Reconfigurable WPT AG (wpt_ag): input and output address generators
//     that walk the frame for each row or column pass;
//   - AG Context Memory (ag_context_mem): PLA of default decomposition
//     programs + RAM;
//   - Input Unit and Output Unit: the frame-memory read and write interfaces.
// The run sequencer (rdwt_ctrl) that steps through a program is this
// design's own addition.
//
// Interface: pulse start with filt_sel (PE context index) and prog_sel (AG
// context address of the first pass); done pulses when the program's last
// pass is written. The context RAMs are written through pe_ctx_* / ag_ctx_*.
// The frame memory is outside: two read ports answering one cycle after
// mem_rd_en, and two write ports. Addresses are (row, column); the default
// programs use rows 0..FRAME_H-1 as buffer A (input and result) and rows
// FRAME_H..2*FRAME_H-1 as buffer B (intermediate).
//
// Throughput: one sample pair per cycle for two-step filters ((5,3)) and one
// pair per two cycles for three- or four-step filters, plus lag flush pairs
// per line and a few cycles per pass.
module rdwt_top
  import rdwt_pkg::*;
#(
  parameter int FRAME_W = 720,   // CCIR 601
  parameter int FRAME_H = 576
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // run control
  input  logic                   start,
  input  logic [PE_CTX_AW-1:0]   filt_sel,
  input  logic [AG_CTX_AW-1:0]   prog_sel,
  output logic                   busy,
  output logic                   done,
  // context RAM programming
  input  logic                   pe_ctx_we,
  input  logic [PE_CTX_AW-1:0]   pe_ctx_widx,
  input  filt_cfg_t              pe_ctx_wdata,
  input  logic                   ag_ctx_we,
  input  logic [AG_CTX_AW-1:0]   ag_ctx_widx,
  input  pass_t                  ag_ctx_wdata,
  // external frame memory
  output logic                   mem_rd_en,
  output logic [1:0][ROW_W-1:0]  mem_rd_row,
  output logic [1:0][COL_W-1:0]  mem_rd_col,
  input  data_t [1:0]            mem_rd_data,
  output logic                   mem_wr_en,
  output logic [1:0][ROW_W-1:0]  mem_wr_row,
  output logic [1:0][COL_W-1:0]  mem_wr_col,
  output data_t [1:0]            mem_wr_data
);
  filt_cfg_t            fcfg;
  pass_t                pass;
  logic                 pe_rd_en, ag_rd_en, pass_start, pass_done, in_done;
  logic [PE_CTX_AW-1:0] pe_rd_idx;
  logic [AG_CTX_AW-1:0] ag_rd_addr;

  rdwt_ctrl u_ctrl (
    .clk, .rst_n, .start, .filt_sel, .prog_sel, .pass, .pass_done,
    .pe_rd_en, .pe_rd_idx, .ag_rd_en, .ag_rd_addr, .pass_start, .busy, .done
  );

  pe_context_mem u_pe_ctx (
    .clk, .rst_n, .wr_en(pe_ctx_we), .wr_idx(pe_ctx_widx), .wr_cfg(pe_ctx_wdata),
    .rd_en(pe_rd_en), .rd_idx(pe_rd_idx), .cfg(fcfg)
  );

  ag_context_mem #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ag_ctx (
    .clk, .rst_n, .wr_en(ag_ctx_we), .wr_idx(ag_ctx_widx), .wr_pass(ag_ctx_wdata),
    .rd_en(ag_rd_en), .rd_addr(ag_rd_addr), .pass
  );

  // address generator
  logic [ROW_W-1:0] in_row, out_row;
  logic [COL_W-1:0] in_col, out_col;
  logic in_adv, in_busy, in_line_first, in_line_last, out_adv, out_busy;

  wpt_ag u_ag (
    .clk, .rst_n, .pass, .start(pass_start),
    .in_adv, .in_row, .in_col, .in_busy, .in_line_first, .in_line_last,
    .out_adv, .out_row, .out_col, .out_busy
  );

  // input unit -> PE array -> output unit
  logic  a_valid, a_first, z_valid, z_first;
  data_t a_e, a_o, z_l, z_h;

  rdwt_input_unit u_in (
    .clk, .rst_n, .start(pass_start), .col_pass(pass.col_pass),
    .fold(fcfg.fold), .lag(fcfg.lag),
    .ag_row(in_row), .ag_col(in_col), .ag_busy(in_busy),
    .ag_line_first(in_line_first), .ag_line_last(in_line_last), .ag_adv(in_adv),
    .rd_en(mem_rd_en), .rd_row(mem_rd_row), .rd_col(mem_rd_col), .rd_data(mem_rd_data),
    .pe_valid(a_valid), .pe_first(a_first), .pe_e(a_e), .pe_o(a_o), .done(in_done)
  );

  dwt_pe_array u_array (
    .clk, .rst_n, .cfg(fcfg),
    .in_valid(a_valid), .in_first(a_first), .in_e(a_e), .in_o(a_o),
    .out_valid(z_valid), .out_first(z_first), .out_l(z_l), .out_h(z_h)
  );

  rdwt_output_unit u_out (
    .clk, .rst_n, .col_pass(pass.col_pass), .half(pass.len >> 1), .lag(fcfg.lag),
    .pe_valid(z_valid), .pe_first(z_first), .pe_l(z_l), .pe_h(z_h),
    .ag_row(out_row), .ag_col(out_col), .ag_busy(out_busy), .ag_adv(out_adv),
    .wr_en(mem_wr_en), .wr_row(mem_wr_row), .wr_col(mem_wr_col), .wr_data(mem_wr_data),
    .done(pass_done)
  );

  // The Input Unit's own end-of-pass flag is not needed by the sequencer,
  // which waits for the Output Unit.
  logic unused_in_done;
  assign unused_in_done = in_done;
endmodule
