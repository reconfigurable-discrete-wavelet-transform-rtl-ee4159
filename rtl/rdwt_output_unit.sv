// rdwt_output_unit: Output Unit, the write interface between the PE array and
// the external frame memory.
//
// Each coefficient pair from the PE array is written through two write ports:
// the low-band coefficient to the output address generator's address and the
// high-band one half a line further along the line, so that a pass leaves the
// low band in the first half and the high band in the second half of each
// destination line. The first lag pairs of every line belong to positions
// before the line (the PE array's pipeline lag) and are dropped. The role of
// the unit follows the design; the two write ports, the subband placement
// and the discard are this design's choices.
//
// Timing: a pair is written in the cycle it arrives (wr_en = pe_valid for a
// kept pair). done pulses once, in the cycle after the last coefficient pair
// of the pass has been written.
module rdwt_output_unit
  import rdwt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   col_pass,
  input  logic [LEN_W-1:0]       half,       // coefficients per band per line
  input  logic [LAG_W-1:0]       lag,
  // from the PE array
  input  logic                   pe_valid,
  input  logic                   pe_first,
  input  data_t                  pe_l,
  input  data_t                  pe_h,
  // output address generator
  input  logic [ROW_W-1:0]       ag_row,
  input  logic [COL_W-1:0]       ag_col,
  input  logic                   ag_busy,
  output logic                   ag_adv,
  // frame memory write ports: [0] low band, [1] high band
  output logic                   wr_en,
  output logic [1:0][ROW_W-1:0]  wr_row,
  output logic [1:0][COL_W-1:0]  wr_col,
  output data_t [1:0]            wr_data,
  output logic                   done
);
  logic [LAG_W-1:0] skip;
  logic             keep, was_busy;

  // a pair is kept unless it is one of the first lag pairs of its line
  always_comb begin
    if (pe_first) keep = (lag == '0);
    else          keep = (skip == '0);
    wr_en      = pe_valid && keep && ag_busy;
    ag_adv     = wr_en;
    wr_row[0]  = ag_row;
    wr_col[0]  = ag_col;
    wr_row[1]  = col_pass ? ag_row + ROW_W'(half) : ag_row;
    wr_col[1]  = col_pass ? ag_col : ag_col + COL_W'(half);
    wr_data[0] = pe_l;
    wr_data[1] = pe_h;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip <= '0; was_busy <= 1'b0; done <= 1'b0;
    end else begin
      if (pe_valid) begin
        if (pe_first)        skip <= (lag == '0) ? '0 : lag - 1'b1;
        else if (skip != '0) skip <= skip - 1'b1;
      end
      was_busy <= ag_busy;
      done     <= was_busy && !ag_busy;
    end
  end
endmodule
