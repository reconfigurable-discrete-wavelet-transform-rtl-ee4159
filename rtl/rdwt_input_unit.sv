// rdwt_input_unit: Input Unit, the read interface between the external frame
// memory and the PE array.
//
// For every position of the input address generator it reads the even and
// the odd sample of a pair through two read ports (the odd sample lies next to
// the even one along the line) and hands the pair to the PE array with a
// first-of-line flag. It issues one pair every fold cycles, the rate the
// folded PE array accepts. After the last pair of each line it sends lag zero
// pairs, which flush the line's last coefficients out of the PE array (zero
// extension beyond the line end). The Input Unit's role follows the design;
// the two-port read, the pacing and the flush are this design's choices.
//
// Timing: the frame memory answers a read one cycle later (rd_data valid the
// cycle after rd_en), so pe_valid follows rd_en by one cycle. done pulses one
// cycle after the last pair (or flush pair) of the pass has been handed on.
module rdwt_input_unit
  import rdwt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,      // pass start
  input  logic                   col_pass,
  input  logic [1:0]             fold,
  input  logic [LAG_W-1:0]       lag,
  // input address generator
  input  logic [ROW_W-1:0]       ag_row,
  input  logic [COL_W-1:0]       ag_col,
  input  logic                   ag_busy,
  input  logic                   ag_line_first,
  input  logic                   ag_line_last,
  output logic                   ag_adv,
  // frame memory read ports: [0] even sample, [1] odd sample
  output logic                   rd_en,
  output logic [1:0][ROW_W-1:0]  rd_row,
  output logic [1:0][COL_W-1:0]  rd_col,
  input  data_t [1:0]            rd_data,
  // to the PE array
  output logic                   pe_valid,
  output logic                   pe_first,
  output data_t                  pe_e,
  output data_t                  pe_o,
  output logic                   done
);
  typedef enum logic [1:0] {I_IDLE, I_READ, I_FLUSH} in_state_e;
  in_state_e state;

  logic [1:0]       pace;       // cycles until the next pair may be issued
  logic [LAG_W-1:0] flush_cnt;
  logic             issue;
  logic             v_q, first_q, zero_q;

  assign issue = (pace == '0) && ((state == I_READ && ag_busy) || state == I_FLUSH);

  // addresses of the pair
  always_comb begin
    rd_row[0] = ag_row;
    rd_col[0] = ag_col;
    rd_row[1] = col_pass ? ag_row + 1'b1 : ag_row;
    rd_col[1] = col_pass ? ag_col : ag_col + 1'b1;
    rd_en     = issue && state == I_READ;
    ag_adv    = rd_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_IDLE; pace <= '0; flush_cnt <= '0;
      v_q <= 1'b0; first_q <= 1'b0; zero_q <= 1'b0; done <= 1'b0;
    end else begin
      v_q  <= issue;
      done <= 1'b0;
      if (issue) begin
        pace    <= fold - 1'b1;
        first_q <= (state == I_READ) && ag_line_first;
        zero_q  <= (state == I_FLUSH);
      end else if (pace != '0) begin
        pace <= pace - 1'b1;
      end
      unique case (state)
        I_IDLE: if (start) begin
          state <= I_READ;
          pace  <= '0;
        end
        I_READ: if (issue && ag_line_last) begin
          // end of a line: flush it out before the next one
          flush_cnt <= lag;
          if (lag != '0) state <= I_FLUSH;
        end else if (!ag_busy && pace == '0) begin
          state <= I_IDLE;
          done  <= 1'b1;
        end
        I_FLUSH: if (issue) begin
          flush_cnt <= flush_cnt - 1'b1;
          if (flush_cnt == LAG_W'(1)) state <= I_READ;
        end
        default: state <= I_IDLE;
      endcase
    end
  end

  assign pe_valid = v_q;
  assign pe_first = first_q;
  assign pe_e     = zero_q ? '0 : rd_data[0];
  assign pe_o     = zero_q ? '0 : rd_data[1];
endmodule
