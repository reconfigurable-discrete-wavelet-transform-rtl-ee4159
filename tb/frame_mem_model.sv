// frame_mem_model: behavioural model of the external frame memory the DWT
// processor reads and writes. ROWS x COLS words of DATA_W bits, two read
// ports answering one cycle after rd_en, two write ports written at the clock
// edge. Out-of-range accesses are counted in bad_access. Testbench only.
module frame_mem_model
  import rdwt_pkg::*;
#(
  parameter int ROWS = 16,
  parameter int COLS = 16
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [1:0][ROW_W-1:0] rd_row,
  input  logic [1:0][COL_W-1:0] rd_col,
  output data_t [1:0]           rd_data,
  input  logic                  wr_en,
  input  logic [1:0][ROW_W-1:0] wr_row,
  input  logic [1:0][COL_W-1:0] wr_col,
  input  data_t [1:0]           wr_data
);
  data_t mem [ROWS][COLS];
  int    bad_access = 0;
  int    reads = 0, writes = 0;

  always @(posedge clk) begin
    if (rd_en) begin
      for (int p = 0; p < 2; p++) begin
        if (int'(rd_row[p]) < ROWS && int'(rd_col[p]) < COLS)
          rd_data[p] <= mem[rd_row[p]][rd_col[p]];
        else begin
          rd_data[p] <= '0;
          bad_access++;
        end
      end
      reads++;
    end
    if (wr_en) begin
      for (int p = 0; p < 2; p++) begin
        if (int'(wr_row[p]) < ROWS && int'(wr_col[p]) < COLS)
          mem[wr_row[p]][wr_col[p]] <= wr_data[p];
        else bad_access++;
      end
      writes++;
    end
  end
endmodule
