// ag_context_mem: AG Context Memory, holding the wavelet decomposition
// structures run by the reconfigurable WPT address generator.
//
// A decomposition structure is a program of pass descriptors (rdwt_pkg::
// pass_t), one per 1-D row or column sweep, the last one flagged. As in the
// design the memory has a PLA part with default programs (1-level 2-D,
// 2-level dyadic, 2-level full wavelet packet and 3-level dyadic for a
// FRAME_W x FRAME_H frame, at the start addresses P_* of rdwt_pkg) and a RAM
// part for user programs at addresses N_AG_PLA..N_AG_PLA+N_AG_RAM-1. The
// program format and the default programs are this design's choices.
//
// Timing: rd_en at edge t loads the descriptor at rd_addr into pass at edge
// t; it holds until the next rd_en.
module ag_context_mem
  import rdwt_pkg::*;
#(
  parameter int FRAME_W = 720,   // CCIR 601 frame
  parameter int FRAME_H = 576
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [AG_CTX_AW-1:0] wr_idx,    // RAM entry 0..N_AG_RAM-1
  input  pass_t                wr_pass,
  input  logic                 rd_en,
  input  logic [AG_CTX_AW-1:0] rd_addr,
  output pass_t                pass
);
  localparam int RAM_AW = $clog2(N_AG_RAM);

  pass_t ram [N_AG_RAM];
  pass_t pla [N_AG_PLA];

  // the PLA contents, a constant table
  for (genvar i = 0; i < N_AG_PLA; i++) begin : g_pla
    assign pla[i] = default_pass(i, FRAME_W, FRAME_H);
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_idx) < N_AG_RAM) ram[wr_idx[RAM_AW-1:0]] <= wr_pass;
  end

  logic [AG_CTX_AW-1:0] ram_addr;
  assign ram_addr = rd_addr - AG_CTX_AW'(N_AG_PLA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pass <= '0;
    else if (rd_en) begin
      if (int'(rd_addr) < N_AG_PLA) pass <= pla[rd_addr[$clog2(N_AG_PLA)-1:0]];
      else                          pass <= ram[ram_addr[RAM_AW-1:0]];
    end
  end
endmodule
