// pe_context_mem: PE Context Memory, holding the hardware configurations of
// the reconfigurable DWT PE array.
//
// Two parts, as in the design: a PLA of default configurations (the lifting
// factorizations of the (5,3), (9,7), (9,3), (2,10) and (13,7) filters, built
// from rdwt_pkg::default_filter) at indices 0..N_PE_PLA-1, and a RAM of
// user-programmable configurations at indices N_PE_PLA..N_PE_PLA+N_PE_RAM-1,
// written through the wr_* port. Which filters the PLA holds and the
// addressing are this design's choices.
//
// Timing: rd_en at edge t loads the configuration at rd_idx into cfg at edge
// t; cfg then holds until the next rd_en, so a filter stays selected for a
// whole run. A write to the RAM takes effect at the edge it is sampled.
module pe_context_mem
  import rdwt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_en,
  input  logic [PE_CTX_AW-1:0] wr_idx,    // RAM entry 0..N_PE_RAM-1
  input  filt_cfg_t            wr_cfg,
  input  logic                 rd_en,
  input  logic [PE_CTX_AW-1:0] rd_idx,    // PLA entry, or N_PE_PLA + RAM entry
  output filt_cfg_t            cfg
);
  filt_cfg_t ram [N_PE_RAM];

  function automatic filt_cfg_t pla(logic [PE_CTX_AW-1:0] idx);
    unique case (int'(idx))
      F_53:    return default_filter(F_53);
      F_97:    return default_filter(F_97);
      F_93:    return default_filter(F_93);
      F_210:   return default_filter(F_210);
      F_137:   return default_filter(F_137);
      default: return default_filter(F_53);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_idx) < N_PE_RAM) ram[wr_idx[$clog2(N_PE_RAM)-1:0]] <= wr_cfg;
  end

  logic [PE_CTX_AW-1:0] ram_idx;
  assign ram_idx = rd_idx - PE_CTX_AW'(N_PE_PLA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= default_filter(F_53);
    else if (rd_en) begin
      if (int'(rd_idx) < N_PE_PLA) cfg <= pla(rd_idx);
      else                          cfg <= ram[ram_idx[$clog2(N_PE_RAM)-1:0]];
    end
  end
endmodule
