// dwt_pe_array: the reconfigurable DWT PE array, a 1-D linear array of
// NUM_PE reconfigurable PEs followed by the K / 1/K scaling.
//
// Each PE performs up to cfg.fold lifting steps per sample pair; the pair
// stream flows from PE to PE through each PE's output pipeline register, so
// a filter of up to NUM_PE * fold lifting steps runs on the array. With
// fold = 1 the array takes one pair (two samples) per cycle; with fold = 2 it
// takes one pair every two cycles. The linear array, the folding and the
// pipeline registers between PEs follow the design; the pair-stream interface
// is this design's choice.
//
// Interface: in_e / in_o are the even and odd samples x[2n], x[2n+1] of a
// line; in_first marks the first pair of a line. out_l / out_h are the
// low-band and high-band coefficients. The output stream trails the input
// stream by cfg.lag pairs: the first cfg.lag outputs after out_first belong
// to indices before the line and the source must append cfg.lag zero pairs
// after each line to flush its last coefficients out.
//
// Timing: a pair sampled at clock edge t leaves PE 0 at edge t+fold, enters
// PE 1 at t+fold+1, and so on; with the scaler register, out_valid for it is
// registered at edge t + NUM_PE*(fold+1) (4 cycles for fold 1, 6 for fold 2).
module dwt_pe_array
  import rdwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  filt_cfg_t cfg,
  input  logic      in_valid,
  input  logic      in_first,
  input  data_t     in_e,
  input  data_t     in_o,
  output logic      out_valid,
  output logic      out_first,
  output data_t     out_l,
  output data_t     out_h
);
  logic  v [NUM_PE+1];
  logic  f [NUM_PE+1];
  data_t e [NUM_PE+1];
  data_t o [NUM_PE+1];

  assign v[0] = in_valid;
  assign f[0] = in_first;
  assign e[0] = in_e;
  assign o[0] = in_o;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    dwt_pe u_pe (
      .clk, .rst_n,
      .cfg_fold (cfg.fold),
      .cfg      (cfg.pe[p]),
      .in_valid (v[p]),   .in_first (f[p]),
      .in_e     (e[p]),   .in_o     (o[p]),
      .out_valid(v[p+1]), .out_first(f[p+1]),
      .out_e    (e[p+1]), .out_o    (o[p+1])
    );
  end

  dwt_scale u_scale (
    .clk, .rst_n,
    .k_lo(cfg.k_lo), .k_hi(cfg.k_hi),
    .in_valid(v[NUM_PE]), .in_first(f[NUM_PE]),
    .in_l(e[NUM_PE]), .in_h(o[NUM_PE]),
    .out_valid, .out_first, .out_l, .out_h
  );
endmodule
