// dwt_scale: the scaling step of a lifting-factored wavelet filter.
//
// Every lifting factorization ends with a diagonal scaling, K on the low band
// and 1/K on the high band. As the design prescribes, this is done by two
// constant-coefficient multipliers after the lifting steps rather than inside
// the PEs. Both factors come from the filter context in the same Q3.12 format
// as the lifting coefficients; integer filters use K = 1.0, which passes the
// data through unchanged. Products are rounded to nearest and saturated to
// DATA_W bits (this design's choice).
//
// Timing: one register stage; in_* at edge t appears on out_* at edge t+1.
module dwt_scale
  import rdwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t k_lo,
  input  coef_t k_hi,
  input  logic  in_valid,
  input  logic  in_first,
  input  data_t in_l,
  input  data_t in_h,
  output logic  out_valid,
  output logic  out_first,
  output data_t out_l,
  output data_t out_h
);
  localparam int PROD_W = DATA_W + COEF_W;

  function automatic data_t scale(data_t x, coef_t k);
    logic signed [PROD_W-1:0] p;
    p = PROD_W'(x) * PROD_W'(k) + PROD_W'(1 <<< (FRAC-1));
    p = p >>> FRAC;
    if (p > PROD_W'((1 <<< (DATA_W-1)) - 1))  return data_t'((1 <<< (DATA_W-1)) - 1);
    else if (p < -PROD_W'(1 <<< (DATA_W-1)))  return data_t'(-(1 <<< (DATA_W-1)));
    else                                      return p[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_l     <= '0;
      out_h     <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_first;
      if (in_valid) begin
        out_l <= scale(in_l, k_lo);
        out_h <= scale(in_h, k_hi);
      end
    end
  end
endmodule
