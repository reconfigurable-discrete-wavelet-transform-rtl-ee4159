// dwt_mcu: main computation unit (core cell) of a reconfigurable DWT PE.
//
// A three-input, one-output lifting datapath: an adder/subtractor forms B+C
// or B-C, a multiplier scales it by the lifting coefficient, and a second
// adder adds the target sample A:
//   OP_SUM  (category a):  D = A + coef * (B + C)
//   OP_DIFF (category b):  D = A + coef * (B - C)
//   OP_ONE  (category c):  D = A + coef * B
// This structure and the three categories follow the design. The fixed-point
// handling is this design's choice: the product is rounded to nearest (ties
// toward +infinity) by adding half an LSB before the arithmetic right shift by
// FRAC, and the sum saturates to DATA_W bits. With coef = -1/2 and 1/4 this
// gives exactly the integer (5,3) lifting of JPEG2000.
//
// Purely combinational: the registers around it live in dwt_pe.
module dwt_mcu
  import rdwt_pkg::*;
(
  input  op_e   op,
  input  coef_t coef,
  input  data_t a,
  input  data_t b,
  input  data_t c,
  output data_t d
);
  localparam int SUM_W  = DATA_W + 1;
  localparam int PROD_W = SUM_W + COEF_W;
  localparam int ACC_W  = PROD_W - FRAC + 1;

  logic signed [SUM_W-1:0]  bc;
  logic signed [PROD_W-1:0] prod;
  logic signed [PROD_W-1:0] prod_sh;
  logic signed [ACC_W-1:0]  acc;

  localparam logic signed [ACC_W-1:0] DMAX = ACC_W'((1 <<< (DATA_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] DMIN = -ACC_W'(1 <<< (DATA_W-1));

  always_comb begin
    unique case (op)
      OP_SUM:  bc = SUM_W'(b) + SUM_W'(c);
      OP_DIFF: bc = SUM_W'(b) - SUM_W'(c);
      default: bc = SUM_W'(b);
    endcase
    prod    = PROD_W'(bc) * PROD_W'(coef) + PROD_W'(1 <<< (FRAC-1));
    prod_sh = prod >>> FRAC;
    acc     = ACC_W'(a) + ACC_W'(prod_sh);
    if (acc > DMAX)      d = DMAX[DATA_W-1:0];
    else if (acc < DMIN) d = DMIN[DATA_W-1:0];
    else                 d = acc[DATA_W-1:0];
  end
endmodule
