// rdwt_pkg: types, constants and default contexts shared by the reconfigurable
// DWT processor.
//
// Data path numbers: samples and coefficients travel as DATA_W-bit two's
// complement words; lifting coefficients are COEF_W-bit signed fixed point
// with FRAC fractional bits (Q3.12). The PE array holds NUM_PE = 2 PEs, as in
// the prototype; each PE can fold up to MAX_FOLD = 2 lifting steps onto its
// one MCU, so up to four lifting steps fit, which covers every filter of the
// prototype's performance table. Word widths, the Q format, the delay-chain
// depth and the encodings below are this design's own choices.
//
// A filter context (filt_cfg_t) says, for every PE and every time slot, which
// lifting-step category the MCU performs (op), its coefficient and which
// delay-chain tap feeds each MCU input, plus which taps form the PE output
// pair. A pass descriptor (pass_t) is one 1-D sweep of the address generators
// over a rectangular region; a decomposition structure is a list of passes.
package rdwt_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int DATA_W   = 16;  // sample / coefficient word
  localparam int COEF_W   = 16;  // lifting coefficient, signed Q3.12
  localparam int FRAC     = 12;  // fractional bits of a coefficient
  localparam int NUM_PE   = 2;   // PEs in the array (prototype)
  localparam int MAX_FOLD = 2;   // lifting steps folded onto one MCU
  localparam int DEPTH    = 5;   // registers per delay chain (taps 0..4)
  localparam int TAP_W    = 3;
  localparam int ROW_W    = 11;  // frame-memory row address (two 576-row buffers)
  localparam int COL_W    = 10;  // frame-memory column address (720 columns)
  localparam int LEN_W    = 11;  // samples per line / lines per pass
  localparam int LAG_W    = 3;   // pipeline lag of a filter, in sample pairs

  localparam int N_PE_PLA = 5;   // default filters held in the PE context PLA
  localparam int N_PE_RAM = 4;   // user-programmable filter contexts
  localparam int PE_CTX_AW = 4;

  localparam int N_AG_PLA = 32;  // default pass descriptors in the AG context PLA
  localparam int N_AG_RAM = 16;  // user-programmable pass descriptors
  localparam int AG_CTX_AW = 6;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // ------------------------------------------------------ PE configuration
  // MCU operation = lifting-step category:
  //   OP_SUM  (a): D = A + coef*(B + C)
  //   OP_DIFF (b): D = A + coef*(B - C)
  //   OP_ONE  (c): D = A + coef*B
  typedef enum logic [1:0] {OP_SUM = 2'd0, OP_DIFF = 2'd1, OP_ONE = 2'd2} op_e;

  // Delay-chain sources the input mux can pick from.
  //   SRC_E   : delay chain 1 (even lane of the incoming pair)
  //   SRC_O   : delay chain 2 (odd lane of the incoming pair)
  //   SRC_FB  : delay chain 0 (feedback of the MCU results of slot 0)
  //   SRC_MCU : the MCU result of the current slot (PE outputs only)
  typedef enum logic [1:0] {SRC_E = 2'd0, SRC_O = 2'd1, SRC_FB = 2'd2, SRC_MCU = 2'd3} src_e;

  typedef struct packed {
    src_e             src;
    logic [TAP_W-1:0] tap;
  } tap_sel_t;

  typedef struct packed {
    op_e      op;
    coef_t    coef;
    tap_sel_t a;
    tap_sel_t b;
    tap_sel_t c;
  } slot_cfg_t;

  typedef struct packed {
    slot_cfg_t [MAX_FOLD-1:0] slot;
    tap_sel_t  out_e;   // source of the even (low-band) lane of the output pair
    tap_sel_t  out_o;   // source of the odd (high-band) lane of the output pair
  } pe_cfg_t;

  typedef struct packed {
    logic [1:0]             fold;   // slots per sample pair: 1 or 2
    logic [LAG_W-1:0]       lag;    // pairs of pipeline lag through the array
    coef_t                  k_lo;   // scaling of the low band (K)
    coef_t                  k_hi;   // scaling of the high band (1/K)
    pe_cfg_t [NUM_PE-1:0]   pe;
  } filt_cfg_t;

  // ------------------------------------------------------ AG configuration
  typedef struct packed {
    logic             col_pass;  // 0: lines are rows, 1: lines are columns
    logic [ROW_W-1:0] src_row;
    logic [COL_W-1:0] src_col;
    logic [ROW_W-1:0] dst_row;
    logic [COL_W-1:0] dst_col;
    logic [LEN_W-1:0] n_lines;   // lines in the pass
    logic [LEN_W-1:0] len;       // samples per line (even)
    logic             last;      // last pass of the decomposition program
  } pass_t;

  // ------------------------------------------------- coefficient helpers
  localparam coef_t ONE = coef_t'(1 << FRAC);

  function automatic tap_sel_t ts(src_e s, int t);
    ts.src = s;
    ts.tap = TAP_W'(t);
  endfunction

  function automatic slot_cfg_t step(op_e op, coef_t k, tap_sel_t a, tap_sel_t b, tap_sel_t c);
    step.op = op; step.coef = k; step.a = a; step.b = b; step.c = c;
  endfunction

  // An unused slot: D = A (coefficient zero).
  function automatic slot_cfg_t idle(tap_sel_t a);
    idle = step(OP_ONE, '0, a, a, a);
  endfunction

  // ------------------------------------------ default filters (PE PLA)
  // Filter numbers in the PLA.
  localparam int F_53  = 0;  // (5,3)  2 lifting steps, fold 1
  localparam int F_97  = 1;  // (9,7)  4 lifting steps, fold 2
  localparam int F_93  = 2;  // (9,3)  3 lifting steps, fold 2
  localparam int F_210 = 3;  // (2,10) 4 lifting steps, fold 2
  localparam int F_137 = 4;  // (13,7) 4 lifting steps, fold 2

  // In every configuration the index of the pair being updated is chosen so
  // that its latest input is tap 0; "lag" counts how many pairs each PE's
  // output trails its input.
  function automatic filt_cfg_t default_filter(int n);
    filt_cfg_t f;
    f = '0;
    f.k_lo = ONE;
    f.k_hi = ONE;
    case (n)
      F_53: begin
        // odd  += -1/2 (e[m] + e[m+1])       (PE0, lag 1)
        // even +=  1/4 (o[m-1] + o[m])       (PE1, lag 0)
        f.fold = 2'd1; f.lag = LAG_W'(1);
        f.pe[0].slot[0] = step(OP_SUM, -16'sd2048, ts(SRC_O,1), ts(SRC_E,1), ts(SRC_E,0));
        f.pe[0].slot[1] = idle(ts(SRC_O,0));
        f.pe[0].out_e   = ts(SRC_E,1);
        f.pe[0].out_o   = ts(SRC_MCU,0);
        f.pe[1].slot[0] = step(OP_SUM, 16'sd1024, ts(SRC_E,0), ts(SRC_O,1), ts(SRC_O,0));
        f.pe[1].slot[1] = idle(ts(SRC_E,0));
        f.pe[1].out_e   = ts(SRC_MCU,0);
        f.pe[1].out_o   = ts(SRC_O,0);
      end
      F_97: begin
        // alpha, beta on PE0; gamma, delta on PE1; K = zeta on the low band.
        f.fold = 2'd2; f.lag = LAG_W'(2);
        f.k_lo = 16'sd4709;   // 1.149604398
        f.k_hi = 16'sd3563;   // 1/1.149604398
        f.pe[0].slot[0] = step(OP_SUM, -16'sd6497, ts(SRC_O,1), ts(SRC_E,1), ts(SRC_E,0));
        f.pe[0].slot[1] = step(OP_SUM, -16'sd217,  ts(SRC_E,1), ts(SRC_FB,1), ts(SRC_FB,0));
        f.pe[0].out_e   = ts(SRC_MCU,0);
        f.pe[0].out_o   = ts(SRC_FB,0);
        f.pe[1].slot[0] = step(OP_SUM, 16'sd3616,  ts(SRC_O,1), ts(SRC_E,1), ts(SRC_E,0));
        f.pe[1].slot[1] = step(OP_SUM, 16'sd1817,  ts(SRC_E,1), ts(SRC_FB,1), ts(SRC_FB,0));
        f.pe[1].out_e   = ts(SRC_MCU,0);
        f.pe[1].out_o   = ts(SRC_FB,0);
      end
      F_93: begin
        // odd  += -1/2  (e[m] + e[m+1])
        // even += 19/64 (o[m-1] + o[m])
        // even += -3/64 (o[m-2] + o[m+1])    (third step, last slot idle)
        f.fold = 2'd2; f.lag = LAG_W'(2);
        f.pe[0].slot[0] = step(OP_SUM, -16'sd2048, ts(SRC_O,1), ts(SRC_E,1), ts(SRC_E,0));
        f.pe[0].slot[1] = step(OP_SUM, 16'sd1216,  ts(SRC_E,1), ts(SRC_FB,1), ts(SRC_FB,0));
        f.pe[0].out_e   = ts(SRC_MCU,0);
        f.pe[0].out_o   = ts(SRC_FB,0);
        f.pe[1].slot[0] = step(OP_SUM, -16'sd192,  ts(SRC_E,1), ts(SRC_O,3), ts(SRC_O,0));
        f.pe[1].slot[1] = idle(ts(SRC_FB,0));
        f.pe[1].out_e   = ts(SRC_MCU,0);
        f.pe[1].out_o   = ts(SRC_O,1);
      end
      F_210: begin
        // odd  += -1 * e[m]                   (category c)
        // even += 1/2 * o[m]                  (category c)
        // odd  += 11/32 (e[m-1] - e[m+1])     (category b)
        // odd  += -3/64 (e[m-2] - e[m+2])     (category b)
        f.fold = 2'd2; f.lag = LAG_W'(2);
        f.pe[0].slot[0] = step(OP_ONE, -16'sd4096, ts(SRC_O,0), ts(SRC_E,0), ts(SRC_E,0));
        f.pe[0].slot[1] = step(OP_ONE, 16'sd2048,  ts(SRC_E,0), ts(SRC_FB,0), ts(SRC_FB,0));
        f.pe[0].out_e   = ts(SRC_MCU,0);
        f.pe[0].out_o   = ts(SRC_FB,0);
        f.pe[1].slot[0] = step(OP_DIFF, 16'sd1408, ts(SRC_O,1), ts(SRC_E,2), ts(SRC_E,0));
        f.pe[1].slot[1] = step(OP_DIFF, -16'sd192, ts(SRC_FB,1), ts(SRC_E,4), ts(SRC_E,0));
        f.pe[1].out_e   = ts(SRC_E,2);
        f.pe[1].out_o   = ts(SRC_MCU,0);
      end
      F_137: begin
        // odd  += -9/16 (e[m] + e[m+1])
        // odd  +=  1/16 (e[m-1] + e[m+2])
        // even +=  9/32 (o[m-1] + o[m])
        // even += -1/32 (o[m-2] + o[m+1])
        f.fold = 2'd2; f.lag = LAG_W'(3);
        f.pe[0].slot[0] = step(OP_SUM, -16'sd2304, ts(SRC_O,1), ts(SRC_E,1), ts(SRC_E,0));
        f.pe[0].slot[1] = step(OP_SUM, 16'sd256,   ts(SRC_FB,1), ts(SRC_E,3), ts(SRC_E,0));
        f.pe[0].out_e   = ts(SRC_E,2);
        f.pe[0].out_o   = ts(SRC_MCU,0);
        f.pe[1].slot[0] = step(OP_SUM, 16'sd1152,  ts(SRC_E,0), ts(SRC_O,1), ts(SRC_O,0));
        f.pe[1].slot[1] = step(OP_SUM, -16'sd128,  ts(SRC_FB,1), ts(SRC_O,3), ts(SRC_O,0));
        f.pe[1].out_e   = ts(SRC_MCU,0);
        f.pe[1].out_o   = ts(SRC_O,1);
      end
      default: f = default_filter(F_53);
    endcase
    return f;
  endfunction

  // -------------------------------------- default programs (AG PLA)
  // Frame buffer A starts at row 0, buffer B at row h (the frame height).
  // Each 2-D level is a row pass A -> B followed by a column pass B -> A, so a
  // finished decomposition is back in buffer A in the usual subband layout.
  // Program start addresses in the AG context PLA:
  localparam int P_1L_DYADIC  = 0;   // 1-level 2-D, 2 passes
  localparam int P_2L_DYADIC  = 2;   // 2-level dyadic, 4 passes
  localparam int P_2L_WPT     = 6;   // 2-level full wavelet packet, 10 passes
  localparam int P_3L_DYADIC  = 16;  // 3-level dyadic, 6 passes

  function automatic pass_t mk_pass(logic col, int sr, int sc, int dr, int dc,
                                    int lines, int len, logic last);
    mk_pass.col_pass = col;
    mk_pass.src_row  = ROW_W'(sr);
    mk_pass.src_col  = COL_W'(sc);
    mk_pass.dst_row  = ROW_W'(dr);
    mk_pass.dst_col  = COL_W'(dc);
    mk_pass.n_lines  = LEN_W'(lines);
    mk_pass.len      = LEN_W'(len);
    mk_pass.last     = last;
  endfunction

  // Row pass over the w x h region at (r, c) of buffer A into buffer B, or
  // (col = 1) column pass over the same region of B back into A.
  function automatic pass_t region_pass(logic col, int h_frame, int r, int c,
                                        int w, int h, logic last);
    if (!col) region_pass = mk_pass(1'b0, r, c, h_frame + r, c, h, w, last);
    else      region_pass = mk_pass(1'b1, h_frame + r, c, r, c, w, h, last);
  endfunction

  function automatic pass_t default_pass(int idx, int w, int h);
    pass_t p;
    p = '0;
    case (idx)
      // one level
      0:  p = region_pass(1'b0, h, 0, 0, w, h, 1'b0);
      1:  p = region_pass(1'b1, h, 0, 0, w, h, 1'b1);
      // two-level dyadic
      2:  p = region_pass(1'b0, h, 0, 0, w, h, 1'b0);
      3:  p = region_pass(1'b1, h, 0, 0, w, h, 1'b0);
      4:  p = region_pass(1'b0, h, 0, 0, w/2, h/2, 1'b0);
      5:  p = region_pass(1'b1, h, 0, 0, w/2, h/2, 1'b1);
      // two-level wavelet packet: level 1, then each of the four subbands
      6:  p = region_pass(1'b0, h, 0, 0, w, h, 1'b0);
      7:  p = region_pass(1'b1, h, 0, 0, w, h, 1'b0);
      8:  p = region_pass(1'b0, h, 0,   0,   w/2, h/2, 1'b0);
      9:  p = region_pass(1'b1, h, 0,   0,   w/2, h/2, 1'b0);
      10: p = region_pass(1'b0, h, 0,   w/2, w/2, h/2, 1'b0);
      11: p = region_pass(1'b1, h, 0,   w/2, w/2, h/2, 1'b0);
      12: p = region_pass(1'b0, h, h/2, 0,   w/2, h/2, 1'b0);
      13: p = region_pass(1'b1, h, h/2, 0,   w/2, h/2, 1'b0);
      14: p = region_pass(1'b0, h, h/2, w/2, w/2, h/2, 1'b0);
      15: p = region_pass(1'b1, h, h/2, w/2, w/2, h/2, 1'b1);
      // three-level dyadic
      16: p = region_pass(1'b0, h, 0, 0, w, h, 1'b0);
      17: p = region_pass(1'b1, h, 0, 0, w, h, 1'b0);
      18: p = region_pass(1'b0, h, 0, 0, w/2, h/2, 1'b0);
      19: p = region_pass(1'b1, h, 0, 0, w/2, h/2, 1'b0);
      20: p = region_pass(1'b0, h, 0, 0, w/4, h/4, 1'b0);
      21: p = region_pass(1'b1, h, 0, 0, w/4, h/4, 1'b1);
      default: p = region_pass(1'b0, h, 0, 0, w, h, 1'b1);
    endcase
    return p;
  endfunction

endpackage
