// dwt_pe: one reconfigurable DWT processing element.
//
// The PE takes one even/odd sample pair per in_valid and runs cfg_fold time
// slots (1 or 2) on its single MCU, one lifting step per slot, so that two
// lifting steps can be folded onto one MCU at half the pair rate. Around the
// MCU sit three delay chains and an input mux, as in the design:
//   delay chain 1 : history of the even lane of the incoming pairs
//   delay chain 2 : history of the odd lane of the incoming pairs
//   delay chain 0 : feedback registers, history of the slot-0 MCU results,
//                   read by the folded second step
// Per slot, the context picks the MCU category and coefficient and, for each
// of the MCU inputs A, B and C, a chain and a tap (tap 0 = newest). After the
// last slot the PE output pair is taken from two more selections (a chain tap
// or the MCU result) into a pipeline register, which is the pipelining cut
// between PEs. The slot FSM below is the "FSM" of the design; how the context
// is encoded, the chain depth and the handshake are this design's choices.
//
// in_first marks the first pair of a line: all three chains restart from zero
// (zero extension before the line). in_first travels with the pair to
// out_first so the next PE restarts in step.
//
// Timing: a pair accepted at clock edge t leaves on out_* at edge t+cfg_fold.
// The source must leave at least cfg_fold cycles between pairs; an assertion
// checks this. Lint sees rst_n used both as an asynchronous reset and
// synchronously: the synchronous use is only that assertion's disable
// condition, which makes no logic.
module dwt_pe
  import rdwt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic [1:0] cfg_fold,
  input  pe_cfg_t cfg,
  input  logic    in_valid,
  input  logic    in_first,
  input  data_t   in_e,
  input  data_t   in_o,
  output logic    out_valid,
  output logic    out_first,
  output data_t   out_e,
  output data_t   out_o
);
  data_t chain_e  [DEPTH];   // delay chain 1
  data_t chain_o  [DEPTH];   // delay chain 2
  data_t chain_fb [DEPTH];   // delay chain 0

  // slot FSM
  typedef enum logic [1:0] {S_IDLE, S_SLOT0, S_SLOT1} pe_state_e;
  pe_state_e state;
  logic      first_q;        // current pair opened a line

  logic      active, last_slot;
  logic [0:0] slot;
  slot_cfg_t  sc;
  data_t      mux_a, mux_b, mux_c, mcu_d;

  assign active    = (state != S_IDLE);
  assign slot      = (state == S_SLOT1) ? 1'b1 : 1'b0;
  assign last_slot = (state == S_SLOT1) || (state == S_SLOT0 && cfg_fold != 2'd2);
  assign sc        = cfg.slot[slot];

  function automatic data_t pick(tap_sel_t s, data_t d, data_t ce[DEPTH],
                                 data_t co[DEPTH], data_t cf[DEPTH]);
    int unsigned t;
    t = (int'(s.tap) < DEPTH) ? int'(s.tap) : DEPTH - 1;
    unique case (s.src)
      SRC_E:   return ce[t];
      SRC_O:   return co[t];
      SRC_FB:  return cf[t];
      default: return d;
    endcase
  endfunction

  always_comb begin
    mux_a = pick(sc.a, '0, chain_e, chain_o, chain_fb);
    mux_b = pick(sc.b, '0, chain_e, chain_o, chain_fb);
    mux_c = pick(sc.c, '0, chain_e, chain_o, chain_fb);
  end

  dwt_mcu u_mcu (
    .op(sc.op), .coef(sc.coef), .a(mux_a), .b(mux_b), .c(mux_c), .d(mcu_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      first_q   <= 1'b0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_e     <= '0;
      out_o     <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        chain_e[i]  <= '0;
        chain_o[i]  <= '0;
        chain_fb[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      // slot work on the pair already in the chains
      if (active) begin
        if (last_slot) begin
          out_valid <= 1'b1;
          out_first <= first_q;
          out_e     <= pick(cfg.out_e, mcu_d, chain_e, chain_o, chain_fb);
          out_o     <= pick(cfg.out_o, mcu_d, chain_e, chain_o, chain_fb);
          state     <= S_IDLE;
        end else begin
          chain_fb[0] <= mcu_d;
          for (int i = 1; i < DEPTH; i++) chain_fb[i] <= first_q ? '0 : chain_fb[i-1];
          state <= S_SLOT1;
        end
      end
      // accept a new pair
      if (in_valid) begin
        chain_e[0] <= in_e;
        chain_o[0] <= in_o;
        for (int i = 1; i < DEPTH; i++) begin
          chain_e[i] <= in_first ? '0 : chain_e[i-1];
          chain_o[i] <= in_first ? '0 : chain_o[i-1];
        end
        first_q <= in_first;
        state   <= S_SLOT0;
      end
    end
  end

  // A new pair may only arrive once the previous one has finished its slots.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (state == S_IDLE) || last_slot)
    else $error("dwt_pe: pair arrived while the previous one was still folding");
endmodule
