// rdwt_ctrl: run sequencer of the DWT processor.
//
// A run transforms the frame held in the external frame memory with one
// wavelet filter and one decomposition structure. On start the sequencer
// loads the filter context filt_sel from the PE Context Memory and the first
// pass descriptor of the program at prog_sel from the AG Context Memory, then
// for every pass starts the address generators and the Input Unit, waits
// until the Output Unit has written the pass's last coefficient and the PE
// array has drained, and moves to the next descriptor until the one flagged
// last. The design names no such block; the sequencing is this design's
// realisation of loading configurations from the context memories at run
// time.
//
// Timing: busy rises the cycle after start; done pulses for one cycle at the
// end of the run. Between passes there are four idle cycles (descriptor
// address, read, load, start).
module rdwt_ctrl
  import rdwt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [PE_CTX_AW-1:0] filt_sel,
  input  logic [AG_CTX_AW-1:0] prog_sel,
  input  pass_t                pass,        // descriptor at ag_addr
  input  logic                 pass_done,   // from the Output Unit
  output logic                 pe_rd_en,
  output logic [PE_CTX_AW-1:0] pe_rd_idx,
  output logic                 ag_rd_en,
  output logic [AG_CTX_AW-1:0] ag_rd_addr,
  output logic                 pass_start,
  output logic                 busy,
  output logic                 done
);
  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_START, C_RUN, C_NEXT} ctrl_state_e;
  ctrl_state_e state;
  logic [AG_CTX_AW-1:0] ag_addr;   // current pass descriptor

  assign busy      = (state != C_IDLE);
  assign pe_rd_idx = filt_sel;

  always_comb begin
    pe_rd_en   = (state == C_IDLE) && start;
    ag_rd_en   = ((state == C_IDLE) && start) || (state == C_NEXT);
    pass_start = (state == C_START);
    ag_rd_addr = (state == C_IDLE) ? prog_sel : ag_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      ag_addr <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        C_IDLE:  if (start) begin
          ag_addr <= prog_sel;
          state   <= C_LOAD;
        end
        C_LOAD:  state <= C_START;
        C_START: state <= C_RUN;
        C_RUN:   if (pass_done) begin
          if (pass.last) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else begin
            ag_addr <= ag_addr + 1'b1;
            state   <= C_NEXT;
          end
        end
        C_NEXT:  state <= C_LOAD;
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
