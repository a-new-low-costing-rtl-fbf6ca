// ldpc_ctrl: processing control of the decoder.
//
// It runs the decoding procedure: take in the received LLRs of one frame, then
// alternate a variable-node phase and a check-node phase for MAX_ITER
// iterations, then output the decoded bits. The stop rule is a fixed number of
// iterations only: no syndrome is computed, as in the source design.
//
// States: IDLE -> LOAD (llr_ready high; NLLR LLRs are counted in and written to
// the LLR RAM at load_addr) -> VNU_GO/VNU_RUN -> CNU_GO/CNU_RUN -> back to
// VNU_GO, or after the last iteration OUT_GO/OUT_RUN -> IDLE with a done pulse.
// A *_GO state pulses the start of the matching address generator (or of the
// output stream) for one clock; a *_RUN state waits until that phase reports
// idle, meaning the generator has issued every slot and the node unit has
// written back every message, so one phase never overlaps the next.
// ssr (RAM_r output reset) is high in the variable-node phase of the first
// iteration and latch (store decisions) in that of the last one.
// The state encoding and the one-clock GO states are this design's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_ITER_P = MAX_ITER,
  parameter int unsigned NLLR       = N
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        llr_valid,
  output logic        llr_ready,
  output logic        load_we,
  output node_t       load_addr,
  output logic        vgen_start,
  output logic        cgen_start,
  input  logic        v_idle,
  input  logic        c_idle,
  output logic        phase_vnu,
  output logic        phase_cnu,
  output logic        ssr,
  output logic        latch,
  output logic        out_start,
  input  logic        out_busy,
  output logic [7:0]  iter,
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_VNU_GO, S_VNU_RUN, S_CNU_GO, S_CNU_RUN, S_OUT_GO, S_OUT_RUN
  } state_t;

  state_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      load_addr <= '0;
      iter      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_LOAD;
          load_addr <= '0;
          iter      <= '0;
        end
        S_LOAD: if (llr_valid) begin
          if (load_addr == node_t'(NLLR - 1)) state <= S_VNU_GO;
          load_addr <= load_addr + 1'b1;
        end
        S_VNU_GO:  state <= S_VNU_RUN;
        S_VNU_RUN: if (v_idle) state <= S_CNU_GO;
        S_CNU_GO:  state <= S_CNU_RUN;
        S_CNU_RUN: if (c_idle) begin
          if (iter == 8'(MAX_ITER_P - 1)) state <= S_OUT_GO;
          else begin
            iter  <= iter + 1'b1;
            state <= S_VNU_GO;
          end
        end
        S_OUT_GO:  state <= S_OUT_RUN;
        S_OUT_RUN: if (!out_busy) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    llr_ready  = (state == S_LOAD);
    load_we    = llr_ready && llr_valid;
    vgen_start = (state == S_VNU_GO);
    cgen_start = (state == S_CNU_GO);
    phase_vnu  = (state == S_VNU_GO) || (state == S_VNU_RUN);
    phase_cnu  = (state == S_CNU_GO) || (state == S_CNU_RUN);
    ssr        = phase_vnu && (iter == '0);
    latch      = phase_vnu && (iter == 8'(MAX_ITER_P - 1));
    out_start  = (state == S_OUT_GO);
    busy       = (state != S_IDLE);
  end

endmodule
