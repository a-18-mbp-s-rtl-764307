// turbo_ctrl: iteration and phase controller of the parallel turbo decoder.
//
// After start it runs decoding iterations until the iteration limit is
// reached or, with early_stop_en, the hard-decision-aided check reports that
// both decoders agree. One iteration is:
//   INIT   1 cycle    load alpha_0 and beta_N into the state metric units
//   RUN    NS cycles  dual-path processing: NS/2 cycles in which the forward
//                     recursion walks symbols 0..NS/2-1 and the backward
//                     recursion NS-1..NS/2 (metrics stored), then NS/2 cycles
//                     (phase2) in which both recursions continue into the
//                     other half and both LLR units produce one symbol each
//   CHECK  1 cycle    sample the early-stop condition
// Both component decoders are driven by the same schedule (parallel turbo
// decoding). fwd_idx / bwd_idx are the decoder-order symbols the forward and
// backward paths work on; t addresses the state metric buffers. apriori_en is
// low in the first iteration. wbank selects which of the two extrinsic RAMs
// of each decoder is written in this iteration; the other one is read.
// done pulses for one cycle at the end, with iters_used and early_stopped
// valid from then until the next start. A start while busy is ignored.
// The two-phase dual-path order and the parallel schedule follow the published
// design; the cycle-level timing (one radix-4 step per cycle, one init and one
// check cycle per iteration) is this design's.
module turbo_ctrl #(
  parameter int unsigned NS       = 106,
  parameter int unsigned MAX_ITER = 3,
  localparam int unsigned AW      = $clog2(NS),
  localparam int unsigned H       = NS / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          early_stop_en,
  input  logic          hda_match,
  output logic          busy,
  output logic          done,
  output logic          init,
  output logic          run,
  output logic          phase2,
  output logic [AW-1:0] t,
  output logic [AW-1:0] fwd_idx,
  output logic [AW-1:0] bwd_idx,
  output logic          apriori_en,
  output logic          wbank,
  output logic [7:0]    iters_used,
  output logic          early_stopped
);
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_RUN, S_CHECK} state_t;
  state_t     state;
  logic [7:0] iter;  // iterations completed in this block

  initial begin
    assert (NS % 2 == 0) else $error("turbo_ctrl: NS must be even");
    assert (MAX_ITER >= 1 && MAX_ITER < 256) else $error("turbo_ctrl: bad MAX_ITER");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      iter          <= '0;
      t             <= '0;
      phase2        <= 1'b0;
      done          <= 1'b0;
      iters_used    <= '0;
      early_stopped <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_INIT;
          iter  <= '0;
        end
        S_INIT: begin
          state  <= S_RUN;
          t      <= '0;
          phase2 <= 1'b0;
        end
        S_RUN: begin
          if (t == AW'(H - 1)) begin
            t <= '0;
            if (phase2) state <= S_CHECK;
            phase2 <= ~phase2;
          end else begin
            t <= t + 1'b1;
          end
        end
        S_CHECK: begin
          iter <= iter + 1'b1;
          if ((early_stop_en && hda_match) || (iter + 1 >= 8'(MAX_ITER))) begin
            state         <= S_IDLE;
            done          <= 1'b1;
            iters_used    <= iter + 1'b1;
            early_stopped <= early_stop_en && hda_match && (iter + 1 < 8'(MAX_ITER));
          end else begin
            state <= S_INIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign init       = (state == S_INIT);
  assign run        = (state == S_RUN);
  assign apriori_en = (iter != '0);
  assign wbank      = iter[0];
  assign fwd_idx    = phase2 ? AW'(H) + t : t;
  assign bwd_idx    = phase2 ? AW'(H - 1) - t : AW'(NS - 1) - t;
endmodule
