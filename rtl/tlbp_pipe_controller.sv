// tlbp_pipe_controller -- sequencer of the pipelined Turbo Layered BP decoding processor.
//
// The pipelined decoder overlaps the backward pass of window w with the forward pass of the
// next window w+1 (the next window in the trellis, or window 0 of the next iteration). Time is
// cut into slots of WIN+1 cycles (WIN issue cycles and one drain cycle). A slot is one of:
//   ST_FWD   forward pass only (first window of a frame, or after a stall)
//   ST_PIPE  backward pass of the pending window and forward pass of the next one
//   ST_BWD   backward pass only (last window of a frame, or a stall)
// A window may only start once all the up-to-date values it reads are available. The core
// reports on `conflict` (valid from the second cycle of a slot) whether the window forwarded in
// the current slot shares a variable with the window after it. If it does, the next slot runs
// only the backward pass (a stall of one slot), and the forward pass follows in the slot after
// that. Without conflicts a frame takes ITER*NWIN + 1 slots instead of the 2*ITER*NWIN of the
// decoder without pipeline, and every stall adds one slot. The forward and backward passes of a
// slot use different halves of the duplicated window buffers: fbank and bbank.
// The overlap itself and the availability rule follow the document; the slot length, the
// one-slot stall and the window-level conflict rule are this design's choices.
// Per frame: INIT (Z+1 cycles) -> slots -> OUT (Z+1 cycles). release_frame is high in the last
// cycle of the last slot, frame_done in the last OUT cycle, and stall for one cycle at each
// slot boundary where a conflict holds back a forward pass.
module tlbp_pipe_controller
  import ldpc_pkg::*;
#(
  parameter int Z    = 128,
  parameter int T    = 384,   // trellis sections per frame
  parameter int WIN  = 3,     // sections per window
  parameter int ITER = 10,    // decoding iterations
  localparam int NWIN = T / WIN,
  localparam int CW   = $clog2(((WIN > Z) ? WIN : Z) + 1),
  localparam int WW   = (NWIN > 1) ? $clog2(NWIN) : 1,
  localparam int IW   = (ITER > 1) ? $clog2(ITER) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_ready,
  input  logic          conflict,      // current forward window shares a variable with the next
  output dec_state_t    state,
  output logic [CW-1:0] cnt,           // cycle within the phase or slot
  output logic          fwd_act,       // the slot has a forward pass
  output logic          bwd_act,       // the slot has a backward pass
  output logic [WW-1:0] fwin,          // window of the forward pass
  output logic [WW-1:0] bwin,          // window of the backward pass
  output logic          f_first,       // forward pass belongs to the first iteration
  output logic          b_first,       // backward pass belongs to the first iteration
  output logic          fbank,         // window-buffer half written by the forward pass
  output logic          bbank,         // window-buffer half read by the backward pass
  output logic          stall,
  output logic          release_frame,
  output logic          frame_done
);

  logic          phase_end, f_last, b_last;
  logic [IW-1:0] fiter, biter;

  always_comb begin
    unique case (state)
      ST_INIT, ST_OUT:        phase_end = (cnt == CW'(Z));
      ST_FWD, ST_BWD, ST_PIPE: phase_end = (cnt == CW'(WIN));
      default:                phase_end = 1'b0;
    endcase
  end

  assign fwd_act       = (state == ST_FWD) || (state == ST_PIPE);
  assign bwd_act       = (state == ST_BWD) || (state == ST_PIPE);
  assign f_first       = (fiter == '0);
  assign b_first       = (biter == '0);
  assign f_last        = (fwin == WW'(NWIN - 1)) && (fiter == IW'(ITER - 1));
  assign b_last        = (bwin == WW'(NWIN - 1)) && (biter == IW'(ITER - 1));
  assign stall         = fwd_act && phase_end && !f_last && conflict;
  assign release_frame = (state == ST_BWD) && phase_end && b_last;
  assign frame_done    = (state == ST_OUT) && phase_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      fwin  <= '0;
      bwin  <= '0;
      fiter <= '0;
      biter <= '0;
      fbank <= 1'b0;
      bbank <= 1'b0;
    end else begin
      cnt <= phase_end ? '0 : ((state == ST_IDLE) ? '0 : cnt + 1'b1);
      unique case (state)
        ST_IDLE: if (frame_ready) state <= ST_INIT;
        ST_INIT: if (phase_end) begin
          state <= ST_FWD;
          fwin  <= '0;
          fiter <= '0;
        end
        ST_FWD, ST_PIPE: if (phase_end) begin
          // the window just forwarded becomes the pending backward pass
          bwin  <= fwin;
          biter <= fiter;
          bbank <= fbank;
          fbank <= ~fbank;
          if (fwin == WW'(NWIN - 1)) begin
            fwin  <= '0;
            fiter <= fiter + 1'b1;
          end else begin
            fwin  <= fwin + 1'b1;
          end
          state <= (f_last || conflict) ? ST_BWD : ST_PIPE;
        end
        ST_BWD: if (phase_end) state <= b_last ? ST_OUT : ST_FWD;
        ST_OUT: if (phase_end) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
