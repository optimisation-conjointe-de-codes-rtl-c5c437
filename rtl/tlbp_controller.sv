// tlbp_controller -- sequencer of one Turbo Layered BP decoding processor.
//
// The trellis of a frame has T = M * KB / J0 sections (one per parity check when J0 = KB,
// several per check when a check is split into groups of J0 edges). It is cut into
// NWIN = T / WIN windows. Per frame the controller runs:
//   INIT  Z+1 cycles: copy the systematic channel values into the a-posteriori banks
//   ITER times, for every window w = 0 .. NWIN-1:
//     FWD WIN+1 cycles: issue sections w*WIN .. w*WIN+WIN-1 rising (one per cycle)
//     BWD WIN+1 cycles: issue the same sections falling
//   OUT   Z+1 cycles: read the hard decisions out
// Each phase issues one memory read per cycle at cnt = 0 .. n-1; the datapath computes one
// cycle later, so every phase has one extra cycle to drain. Windows are processed strictly one
// after the other (the decoder without pipeline of the document): a window's forward pass only
// starts once the previous window has written all its updates, which is the document's rule
// that a window starts when all the most up-to-date extrinsic information is available.
// The processor takes a frame when frame_ready is high and releases the input half when it
// starts the OUT phase; frame_done pulses in the last OUT cycle.
module tlbp_controller
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
  output dec_state_t    state,
  output logic [CW-1:0] cnt,          // cycle within the phase
  output logic [WW-1:0] win,          // window index
  output logic          first_iter,
  output logic          release_frame,
  output logic          frame_done
);

  logic          phase_end;
  logic [IW-1:0] iter;          // iteration index

  always_comb begin
    unique case (state)
      ST_INIT, ST_OUT: phase_end = (cnt == CW'(Z));
      ST_FWD, ST_BWD:  phase_end = (cnt == CW'(WIN));
      default:         phase_end = 1'b0;
    endcase
  end

  assign first_iter    = (iter == '0);
  assign release_frame = (state == ST_BWD) && phase_end && (win == WW'(NWIN - 1))
                         && (iter == IW'(ITER - 1));
  assign frame_done    = (state == ST_OUT) && phase_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      win   <= '0;
      iter  <= '0;
    end else begin
      cnt <= phase_end ? '0 : ((state == ST_IDLE) ? '0 : cnt + 1'b1);
      unique case (state)
        ST_IDLE: if (frame_ready) state <= ST_INIT;
        ST_INIT: if (phase_end) begin
          state <= ST_FWD;
          win   <= '0;
          iter  <= '0;
        end
        ST_FWD: if (phase_end) state <= ST_BWD;
        ST_BWD: if (phase_end) begin
          if (win != WW'(NWIN - 1)) begin
            win   <= win + 1'b1;
            state <= ST_FWD;
          end else if (iter != IW'(ITER - 1)) begin
            win   <= '0;
            iter  <= iter + 1'b1;
            state <= ST_FWD;
          end else begin
            state <= ST_OUT;
          end
        end
        ST_OUT: if (phase_end) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
