// tb_tlbp_pipe_controller -- self-checking testbench of the pipelined TLBP sequencer.
//
// The conflict input is driven from a random table indexed by the forward window, so some
// window pairs overlap and others stall. The expected slot sequence is built independently as
// a list (kind of slot, forward and backward window and iteration, buffer halves), then every
// cycle of a frame is compared with it: state, cnt, the window indices, first-iteration flags,
// buffer halves (relative to the first slot), stall, release_frame and frame_done. Two frames are run, with different
// conflict tables, and the frame length is checked against
// (Z+1) + (ITER*NWIN + 1 + stalls)*(WIN+1) + (Z+1) cycles.
module tb_tlbp_pipe_controller;
  import ldpc_pkg::*;

  localparam int Z = 6, T = 20, WIN = 4, ITER = 3, NWIN = T / WIN;
  localparam int CW = $clog2(((WIN > Z) ? WIN : Z) + 1);
  localparam int WW = (NWIN > 1) ? $clog2(NWIN) : 1;

  logic clk = 0, rst_n = 0, frame_ready = 0, conflict;
  dec_state_t state;
  logic [CW-1:0] cnt;
  logic fwd_act, bwd_act, f_first, b_first, fbank, bbank, stall, release_frame, frame_done;
  logic [WW-1:0] fwin, bwin;

  tlbp_pipe_controller #(.Z(Z), .T(T), .WIN(WIN), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  bit ctab [NWIN];
  assign conflict = ctab[fwin];

  typedef struct {
    dec_state_t st;
    int fw, fi, bw, bi, fb, bb;
    bit stl, rel;
  } slot_t;

  int checks = 0, failures = 0;
  slot_t q[$];
  bit base;   // buffer half of the first slot of a frame (halves keep alternating across frames)

  // expected slots of one frame
  task automatic build();
    int g = 0;
    slot_t s;
    q.delete();
    // first slot: forward of window 0
    s = '{st: ST_FWD, fw: 0, fi: 0, bw: -1, bi: -1, fb: 0, bb: -1, stl: 0, rel: 0};
    q.push_back(s);
    forever begin
      slot_t n;
      bit last, hold;
      int pb;
      // slot q[$] just forwarded global window g
      last = (g == ITER * NWIN - 1);
      hold = !last && ctab[g % NWIN];
      q[$].stl = hold;
      pb = q[$].fb;
      if (last || hold) begin
        n = '{st: ST_BWD, fw: -1, fi: -1, bw: g % NWIN, bi: g / NWIN, fb: -1, bb: pb, stl: 0,
              rel: last};
        q.push_back(n);
        if (last) break;
        g++;
        n = '{st: ST_FWD, fw: g % NWIN, fi: g / NWIN, bw: -1, bi: -1, fb: 1 - pb, bb: -1,
              stl: 0, rel: 0};
        q.push_back(n);
      end else begin
        n = '{st: ST_PIPE, fw: (g + 1) % NWIN, fi: (g + 1) / NWIN, bw: g % NWIN, bi: g / NWIN,
              fb: 1 - pb, bb: pb, stl: 0, rel: 0};
        q.push_back(n);
        g++;
      end
    end
  endtask

  task automatic fail(string msg);
    failures++;
    $display("%s", msg);
  endtask

  task automatic expect_cycle(dec_state_t st, int n, int len, slot_t s, bit done);
    @(negedge clk);
    checks++;
    if (state != st || int'(cnt) != n) begin
      fail($sformatf("state %s cnt %0d, expected %s cnt %0d", state.name(), cnt, st.name(), n));
      return;
    end
    if (st inside {ST_FWD, ST_PIPE, ST_BWD}) begin
      checks++;
      if (fwd_act != (s.fw >= 0) || bwd_act != (s.bw >= 0) ||
          (s.fw >= 0 && (int'(fwin) != s.fw || f_first != (s.fi == 0) || int'(fbank ^ base) != s.fb)) ||
          (s.bw >= 0 && (int'(bwin) != s.bw || b_first != (s.bi == 0) || int'(bbank ^ base) != s.bb)))
        fail($sformatf("slot %s: fwin %0d bwin %0d fbank %0d bbank %0d, expected %0d %0d %0d %0d",
                       st.name(), fwin, bwin, fbank, bbank, s.fw, s.bw, s.fb, s.bb));
      checks++;
      if (stall != (s.stl && n == len - 1) || release_frame != (s.rel && n == len - 1))
        fail($sformatf("slot %s cnt %0d: stall %0b release %0b", st.name(), n, stall,
                       release_frame));
    end
    checks++;
    if (frame_done != done) fail($sformatf("frame_done %0b in %s cnt %0d", frame_done,
                                           st.name(), n));
  endtask

  initial begin
    slot_t none;
    none = '{st: ST_IDLE, fw: -1, fi: -1, bw: -1, bi: -1, fb: -1, bb: -1, stl: 0, rel: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      int nst, cycles;
      for (int w = 0; w < NWIN; w++) ctab[w] = (fr == 0) ? bit'($urandom_range(0, 1)) : (w % 2 == 1);
      build();
      nst = 0;
      foreach (q[i]) if (q[i].stl) nst++;
      @(negedge clk);
      frame_ready = 1;
      for (int n = 0; n <= Z; n++) begin
        expect_cycle(ST_INIT, n, Z + 1, none, 0);
        frame_ready = 0;
      end
      base = fbank;
      foreach (q[i])
        for (int n = 0; n <= WIN; n++) expect_cycle(q[i].st, n, WIN + 1, q[i], 0);
      for (int n = 0; n <= Z; n++) expect_cycle(ST_OUT, n, Z + 1, none, n == Z);
      cycles = 2 * (Z + 1) + q.size() * (WIN + 1);
      checks++;
      if (cycles != 2 * (Z + 1) + (ITER * NWIN + 1 + nst) * (WIN + 1))
        fail($sformatf("frame %0d: %0d slots for %0d stalls", fr, q.size(), nst));
      $display("frame %0d: %0d slots, %0d stalls, %0d cycles", fr, q.size(), nst, cycles);
      @(negedge clk);
      checks++;
      if (state != ST_IDLE) fail("not idle after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (2 * (Z + 1) + 2 * ITER * NWIN * (WIN + 1)) + 200) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
