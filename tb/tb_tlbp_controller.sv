// tb_tlbp_controller -- self-checking testbench of the decoding sequencer.
// With Z = 8, T = 24 sections, windows of 6 and 3 iterations, the testbench offers three
// frames and records the phase of every cycle. It checks the phase order (INIT, then FWD/BWD
// pairs over windows 0..3 for each iteration, then OUT), the length of every phase (Z+1 and
// WIN+1 cycles), the window and iteration counters, that release and done each pulse once per
// frame, and that release comes at the end of the last backward pass.
module tb_tlbp_controller;
  import ldpc_pkg::*;

  localparam int Z = 8, T = 24, WIN = 6, ITER = 3, NWIN = T / WIN;
  logic clk = 0, rst_n = 0, frame_ready = 0;
  dec_state_t state;
  logic [3:0] cnt;
  logic [1:0] win, iter;
  assign iter = dut.iter;
  logic first_iter, release_frame, frame_done;
  int checks = 0, failures = 0;

  tlbp_controller #(.Z(Z), .T(T), .WIN(WIN), .ITER(ITER)) dut (
    .clk, .rst_n, .frame_ready, .state, .cnt, .win, .first_iter, .release_frame, .frame_done
  );

  always #5 clk = ~clk;

  task automatic expect_phase(dec_state_t st, int len, int w, int it, bit rel);
    for (int n = 0; n < len; n++) begin
      checks++;
      if (state != st || int'(cnt) != n || (st inside {ST_FWD, ST_BWD} &&
          (int'(win) != w || int'(iter) != it || first_iter != (it == 0)))) begin
        failures++;
        $display("cycle %0d of %s: state %s cnt %0d win %0d iter %0d", n, st.name(),
                 state.name(), cnt, win, iter);
      end
      checks++;
      if (release_frame != (rel && n == len - 1) || frame_done != (st == ST_OUT && n == len - 1)) begin
        failures++;
        $display("%s cycle %0d: release %0b done %0b", st.name(), n, release_frame, frame_done);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk);
      checks++;
      if (state != ST_IDLE) begin
        failures++;
        $display("not idle before frame %0d", f);
      end
      frame_ready = 1;
      @(negedge clk);
      frame_ready = 0;
      expect_phase(ST_INIT, Z + 1, 0, 0, 0);
      for (int it = 0; it < ITER; it++)
        for (int w = 0; w < NWIN; w++) begin
          expect_phase(ST_FWD, WIN + 1, w, it, 0);
          expect_phase(ST_BWD, WIN + 1, w, it, it == ITER - 1 && w == NWIN - 1);
        end
      expect_phase(ST_OUT, Z + 1, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
