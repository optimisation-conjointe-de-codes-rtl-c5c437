// tb_ldpc_fpga_top_broadcast -- end-to-end testbench of the LDPC coder/decoder
// at the size of the broadcast application (z = 2688, N = 16128, rate 1/2, 15 iterations,
// pipelined processors).
// The PRBS source and encoder produce NF codewords. The testbench acts as the channel: it maps
// each bit to a 4-bit LLR (+7 for 0, -7 for 1); the first two frames are sent clean, the
// others with some magnitudes lowered and some signs flipped (hard errors). The frames are
// streamed back to back into the decoder, whose two processors take them in turn. Checks:
//   - the information words follow the PRBS x^20 + x^3 + 1 sequence and every codeword meets
//     all parity-check equations of H;
//   - every hard decision equals that of the reference TLBP decoder, bit for bit, and clean
//     frames decode to their information word;
//   - every frame takes (Z+1) + ITER*NWIN*2*(WIN+1) + (Z+1) cycles to decode without pipeline,
//     (Z+1) + (ITER*NWIN+1+stalls)*(WIN+1) + (Z+1) with it, where stalls (pulses of dec_stall,
//     checked per frame) is the reference count of consecutive windows sharing a variable;
//   - each mechanism happened at least once: both processors decoded frames, a frame was
//     loaded while its processor was decoding (double input memory), the input was held off
//     because both halves were full, and channel hard errors were corrected.
module tb_ldpc_fpga_top_broadcast;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  localparam int Z = 2688, MB = 3, KB = 3, J0 = 3, WIN = 3, ITER = 15, P = 2;
  localparam bit PIPE = 1'b1;
  localparam int K = KB * Z, M = MB * Z, N = K + M, T = M * (KB / J0), NWIN = T / WIN;
  localparam int NF = 6;
  localparam int ERR_PER_10K = 30;   // hard-error rate of the noisy frames
  localparam int LAT0 = (Z + 1) + ITER * NWIN * 2 * (WIN + 1) + (Z + 1);
  int n_stall, LAT;
  initial begin
    n_stall = PIPE ? pipe_stalls(Z, MB, KB, J0, WIN, ITER) : 0;
    LAT = PIPE ? (Z + 1) + (ITER * NWIN + 1 + n_stall) * (WIN + 1) + (Z + 1) : LAT0;
  end

  logic clk = 0, rst_n = 0;
  logic src_start = 0, src_busy, tx_valid;
  logic [K-1:0] tx_info;
  logic [M-1:0] tx_parity;
  logic rx_valid = 0, rx_ready;
  llr_t rx_llr = '0;
  logic dec_valid [P], dec_done [P], dec_busy [P], dec_stall [P];
  logic [$clog2(Z)-1:0] dec_pos [P];
  logic [KB-1:0] dec_bits [P];

  ldpc_fpga_top #(.Z(Z), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int llr_q [NF][N];
  bit info_q [NF][K];
  bit ref_q [NF][K];
  int hard_err [NF];
  logic [19:0] lfsr = 20'h00001;
  bit gen_done = 0;

  function automatic void fail(string msg);
    failures++;
    $display("%s", msg);
  endfunction

  // transmit side and channel
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      bit info[], dec[];
      int llr[];
      bit s;
      info = new[K];
      llr = new[N];
      @(negedge clk);
      src_start = 1;
      @(negedge clk);
      src_start = 0;
      while (!tx_valid) @(negedge clk);
      for (int v = 0; v < K; v++) begin
        info[v] = tx_info[v];
        info_q[f][v] = tx_info[v];
        checks++;
        if (tx_info[v] != lfsr[19]) fail($sformatf("frame %0d info bit %0d not the PRBS bit", f, v));
        lfsr = {lfsr[18:0], lfsr[19] ^ lfsr[2]};
      end
      for (int l = 0; l < Z; l++)
        for (int i = 0; i < MB; i++) begin
          s = tx_parity[l * MB + i];
          if (l * MB + i > 0) s ^= tx_parity[l * MB + i - 1];
          for (int j = 0; j < KB; j++) s ^= tx_info[j * Z + (l + shift(i, j, Z)) % Z];
          checks++;
          if (s) fail($sformatf("frame %0d: parity check %0d fails", f, l * MB + i));
        end
      hard_err[f] = 0;
      for (int n = 0; n < N; n++) begin
        bit b;
        int m;
        b = (n < K) ? tx_info[n] : tx_parity[n - K];
        m = 7;
        if (f > 1 && $urandom_range(0, 99) < 40) m = $urandom_range(1, 6);
        llr[n] = b ? -m : m;
        if (f > 1 && $urandom_range(0, 9999) < ERR_PER_10K) begin
          llr[n] = -llr[n];
          hard_err[f]++;
        end
        llr_q[f][n] = llr[n];
      end
      tlbp_decode(Z, MB, KB, J0, WIN, ITER, llr, dec);
      for (int v = 0; v < K; v++) ref_q[f][v] = dec[v];
    end
    gen_done = 1;
  end

  // receive side: stream all frames back to back
  int overlap = 0, stalls = 0;
  initial begin
    wait (gen_done);
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        rx_valid = 1;
        rx_llr = llr_t'(llr_q[f][n]);
        @(posedge clk);
        while (!rx_ready) begin
          stalls++;
          @(posedge clk);
        end
        if (dec_busy[f % P]) overlap++;
      end
    @(negedge clk);
    rx_valid = 0;
  end

  // outputs of both processors
  int nf_core [P];
  int t0 [P];
  int st [P];
  bit pb [P];
  int cyc = 0, total = 0, corrected = 0;
  int stalls_seen = 0;
  initial for (int p = 0; p < P; p++) begin nf_core[p] = 0; pb[p] = 0; t0[p] = 0; st[p] = 0; end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int p = 0; p < P; p++) begin
      int f;
      f = nf_core[p] * P + p;
      if (dec_busy[p] && !pb[p]) begin
        t0[p] = cyc;
        st[p] = 0;
      end
      pb[p] = dec_busy[p];
      if (dec_stall[p]) begin
        st[p]++;
        stalls_seen++;
      end
      if (dec_valid[p])
        for (int j = 0; j < KB; j++) begin
          checks++;
          if (dec_bits[p][j] !== ref_q[f][j * Z + int'(dec_pos[p])])
            fail($sformatf("frame %0d bit %0d differs from the reference decoder", f,
                           j * Z + int'(dec_pos[p])));
        end
      if (dec_done[p]) begin
        bit ok;
        ok = 1;
        for (int v = 0; v < K; v++) if (ref_q[f][v] != info_q[f][v]) ok = 0;
        checks += 2;
        if (st[p] != n_stall)
          fail($sformatf("frame %0d: %0d stalls, expected %0d", f, st[p], n_stall));
        if (cyc - t0[p] + 1 != LAT)
          fail($sformatf("frame %0d: %0d cycles, expected %0d", f, cyc - t0[p] + 1, LAT));
        if (f < 2) begin
          checks++;
          if (!ok) fail($sformatf("clean frame %0d not decoded", f));
        end
        if (ok && hard_err[f] > 0) corrected++;
        nf_core[p]++;
        total++;
        if (total == NF) finish_run();
      end
    end
  end

  task automatic finish_run();
    $display("frames %0d: processor 0 %0d, processor 1 %0d; frames with hard errors corrected %0d",
             NF, nf_core[0], nf_core[1], corrected);
    $display("loads during decoding %0d, input stall cycles %0d", overlap, stalls);
    $display("pipelined %0d: window stalls %0d per frame (%0d seen), overlapped slots %0d per frame",
             PIPE, n_stall, stalls_seen, PIPE ? ITER * NWIN - 1 - n_stall : 0);
    checks += 4;

    if (nf_core[0] == 0 || nf_core[1] == 0) fail("a processor never decoded a frame");
    if (overlap == 0) fail("no frame was loaded during decoding");
    if (stalls == 0) fail("the input was never held off");
    if (corrected == 0) fail("no channel error was corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NF * (N + K + M + 20) + (NF / P + 2) * (LAT0 + N) + 2000) @(posedge clk);
    fail($sformatf("watchdog: %0d of %0d frames decoded", total, NF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
