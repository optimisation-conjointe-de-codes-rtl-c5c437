// tb_tlbp_pipe_core -- self-checking testbench of the pipelined TLBP decoding processor.
//
// Uses the 3 x 3, z = 8 example code (N = 48, rate 1/2) with one trellis section per check (J0 = 3) and windows of 2 sections. With this window length
// some pairs of consecutive windows share a variable and others do not, so the processor both
// overlaps passes and stalls. Frames are random information words encoded by the reference
// encoder and sent as 4-bit LLRs (+/-7); from frame 1 on a few signs are flipped and many
// magnitudes lowered. Frames are streamed back to back. Checks:
//   - every output word equals the hard decisions of the reference TLBP decoder (the schedule
//     without pipeline), bit for bit;
//   - the noise-free frame decodes to the information word;
//   - every frame raises `stall` as often as the reference count of consecutive windows that
//     share a variable, and takes (Z+1) + (ITER*NWIN + 1 + stalls)*(WIN+1) + (Z+1) cycles;
//   - stalls and overlapped slots both happened, and loading overlapped decoding.
module tb_tlbp_pipe_core;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  localparam int Z = 8, MB = 3, KB = 3, J0 = 3, WIN = 2, ITER = 4;
  localparam int K = KB * Z, M = MB * Z, N = K + M, T = M * (KB / J0), NWIN = T / WIN;
  localparam int NF = 10;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  llr_t in_llr = '0;
  logic out_valid, frame_done, busy, stall;
  logic [$clog2(Z)-1:0] out_pos;
  logic [KB-1:0] out_bits;

  tlbp_pipe_core #(.Z(Z), .MB(MB), .KB(KB), .J0(J0), .WIN(WIN), .ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int llr_q [NF][N];
  bit info_q [NF][K];
  bit ref_q [NF][K];
  int n_stall, lat;

  initial begin
    n_stall = pipe_stalls(Z, MB, KB, J0, WIN, ITER);
    lat = (Z + 1) + (ITER * NWIN + 1 + n_stall) * (WIN + 1) + (Z + 1);
    for (int f = 0; f < NF; f++) begin
      bit info[], par[], dec[];
      int llr[];
      info = new[K];
      llr = new[N];
      for (int v = 0; v < K; v++) info[v] = bit'($urandom_range(0, 1));
      encode(Z, MB, KB, info, par);
      for (int n = 0; n < N; n++) begin
        bit b;
        int m;
        b = (n < K) ? info[n] : par[n - K];
        m = 7;
        if (f > 0 && $urandom_range(0, 99) < 40) m = $urandom_range(1, 6);
        llr[n] = b ? -m : m;
        if (f > 0 && $urandom_range(0, 99) < 5) llr[n] = -llr[n];
        llr_q[f][n] = llr[n];
      end
      tlbp_decode(Z, MB, KB, J0, WIN, ITER, llr, dec);
      for (int v = 0; v < K; v++) begin
        info_q[f][v] = info[v];
        ref_q[f][v] = dec[v];
      end
    end
  end

  // driver
  int overlap = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_llr = llr_t'(llr_q[f][n]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (busy) overlap++;
      end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  int fo = 0, t0 = 0, cyc = 0, good = 0, st_frame = 0, st_total = 0;
  bit prev_busy = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (busy && !prev_busy) begin
      t0 = cyc;
      st_frame = 0;
    end
    prev_busy = busy;
    if (stall) begin
      st_frame++;
      st_total++;
    end
    if (out_valid)
      for (int j = 0; j < KB; j++) begin
        checks++;
        if (out_bits[j] !== ref_q[fo][j * Z + int'(out_pos)]) begin
          failures++;
          $display("frame %0d bit %0d: got %0b expected %0b", fo, j * Z + int'(out_pos),
                   out_bits[j], ref_q[fo][j * Z + int'(out_pos)]);
        end
      end
    if (frame_done) begin
      bit ok;
      ok = 1;
      checks += 2;
      if (st_frame != n_stall) begin
        failures++;
        $display("frame %0d: %0d stalls, expected %0d", fo, st_frame, n_stall);
      end
      if (cyc - t0 + 1 != lat) begin
        failures++;
        $display("frame %0d: decoding took %0d cycles, expected %0d", fo, cyc - t0 + 1, lat);
      end
      for (int v = 0; v < K; v++) if (ref_q[fo][v] != info_q[fo][v]) ok = 0;
      if (ok) good++;
      if (fo == 0) begin
        checks++;
        if (!ok) begin
          failures++;
          $display("noise-free frame not decoded");
        end
      end
      fo++;
      if (fo == NF) begin
        checks += 3;
        if (overlap == 0) begin
          failures++;
          $display("loading never overlapped decoding");
        end
        if (st_total == 0) begin
          failures++;
          $display("no stall happened");
        end
        if (n_stall >= ITER * NWIN - 1) begin
          failures++;
          $display("no slot overlapped two windows");
        end
        $display("frames %0d, corrected %0d, stalls %0d per frame, overlapped slots %0d per frame, overlapped loads %0d",
                 NF, good, n_stall, ITER * NWIN - 1 - n_stall, overlap);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // watchdog
  initial begin
    repeat (NF * (2 * (Z + 1) + 2 * ITER * NWIN * (WIN + 1) + N) + 1000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d frames decoded", fo, NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
