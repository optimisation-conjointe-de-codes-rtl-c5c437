// tb_dual_input_mem -- self-checking testbench of the double input memory.
// Frames of N = 48 random 4-bit values are written while a reader takes them out: the first
// two frames fill both halves, after which in_ready must drop until a half is released. Every
// frame is read back through the systematic port (one word of KB values per circulant row)
// and the parity port, and compared with what was written, in frame order.
module tb_dual_input_mem;
  import ldpc_pkg::*;

  localparam int Z = 8, MB = 3, KB = 3, K = KB * Z, M = MB * Z, N = K + M, NF = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, frame_ready, release_frame = 0, sys_re = 0, par_re = 0;
  llr_t in_llr = '0;
  logic [2:0] sys_addr = '0;
  logic [4:0] par_addr = '0;
  llr_t sys_data [KB];
  llr_t par_data;
  int data [NF][N];
  int checks = 0, failures = 0, stalls = 0;

  dual_input_mem #(.Z(Z), .MB(MB), .KB(KB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) data[f][n] = $urandom_range(0, 15) - 8;
  end

  // writer
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_llr = llr_t'(data[f][n]);
        @(posedge clk);
        while (!in_ready) begin
          stalls++;
          @(posedge clk);
        end
      end
    @(negedge clk);
    in_valid = 0;
  end

  // reader: waits a while before taking each frame so that both halves fill up
  initial begin
    @(posedge rst_n);
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!frame_ready) @(negedge clk);
      repeat (100) @(negedge clk);
      for (int r = 0; r < Z; r++) begin
        sys_re = 1; sys_addr = 3'(r);
        @(negedge clk);
        sys_re = 0;
        for (int j = 0; j < KB; j++) begin
          checks++;
          if (int'(sys_data[j]) != data[f][j * Z + r]) begin
            failures++;
            $display("frame %0d sys %0d: %0d expected %0d", f, j * Z + r, sys_data[j],
                     data[f][j * Z + r]);
          end
        end
      end
      for (int c = 0; c < M; c++) begin
        par_re = 1; par_addr = 5'(c);
        @(negedge clk);
        par_re = 0;
        checks++;
        if (int'(par_data) != data[f][K + c]) begin
          failures++;
          $display("frame %0d parity %0d: %0d expected %0d", f, c, par_data, data[f][K + c]);
        end
      end
      release_frame = 1;
      @(negedge clk);
      release_frame = 0;
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("the writer was never held off with both halves full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * (N + 200) + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
