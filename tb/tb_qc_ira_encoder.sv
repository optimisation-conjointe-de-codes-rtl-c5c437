// tb_qc_ira_encoder -- self-checking testbench of the accumulator encoder.
// For the 3 x 3, z = 8 example code, random information words are encoded and every one of
// the M parity-check equations of H = [Hs Hp] is evaluated on the resulting codeword: the
// ones of row l of circulant I_delta(i,j) in Hs, parity bit c and, for c > 0, parity bit c-1
// must add up to zero. The start-to-done latency must be M cycles.
module tb_qc_ira_encoder;
  import ldpc_model_pkg::*;

  localparam int Z = 8, MB = 3, KB = 3, K = KB * Z, M = MB * Z;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [K-1:0] info = '0;
  logic [M-1:0] parity;
  int checks = 0, failures = 0;

  qc_ira_encoder #(.Z(Z), .MB(MB), .KB(KB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int lat;
    bit s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      @(negedge clk);
      for (int v = 0; v < K; v++) info[v] = (w == 0) ? 1'b0 : 1'($urandom_range(0, 1));
      start = 1;
      @(negedge clk);
      start = 0;
      info = ~info;        // must not matter once latched
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      info = ~info;
      checks++;
      if (lat != M + 1) begin
        failures++;
        $display("latency %0d cycles, expected %0d", lat - 1, M);
      end
      for (int l = 0; l < Z; l++)
        for (int i = 0; i < MB; i++) begin
          s = 0;
          for (int j = 0; j < KB; j++) s ^= info[j * Z + (l + shift(i, j, Z)) % Z];
          s ^= parity[l * MB + i];
          if (l * MB + i > 0) s ^= parity[l * MB + i - 1];
          checks++;
          if (s) begin
            failures++;
            $display("word %0d: check %0d not satisfied", w, l * MB + i);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * (M + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
