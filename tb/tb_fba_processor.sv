// tb_fba_processor -- self-checking testbench of the trellis forward-backward processor.
// Windows of WIN = 4 sections are run with random m_IO and channel values: a forward pass
// (one section per cycle), then a backward pass in reverse order with a random starting
// backward metric, the buffer being read one cycle ahead as the decoder does. The forward
// metric is restarted every third window and otherwise carried over. m_OI of every section
// and the final backward metric are compared with the accumulator forward-backward
// equations evaluated here on integers.
module tb_fba_processor;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  localparam int WIN = 4;
  logic clk = 0, rst_n = 0;
  logic fwd_init = 0, fwd_en = 0, bwd_load = 0, bwd_re = 0, bwd_en = 0;
  logic [1:0] fwd_addr = '0, bwd_raddr = '0;
  msg_t m_io = '0, y = '0, beta_init = '0, m_oi, beta;
  int checks = 0, failures = 0;

  fba_processor #(.WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int f, b, g;
    int mio [WIN], yy [WIN], ff [WIN];
    repeat (2) @(posedge clk);
    rst_n = 1;
    f = MMAX;
    for (int w = 0; w < 300; w++) begin
      // forward
      @(negedge clk);
      if (w % 3 == 0) begin
        fwd_init = 1;
        f = MMAX;
        @(negedge clk);
        fwd_init = 0;
      end
      for (int k = 0; k < WIN; k++) begin
        mio[k] = $urandom_range(0, 62) - 31;
        yy[k]  = (k == WIN - 1 || w % 2 == 0) ? $urandom_range(0, 14) - 7 : 0;
        ff[k]  = f;
        f = clampi(bp(f, mio[k]) + yy[k], MMAX);
        fwd_en = 1; fwd_addr = 2'(k); m_io = msg_t'(mio[k]); y = msg_t'(yy[k]);
        @(negedge clk);
      end
      fwd_en = 0;
      // backward
      b = $urandom_range(0, 62) - 31;
      bwd_load = 1; beta_init = msg_t'(b);
      bwd_re = 1; bwd_raddr = 2'(WIN - 1);
      @(negedge clk);
      bwd_load = 0;
      for (int k = WIN - 1; k >= 0; k--) begin
        bwd_en = 1;
        bwd_re = (k > 0);
        bwd_raddr = 2'((k > 0) ? k - 1 : 0);
        g = clampi(yy[k] + b, MMAX);
        checks++;
        if (int'(m_oi) != bp(ff[k], g)) begin
          failures++;
          $display("window %0d section %0d: m_oi %0d expected %0d", w, k, m_oi, bp(ff[k], g));
        end
        b = bp(g, mio[k]);
        @(negedge clk);
      end
      bwd_en = 0; bwd_re = 0;
      checks++;
      if (int'(beta) != b) begin
        failures++;
        $display("window %0d: beta %0d expected %0d", w, beta, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
