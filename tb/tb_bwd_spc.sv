// tb_bwd_spc -- self-checking testbench of the backward SPC unit.
// Random buffered messages m_vc, trellis message m_oi, current sums and old check messages
// are applied to a 3-lane unit. For every lane the expected new message is the min-sum of the
// four other inputs, found by brute force (every pair combined in turn), and the expected sum
// is A - old + new, saturated to +/-127.
module tb_bwd_spc;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  localparam int J0 = 3;
  msg_t m_vc [J0], m_cv_old [J0], m_cv_new [J0];
  msg_t m_oi;
  app_t a_cur [J0], a_new [J0];
  int checks = 0, failures = 0;

  bwd_spc #(.J0(J0)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      m_oi = msg_t'($urandom_range(0, 62) - 31);
      for (int q = 0; q < J0; q++) begin
        m_vc[q]     = msg_t'((n % 7 == 0) ? $urandom_range(0, 4) - 2 : $urandom_range(0, 62) - 31);
        m_cv_old[q] = msg_t'($urandom_range(0, 62) - 31);
        a_cur[q]    = app_t'((n < 30) ? ((n % 2) ? 120 : -120) : $urandom_range(0, 254) - 127);
      end
      #1;
      for (int q = 0; q < J0; q++) begin
        int e, ea;
        e = int'(m_oi);
        for (int r = 0; r < J0; r++) if (r != q) e = bp(e, int'(m_vc[r]));
        ea = clampi(int'(a_cur[q]) - int'(m_cv_old[q]) + e, AMAX);
        checks += 2;
        if (int'(m_cv_new[q]) != e) begin
          failures++;
          $display("m_cv_new[%0d] = %0d, expected %0d", q, m_cv_new[q], e);
        end
        if (int'(a_new[q]) != ea) begin
          failures++;
          $display("a_new[%0d] = %0d, expected %0d", q, a_new[q], ea);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
