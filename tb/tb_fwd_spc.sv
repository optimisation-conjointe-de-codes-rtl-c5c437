// tb_fwd_spc -- self-checking testbench of the forward SPC unit.
// Random a-posteriori sums (+/-127) and old check messages (+/-31), including the extreme
// values that saturate, are applied to a 3-lane unit. Each m_vc is compared with the saturated
// difference and m_io with the sign product and smallest magnitude of the three m_vc,
// computed here with plain integer arithmetic.
module tb_fwd_spc;
  import ldpc_pkg::*;
  import ldpc_model_pkg::*;

  localparam int J0 = 3;
  app_t a_v [J0];
  msg_t m_cv [J0], m_vc [J0];
  msg_t m_io;
  int checks = 0, failures = 0;

  fwd_spc #(.J0(J0)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp_vc [J0];
      int exp_io;
      exp_io = MMAX;
      for (int q = 0; q < J0; q++) begin
        a_v[q]  = app_t'((n < 20) ? ((n % 2) ? 127 : -127) : $urandom_range(0, 254) - 127);
        m_cv[q] = msg_t'($urandom_range(0, 62) - 31);
        exp_vc[q] = clampi(int'(a_v[q]) - int'(m_cv[q]), MMAX);
        exp_io = bp(exp_io, exp_vc[q]);
      end
      #1;
      for (int q = 0; q < J0; q++) begin
        checks++;
        if (int'(m_vc[q]) != exp_vc[q]) begin
          failures++;
          $display("m_vc[%0d] = %0d, expected %0d", q, m_vc[q], exp_vc[q]);
        end
      end
      checks++;
      if (int'(m_io) != exp_io) begin
        failures++;
        $display("m_io = %0d, expected %0d", m_io, exp_io);
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
