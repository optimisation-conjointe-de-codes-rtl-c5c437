// bwd_spc -- backward single-parity-check unit of the Turbo Layered BP decoder.
//
// For one trellis section it receives the J0 buffered variable-to-check messages m_vc and the
// message m_OI that the accumulator trellis returns for this check. The new check-to-variable
// message on edge q is the min-sum of every other input of the check: the other J0-1 m_vc and
// m_OI. It is found with the usual two-minimum search (smallest and second smallest magnitude
// plus the position of the smallest) and the product of all signs.
// The a-posteriori sum is then updated as A_v' = A_v - m_cv(old) + m_cv(new). The document
// writes the update as A_v = m_vc + m_cv; the difference form used here gives the same result
// when the variable is touched once per window, and stays correct when a window holds two edges
// of one variable, which this design's choice of window length allows.
//
// Purely combinational.
module bwd_spc
  import ldpc_pkg::*;
#(
  parameter int J0 = 3
) (
  input  msg_t m_vc     [J0],  // buffered variable-to-check messages
  input  msg_t m_oi,           // message from the trellis to this check
  input  app_t a_cur    [J0],  // a-posteriori sums as they are now
  input  msg_t m_cv_old [J0],  // check-to-variable messages of the previous iteration
  output msg_t m_cv_new [J0],
  output app_t a_new    [J0]
);

  always_comb begin
    logic [MSG_W-1:0] min1, min2, mq;
    int               idx;
    logic             sgn;
    min1 = mag(m_oi);
    min2 = MSG_W'(MSG_MAX);
    idx  = J0;                       // J0 stands for the trellis input
    sgn  = m_oi[MSG_W-1];
    for (int q = 0; q < J0; q++) begin
      mq  = mag(m_vc[q]);
      sgn = sgn ^ m_vc[q][MSG_W-1];
      if (mq < min1) begin
        min2 = min1;
        min1 = mq;
        idx  = q;
      end else if (mq < min2) begin
        min2 = mq;
      end
    end
    for (int q = 0; q < J0; q++) begin
      mq = (idx == q) ? min2 : min1;
      m_cv_new[q] = (sgn ^ m_vc[q][MSG_W-1]) ? msg_t'(-mq) : msg_t'(mq);
      a_new[q]    = sat_app(int'(a_cur[q]) - int'(m_cv_old[q]) + int'(m_cv_new[q]));
    end
  end

endmodule
