// fwd_spc -- forward single-parity-check unit of the Turbo Layered BP decoder.
//
// For one trellis section it takes the J0 systematic edges of a parity check. For each edge it
// forms the variable-to-check message m_vc = A_v - m_cv (the a-posteriori sum minus the check's
// own previous contribution) and combines the J0 messages with the min-sum rule into m_IO, the
// message the systematic part of the check sends into the accumulator trellis. The J0 messages
// m_vc are also returned so that the backward unit can reuse them (they go into the m_vc buffer).
// Handling J0 edges per cycle follows the document's parallel SPC processor; using plain
// min-sum (no offset) is this design's choice.
//
// Purely combinational: results are valid in the cycle the inputs are.
module fwd_spc
  import ldpc_pkg::*;
#(
  parameter int J0 = 3   // systematic edges handled in parallel
) (
  input  app_t a_v   [J0],  // current a-posteriori sums of the J0 variables
  input  msg_t m_cv  [J0],  // previous check-to-variable messages on the J0 edges
  output msg_t m_vc  [J0],  // variable-to-check messages
  output msg_t m_io         // min-sum of the J0 m_vc, sent to the trellis
);

  always_comb begin
    msg_t acc;
    for (int q = 0; q < J0; q++)
      m_vc[q] = sat_msg(int'(a_v[q]) - int'(m_cv[q]));
    acc = msg_t'(MSG_MAX);
    for (int q = 0; q < J0; q++)
      acc = boxplus(acc, m_vc[q]);
    m_io = acc;
  end

endmodule
