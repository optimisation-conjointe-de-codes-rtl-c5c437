// fba_processor -- forward-backward processor on the accumulator trellis (Turbo Layered BP).
//
// The dual-diagonal part Hp of a QC-IRA code is an accumulator: parity bit p_s is tied to
// p_(s-1) through trellis section s, which also receives m_IO(s), the combined message of the
// section's systematic edges. The processor runs the two-state forward-backward algorithm on
// this chain in the min-sum domain:
//   forward  (s rising):   a_s = f_s [+] m_IO(s),      f_(s+1) = a_s + y(s),   f_0 = +max
//   backward (s falling):  g_s = y(s) + b_s,  m_OI(s) = f_s [+] g_s,  b_(s-1) = g_s [+] m_IO(s)
// where [+] is the min-sum box-plus, y(s) the channel value of parity bit p_s and b_s the
// message about p_s coming from the right. The processor works window by window: the forward
// pass of a window stores (f_s, m_IO(s), y(s)) in a window buffer of WIN words, the backward
// pass reads them back in reverse order. The running forward metric f carries over from one
// window to the next; the backward metric is loaded at the start of each window's backward
// pass (the value saved at that window boundary in the previous iteration, or zero).
// The structure (forward SPC -> FBA processor with its buffer -> backward SPC) follows the
// document; the window buffer layout and the metric equations written out here are this
// design's reading of it.
//
// Timing: fwd_en with its inputs is absorbed at the clock edge. For the backward pass, the
// buffer is read with bwd_re/bwd_raddr one cycle before bwd_en; m_oi is combinational during
// bwd_en and the backward metric advances at the clock edge.
module fba_processor
  import ldpc_pkg::*;
#(
  parameter int WIN = 3,                          // trellis sections per window
  localparam int AW = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // forward pass
  input  logic          fwd_init,   // start of an iteration: f = +max
  input  logic          fwd_en,
  input  logic [AW-1:0] fwd_addr,   // position in the window
  input  msg_t          m_io,
  input  msg_t          y,
  // backward pass
  input  logic          bwd_load,   // start of a window's backward pass
  input  msg_t          beta_init,
  input  logic          bwd_re,
  input  logic [AW-1:0] bwd_raddr,
  input  logic          bwd_en,
  output msg_t          m_oi,
  output msg_t          beta        // current backward metric b
);

  typedef struct packed {
    msg_t f;
    msg_t mio;
    msg_t y;
  } fba_word_t;

  msg_t      f_q;
  fba_word_t wr_word, rd_word;
  msg_t      g;

  assign wr_word = '{f: f_q, mio: m_io, y: y};

  msg_ram #(.WIDTH($bits(fba_word_t)), .DEPTH(WIN)) u_buf (
    .clk, .we(fwd_en), .wr_addr(fwd_addr), .wr_data(wr_word),
    .re(bwd_re), .rd_addr(bwd_raddr), .rd_data(rd_word)
  );

  assign g    = sat_msg(int'(rd_word.y) + int'(beta));
  assign m_oi = boxplus(rd_word.f, g);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q  <= msg_t'(MSG_MAX);
      beta <= '0;
    end else begin
      if (fwd_init)
        f_q <= msg_t'(MSG_MAX);
      else if (fwd_en)
        f_q <= sat_msg(int'(boxplus(f_q, m_io)) + int'(y));
      if (bwd_load)
        beta <= beta_init;
      else if (bwd_en)
        beta <= boxplus(g, rd_word.mio);
    end
  end

endmodule
