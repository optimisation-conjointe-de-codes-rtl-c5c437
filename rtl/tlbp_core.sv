// tlbp_core -- one Turbo Layered BP (TLBP) decoding processor for QC-IRA LDPC codes.
//
// Code: H = [Hs Hp]; Hs is MB x KB circulants of size Z (shifts from ldpc_pkg::delta), Hp is
// the dual-diagonal accumulator. Checks are numbered in accumulator order c = l*MB + i
// (l: row inside a circulant, i: block row), which is the order in which the block form of Hp
// (I_0 on the block diagonal and below it, the one-position shift I'_1 in the corner) is a
// single bit-level chain. Each check is split into S = KB/J0 trellis sections of J0 systematic
// edges; the extra parity bits between the sections of one check are not transmitted (channel
// value 0). With J0 = KB every check is a single section.
//
// Decoding (the TLBP schedule): the trellis is cut into windows of WIN sections. For each window
//   forward:  the forward SPC reads A_v from the memory banks and m_cv from the edge memory,
//             forms m_vc and m_IO; the FBA processor advances its forward metric and stores it;
//             m_vc goes to the m_vc buffer.
//   backward: the FBA processor returns m_OI for each section in reverse order; the backward SPC
//             computes the new m_cv, writes them to the edge memory and updates A_v.
// Because a window only starts after the previous one has updated A_v, the decoder is layered
// at window granularity. The backward metric at a window's right edge comes from the previous
// iteration (boundary memory); the forward metric runs on across windows.
//
// Memories: KB a-posteriori banks of Z words (one per block column, so the J0 edges of a
// section always hit J0 different banks and never collide); edge memory of T words of J0
// messages; m_vc buffer and FBA buffer of WIN words each; boundary memory of T/WIN metrics;
// double input memory. The block diagram follows the document; widths, window length and the
// split into sections are this design's choices.
//
// Interface: channel values stream in on in_valid/in_llr/in_ready (K systematic values, block
// column after block column, then M parity values in accumulator order). After ITER iterations
// the hard decisions come out as Z words of KB bits: out_bits[j] at out_pos is bit j*Z+out_pos.
// Timing per frame: 1 + (Z+1) + ITER*(T/WIN)*2*(WIN+1) + (Z+1) cycles from frame_ready to the
// last output word (frame_done). busy is high from INIT to OUT.
module tlbp_core
  import ldpc_pkg::*;
#(
  parameter int Z    = 128,  // circulant size
  parameter int MB   = 3,    // block rows of Hs
  parameter int KB   = 3,    // block columns of Hs
  parameter int J0   = 3,    // systematic edges per trellis section (must divide KB)
  parameter int WIN  = MB * (KB / J0), // trellis sections per window (must divide T)
  parameter int ITER = 10,   // decoding iterations
  localparam int S   = KB / J0,
  localparam int M   = MB * Z,
  localparam int T   = M * S,
  localparam int NWIN = T / WIN,
  localparam int ZW  = $clog2(Z),
  localparam int MW  = $clog2(M),
  localparam int TW  = $clog2(T),
  localparam int WA  = (WIN > 1) ? $clog2(WIN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  llr_t          in_llr,
  output logic          in_ready,
  output logic          out_valid,
  output logic [ZW-1:0] out_pos,
  output logic [KB-1:0] out_bits,
  output logic          frame_done,
  output logic          busy
);

  // ---------------------------------------------------------------- control
  localparam int CW = $clog2(((WIN > Z) ? WIN : Z) + 1);
  localparam int WW = (NWIN > 1) ? $clog2(NWIN) : 1;

  dec_state_t    state;
  logic [CW-1:0] cnt;
  logic [WW-1:0] win;
  logic          first_iter, release_frame, frame_ready;

  tlbp_controller #(.Z(Z), .T(T), .WIN(WIN), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .frame_ready, .state, .cnt, .win, .first_iter,
    .release_frame, .frame_done
  );

  assign busy = (state != ST_IDLE);

  // ---------------------------------------------------------------- issue stage
  logic          iss;            // a section is issued this cycle
  logic [TW-1:0] iss_s;          // its index
  logic [WA-1:0] iss_k;          // its position in the window
  logic [ZW-1:0] iss_pos [J0];   // row of each lane's variable in its block column
  int            iss_t;          // section inside its check
  int            iss_c;          // check (accumulator order)

  always_comb begin
    int i, l;
    iss   = (state == ST_FWD || state == ST_BWD) && (cnt < CW'(WIN));
    iss_k = (state == ST_BWD) ? WA'(WIN - 1 - int'(cnt)) : WA'(cnt);
    iss_s = TW'(int'(win) * WIN + int'(iss_k));
    iss_c = int'(iss_s) / S;
    iss_t = int'(iss_s) % S;
    i     = iss_c % MB;
    l     = iss_c / MB;
    for (int q = 0; q < J0; q++)
      iss_pos[q] = ZW'((l + delta(i, iss_t * J0 + q, Z)) % Z);
  end

  // ---------------------------------------------------------------- compute stage registers
  logic          fwd_d, bwd_d, init_d, out_d, ylast_d;
  logic [TW-1:0] s_d;
  logic [WA-1:0] k_d;
  logic [ZW-1:0] pos_d [J0];
  int            t_d;
  logic [ZW-1:0] zpos_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_d   <= 1'b0;
      bwd_d   <= 1'b0;
      init_d  <= 1'b0;
      out_d   <= 1'b0;
      ylast_d <= 1'b0;
      s_d     <= '0;
      k_d     <= '0;
      t_d     <= 0;
      zpos_d  <= '0;
      for (int q = 0; q < J0; q++) pos_d[q] <= '0;
    end else begin
      fwd_d   <= iss && state == ST_FWD;
      bwd_d   <= iss && state == ST_BWD;
      init_d  <= state == ST_INIT && cnt < CW'(Z);
      out_d   <= state == ST_OUT && cnt < CW'(Z);
      ylast_d <= (iss_t == S - 1);
      s_d     <= iss_s;
      k_d     <= iss_k;
      t_d     <= iss_t;
      zpos_d  <= ZW'(cnt);
      pos_d   <= iss_pos;
    end
  end

  // ---------------------------------------------------------------- double input memory
  llr_t sys_llr [KB];
  llr_t par_llr;

  dual_input_mem #(.Z(Z), .MB(MB), .KB(KB)) u_in (
    .clk, .rst_n, .in_valid, .in_llr, .in_ready, .frame_ready, .release_frame,
    .sys_re(state == ST_INIT), .sys_addr(ZW'(cnt)), .sys_data(sys_llr),
    .par_re(iss && state == ST_FWD), .par_addr(MW'(iss_c)), .par_data(par_llr)
  );

  // ---------------------------------------------------------------- a-posteriori memory banks
  app_t          a_rd [KB];
  app_t          a_wr [KB];
  logic          a_we [KB];
  logic          a_re [KB];
  logic [ZW-1:0] a_raddr [KB];
  logic [ZW-1:0] a_waddr [KB];
  app_t          a_new [J0];

  always_comb begin
    for (int j = 0; j < KB; j++) begin
      a_re[j]    = (state == ST_OUT) || iss;
      a_raddr[j] = ZW'(cnt);
      a_we[j]    = init_d;
      a_waddr[j] = zpos_d;
      a_wr[j]    = app_t'(sys_llr[j]);
    end
    if (state != ST_OUT)
      for (int q = 0; q < J0; q++)
        a_raddr[iss_t * J0 + q] = iss_pos[q];
    if (bwd_d)
      for (int q = 0; q < J0; q++) begin
        a_we[t_d * J0 + q]    = 1'b1;
        a_waddr[t_d * J0 + q] = pos_d[q];
        a_wr[t_d * J0 + q]    = a_new[q];
      end
  end

  for (genvar j = 0; j < KB; j++) begin : g_bank
    msg_ram #(.WIDTH(APP_W), .DEPTH(Z)) u_bank (
      .clk, .we(a_we[j]), .wr_addr(a_waddr[j]), .wr_data(a_wr[j]),
      .re(a_re[j]), .rd_addr(a_raddr[j]), .rd_data(a_rd[j])
    );
  end

  // lanes of the section being computed
  app_t a_lane [J0];
  always_comb
    for (int q = 0; q < J0; q++) a_lane[q] = a_rd[t_d * J0 + q];

  // ---------------------------------------------------------------- edge (m_cv) memory
  msg_t                 m_cv_old [J0];
  msg_t                 m_cv_new [J0];
  logic [J0*MSG_W-1:0]  edge_rd, edge_wr;

  msg_ram #(.WIDTH(J0 * MSG_W), .DEPTH(T)) u_edge (
    .clk, .we(bwd_d), .wr_addr(s_d), .wr_data(edge_wr),
    .re(iss), .rd_addr(iss_s), .rd_data(edge_rd)
  );

  always_comb
    for (int q = 0; q < J0; q++) begin
      m_cv_old[q] = first_iter ? msg_t'(0) : msg_t'(edge_rd[q*MSG_W +: MSG_W]);
      edge_wr[q*MSG_W +: MSG_W] = m_cv_new[q];
    end

  // ---------------------------------------------------------------- forward SPC
  msg_t m_vc_f [J0];
  msg_t m_io;
  msg_t y_sec;

  fwd_spc #(.J0(J0)) u_fwd (.a_v(a_lane), .m_cv(m_cv_old), .m_vc(m_vc_f), .m_io);

  assign y_sec = ylast_d ? msg_t'(par_llr) : msg_t'(0);

  // ---------------------------------------------------------------- m_vc buffer
  logic [J0*MSG_W-1:0] mvc_wr, mvc_rd;
  msg_t                m_vc_b [J0];

  always_comb
    for (int q = 0; q < J0; q++) begin
      mvc_wr[q*MSG_W +: MSG_W] = m_vc_f[q];
      m_vc_b[q] = msg_t'(mvc_rd[q*MSG_W +: MSG_W]);
    end

  msg_ram #(.WIDTH(J0 * MSG_W), .DEPTH(WIN)) u_mvc (
    .clk, .we(fwd_d), .wr_addr(k_d), .wr_data(mvc_wr),
    .re(iss && state == ST_BWD), .rd_addr(iss_k), .rd_data(mvc_rd)
  );

  // ---------------------------------------------------------------- FBA processor
  msg_t m_oi, beta, beta_init;
  msg_t bnd [NWIN];

  assign beta_init = (first_iter || win == WW'(NWIN - 1)) ? msg_t'(0) : bnd[win];

  fba_processor #(.WIN(WIN)) u_fba (
    .clk, .rst_n,
    .fwd_init(state == ST_FWD && cnt == '0 && win == '0),
    .fwd_en(fwd_d), .fwd_addr(k_d), .m_io, .y(y_sec),
    .bwd_load(state == ST_BWD && cnt == '0), .beta_init,
    .bwd_re(iss && state == ST_BWD), .bwd_raddr(iss_k),
    .bwd_en(bwd_d), .m_oi, .beta
  );

  // boundary memory: after window w's backward pass, beta is the message about the last
  // parity bit of window w-1, used by that window in the next iteration
  logic          save_bnd;
  logic [WW-1:0] save_win;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      save_bnd <= 1'b0;
      save_win <= '0;
    end else begin
      save_bnd <= state == ST_BWD && cnt == CW'(WIN) && win != '0;
      save_win <= win;
    end
  end
  always_ff @(posedge clk)
    if (save_bnd) bnd[save_win - 1'b1] <= beta;

  // ---------------------------------------------------------------- backward SPC
  bwd_spc #(.J0(J0)) u_bwd (
    .m_vc(m_vc_b), .m_oi, .a_cur(a_lane), .m_cv_old, .m_cv_new, .a_new
  );

  // ---------------------------------------------------------------- hard decisions
  assign out_valid = out_d;
  assign out_pos   = zpos_d;
  always_comb
    for (int j = 0; j < KB; j++) out_bits[j] = a_rd[j][APP_W-1];

endmodule
