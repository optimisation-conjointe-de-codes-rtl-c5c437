// tlbp_pipe_core -- one Turbo Layered BP (TLBP) decoding processor with the pipelined window
// schedule.
//
// The arithmetic, code structure, message ordering and interface are those of tlbp_core: the
// forward SPC, FBA processor and backward SPC work on trellis sections of J0 systematic edges,
// windows of WIN sections, with the backward metric at window edges kept from the previous
// iteration. The difference is the schedule. Here the backward pass of window w runs in the same
// cycles as the forward pass of window w+1, which roughly halves the decoding time. The
// sequencing is done by tlbp_pipe_controller. Running both passes at once needs:
//   - a second read port on each a-posteriori bank, built as two copies of the bank that always
//     receive the same writes (copy F for the forward reads, copy B for the backward reads and
//     the read-out);
//   - duplicated window buffers (two halves of WIN words each) for the FBA buffer and for the
//     m_vc buffer. The m_vc buffer also keeps the old m_cv that the forward pass read, so the
//     edge memory needs only one read port (forward) and one write port (backward);
//   - a conflict check. The forward pass of w+1 reads A_v before w's updates are all written.
//     That is only allowed when the two windows share no variable. The check compares every
//     (bank, row) of the current forward window with every one of the window after it, and
//     the controller stalls the forward pass for one slot when they meet.
// With the stall rule the hard decisions are bit-identical to those of tlbp_core; only the
// cycle count differs. The pipeline and the duplicated buffers follow the document; the
// bank copies, the conflict comparator and the stall rule are this design's choices.
//
// Interface: as tlbp_core, plus `stall`, which pulses once per stalled slot.
// Timing per frame: from the first busy cycle to frame_done,
// (Z+1) + (ITER*NWIN + 1 + stalls)*(WIN+1) + (Z+1) cycles.
module tlbp_pipe_core
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
  localparam int WA  = (WIN > 1) ? $clog2(WIN) : 1,
  localparam int BA  = $clog2(2 * WIN)
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
  output logic          busy,
  output logic          stall
);

  // ---------------------------------------------------------------- control
  localparam int CW = $clog2(((WIN > Z) ? WIN : Z) + 1);
  localparam int WW = (NWIN > 1) ? $clog2(NWIN) : 1;

  dec_state_t    state;
  logic [CW-1:0] cnt;
  logic [WW-1:0] fwin, bwin;
  logic          fwd_act, bwd_act, f_first, b_first, fbank, bbank;
  logic          release_frame, frame_ready, conflict_q;

  tlbp_pipe_controller #(.Z(Z), .T(T), .WIN(WIN), .ITER(ITER)) u_ctrl (
    .clk, .rst_n, .frame_ready, .conflict(conflict_q), .state, .cnt, .fwd_act, .bwd_act,
    .fwin, .bwin, .f_first, .b_first, .fbank, .bbank, .stall, .release_frame, .frame_done
  );

  assign busy = (state != ST_IDLE);

  // section s of the trellis: section inside its check and row of each lane
  function automatic void section(input int s, output int t, output logic [ZW-1:0] pos [J0]);
    int c, i, l;
    c = s / S;
    t = s % S;
    i = c % MB;
    l = c / MB;
    for (int q = 0; q < J0; q++) pos[q] = ZW'((l + delta(i, t * J0 + q, Z)) % Z);
  endfunction

  // ---------------------------------------------------------------- conflict check
  // Does the window forwarded in this slot share a variable with the window after it?
  logic conflict;
  always_comb begin
    int            t0, t1, wn;
    logic [ZW-1:0] p0 [J0];
    logic [ZW-1:0] p1 [J0];
    conflict = 1'b0;
    wn = (int'(fwin) == NWIN - 1) ? 0 : int'(fwin) + 1;
    for (int k0 = 0; k0 < WIN; k0++) begin
      section(int'(fwin) * WIN + k0, t0, p0);
      for (int k1 = 0; k1 < WIN; k1++) begin
        section(wn * WIN + k1, t1, p1);
        if (t0 == t1)
          for (int q = 0; q < J0; q++)
            if (p0[q] == p1[q]) conflict = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) conflict_q <= 1'b0;
    else        conflict_q <= conflict;

  // ---------------------------------------------------------------- issue stage
  logic          iss_f, iss_b;
  logic [WA-1:0] kf, kb;
  logic [TW-1:0] sf, sb;
  logic [ZW-1:0] posf [J0];
  logic [ZW-1:0] posb [J0];
  logic [MW-1:0] cf;             // check of the forward section (parity address)
  int            tf, tb;

  always_comb begin
    iss_f = fwd_act && (cnt < CW'(WIN));
    iss_b = bwd_act && (cnt < CW'(WIN));
    kf    = WA'(cnt);
    kb    = WA'(WIN - 1 - int'(cnt));
    sf    = TW'(int'(fwin) * WIN + int'(kf));
    sb    = TW'(int'(bwin) * WIN + int'(kb));
    cf    = MW'(int'(sf) / S);
    section(int'(sf), tf, posf);
    section(int'(sb), tb, posb);
  end

  // ---------------------------------------------------------------- compute stage registers
  logic          fwd_d, bwd_d, init_d, out_d, ylast_d, ffirst_d, fbank_d;
  logic [WA-1:0] kf_d;
  logic [TW-1:0] sb_d;
  logic [ZW-1:0] posb_d [J0];
  int            tf_d, tb_d;
  logic [ZW-1:0] zpos_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_d    <= 1'b0;
      bwd_d    <= 1'b0;
      init_d   <= 1'b0;
      out_d    <= 1'b0;
      ylast_d  <= 1'b0;
      ffirst_d <= 1'b0;
      fbank_d  <= 1'b0;
      kf_d     <= '0;
      sb_d     <= '0;
      tf_d     <= 0;
      tb_d     <= 0;
      zpos_d   <= '0;
      for (int q = 0; q < J0; q++) posb_d[q] <= '0;
    end else begin
      fwd_d    <= iss_f;
      bwd_d    <= iss_b;
      init_d   <= state == ST_INIT && cnt < CW'(Z);
      out_d    <= state == ST_OUT && cnt < CW'(Z);
      ylast_d  <= (tf == S - 1);
      ffirst_d <= f_first;
      fbank_d  <= fbank;
      kf_d     <= kf;
      sb_d     <= sb;
      tf_d     <= tf;
      tb_d     <= tb;
      zpos_d   <= ZW'(cnt);
      posb_d   <= posb;
    end
  end

  // ---------------------------------------------------------------- double input memory
  llr_t sys_llr [KB];
  llr_t par_llr;

  dual_input_mem #(.Z(Z), .MB(MB), .KB(KB)) u_in (
    .clk, .rst_n, .in_valid, .in_llr, .in_ready, .frame_ready, .release_frame,
    .sys_re(state == ST_INIT), .sys_addr(ZW'(cnt)), .sys_data(sys_llr),
    .par_re(iss_f), .par_addr(cf), .par_data(par_llr)
  );

  // ---------------------------------------------------------------- a-posteriori banks (2 copies)
  app_t          af_rd [KB];
  app_t          ab_rd [KB];
  app_t          a_wr [KB];
  logic          a_we [KB];
  logic [ZW-1:0] a_waddr [KB];
  logic [ZW-1:0] af_raddr [KB];
  logic [ZW-1:0] ab_raddr [KB];
  app_t          a_new [J0];

  always_comb begin
    for (int j = 0; j < KB; j++) begin
      a_we[j]     = init_d;
      a_waddr[j]  = zpos_d;
      a_wr[j]     = app_t'(sys_llr[j]);
      af_raddr[j] = '0;
      ab_raddr[j] = ZW'(cnt);
    end
    for (int q = 0; q < J0; q++) af_raddr[tf * J0 + q] = posf[q];
    if (state != ST_OUT)
      for (int q = 0; q < J0; q++) ab_raddr[tb * J0 + q] = posb[q];
    if (bwd_d)
      for (int q = 0; q < J0; q++) begin
        a_we[tb_d * J0 + q]    = 1'b1;
        a_waddr[tb_d * J0 + q] = posb_d[q];
        a_wr[tb_d * J0 + q]    = a_new[q];
      end
  end

  for (genvar j = 0; j < KB; j++) begin : g_bank
    msg_ram #(.WIDTH(APP_W), .DEPTH(Z)) u_bank_f (
      .clk, .we(a_we[j]), .wr_addr(a_waddr[j]), .wr_data(a_wr[j]),
      .re(iss_f), .rd_addr(af_raddr[j]), .rd_data(af_rd[j])
    );
    msg_ram #(.WIDTH(APP_W), .DEPTH(Z)) u_bank_b (
      .clk, .we(a_we[j]), .wr_addr(a_waddr[j]), .wr_data(a_wr[j]),
      .re(iss_b || state == ST_OUT), .rd_addr(ab_raddr[j]), .rd_data(ab_rd[j])
    );
  end

  app_t af_lane [J0];
  app_t ab_lane [J0];
  always_comb
    for (int q = 0; q < J0; q++) begin
      af_lane[q] = af_rd[tf_d * J0 + q];
      ab_lane[q] = ab_rd[tb_d * J0 + q];
    end

  // ---------------------------------------------------------------- edge (m_cv) memory
  msg_t                m_cv_f [J0];      // old m_cv read by the forward pass
  msg_t                m_cv_b [J0];      // the same values, back from the m_vc buffer
  msg_t                m_cv_new [J0];
  logic [J0*MSG_W-1:0] edge_rd, edge_wr;

  msg_ram #(.WIDTH(J0 * MSG_W), .DEPTH(T)) u_edge (
    .clk, .we(bwd_d), .wr_addr(sb_d), .wr_data(edge_wr),
    .re(iss_f), .rd_addr(sf), .rd_data(edge_rd)
  );

  always_comb
    for (int q = 0; q < J0; q++) begin
      m_cv_f[q] = ffirst_d ? msg_t'(0) : msg_t'(edge_rd[q*MSG_W +: MSG_W]);
      edge_wr[q*MSG_W +: MSG_W] = m_cv_new[q];
    end

  // ---------------------------------------------------------------- forward SPC
  msg_t m_vc_f [J0];
  msg_t m_io;
  msg_t y_sec;

  fwd_spc #(.J0(J0)) u_fwd (.a_v(af_lane), .m_cv(m_cv_f), .m_vc(m_vc_f), .m_io);

  assign y_sec = ylast_d ? msg_t'(par_llr) : msg_t'(0);

  // ---------------------------------------------------------------- m_vc buffer (two halves)
  logic [2*J0*MSG_W-1:0] mvc_wr, mvc_rd;
  msg_t                  m_vc_b [J0];

  always_comb
    for (int q = 0; q < J0; q++) begin
      mvc_wr[q*MSG_W +: MSG_W]            = m_vc_f[q];
      mvc_wr[(J0+q)*MSG_W +: MSG_W]       = m_cv_f[q];
      m_vc_b[q] = msg_t'(mvc_rd[q*MSG_W +: MSG_W]);
      m_cv_b[q] = msg_t'(mvc_rd[(J0+q)*MSG_W +: MSG_W]);
    end

  logic [BA-1:0] fbuf_addr, bbuf_addr;
  assign fbuf_addr = BA'(int'(fbank_d) * WIN + int'(kf_d));
  assign bbuf_addr = BA'(int'(bbank) * WIN + int'(kb));

  msg_ram #(.WIDTH(2 * J0 * MSG_W), .DEPTH(2 * WIN)) u_mvc (
    .clk, .we(fwd_d), .wr_addr(fbuf_addr), .wr_data(mvc_wr),
    .re(iss_b), .rd_addr(bbuf_addr), .rd_data(mvc_rd)
  );

  // ---------------------------------------------------------------- FBA processor
  msg_t m_oi, beta, beta_init;
  msg_t bnd [NWIN];

  assign beta_init = (b_first || bwin == WW'(NWIN - 1)) ? msg_t'(0) : bnd[bwin];

  fba_processor #(.WIN(2 * WIN)) u_fba (
    .clk, .rst_n,
    .fwd_init(fwd_act && cnt == '0 && fwin == '0),
    .fwd_en(fwd_d), .fwd_addr(fbuf_addr), .m_io, .y(y_sec),
    .bwd_load(bwd_act && cnt == '0), .beta_init,
    .bwd_re(iss_b), .bwd_raddr(bbuf_addr),
    .bwd_en(bwd_d), .m_oi, .beta
  );

  // boundary memory, as in tlbp_core
  logic          save_bnd;
  logic [WW-1:0] save_win;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      save_bnd <= 1'b0;
      save_win <= '0;
    end else begin
      save_bnd <= bwd_act && cnt == CW'(WIN) && bwin != '0;
      save_win <= bwin;
    end
  end
  always_ff @(posedge clk)
    if (save_bnd) bnd[save_win - 1'b1] <= beta;

  // ---------------------------------------------------------------- backward SPC
  bwd_spc #(.J0(J0)) u_bwd (
    .m_vc(m_vc_b), .m_oi, .a_cur(ab_lane), .m_cv_old(m_cv_b), .m_cv_new, .a_new
  );

  // ---------------------------------------------------------------- hard decisions
  assign out_valid = out_d;
  assign out_pos   = zpos_d;
  always_comb
    for (int j = 0; j < KB; j++) out_bits[j] = ab_rd[j][APP_W-1];

endmodule
