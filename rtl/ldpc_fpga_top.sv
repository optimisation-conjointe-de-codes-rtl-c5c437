// ldpc_fpga_top -- QC-IRA LDPC coder/decoder: PRBS source, accumulator encoder and P Turbo
// Layered BP decoding processors.
//
// Transmit side: on src_start the PRBS-20 source fills a K-bit information word (one bit per
// clock, K cycles), the encoder then computes the M parity bits (M cycles) and tx_valid pulses
// with tx_info/tx_parity, the codeword to be sent over the channel. The channel itself
// (modulation and noise) lies outside this design.
// Receive side: channel values (4-bit LLRs, positive = bit 0) arrive on rx_valid/rx_llr/rx_ready
// in codeword order: K systematic values (bit index j*Z+r) then M parity values in accumulator
// order. Whole frames are handed to the P decoding processors in turn (frame f goes to processor
// f mod P); each has its own double input memory, so a frame can be loaded while the previous
// one is decoded. Processor p reports its hard decisions on dec_valid[p]/dec_pos[p]/dec_bits[p]
// (Z words of KB bits, bit j*Z+dec_pos in dec_bits[p][j]) and pulses dec_done[p] with its last
// word. PIPE selects the processor: 1 gives the pipelined schedule (tlbp_pipe_core, the backward
// pass of a window overlapping the forward pass of the next, with dec_stall[p] pulsing when two
// consecutive windows share a variable and the overlap is held back); 0 gives the schedule
// without pipeline (tlbp_core, dec_stall tied low). Decoding time per frame and processor is
// (Z+1) + ITER*NWIN*2*(WIN+1) + (Z+1) cycles without pipeline and
// (Z+1) + (ITER*NWIN+1+stalls)*(WIN+1) + (Z+1) with it (NWIN = M*KB/J0/WIN windows).
// Two processors with their own buffers, 4-bit channel values, a rate-1/2, 768-bit frame with
// 10 iterations and the choice between the two schedules are the document's FPGA
// configuration. The pipelined schedule is the default because it is the faster one. Handing
// out whole frames in turn is this design's reading of how the two processors share the work.
module ldpc_fpga_top
  import ldpc_pkg::*;
#(
  parameter int Z    = 128,
  parameter int MB   = 3,
  parameter int KB   = 3,
  parameter int J0   = 3,
  parameter int WIN  = MB * (KB / J0),
  parameter int ITER = 10,
  parameter int P    = 2,
  parameter bit PIPE = 1'b1,
  localparam int K   = KB * Z,
  localparam int M   = MB * Z,
  localparam int N   = K + M,
  localparam int ZW  = $clog2(Z),
  localparam int NW  = $clog2(N),
  localparam int KW  = $clog2(K),
  localparam int PW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // transmit side
  input  logic          src_start,
  output logic          src_busy,
  output logic          tx_valid,
  output logic [K-1:0]  tx_info,
  output logic [M-1:0]  tx_parity,
  // receive side
  input  logic          rx_valid,
  input  llr_t          rx_llr,
  output logic          rx_ready,
  output logic          dec_valid [P],
  output logic [ZW-1:0] dec_pos   [P],
  output logic [KB-1:0] dec_bits  [P],
  output logic          dec_done  [P],
  output logic          dec_busy  [P],
  output logic          dec_stall [P]
);

  // ---------------------------------------------------------------- source and encoder
  logic          collecting, prbs_bit, enc_busy;
  logic [NW-1:0] src_cnt;

  prbs20 u_prbs (.clk, .rst_n, .en(collecting), .bit_out(prbs_bit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      collecting <= 1'b0;
      src_cnt    <= '0;
      tx_info    <= '0;
    end else if (collecting) begin
      tx_info[KW'(src_cnt)] <= prbs_bit;
      if (src_cnt == NW'(K - 1)) collecting <= 1'b0;
      src_cnt <= src_cnt + 1'b1;
    end else if (src_start && !enc_busy) begin
      collecting <= 1'b1;
      src_cnt    <= '0;
    end
  end

  logic collect_end;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) collect_end <= 1'b0;
    else        collect_end <= collecting && src_cnt == NW'(K - 1);

  qc_ira_encoder #(.Z(Z), .MB(MB), .KB(KB)) u_enc (
    .clk, .rst_n, .start(collect_end), .info(tx_info), .busy(enc_busy),
    .done(tx_valid), .parity(tx_parity)
  );

  assign src_busy = collecting || collect_end || enc_busy;

  // ---------------------------------------------------------------- frame distribution
  logic [PW-1:0] sel;
  logic [NW-1:0] rx_cnt;
  logic          core_ready [P];

  assign rx_ready = core_ready[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel    <= '0;
      rx_cnt <= '0;
    end else if (rx_valid && rx_ready) begin
      if (rx_cnt == NW'(N - 1)) begin
        rx_cnt <= '0;
        sel    <= (sel == PW'(P - 1)) ? '0 : sel + 1'b1;
      end else begin
        rx_cnt <= rx_cnt + 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- decoding processors
  for (genvar p = 0; p < P; p++) begin : g_core
    if (PIPE) begin : g_pipe
      tlbp_pipe_core #(.Z(Z), .MB(MB), .KB(KB), .J0(J0), .WIN(WIN), .ITER(ITER)) u_core (
        .clk, .rst_n,
        .in_valid(rx_valid && sel == PW'(p)), .in_llr(rx_llr), .in_ready(core_ready[p]),
        .out_valid(dec_valid[p]), .out_pos(dec_pos[p]), .out_bits(dec_bits[p]),
        .frame_done(dec_done[p]), .busy(dec_busy[p]), .stall(dec_stall[p])
      );
    end else begin : g_serial
      tlbp_core #(.Z(Z), .MB(MB), .KB(KB), .J0(J0), .WIN(WIN), .ITER(ITER)) u_core (
        .clk, .rst_n,
        .in_valid(rx_valid && sel == PW'(p)), .in_llr(rx_llr), .in_ready(core_ready[p]),
        .out_valid(dec_valid[p]), .out_pos(dec_pos[p]), .out_bits(dec_bits[p]),
        .frame_done(dec_done[p]), .busy(dec_busy[p])
      );
      assign dec_stall[p] = 1'b0;
    end
  end

endmodule
