// dual_input_mem -- double (ping-pong) input memory of one decoding processor.
//
// Channel values of a frame arrive one per clock (valid/ready handshake) in codeword order:
// the K = KB*Z systematic values block column by block column, then the M = MB*Z parity values
// in accumulator order. They are written into one of two halves while the processor decodes
// the frame held in the other half, so that loading overlaps decoding; the document names
// these double input memories as a way to keep the processor busy. The systematic part is
// split into KB banks, one per block column, so that the processor can read a whole column
// position (one value per bank) in one cycle; the parity part is one memory.
//
// Write side: in_ready is high while the half being filled is free. When the last value of a
// frame is written that half becomes full and filling moves to the other half.
// Read side: frame_ready is high while the half being read holds a frame; release (one cycle)
// frees it and moves reading to the other half. Reads are synchronous (data one clock later).
module dual_input_mem
  import ldpc_pkg::*;
#(
  parameter int Z  = 128,
  parameter int MB = 3,
  parameter int KB = 3,
  localparam int M   = MB * Z,
  localparam int ZW  = $clog2(Z),
  localparam int MW  = $clog2(M),
  localparam int JW  = (KB > 1) ? $clog2(KB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  llr_t          in_llr,
  output logic          in_ready,
  output logic          frame_ready,
  input  logic          release_frame,
  input  logic          sys_re,
  input  logic [ZW-1:0] sys_addr,
  output llr_t          sys_data [KB],
  input  logic          par_re,
  input  logic [MW-1:0] par_addr,
  output llr_t          par_data
);

  logic [1:0]    full;
  logic          wr_sel, rd_sel;
  logic          in_sys;            // still writing the systematic part
  logic [JW-1:0] wr_j;
  logic [ZW-1:0] wr_pos;
  logic [MW-1:0] wr_c;
  logic          wr_fire;

  assign in_ready    = !full[wr_sel];
  assign frame_ready = full[rd_sel];
  assign wr_fire     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full   <= '0;
      wr_sel <= 1'b0;
      rd_sel <= 1'b0;
      in_sys <= 1'b1;
      wr_j   <= '0;
      wr_pos <= '0;
      wr_c   <= '0;
    end else begin
      if (wr_fire) begin
        if (in_sys) begin
          if (wr_pos == ZW'(Z - 1)) begin
            wr_pos <= '0;
            if (wr_j == JW'(KB - 1)) begin
              wr_j   <= '0;
              in_sys <= 1'b0;
            end else begin
              wr_j <= wr_j + 1'b1;
            end
          end else begin
            wr_pos <= wr_pos + 1'b1;
          end
        end else if (wr_c == MW'(M - 1)) begin
          wr_c   <= '0;
          in_sys <= 1'b1;
          wr_sel <= !wr_sel;
        end else begin
          wr_c <= wr_c + 1'b1;
        end
      end
      // a half becomes full on its last write and free on release
      for (int b = 0; b < 2; b++) begin
        if (wr_fire && !in_sys && wr_c == MW'(M - 1) && wr_sel == b[0])
          full[b] <= 1'b1;
        else if (release_frame && rd_sel == b[0])
          full[b] <= 1'b0;
      end
      if (release_frame) rd_sel <= !rd_sel;
    end
  end

  for (genvar j = 0; j < KB; j++) begin : g_sys
    msg_ram #(.WIDTH(LLR_W), .DEPTH(2 << ZW)) u_sys (
      .clk,
      .we(wr_fire && in_sys && wr_j == JW'(j)),
      .wr_addr({wr_sel, wr_pos}),
      .wr_data(in_llr),
      .re(sys_re),
      .rd_addr({rd_sel, sys_addr}),
      .rd_data(sys_data[j])
    );
  end

  msg_ram #(.WIDTH(LLR_W), .DEPTH(2 << MW)) u_par (
    .clk,
    .we(wr_fire && !in_sys),
    .wr_addr({wr_sel, wr_c}),
    .wr_data(in_llr),
    .re(par_re),
    .rd_addr({rd_sel, par_addr}),
    .rd_data(par_data)
  );

endmodule
