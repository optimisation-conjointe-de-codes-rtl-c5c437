// qc_ira_encoder -- linear-time encoder of the QC-IRA LDPC code.
//
// With H = [Hs Hp] and Hp dual-diagonal, the parity bits follow from Hp p = Hs c by a running
// XOR (an accumulator): p_c = p_(c-1) xor (row c of Hs times c), with p_(-1) = 0. Checks are
// taken in accumulator order c = l*MB + i (l: row inside a circulant, i: block row); row l of
// circulant I_delta(i,j) selects information bit j*Z + ((l + delta(i,j)) mod Z). That encoding
// by accumulation is the document's; the serial one-check-per-cycle schedule is this design's
// choice.
//
// Interface: start (one cycle, while idle) latches info[K-1:0]; the encoder then produces one
// parity bit per cycle and pulses done in the cycle after the last one, when parity[M-1:0]
// (index = accumulator order) is complete. Latency: M cycles from start to done.
module qc_ira_encoder
  import ldpc_pkg::*;
#(
  parameter int Z  = 128,
  parameter int MB = 3,
  parameter int KB = 3,
  localparam int K  = KB * Z,
  localparam int M  = MB * Z,
  localparam int ZW = $clog2(Z),
  localparam int IW = (MB > 1) ? $clog2(MB) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] info,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] parity
);

  logic [K-1:0]  info_q;
  logic [IW-1:0] i_q;       // block row of the current check
  logic [ZW-1:0] l_q;       // row inside the circulant
  logic          acc;       // p_(c-1)
  logic          sum;       // row c of Hs times the information

  always_comb begin
    sum = 1'b0;
    for (int j = 0; j < KB; j++)
      sum ^= info_q[j * Z + ((int'(l_q) + delta(int'(i_q), j, Z)) % Z)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info_q <= '0;
      i_q    <= '0;
      l_q    <= '0;
      acc    <= 1'b0;
      busy   <= 1'b0;
      done   <= 1'b0;
      parity <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        info_q <= info;
        i_q    <= '0;
        l_q    <= '0;
        acc    <= 1'b0;
        busy   <= 1'b1;
      end else if (busy) begin
        parity[int'(l_q) * MB + int'(i_q)] <= acc ^ sum;
        acc <= acc ^ sum;
        if (i_q == IW'(MB - 1)) begin
          i_q <= '0;
          if (l_q == ZW'(Z - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            l_q <= l_q + 1'b1;
          end
        end else begin
          i_q <= i_q + 1'b1;
        end
      end
    end
  end

endmodule
