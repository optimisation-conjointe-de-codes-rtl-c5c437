// prbs20 -- pseudo-random binary source of period 2^20 - 1.
//
// The document's hardware test chain draws its information bits from a "PRBS 20" source; the
// generator polynomial is not given there. This design uses the common x^20 + x^3 + 1
// (as in ITU-T O.151) as a 20-bit Fibonacci LFSR: each enabled clock the register shifts left
// and takes in bit19 xor bit2; the output bit is bit19 before the shift.
// Interface: en advances the sequence by one bit; bit_out is valid in the same cycle as en.
// Reset loads SEED, which must not be zero.
module prbs20 #(
  parameter logic [19:0] SEED = 20'h00001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic bit_out
);

  logic [19:0] lfsr;

  assign bit_out = lfsr[19];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr <= SEED;
    else if (en) lfsr <= {lfsr[18:0], lfsr[19] ^ lfsr[2]};
  end

endmodule
