// clfsr_feedback: feedback network of the modified complete LFSR.
//
// Computes D1, the next value of the first flip-flop, as the modulo-2 sum of
//   - the zero-detect term (NOR of the first M-1 flip-flops), which sits in
//     the b_0 position of the polynomial,
//   - each flip-flop output Q_i, 1 <= i <= M-1, whose tap b_i is 1,
//   - the last flip-flop output Q_M (b_M is always 1).
// The sum is built by a chain of rfa_cell full adders used for their sum
// only: Q_M enters the carry input of the first cell, every cell takes two of
// the gated inputs, and each sum drives the carry input of the next cell; the
// last sum is D1. As in the published chain, the first cell takes the highest
// numbered taps and the last cell takes the NOR term and Q_1. Inputs whose tap is 0 are tied to 0 (the AND gate with b_i
// of the schematic becomes a constant), which synthesis removes.
//
// Interface: q[M-1:0] holds the register with q[M-1] = Q_1 (first stage) and
// q[0] = Q_M (last stage). zero_term is the NOR output. Combinational.
module clfsr_feedback #(
  parameter int unsigned M = 8,
  parameter mbist_pkg::taps_t TAPS = mbist_pkg::clfsr_taps(M)
) (
  input  logic [M-1:0] q,
  input  logic         zero_term,
  output logic         d1
);

  // Gated inputs of the chain: index 0 is the NOR term, index i (1..M-1) is
  // b_i & Q_i. An odd count is padded with a 0.
  localparam int unsigned NIN   = M;
  localparam int unsigned NCELL = (NIN + 1) / 2;

  logic [2*NCELL-1:0] gated;
  logic [NCELL:0]     chain;

  always_comb begin
    gated    = '0;
    gated[0] = zero_term;
    for (int unsigned i = 1; i < M; i++)
      gated[i] = TAPS[i] & q[M-i];
  end

  assign chain[0] = q[0];  // Q_M into the carry input of the first cell

  for (genvar c = 0; c < NCELL; c++) begin : g_cell
    rfa_cell u_fa (
      .a  (gated[2*NCELL-2-2*c]),
      .b  (gated[2*NCELL-1-2*c]),
      .cin(chain[c]),
      .sum(chain[c+1])
    );
  end

  assign d1 = chain[NCELL];

endmodule
