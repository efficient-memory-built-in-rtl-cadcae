// mod_clfsr: (n-2)-bit modified complete LFSR, the slow half of the address
// generator.
//
// An external-feedback (Fibonacci) shift register of M D flip-flops. On each
// enabled clock edge the register shifts one place from stage 1 towards
// stage M and stage 1 loads the feedback bit D1 from clfsr_feedback: the
// parity of the tapped stages Q_i (b_i = 1 in the primitive polynomial of
// degree M from mbist_pkg::clfsr_taps) and of a NOR of stages 1..M-1. The NOR
// term turns the 2^M-1 cycle of a plain LFSR into a complete 2^M cycle that
// includes the all-zero state, with no separate zero detector. The NOR covers
// the first M-1 stages: that is the input set for which the sequence is a
// single cycle through all 2^M states (with the last stage included too, the
// all-zero state would never be re-entered).
//
// Interface: q[M-1] is stage 1 (the most significant address bit), q[0] is
// stage M. en advances the register by one step; load (priority over en)
// writes seed. Reset is asynchronous, active low, to all zeros, which is the
// initial seed of the worked 5-bit example.
module mod_clfsr #(
  parameter int unsigned M = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [M-1:0] seed,
  output logic [M-1:0] q
);

  localparam mbist_pkg::taps_t TAPS = mbist_pkg::clfsr_taps(M);

  if (M < mbist_pkg::MIN_DEGREE || M > mbist_pkg::MAX_DEGREE) begin : g_bad_m
    $error("mod_clfsr: M=%0d outside the polynomial table (2..30)", M);
  end

  logic zero_term;
  logic d1;

  // NOR of stages 1..M-1 (q[M-1] down to q[1]).
  assign zero_term = ~|q[M-1:1];

  clfsr_feedback #(.M(M), .TAPS(TAPS)) u_fb (
    .q        (q),
    .zero_term(zero_term),
    .d1       (d1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (en)   q <= {d1, q[M-1:1]};
  end

endmodule
