// mbist_addr_gen: n-bit low-switching MBIST address generator.
//
// The address is the concatenation {slow, fast}: the upper N-2 bits come from
// a modified complete LFSR (mod_clfsr) and the lower 2 bits from a 2-bit
// complete LFSR (clfsr2). The dual clocking scheme (dual_clock_gen) gives
// three of every four steps to the 2-bit part and the fourth to the upper
// part. The 2-bit part moves one address bit per step, so only one step in
// four can change more than one bit; this is what lowers the switching
// activity on the address bus compared with a plain n-bit LFSR, where every
// step shifts all bits. Both parts are complete LFSRs (periods 2^(N-2) and 4)
// so the address visits all 2^N values once in 2^N steps and then repeats.
//
// Interface: step advances the address by one (the new address is visible
// after the clock edge); load writes seed into both parts and restarts the
// phase of the step split; reset clears everything to address 0. addr[N-1] is
// stage 1 of the modified CLFSR, addr[1:0] is {Q1, Q2} of the 2-bit CLFSR.
// Requires 4 <= N <= 32 (polynomial table covers degrees 2..30).
//
// The split of the address, the two complete LFSRs and the three-fast /
// one-slow step pattern follow the published generator; expressing the two
// clocks as enables of one clock and the seed load port are this design's
// choices.
module mbist_addr_gen #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] addr
);

  logic en_hi, en_lo;

  dual_clock_gen u_clk (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .load (load),
    .en_hi(en_hi),
    .en_lo(en_lo)
  );

  mod_clfsr #(.M(N-2)) u_slow (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en_lo),
    .load (load),
    .seed (seed[N-1:2]),
    .q    (addr[N-1:2])
  );

  clfsr2 u_fast (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en_hi),
    .load (load),
    .seed (seed[1:0]),
    .q    (addr[1:0])
  );

endmodule
