// dual_clock_gen: the dual clocking scheme, expressed as two clock enables.
//
// The address generator has a fast part (the 2-bit CLFSR) and a slow part
// (the modified CLFSR). Of every four address steps, the first three advance
// only the fast part and the fourth advances only the slow part: the fast
// "clock" is the normal clock with every fourth pulse removed, the slow
// "clock" carries just that fourth pulse. Because the fast part has exactly
// four states, every slow state is combined with all four fast states before
// the slow part moves on.
//
// Rather than deriving two gated clocks, this block keeps everything on one
// clock and produces en_hi / en_lo, the pulses each part would receive. A
// synthesis flow for an ASIC turns these enables into clock-gating cells,
// which keeps the power benefit of the idle register bank; on an FPGA they
// map to flip-flop clock enables.
//
// Interface: step requests one address step in the current cycle; exactly one
// of en_hi / en_lo is then high, combinationally. A 2-bit phase counter
// advances on each step; load clears it so that the three fast steps come
// first after a new seed. Asynchronous active-low reset.
module dual_clock_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic load,
  output logic en_hi,
  output logic en_lo
);

  logic [1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (load) phase <= '0;
    else if (step) phase <= phase + 2'd1;
  end

  assign en_lo = step & ~load & (phase == 2'd3);
  assign en_hi = step & ~load & (phase != 2'd3);

endmodule
