// clfsr2: 2-bit complete LFSR, the fast half of the address generator.
//
// Two D flip-flops FF1 -> FF2 with external feedback through one full adder
// cell (rfa_cell, sum only). The adder inputs are Q1, Q2 and the inverted Q1;
// its sum, Q1 ^ Q2 ^ ~Q1 = ~Q2, is loaded into FF1 while FF1 shifts into FF2.
// The state (Q1 Q2) therefore walks 11 -> 01 -> 00 -> 10 -> 11, changing one
// bit per step: a 2-bit Gray cycle through all four values. The inverter is
// the degree-2 case of the NOR zero detector of mod_clfsr.
//
// Interface: q[1] = Q1 (address bit 1), q[0] = Q2 (address bit 0). en
// advances one step, load (priority) writes seed, asynchronous active-low
// reset to 00.
module clfsr2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       load,
  input  logic [1:0] seed,
  output logic [1:0] q
);

  logic not_q1;
  logic fa_sum;

  assign not_q1 = ~q[1];

  rfa_cell u_fa (
    .a  (q[1]),
    .b  (q[0]),
    .cin(not_q1),
    .sum(fa_sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (en)   q <= {fa_sum, q[1]};
  end

endmodule
