// rfa_cell: "reconfigured" full adder cell of the CLFSR feedback network.
//
// A full adder whose carry-out is not used: only the sum a ^ b ^ cin leaves
// the cell. In the feedback chain the cin of each cell is driven by the sum of
// the cell before it, so a chain of these cells forms a parity tree of all its
// inputs. The truth table is the standard full-adder sum column. Leaving out
// the carry-out port (rather than leaving it unconnected) is this design's
// choice; it has no effect on function.
//
// Purely combinational, no clock.
module rfa_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum
);

  always_comb sum = a ^ b ^ cin;

endmodule
