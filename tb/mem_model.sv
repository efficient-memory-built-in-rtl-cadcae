// mem_model: behavioural single-port memory used as the memory under test.
//
// 2^AW words of DW bits, synchronous write, synchronous read with one clock
// of latency (rdata holds the word addressed in the previous enabled read
// cycle). One stuck-at fault can be injected: when flt_en is set, bit flt_bit
// of word flt_addr always holds flt_val, on write and on read. Contents start
// at random values.
module mem_model #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          flt_en,
  input  logic [AW-1:0] flt_addr,
  input  int unsigned   flt_bit,
  input  logic          flt_val
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    foreach (mem[i]) mem[i] = DW'($urandom);
    rdata = '0;
  end

  function automatic logic [DW-1:0] apply_fault(input logic [AW-1:0] a, input logic [DW-1:0] d);
    logic [DW-1:0] r;
    r = d;
    if (flt_en && a == flt_addr) r[flt_bit] = flt_val;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= apply_fault(addr, wdata);
      else    rdata     <= apply_fault(addr, mem[addr]);
    end
  end

endmodule
