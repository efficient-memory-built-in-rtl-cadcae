// mbist_controller: test controller of the MBIST, running the Zero-One test.
//
// The Zero-One test writes 0 to every word, reads every word expecting 0,
// writes 1 to every word and reads every word expecting 1. The order of
// addresses within a pass does not matter, which is what allows a
// low-switching LFSR-based address generator to replace a binary counter.
//
// On start the controller loads the seed into the address generator and
// clears the signature analyzer, then runs four passes (W0, R0, W1, R1). In
// each pass it issues one memory access per cycle at the generator's current
// address and steps the generator. Because the generator visits all 2^N
// addresses in exactly 2^N steps and then returns to its seed, a pass ends
// when the address is back at the seed: that cycle is an idle bubble in
// which the controller moves to the next pass (no address counter needed).
// After R1 it waits READ_LAT cycles for the last read to be compared, then
// raises done and reports pass = no mismatch seen by the signature analyzer.
// A test takes 4 * (2^N + 1) + READ_LAT + 1 cycles from start to done.
//
// Interface: start is a one-cycle request, honoured in IDLE or DONE. mem_en /
// mem_we qualify the access at addr; bg is the data background (0 or 1) of
// the pass; rd_issue marks a read. Asynchronous active-low reset to IDLE.
// The flow follows the generic controller / generator / analyzer split of a
// memory BIST; the pass sequencing, the bubble and the status outputs are
// this design's own choices.
module mbist_controller #(
  parameter int unsigned N        = 10,
  parameter int unsigned READ_LAT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      seed,
  input  logic [N-1:0]      addr,
  input  logic              fail,
  output logic              ag_step,
  output logic              ag_load,
  output logic              sa_clear,
  output logic              mem_en,
  output logic              mem_we,
  output logic              bg,
  output logic              rd_issue,
  output mbist_pkg::phase_e phase,
  output logic              done,
  output logic              pass
);

  import mbist_pkg::*;

  localparam int unsigned DW = (READ_LAT < 2) ? 1 : $clog2(READ_LAT + 1);

  phase_e          phase_q;
  logic            started;
  logic [N-1:0]    seed_q;
  logic [DW-1:0]   drain_cnt;
  logic            pass_q;
  logic            in_pass;
  logic            wrapped;

  assign in_pass = (phase_q == PH_W0) || (phase_q == PH_R0) ||
                   (phase_q == PH_W1) || (phase_q == PH_R1);
  assign wrapped = started && (addr == seed_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= PH_IDLE;
      started   <= 1'b0;
      seed_q    <= '0;
      drain_cnt <= '0;
      pass_q    <= 1'b0;
    end else begin
      case (phase_q)
        PH_IDLE, PH_DONE: begin
          if (start) begin
            phase_q <= PH_W0;
            seed_q  <= seed;
            started <= 1'b0;
            pass_q  <= 1'b0;
          end
        end
        PH_W0, PH_R0, PH_W1, PH_R1: begin
          if (wrapped) begin
            started <= 1'b0;
            case (phase_q)
              PH_W0:   phase_q <= PH_R0;
              PH_R0:   phase_q <= PH_W1;
              PH_W1:   phase_q <= PH_R1;
              default: begin
                phase_q   <= PH_DRAIN;
                drain_cnt <= '0;
              end
            endcase
          end else begin
            started <= 1'b1;
          end
        end
        PH_DRAIN: begin
          if (drain_cnt == DW'(READ_LAT - 1)) begin
            phase_q <= PH_DONE;
            pass_q  <= ~fail;
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    ag_load  = ((phase_q == PH_IDLE) || (phase_q == PH_DONE)) && start;
    sa_clear = ag_load;
    mem_en   = in_pass && !wrapped;
    mem_we   = mem_en && ((phase_q == PH_W0) || (phase_q == PH_W1));
    rd_issue = mem_en && ((phase_q == PH_R0) || (phase_q == PH_R1));
    bg       = (phase_q == PH_W1) || (phase_q == PH_R1);
    ag_step  = mem_en;
    phase    = phase_q;
    done     = (phase_q == PH_DONE);
    pass     = pass_q;
  end

endmodule
