// Reseedable LFSR with a phase shifter: expands one seed into OUTS parallel
// bit streams, one per scan chain.
//
// A seed is written into the LEN stages in one cycle (load). Each cycle with
// advance high the register shifts up by one stage and stage 0 takes the XOR
// of the tapped stages (Fibonacci form, taps from lfsr_taps()). Output c is
// combinational: the XOR of five stages ps_tap(c,0..4). Because everything is
// linear over GF(2), every output bit of every cycle is a fixed XOR of seed
// bits, which is what lets an offline solver compute a seed that reproduces
// the specified bits of a test cube.
//
// Expanding seeds with an LFSR is the published scheme's; the Fibonacci form, the
// parallel seed load and the five-tap phase shifter are this design's.
// Timing: out reflects the current state; load has priority over advance.
module reseed_lfsr
  import lp_reseed_pkg::*;
#(
  parameter int unsigned    LEN  = LFSR_LEN_D,
  parameter int unsigned    OUTS = NUM_CHAINS_D,
  parameter logic [LEN-1:0] TAPS = LEN'(lfsr_taps(LEN))
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,     // write seed into the register
  input  logic [LEN-1:0]  seed,
  input  logic            advance,  // step the LFSR by one cycle
  output logic [OUTS-1:0] out,      // one bit per scan chain
  output logic [LEN-1:0]  state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= '0;
    else if (load)    state <= seed;
    else if (advance) state <= {state[LEN-2:0], feedback};
  end

  always_comb begin
    for (int unsigned c = 0; c < OUTS; c++) begin
      out[c] = 1'b0;
      for (int unsigned k = 0; k < PS_TAPS; k++) out[c] ^= state[ps_tap(c, k, LEN)];
    end
  end

endmodule
