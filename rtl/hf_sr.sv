// Hold-flag shift register (HF-SR) of one scan chain: B bits, one hold flag
// per block of the chain.
//
// While the controller is in its hold-flag phase (shift_in high) the flag for
// the chain arrives from the LFSR one per cycle; flags enter at the top and
// move down, so after B shifts the first flag received (block 1) sits in bit
// 0, which drives active_flag. During the scan-data phase the register is
// rotated by one position at the end of every block (rotate high), making the
// next block's flag active. After B rotations the flags are back in their
// loaded order, so a test cube whose update flag is 0 reuses them unchanged.
//
// The register, its size B and the shift per block are the published scheme's; the
// circular shift that keeps the flags for reuse is this design's reading of
// "the hold flags could be loaded once and then reused". Reset clears all
// flags (every block loads from the LFSR). shift_in has priority over rotate.
module hf_sr
  import lp_reseed_pkg::*;
#(
  parameter int unsigned B = BLOCKS_D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_in,     // load one new flag
  input  logic         flag_in,      // hold flag from the LFSR
  input  logic         rotate,       // advance to the next block's flag
  output logic         active_flag,  // hold flag of the current block
  output logic [B-1:0] flags
);

  logic [B-1:0] flags_q;

  if (B == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        flags_q <= '0;
      else if (shift_in) flags_q <= flag_in;
    end
  end else begin : g_many
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        flags_q <= '0;
      else if (shift_in) flags_q <= {flag_in, flags_q[B-1:1]};
      else if (rotate)   flags_q <= {flags_q[0], flags_q[B-1:1]};
    end
  end

  assign active_flag = flags_q[0];
  assign flags       = flags_q;

endmodule
