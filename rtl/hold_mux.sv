// Hold multiplexer at the input of one scan chain.
//
// When hold is high the chain is fed the bit it received last (its first
// scan cell, held_bit), so the value stays constant through the block and the
// LFSR bit of that cycle is dropped. When hold is low the LFSR bit goes
// straight into the chain. The controller raises hold only when the current
// block's hold flag is 1 during the scan-data phase.
//
// One such 2-to-1 MUX per chain is the published scheme's; taking the held value from
// the chain's first cell rather than from a separate flip-flop follows its
// overhead count (a MUX and an HF-SR per chain, nothing more). Purely
// combinational.
module hold_mux (
  input  logic lfsr_bit,  // bit from the LFSR for this chain
  input  logic held_bit,  // last bit shifted into this chain
  input  logic hold,      // 1: repeat held_bit, 0: take lfsr_bit
  output logic scan_in    // to the scan input of the chain
);

  always_comb begin
    if (hold) scan_in = held_bit;
    else      scan_in = lfsr_bit;
  end

endmodule
