// One conventional scan chain of L cells.
//
// With scan_en high the chain shifts by one cell per cycle: scan_in enters
// cell 0 and cell L-1 drives scan_out, so the first bit shifted in ends up in
// cell L-1 after L cycles. With capture high (and scan_en low) every cell
// loads the circuit's response bit in the same position. cell 0 is also
// brought out as head: it is the last bit shifted in, which the hold
// multiplexer repeats for a held block.
//
// The chain itself belongs to the circuit under test; the published scheme only
// relies on its shift behaviour and its first cell. The cells reset to 0.
module scan_chain
  import lp_reseed_pkg::*;
#(
  parameter int unsigned L = CHAIN_LEN_D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic         capture,
  input  logic [L-1:0] capture_data,  // response of the circuit under test
  output logic [L-1:0] cells,         // scan vector applied to the circuit
  output logic         head,          // cell 0, last bit shifted in
  output logic         scan_out       // cell L-1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cells <= '0;
    else if (scan_en) cells <= {cells[L-2:0], scan_in};
    else if (capture) cells <= capture_data;
  end

  assign head     = cells[0];
  assign scan_out = cells[L-1];

endmodule
