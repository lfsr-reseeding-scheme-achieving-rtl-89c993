// Low-power LFSR-reseeding test decompressor with its scan chains.
//
// The decompressor (lp_decompressor) turns one seed per test cube into N
// scan vectors of L bits, holding the chain input constant in every block
// whose hold flag is 1; the N scan chains (scan_chain) shift those vectors
// in and, on capture, load the response of the circuit under test. The
// circuit under test itself is outside: its inputs are scan_vector (all
// scan cells), its outputs come back as response. Responses leave through
// scan_out while the next vector shifts in.
//
// Seeds: valid/ready handshake, one seed per cube. cube_done pulses in the
// capture cycle, when scan_vector holds the complete vector. All defaults are
// those of lp_reseed_pkg (30 chains of 56 cells, 4 blocks per chain, 256-bit
// LFSR).
module lp_reseed_top
  import lp_reseed_pkg::*;
#(
  parameter int unsigned    N    = NUM_CHAINS_D,
  parameter int unsigned    B    = BLOCKS_D,
  parameter int unsigned    L    = CHAIN_LEN_D,
  parameter int unsigned    LEN  = LFSR_LEN_D,
  parameter logic [LEN-1:0] TAPS = LEN'(lfsr_taps(LEN))
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_valid,
  output logic                seed_ready,
  input  logic [LEN-1:0]      seed,
  input  logic [N-1:0][L-1:0] response,     // from the circuit under test
  output logic [N-1:0][L-1:0] scan_vector,  // to the circuit under test
  output logic [N-1:0]        scan_out,     // chain outputs (responses)
  output logic                scan_en,
  output logic                capture,
  output logic                cube_done,
  output logic                update_flag,
  output logic [N-1:0]        hold_active,  // chain input held this cycle
  output logic [N-1:0][B-1:0] hold_flags,   // HF-SR contents per chain
  output ctrl_state_e         state
);

  logic [N-1:0] scan_in, chain_head;

  lp_decompressor #(.N(N), .B(B), .L(L), .LEN(LEN), .TAPS(TAPS)) u_decomp (
    .clk, .rst_n,
    .seed_valid, .seed_ready, .seed,
    .chain_head,
    .scan_in,
    .scan_en,
    .capture,
    .cube_done,
    .update_flag,
    .hold_active,
    .hold_flags,
    .state
  );

  for (genvar c = 0; c < N; c++) begin : g_chain
    scan_chain #(.L(L)) u_chain (
      .clk, .rst_n,
      .scan_en,
      .scan_in      (scan_in[c]),
      .capture,
      .capture_data (response[c]),
      .cells        (scan_vector[c]),
      .head         (chain_head[c]),
      .scan_out     (scan_out[c])
    );
  end

endmodule
