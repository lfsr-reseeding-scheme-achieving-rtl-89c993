// Low-power reseeding decompressor: one LFSR, the controller, and per scan
// chain one hold-flag shift register (HF-SR) and one 2-to-1 hold MUX.
//
// A seed expands into, per test cube, an update flag (LFSR output 0), then
// B hold flags per chain if the update flag is 1, then L scan bits per
// chain. During the scan phase chain c receives LFSR output c while its
// current block's hold flag is 0; while it is 1 the chain receives its own
// first cell again (chain_head[c]), so the whole block repeats the last bit
// of the previous block and makes no transitions. The HF-SRs rotate once per
// block and keep their flags for the next cube when its update flag is 0.
//
// Interface: seeds arrive with a valid/ready handshake (seed must stay
// stable while seed_valid is high and seed_ready low); scan_in/scan_en drive
// the chains, chain_head returns their first cells; capture asks the chains
// to load the circuit response. Timing of a cube: see reseed_ctrl.
// The structure is the published scheme's; the seed interface is this design's.
module lp_decompressor
  import lp_reseed_pkg::*;
#(
  parameter int unsigned    N    = NUM_CHAINS_D,
  parameter int unsigned    B    = BLOCKS_D,
  parameter int unsigned    L    = CHAIN_LEN_D,
  parameter int unsigned    LEN  = LFSR_LEN_D,
  parameter logic [LEN-1:0] TAPS = LEN'(lfsr_taps(LEN))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_valid,
  output logic               seed_ready,
  input  logic [LEN-1:0]     seed,
  input  logic [N-1:0]       chain_head,   // first cell of every chain
  output logic [N-1:0]       scan_in,      // into every chain
  output logic               scan_en,
  output logic               capture,
  output logic               cube_done,
  output logic               update_flag,  // hold flags reloaded this cube
  output logic [N-1:0]       hold_active,  // current block held, per chain
  output logic [N-1:0][B-1:0] hold_flags,  // HF-SR contents
  output ctrl_state_e        state
);

  logic [N-1:0] lfsr_out;
  logic         lfsr_load, lfsr_advance, hf_shift, hf_rotate;
  logic [N-1:0] active_flag;

  reseed_lfsr #(.LEN(LEN), .OUTS(N), .TAPS(TAPS)) u_lfsr (
    .clk, .rst_n,
    .load    (lfsr_load),
    .seed,
    .advance (lfsr_advance),
    .out     (lfsr_out),
    .state   ()
  );

  reseed_ctrl #(.B(B), .L(L)) u_ctrl (
    .clk, .rst_n,
    .seed_valid,
    .seed_ready,
    .upd_bit      (lfsr_out[0]),
    .lfsr_load,
    .lfsr_advance,
    .hf_shift,
    .hf_rotate,
    .scan_en,
    .capture,
    .update_flag,
    .cube_done,
    .state
  );

  for (genvar c = 0; c < N; c++) begin : g_chain
    hf_sr #(.B(B)) u_hf_sr (
      .clk, .rst_n,
      .shift_in    (hf_shift),
      .flag_in     (lfsr_out[c]),
      .rotate      (hf_rotate),
      .active_flag (active_flag[c]),
      .flags       (hold_flags[c])
    );

    assign hold_active[c] = scan_en && active_flag[c];

    hold_mux u_mux (
      .lfsr_bit (lfsr_out[c]),
      .held_bit (chain_head[c]),
      .hold     (hold_active[c]),
      .scan_in  (scan_in[c])
    );
  end

  // The seed source must hold its seed until it is taken.
  a_seed_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (seed_valid && !seed_ready) |=> (seed_valid && $stable(seed)));

endmodule
