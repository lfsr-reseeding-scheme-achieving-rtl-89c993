// Controller of the low-power reseeding decompressor: a small FSM around one
// bit counter and the update-flag flip-flop.
//
// For every test cube it runs through
//   ST_SEED    seed_ready high; the cycle seed_valid is seen, the LFSR loads
//   ST_UPDATE  1 cycle: LFSR bit 0 is the update flag, stored in update_flag
//   ST_HOLD    B cycles, only if the update flag is 1: hf_shift high, each
//              chain's HF-SR takes one LFSR bit
//   ST_DATA    L cycles: scan_en high, the chains shift; hf_rotate pulses in
//              the last cycle of every block of L/B cycles
//   ST_CAPTURE 1 cycle: capture high, the circuit's response is loaded
// and back to ST_SEED. The LFSR steps in every cycle of ST_UPDATE, ST_HOLD
// and ST_DATA. A cube therefore takes 1 + 1 + B + L + 1 cycles when its hold
// flags are reloaded and 1 + 1 + L + 1 cycles when they are reused, plus any
// wait for seed_valid.
//
// The order update flag, hold flags, data and the B-cycle and L-cycle phases
// are the published scheme's. Skipping the hold-flag cycles when the update flag is
// 0, the valid/ready seed handshake and the separate capture cycle are this
// design's choices. L must be a multiple of B.
module reseed_ctrl
  import lp_reseed_pkg::*;
#(
  parameter int unsigned B = BLOCKS_D,
  parameter int unsigned L = CHAIN_LEN_D
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_valid,
  output logic        seed_ready,
  input  logic        upd_bit,      // LFSR output read as the update flag
  output logic        lfsr_load,
  output logic        lfsr_advance,
  output logic        hf_shift,     // HF-SRs take one hold flag each
  output logic        hf_rotate,    // HF-SRs move to the next block's flag
  output logic        scan_en,      // scan-data phase: chains shift
  output logic        capture,      // apply the vector, load the response
  output logic        update_flag,  // update-flag flip-flop
  output logic        cube_done,    // last cycle of a test cube
  output ctrl_state_e state
);

  localparam int unsigned BLK_LEN = L / B;
  localparam int unsigned CNT_W   = $clog2((L > B ? L : B) + 1);
  localparam int unsigned BLK_W   = $clog2(BLK_LEN + 1);

  if (L % B != 0) begin : g_bad_size
    $error("reseed_ctrl: L (%0d) must be a multiple of B (%0d)", L, B);
  end

  ctrl_state_e        state_q, state_d;
  logic [CNT_W-1:0]   bit_cnt;    // cycles within ST_HOLD or ST_DATA
  logic [BLK_W-1:0]   blk_cnt;    // cycles within the current block
  logic               blk_last;
  logic               upd_q;

  assign blk_last = (blk_cnt == BLK_W'(BLK_LEN - 1));

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_SEED:    if (seed_valid) state_d = ST_UPDATE;
      ST_UPDATE:  state_d = upd_bit ? ST_HOLD : ST_DATA;
      ST_HOLD:    if (bit_cnt == CNT_W'(B - 1)) state_d = ST_DATA;
      ST_DATA:    if (bit_cnt == CNT_W'(L - 1)) state_d = ST_CAPTURE;
      ST_CAPTURE: state_d = ST_SEED;
      default:    state_d = ST_SEED;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_SEED;
      bit_cnt <= '0;
      blk_cnt <= '0;
      upd_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == ST_UPDATE) upd_q <= upd_bit;
      if (state_d != state_q) bit_cnt <= '0;
      else                    bit_cnt <= bit_cnt + 1'b1;
      if (state_q != ST_DATA || blk_last) blk_cnt <= '0;
      else                                blk_cnt <= blk_cnt + 1'b1;
    end
  end

  assign seed_ready   = (state_q == ST_SEED);
  assign lfsr_load    = seed_ready && seed_valid;
  assign lfsr_advance = (state_q == ST_UPDATE) || (state_q == ST_HOLD)
                     || (state_q == ST_DATA);
  // The update-flag flip-flop gates the HF-SR load.
  assign hf_shift     = (state_q == ST_HOLD) && upd_q;
  assign scan_en      = (state_q == ST_DATA);
  assign hf_rotate    = scan_en && blk_last;
  assign capture      = (state_q == ST_CAPTURE);
  assign cube_done    = capture;
  assign update_flag  = upd_q;
  assign state        = state_q;

  // The HF-SRs are only written in cubes whose update flag is 1.
  a_hold_needs_update : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_HOLD) |-> upd_q);
  // The data phase lasts exactly L cycles and is followed by the capture.
  a_data_length : assert property (@(posedge clk) disable iff (!rst_n)
    scan_en |-> (bit_cnt < CNT_W'(L)));
  a_data_to_capture : assert property (@(posedge clk) disable iff (!rst_n)
    (scan_en && bit_cnt == CNT_W'(L - 1)) |=> capture);

endmodule
