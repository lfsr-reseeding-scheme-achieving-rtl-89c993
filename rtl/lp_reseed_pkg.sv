// Shared constants and types of the low-power LFSR-reseeding decompressor.
//
// The scheme splits every scan chain into BLOCKS blocks of CHAIN_LEN/BLOCKS
// cells. For each test cube a single reseedable LFSR produces, in this
// order: one update flag, then (only if the update flag is 1) one hold flag
// per block and chain, then CHAIN_LEN cycles of scan data. A block whose hold
// flag is 1 is filled by repeating the last bit shifted into its chain, so it
// causes no transitions and needs no LFSR-generated bits.
//
// Default sizes follow the s38417 row of the published results with 120
// blocks in total: 30 scan chains, 4 hold flags per chain. The chain length
// (56) comes from the 1636 flip-flops of s38417 spread over 30 chains and
// rounded up to a multiple of 4. The LFSR length (256) and its polynomial are
// this design's choice; the published scheme only requires the LFSR to be long enough
// for the test cubes (s_max + 20 bits).
package lp_reseed_pkg;

  localparam int unsigned NUM_CHAINS_D = 30;   // scan chains = hold MUXes
  localparam int unsigned BLOCKS_D     = 4;    // blocks per chain = HF-SR bits
  localparam int unsigned CHAIN_LEN_D  = 56;   // scan cells per chain
  localparam int unsigned LFSR_LEN_D   = 256;  // LFSR stages = seed bits

  localparam int unsigned MAX_LFSR_LEN = 256;

  // Controller phases for one test cube.
  typedef enum logic [2:0] {
    ST_SEED    = 3'd0,  // wait for and load a seed
    ST_UPDATE  = 3'd1,  // LFSR bit 0 is the update flag
    ST_HOLD    = 3'd2,  // B cycles: LFSR bits shifted into the HF-SRs
    ST_DATA    = 3'd3,  // L cycles: scan shift, hold MUXes active
    ST_CAPTURE = 3'd4   // one capture cycle of the circuit under test
  } ctrl_state_e;

  // Feedback taps of a maximal-length Fibonacci LFSR. Bit k-1 set means the
  // term x^k is in the feedback polynomial.
  function automatic logic [MAX_LFSR_LEN-1:0] lfsr_taps(int unsigned len);
    logic [MAX_LFSR_LEN-1:0] t;
    t = '0;
    case (len)
      16:      begin t[15] = 1'b1; t[14] = 1'b1; t[12] = 1'b1; t[3] = 1'b1; end
      32:      begin t[31] = 1'b1; t[21] = 1'b1; t[1] = 1'b1; t[0] = 1'b1; end
      64:      begin t[63] = 1'b1; t[62] = 1'b1; t[60] = 1'b1; t[59] = 1'b1; end
      128:     begin t[127] = 1'b1; t[125] = 1'b1; t[100] = 1'b1; t[98] = 1'b1; end
      256:     begin t[255] = 1'b1; t[253] = 1'b1; t[250] = 1'b1; t[245] = 1'b1; end
      default: begin t[len-1] = 1'b1; t[0] = 1'b1; end
    endcase
    return t;
  endfunction

  // Phase shifter: output c of the LFSR is the XOR of PS_TAPS stages,
  // ps_tap(c, 0..PS_TAPS-1, len). Spreading the taps keeps the chains from
  // receiving shifted copies of one another's bit stream, which would make
  // the seed equations of a test cube linearly dependent.
  localparam int unsigned PS_TAPS = 5;

  function automatic int unsigned ps_tap(int unsigned c, int unsigned k, int unsigned len);
    case (k)
      0:       return c % len;
      1:       return (c * 37 + 11) % len;
      2:       return (c * 71 + 97) % len;
      3:       return (c * 113 + 53) % len;
      default: return (c * 149 + 181) % len;
    endcase
  endfunction

endpackage
