// End-to-end test of the low-power reseeding decompressor with its scan
// chains at the default size (30 chains x 56 cells, 4 blocks per chain,
// 256-bit LFSR): 60 random test cubes with about 5% specified bits are
// encoded with hold flags, grouped into hold-cube-compatible sets, turned
// into seeds and applied; the scan vectors are checked bit by bit and the
// transitions are compared with conventional reseeding of the same cubes.
// Every mechanism (hold-flag load and reuse, held and loaded blocks,
// conversion, waiting for a seed, capture) must occur. See
// lp_reseed_tb_body.svh for the procedure.
module tb_lp_reseed_top;
  import lp_reseed_pkg::*;
  localparam int N = NUM_CHAINS_D, B = BLOCKS_D, L = CHAIN_LEN_D, LEN = LFSR_LEN_D;
  localparam int NC = 60;
  localparam bit FULL_COVERAGE = 1;
  localparam int P_UNIFORM = 22;   // % of blocks with one value only
  localparam int P_MIXED = 8;     // % of blocks with both values

`include "lp_reseed_tb_body.svh"

  lp_reseed_top dut (.*);

  // Random cubes with structure shared between cubes, as in ATPG test sets:
  // every block of every chain has a fixed profile, either one value only
  // (P_UNIFORM %) or a 0 followed by a 1 (P_MIXED %). Each cube fills a
  // block with probability (P_UNIFORM + P_MIXED) %: one to three bits of its single value,
  // or one 0 and one 1, at random positions in the block.
  bit prof_mixed [N][B];
  bit prof_val [N][B];

  task automatic gen_cubes();
    for (int c = 0; c < n_chains; c++)
      for (int j = 0; j < n_blk; j++) begin
        prof_mixed[c][j] = ($urandom_range(0, 99) < P_MIXED * 100 / (P_UNIFORM + P_MIXED));
        prof_val[c][j] = 1'($urandom);
      end
    for (int t = 0; t < NC; t++)
      for (int c = 0; c < n_chains; c++) begin
        for (int k = 0; k < n_len; k++) begin care[t][c][k] = 0; val[t][c][k] = 0; end
        for (int j = 0; j < n_blk; j++) begin
          if ($urandom_range(0, 99) < P_UNIFORM + P_MIXED) begin
            if (!prof_mixed[c][j]) begin
              repeat ($urandom_range(1, 3)) begin
                int k;
                k = j * BL + $urandom_range(0, BL - 1);
                care[t][c][k] = 1; val[t][c][k] = prof_val[c][j];
              end
            end else begin
              int k0, k1;
              k0 = j * BL + $urandom_range(0, BL / 2 - 1);
              k1 = j * BL + $urandom_range(BL / 2, BL - 1);
              care[t][c][k0] = 1; val[t][c][k0] = prof_val[c][j];
              care[t][c][k1] = 1; val[t][c][k1] = ~prof_val[c][j];
            end
          end
        end
      end
  endtask

  task automatic check_encoding();
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
