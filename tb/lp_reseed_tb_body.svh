// Shared body of the end-to-end testbenches of lp_reseed_top.
//
// Included inside a testbench module that first declares N, B, L, LEN (the
// top's sizes), NC (number of test cubes) and FULL_COVERAGE (whether every
// mechanism must be seen), and afterwards instantiates the top on the
// signals declared here and defines three tasks: gen_cubes(), which fills
// care/val with the test cubes, check_encoding(), which may check the
// hold flags chosen by the encoder, and finish_test(), which prints the
// result line and ends the simulation.
//
// What the body does, playing the offline tools and the tester:
//  1. encode(): per cube, chain and block a hold flag (1 = the block repeats
//     the last bit of the previous block, 0 = the block is loaded from the
//     LFSR, 2 = X, no specified bits). Block 1 of a chain is never held. A
//     block holding only 0s or only 1s becomes a hold block when the
//     previous block is known to end in that value, or when that last bit
//     is still free and can be specified (conversion). A don't-care
//     predecessor is turned into a loaded block with only its last bit
//     specified.
//  2. partition(): first-fit grouping of cubes whose hold cubes do not
//     conflict; the first cube of each set carries the merged hold flags and
//     an update flag of 1, the others an update flag of 0 and reuse them.
//  3. compute_seeds(): every LFSR output bit of every cycle is an XOR of seed
//     bits (symbolic simulation of the LFSR and phase shifter); each seed is
//     found by Gauss-Jordan elimination over GF(2), free bits random. The
//     same is done for conventional reseeding (no hold flags) to compare.
//  4. The seeds are applied with random gaps. At each capture every
//     specified bit of the original cube must be in the scan vector, every
//     held block must be constant and the cube must take 1 + B + L + 1
//     cycles (hold flags loaded) or 1 + L + 1 cycles (reused). The previous
//     response must leave through scan_out during the next shift.
// Transitions are counted as neighbouring scan cells with different values.

  localparam int BL = L / B;
  localparam int MAXEQ = 1 + N * B + N * L;
  localparam logic [LEN-1:0] TAPS = LEN'(lfsr_taps(LEN));
  // Loop bounds as variables keep the simulator from unrolling the nested
  // loops of the offline steps, which would make the build very large.
  int n_chains = N, n_len = L, n_blk = B;

  logic clk = 0, rst_n = 0, seed_valid = 0;
  logic seed_ready, scan_en, capture, cube_done, update_flag;
  logic [LEN-1:0] seed = '0;
  logic [N-1:0][L-1:0] response = '0, scan_vector;
  logic [N-1:0] scan_out, hold_active;
  logic [N-1:0][B-1:0] hold_flags;
  ctrl_state_e state;

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- cubes
  logic [L-1:0] care  [NC][N];  // original cube, bit k = shift cycle k
  logic [L-1:0] val   [NC][N];
  logic [L-1:0] dcare [NC][N];  // data bits the LFSR must produce (proposed)
  logic [L-1:0] dval  [NC][N];
  int flag [NC][N][B];   // 0, 1, or 2 = X
  int n_conv = 0;

  int checks = 0, failures = 0;

  initial begin
    repeat (NC * (L + B + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_test();
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  // Hold-flag encoding with conversion, one cube.
  task automatic encode(int t);
    for (int c = 0; c < n_chains; c++) begin
      bit known, kv, last_free;
      known = 0; kv = 0; last_free = 0;
      for (int k = 0; k < n_len; k++) begin dcare[t][c][k] = 0; dval[t][c][k] = 0; end
      for (int j = 0; j < n_blk; j++) begin
        int n0, n1;
        n0 = 0; n1 = 0;
        for (int k = j * BL; k < (j + 1) * BL; k++)
          if (care[t][c][k]) begin if (val[t][c][k]) n1++; else n0++; end
        if (n0 + n1 == 0) begin
          flag[t][c][j] = 2;
          known = 0; last_free = 0;
        end else if (j > 0 && (n0 == 0 || n1 == 0) &&
                     ((known && kv == (n1 > 0)) || last_free)) begin
          if (!(known && kv == (n1 > 0))) begin
            // conversion: specify the free last bit of the previous block
            dcare[t][c][j * BL - 1] = 1;
            dval[t][c][j * BL - 1] = (n1 > 0);
            n_conv++;
          end
          flag[t][c][j] = 1;
          known = 1; kv = (n1 > 0); last_free = 0;
        end else if (j > 0 && (n0 == 0 || n1 == 0) && n0 + n1 >= 1 &&
                     flag[t][c][j-1] == 2) begin
          // the predecessor has no specified bits: load it from the LFSR
          // and specify only its last bit, then hold this block
          flag[t][c][j-1] = 0;
          dcare[t][c][j * BL - 1] = 1;
          dval[t][c][j * BL - 1] = (n1 > 0);
          n_conv++;
          flag[t][c][j] = 1;
          known = 1; kv = (n1 > 0); last_free = 0;
        end else begin
          flag[t][c][j] = 0;
          for (int k = j * BL; k < (j + 1) * BL; k++) begin
            dcare[t][c][k] = care[t][c][k]; dval[t][c][k] = val[t][c][k];
          end
          if (care[t][c][(j + 1) * BL - 1]) begin
            known = 1; kv = val[t][c][(j + 1) * BL - 1]; last_free = 0;
          end else begin
            known = 0; last_free = 1;
          end
        end
      end
    end
  endtask

  // ---------------------------------------------------------- partitioning
  int set_of [NC];
  int n_sets = 0;
  int mflag [NC][N][B];   // merged hold cube per set
  int first_of [NC];      // first cube of each set
  int order [NC];         // application order
  bit upd [NC];           // update flag per position in order

  function automatic int data_eqs(int t);
    int n = 0;
    for (int c = 0; c < n_chains; c++) for (int k = 0; k < n_len; k++) n += dcare[t][c][k];
    return n;
  endfunction

  task automatic partition();
    int pos;
    for (int t = 0; t < NC; t++) begin
      int placed;
      placed = -1;
      for (int s = 0; s < n_sets && placed < 0; s++) begin
        bit ok;
        int spec;
        ok = 1; spec = 0;
        for (int c = 0; c < n_chains; c++) for (int j = 0; j < n_blk; j++) begin
          if (mflag[s][c][j] != 2 && flag[t][c][j] != 2 && mflag[s][c][j] != flag[t][c][j]) ok = 0;
          if (mflag[s][c][j] != 2 || flag[t][c][j] != 2) spec++;
        end
        // keep the first cube of the set solvable: flags + its data + margin
        if (ok && 1 + spec + data_eqs(first_of[s]) <= LEN - 24) placed = s;
      end
      if (placed < 0) begin
        placed = n_sets++;
        first_of[placed] = t;
        for (int c = 0; c < n_chains; c++) for (int j = 0; j < n_blk; j++) mflag[placed][c][j] = 2;
      end
      set_of[t] = placed;
      for (int c = 0; c < n_chains; c++) for (int j = 0; j < n_blk; j++)
        if (flag[t][c][j] != 2) mflag[placed][c][j] = flag[t][c][j];
    end
    pos = 0;
    for (int s = 0; s < n_sets; s++) begin
      order[pos] = first_of[s]; upd[pos] = 1; pos++;
      for (int t = 0; t < NC; t++)
        if (set_of[t] == s && t != first_of[s]) begin order[pos] = t; upd[pos] = 0; pos++; end
    end
  endtask

  // ------------------------------------------------------------ GF(2) solve
  logic [LEN-1:0] sym [LEN];          // stage i as an XOR of seed bits
  logic [LEN-1:0] omask [64][N];      // output c at cycle t
  logic [LEN-1:0] eqm [MAXEQ];
  bit eqr [MAXEQ];
  int n_eq;

  task automatic expand(int cycles);
    logic [LEN-1:0] fb;
    for (int i = 0; i < LEN; i++) begin sym[i] = '0; sym[i][i] = 1'b1; end
    for (int t = 0; t < cycles; t++) begin
      for (int c = 0; c < n_chains; c++)
        omask[t][c] = sym[c % LEN] ^ sym[(c * 37 + 11) % LEN] ^ sym[(c * 71 + 97) % LEN]
                    ^ sym[(c * 113 + 53) % LEN] ^ sym[(c * 149 + 181) % LEN];
      fb = '0;
      for (int i = 0; i < LEN; i++) if (TAPS[i]) fb ^= sym[i];
      for (int i = LEN - 1; i > 0; i--) sym[i] = sym[i-1];
      sym[0] = fb;
    end
  endtask

  task automatic add_eq(int t, int c, bit v);
    eqm[n_eq] = omask[t][c]; eqr[n_eq] = v; n_eq++;
  endtask

  // Gauss-Jordan; returns 1 and a seed if the system is consistent.
  task automatic gf2_solve(output bit ok, output logic [LEN-1:0] x);
    int rank;
    int pcol [MAXEQ];
    logic [LEN-1:0] tm;
    bit tr;
    rank = 0;
    for (int col = 0; col < LEN && rank < n_eq; col++) begin
      int p;
      p = -1;
      for (int r = rank; r < n_eq && p < 0; r++) if (eqm[r][col]) p = r;
      if (p >= 0) begin
        tm = eqm[p]; eqm[p] = eqm[rank]; eqm[rank] = tm;
        tr = eqr[p]; eqr[p] = eqr[rank]; eqr[rank] = tr;
        for (int r = 0; r < n_eq; r++)
          if (r != rank && eqm[r][col]) begin eqm[r] ^= eqm[rank]; eqr[r] ^= eqr[rank]; end
        pcol[rank] = col;
        rank++;
      end
    end
    ok = 1;
    for (int r = rank; r < n_eq; r++) if (eqr[r]) ok = 0;
    for (int w = 0; w < LEN / 32; w++) x[w*32 +: 32] = $urandom;
    for (int r = 0; r < rank; r++) x[pcol[r]] = 1'b0;
    for (int r = 0; r < rank; r++) x[pcol[r]] = eqr[r] ^ (^(eqm[r] & x));
  endtask

  logic [LEN-1:0] seeds [NC];        // per position in order
  int conv_trans = 0, spec_orig = 0, spec_prop = 0;

  task automatic compute_seeds();
    bit ok;
    logic [LEN-1:0] x;
    expand(1 + B + L);
    for (int p = 0; p < NC; p++) begin
      int t, d0;
      t = order[p];
      n_eq = 0;
      add_eq(0, 0, upd[p]);
      if (upd[p]) begin
        for (int c = 0; c < n_chains; c++) for (int j = 0; j < n_blk; j++)
          if (mflag[set_of[t]][c][j] != 2) add_eq(1 + j, c, 1'(mflag[set_of[t]][c][j]));
      end
      d0 = 1 + (upd[p] ? B : 0);
      for (int c = 0; c < n_chains; c++) for (int k = 0; k < n_len; k++)
        if (dcare[t][c][k]) add_eq(d0 + k, c, dval[t][c][k]);
      spec_prop += n_eq;
      gf2_solve(ok, x);
      check(ok, $sformatf("seed for cube %0d solvable (%0d equations)", t, n_eq));
      seeds[p] = x;
    end
    // Conventional reseeding of the same cubes, for comparison.
    for (int t = 0; t < NC; t++) begin
      n_eq = 0;
      for (int c = 0; c < n_chains; c++) for (int k = 0; k < n_len; k++)
        if (care[t][c][k]) add_eq(k, c, val[t][c][k]);
      spec_orig += n_eq;
      gf2_solve(ok, x);
      check(ok, "conventional seed solvable");
      for (int c = 0; c < n_chains; c++)
        for (int k = 1; k < n_len; k++)
          conv_trans += int'((^(omask[k][c] & x)) != (^(omask[k-1][c] & x)));
    end
  endtask

  // ------------------------------------------------------------ apply
  int n_update = 0, n_reuse = 0, n_held_cycles = 0, n_loaded_cycles = 0;
  int n_stall = 0, n_capture = 0, n_held_blocks = 0, prop_trans = 0;
  logic [N-1:0][L-1:0] last_resp;
  bit have_resp = 0;
  int data_k = 0;

  // Monitor: every data cycle, the previous response leaves through scan_out
  // and held chains are counted.
  always @(negedge clk) if (rst_n) begin
    if (seed_ready && !seed_valid) n_stall++;
    if (scan_en) begin
      for (int c = 0; c < n_chains; c++) begin
        if (hold_active[c]) n_held_cycles++; else n_loaded_cycles++;
        if (have_resp) check(scan_out[c] === last_resp[c][L-1-data_k], "response on scan_out");
      end
      data_k++;
    end else data_k = 0;
  end

  initial begin
    gen_cubes();
    for (int t = 0; t < NC; t++) encode(t);
    check_encoding();
    partition();
    compute_seeds();
    $display("%0d cubes in %0d hold-cube-compatible sets, %0d conversions", NC, n_sets, n_conv);

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < NC; p++) begin
      int t, cyc, exp_cyc;
      t = order[p];
      repeat ($urandom_range(0, 2)) @(negedge clk);
      seed = seeds[p];
      seed_valid = 1;
      #1 check(seed_ready === 1'b1, "seed_ready when idle");
      @(negedge clk);
      seed_valid = 0;
      cyc = 1;
      while (!cube_done && cyc < 1000) begin @(negedge clk); cyc++; end
      exp_cyc = 1 + (upd[p] ? B : 0) + L + 1;
      check(cyc == exp_cyc, $sformatf("cube length %0d cycles, expected %0d", cyc, exp_cyc));
      check(update_flag === upd[p], "update flag");
      if (upd[p]) n_update++; else n_reuse++;
      n_capture += int'(capture);
      for (int c = 0; c < n_chains; c++) begin
        for (int k = 0; k < n_len; k++)
          if (care[t][c][k])
            check(scan_vector[c][L-1-k] === val[t][c][k],
                  $sformatf("cube %0d chain %0d bit %0d", t, c, k));
        for (int j = 0; j < n_blk; j++) begin
          // specified hold flags are in the HF-SR, back in loaded order
          if (mflag[set_of[t]][c][j] != 2)
            check(hold_flags[c][j] === 1'(mflag[set_of[t]][c][j]), "hold flag");
          if (hold_flags[c][j] && j > 0) begin
            n_held_blocks++;
            for (int k = j * BL; k < (j + 1) * BL; k++)
              check(scan_vector[c][L-1-k] === scan_vector[c][L-j*BL], "held block constant");
          end
        end
        for (int k = 1; k < n_len; k++)
          prop_trans += int'(scan_vector[c][L-1-k] != scan_vector[c][L-k]);
      end
      for (int c = 0; c < n_chains; c++) response[c] = L'({$urandom, $urandom});
      last_resp = response;
      have_resp = 1;
      @(negedge clk);
    end

    $display("specified bits: original %0d, proposed %0d (update + hold flags + data)",
             spec_orig, spec_prop);
    $display("transitions: conventional reseeding %0d, proposed %0d (%0d%% fewer)",
             conv_trans, prop_trans, conv_trans > 0 ? (conv_trans - prop_trans) * 100 / conv_trans : 0);
    $display("update cubes %0d, reuse cubes %0d, held chain-cycles %0d, loaded chain-cycles %0d",
             n_update, n_reuse, n_held_cycles, n_loaded_cycles);
    $display("held blocks %0d, seed stalls %0d, captures %0d, conversions %0d",
             n_held_blocks, n_stall, n_capture, n_conv);
    if (FULL_COVERAGE) begin
      check(prop_trans < conv_trans, "fewer transitions than conventional reseeding");
      check(n_update > 0, "hold flags loaded at least once");
      check(n_reuse > 0, "hold flags reused at least once");
      check(n_held_cycles > 0 && n_held_blocks > 0, "hold path used");
      check(n_loaded_cycles > 0, "LFSR path used");
      check(n_stall > 0, "controller waited for a seed");
      check(n_capture == NC, "one capture per cube");
      check(n_conv > 0, "conversion used");
    end else begin
      check(n_capture == NC, "one capture per cube");
    end
    finish_test();
  end
