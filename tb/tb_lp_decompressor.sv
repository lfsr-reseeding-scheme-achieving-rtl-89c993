// Decompressor check at a reduced size (4 chains, 2 blocks of 4 cells, 32-bit
// LFSR). A cycle model of the scheme runs next to the DUT: its own LFSR
// (x^32 + x^22 + x^2 + x + 1, five-tap phase shifter), its own hold flags
// and its own scan chains, which also supply chain_head. Every cycle the
// chain inputs, scan enable, capture and hold selections are compared.
// Seeds are random, so both update-flag values and both hold-flag values
// occur; their counts are checked at the end.
module tb_lp_decompressor;
  import lp_reseed_pkg::*;
  localparam int N = 4, B = 2, L = 8, LEN = 32;
  logic clk = 0, rst_n = 0, seed_valid = 0;
  logic seed_ready, scan_en, capture, cube_done, update_flag;
  logic [LEN-1:0] seed = '0;
  logic [N-1:0] chain_head, scan_in, hold_active;
  logic [N-1:0][B-1:0] hold_flags;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int n_upd = 0, n_reuse = 0, n_held = 0, n_loaded = 0;

  // Model state
  bit m [LEN];
  bit mflag [N][B];
  logic [L-1:0] mchain [N];

  lp_decompressor #(.N(N), .B(B), .L(L), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int c = 0; c < N; c++) chain_head[c] = mchain[c][0];

  function automatic bit mout(int c);
    return m[c % LEN] ^ m[(c * 37 + 11) % LEN] ^ m[(c * 71 + 97) % LEN]
         ^ m[(c * 113 + 53) % LEN] ^ m[(c * 149 + 181) % LEN];
  endfunction

  task automatic mstep();
    bit fb;
    fb = m[31] ^ m[21] ^ m[1] ^ m[0];
    for (int i = LEN - 1; i > 0; i--) m[i] = m[i-1];
    m[0] = fb;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%0t %s", $time, what);
    end
  endtask

  initial begin
    bit u, exp_in;
    for (int c = 0; c < N; c++) mchain[c] = '0;
    for (int c = 0; c < N; c++) for (int b = 0; b < B; b++) mflag[c][b] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      seed_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      seed = $urandom;
      seed_valid = 1;
      #1 check(seed_ready === 1'b1, "seed_ready");
      @(negedge clk);
      seed_valid = 0;
      for (int i = 0; i < LEN; i++) m[i] = seed[i];
      // update-flag cycle
      u = mout(0);
      check(scan_en === 1'b0, "scan_en in update cycle");
      mstep();
      @(negedge clk);
      check(update_flag === u, "update flag");
      if (u) begin
        n_upd++;
        for (int b = 0; b < B; b++) begin
          for (int c = 0; c < N; c++) mflag[c][b] = mout(c);
          check(scan_en === 1'b0, "scan_en in hold-flag cycle");
          mstep();
          @(negedge clk);
        end
      end else n_reuse++;
      for (int c = 0; c < N; c++) check(hold_flags[c] === {mflag[c][1], mflag[c][0]}, "HF-SR contents");
      for (int k = 0; k < L; k++) begin
        check(scan_en === 1'b1, "scan_en in data cycle");
        for (int c = 0; c < N; c++) begin
          bit h;
          h = mflag[c][k / (L / B)];
          exp_in = h ? mchain[c][0] : mout(c);
          if (h) n_held++; else n_loaded++;
          check(hold_active[c] === h, "hold select");
          check(scan_in[c] === exp_in, "scan input");
          mchain[c] = {mchain[c][L-2:0], exp_in};
        end
        mstep();
        @(negedge clk);
      end
      check(capture === 1'b1 && cube_done === 1'b1, "capture");
      // The model chains see a fixed response pattern.
      for (int c = 0; c < N; c++) mchain[c] = mchain[c] ^ L'(c + 1);
      @(negedge clk);
    end
    check(n_upd > 0 && n_reuse > 0 && n_held > 0 && n_loaded > 0, "coverage");
    $display("updates %0d reuses %0d held bits %0d loaded bits %0d", n_upd, n_reuse, n_held, n_loaded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
