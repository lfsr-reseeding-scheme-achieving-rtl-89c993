// Controller check: for random seed arrival gaps and random update flags,
// every cube must follow load, 1 update cycle, B hold-flag cycles (only when
// the update flag is 1), L scan cycles with a rotate in the last cycle of
// every block, and one capture cycle, with the expected strobes in each.
module tb_reseed_ctrl;
  import lp_reseed_pkg::*;
  localparam int B = 4, L = 12;
  logic clk = 0, rst_n = 0, seed_valid = 0, upd_bit = 0;
  logic seed_ready, lfsr_load, lfsr_advance, hf_shift, hf_rotate, scan_en;
  logic capture, update_flag, cube_done;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int n_upd = 0, n_reuse = 0;

  reseed_ctrl #(.B(B), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare all strobes in the current cycle with the expected vector
  // {seed_ready, lfsr_load, lfsr_advance, hf_shift, hf_rotate, scan_en, capture}.
  task automatic expect_strobes(logic [6:0] exp, string phase);
    logic [6:0] got;
    #1;
    got = {seed_ready, lfsr_load, lfsr_advance, hf_shift, hf_rotate, scan_en, capture};
    checks++;
    if (got !== exp || cube_done !== capture) begin
      failures++;
      if (failures < 10) $display("%s: strobes %b expected %b", phase, got, exp);
    end
  endtask

  initial begin
    logic u;
    int cycles;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      // Seed source idles for a random time: the controller must wait.
      seed_valid = 0;
      repeat ($urandom_range(0, 3)) begin
        expect_strobes(7'b1000000, "wait");
        @(negedge clk);
      end
      seed_valid = 1;
      expect_strobes(7'b1100000, "load");
      @(negedge clk);
      seed_valid = 0;
      cycles = 1;
      u = 1'($urandom);
      upd_bit = u;
      expect_strobes(7'b0010000, "update");
      @(negedge clk);
      cycles++;
      upd_bit = 1'($urandom);   // later LFSR bits must not matter
      checks++;
      if (update_flag !== u) failures++;
      if (u) begin
        n_upd++;
        for (int k = 0; k < B; k++) begin
          expect_strobes(7'b0011000, "hold flags");
          @(negedge clk);
          cycles++;
        end
      end else n_reuse++;
      for (int k = 0; k < L; k++) begin
        expect_strobes({4'b0010, 1'((k % (L / B)) == (L / B) - 1), 2'b10}, "data");
        @(negedge clk);
        cycles++;
      end
      expect_strobes(7'b0000001, "capture");
      checks++;
      if (cycles != 2 + (u ? B : 0) + L) failures++;
      @(negedge clk);
    end
    checks++;
    if (n_upd == 0 || n_reuse == 0) failures++;
    $display("cubes with hold-flag update %0d, reusing flags %0d", n_upd, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
