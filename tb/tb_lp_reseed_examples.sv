// The two worked examples of the scheme, run through the hardware: one scan
// chain of 16 cells in 4 blocks of 4, a 32-bit LFSR.
//
// Example 1, cube 0XX1 X111 1X1X XXXX (first bit shifted in on the left):
// block 1 is loaded, blocks 2 and 3 repeat the 1 that ends block 1, block 4
// is a don't-care block. Hold flags 0 1 1 X; 5 specified bits (3 flags, 2
// data bits) instead of 7.
// Example 2, cube X01X X0X0 XXXX 111X: the free last bit of block 1 is
// specified as 0 so that block 2 can hold, and the don't-care block 3 is
// loaded with its last bit specified as 1 so that block 4 can hold. Hold
// flags 0 1 0 1.
// The encoder's flags and extra bits are checked against these values; the
// seeds are then computed and applied and the scan vectors checked.
module tb_lp_reseed_examples;
  import lp_reseed_pkg::*;
  localparam int N = 1, B = 4, L = 16, LEN = 32;
  localparam int NC = 2;
  localparam bit FULL_COVERAGE = 0;

`include "lp_reseed_tb_body.svh"

  lp_reseed_top #(.N(N), .B(B), .L(L), .LEN(LEN)) dut (.*);

  // '0', '1' or 'X' per cell, in shift order
  task automatic set_cube(int t, string s);
    for (int k = 0; k < n_len; k++) begin
      care[t][0][k] = (s[k] != "X");
      val[t][0][k] = (s[k] == "1");
    end
  endtask

  task automatic gen_cubes();
    set_cube(0, "0XX1X1111X1XXXXX");
    set_cube(1, "X01XX0X0XXXX111X");
  endtask

  task automatic check_encoding();
    int spec;
    check(flag[0][0][0] == 0 && flag[0][0][1] == 1 && flag[0][0][2] == 1 && flag[0][0][3] == 2,
          "example 1 hold flags 0 1 1 X");
    spec = 0;
    for (int j = 0; j < n_blk; j++) spec += int'(flag[0][0][j] != 2);
    for (int k = 0; k < n_len; k++) spec += int'(dcare[0][0][k]);
    check(spec == 5, $sformatf("example 1 needs 5 specified bits, got %0d", spec));
    check(flag[1][0][0] == 0 && flag[1][0][1] == 1 && flag[1][0][2] == 0 && flag[1][0][3] == 1,
          "example 2 hold flags 0 1 0 1");
    check(dcare[1][0][3] && !dval[1][0][3], "example 2: last bit of block 1 set to 0");
    check(dcare[1][0][11] && dval[1][0][11], "example 2: last bit of block 3 set to 1");
  endtask

  task automatic finish_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
