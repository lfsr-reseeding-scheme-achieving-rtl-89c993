// Hold-flag shift register check: flags loaded one per cycle must become
// active in the order received, one per rotate, and return to the loaded
// order after B rotations so they can be reused. Also checks B = 1.
module tb_hf_sr;
  localparam int B = 4;
  logic clk = 0, rst_n = 0, shift_in = 0, flag_in = 0, rotate = 0;
  logic active_flag, active1;
  logic [B-1:0] flags;
  logic [0:0] flags1;
  int checks = 0, failures = 0;

  hf_sr #(.B(B)) dut (.*);
  hf_sr #(.B(1)) dut1 (.clk, .rst_n, .shift_in, .flag_in, .rotate,
                       .active_flag(active1), .flags(flags1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [B-1:0] seq;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_bit(active_flag, 1'b0, "after reset");
    for (int t = 0; t < 50; t++) begin
      seq = B'($urandom);
      // Load: seq[k] is the flag of block k, sent in block order.
      for (int k = 0; k < B; k++) begin
        shift_in = 1; flag_in = seq[k]; rotate = (k == 1);  // shift_in wins
        @(negedge clk);
        expect_bit(active1, seq[k], "B=1 load");
      end
      shift_in = 0; rotate = 0;
      checks++;
      if (flags !== seq) begin
        failures++;
        $display("loaded %b expected %b", flags, seq);
      end
      // Two passes over the blocks without reloading: the flags are reused.
      for (int pass = 0; pass < 2; pass++) begin
        for (int k = 0; k < B; k++) begin
          expect_bit(active_flag, seq[k], "active flag");
          repeat ($urandom_range(0, 2)) @(negedge clk);  // cycles inside a block
          expect_bit(active_flag, seq[k], "held between rotates");
          rotate = 1;
          @(negedge clk);
          rotate = 0;
        end
        checks++;
        if (flags !== seq) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
