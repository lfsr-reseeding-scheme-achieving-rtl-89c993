// LFSR check against an independent bit-array model: x^256 + x^254 + x^251 +
// x^246 + 1 in Fibonacci form (stage 0 takes the XOR of stages 255, 253, 250,
// 245, the rest shift up) and a phase shifter whose output c is the XOR of
// stages c, (37c+11), (71c+97), (113c+53) and (149c+181), all mod 256.
// Random seeds, random advance/hold cycles, load taking priority over
// advance.
module tb_reseed_lfsr;
  localparam int LEN = 256, OUTS = 30;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [LEN-1:0] seed = '0, state;
  logic [OUTS-1:0] out;
  bit m [LEN];
  int checks = 0, failures = 0;

  reseed_lfsr #(.LEN(LEN), .OUTS(OUTS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_out(int c);
    return m[c] ^ m[(c * 37 + 11) % LEN] ^ m[(c * 71 + 97) % LEN]
         ^ m[(c * 113 + 53) % LEN] ^ m[(c * 149 + 181) % LEN];
  endfunction

  task automatic compare();
    for (int c = 0; c < OUTS; c++) begin
      checks++;
      if (out[c] !== model_out(c)) begin
        failures++;
        if (failures < 10) $display("out[%0d] mismatch", c);
      end
    end
    for (int i = 0; i < LEN; i++) if (state[i] !== m[i]) begin
      failures++;
      if (failures < 10) $display("state[%0d] mismatch", i);
    end
    checks++;
  endtask

  initial begin
    bit fb;
    for (int i = 0; i < LEN; i++) m[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      for (int w = 0; w < LEN / 32; w++) seed[w*32 +: 32] = $urandom;
      load = 1; advance = 1;
      @(negedge clk);
      load = 0;
      for (int i = 0; i < LEN; i++) m[i] = seed[i];
      compare();
      for (int t = 0; t < 200; t++) begin
        advance = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (advance) begin
          fb = m[255] ^ m[253] ^ m[250] ^ m[245];
          for (int i = LEN - 1; i > 0; i--) m[i] = m[i-1];
          m[0] = fb;
        end
        compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
