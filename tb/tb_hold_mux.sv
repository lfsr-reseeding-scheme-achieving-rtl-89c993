// Exhaustive check of the hold multiplexer: with hold low the chain input is
// the LFSR bit, with hold high it is the last bit shifted into the chain.
module tb_hold_mux;
  logic lfsr_bit, held_bit, hold, scan_in;
  int checks = 0, failures = 0;

  hold_mux dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {hold, held_bit, lfsr_bit} = 3'(i);
      #1;
      checks++;
      if (scan_in !== (hold ? held_bit : lfsr_bit)) begin
        failures++;
        $display("mismatch hold=%b held=%b lfsr=%b -> %b", hold, held_bit, lfsr_bit, scan_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
