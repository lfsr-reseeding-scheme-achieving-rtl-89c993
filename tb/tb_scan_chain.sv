// Scan chain check: random shift, capture and idle cycles against a queue
// model of the chain; the first bit shifted in must reach the last cell.
module tb_scan_chain;
  localparam int L = 12;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, capture = 0;
  logic [L-1:0] capture_data = '0, cells;
  logic head, scan_out;
  logic [L-1:0] model;
  int checks = 0, failures = 0;

  scan_chain #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (cells !== model || head !== model[0] || scan_out !== model[L-1]) begin
      failures++;
      $display("mismatch cells=%h model=%h", cells, model);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check();
    for (int i = 0; i < 1000; i++) begin
      int op = $urandom_range(0, 9);
      @(negedge clk);
      scan_en = (op < 7);
      capture = (op == 7) || (op < 2);   // capture while shifting must be ignored
      scan_in = 1'($urandom);
      capture_data = {$urandom, $urandom};
      @(posedge clk);
      // Model: cell k of the chain holds the bit shifted in k cycles ago.
      if (scan_en) model = {model[L-2:0], scan_in};
      else if (capture) model = capture_data;
      #1 check();
    end
    // A bit shifted in first arrives at scan_out after L shifts.
    @(negedge clk);
    capture = 0; scan_en = 1; scan_in = 0;
    repeat (L) @(negedge clk);   // flush
    scan_in = 1;
    @(negedge clk);
    scan_in = 0;
    repeat (L - 2) @(negedge clk);
    checks++;
    if (scan_out !== 1'b0) begin failures++; $display("early arrival"); end
    @(negedge clk);
    checks++;
    if (scan_out !== 1'b1) begin failures++; $display("late arrival"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
