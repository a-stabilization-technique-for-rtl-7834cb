// tb_toggle_tx: self-checking test of the "1"-to-toggle converter.
// Random code words with random valid gaps, in both settings of toggle_en. A reference
// register written here predicts the lines; the test also checks that the number of lines
// that change per word equals the number of ones in the word, and that idle cycles hold.
module tb_toggle_tx;
  localparam int unsigned W = 10;
  logic         clk = 1'b0;
  logic         rst_n, valid, toggle_en;
  logic [W-1:0] code, lines;
  logic [W-1:0] ref_lines, prev_lines;
  int checks = 0, failures = 0;

  toggle_tx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; valid = 0; toggle_en = 0; code = '0;
    #12 rst_n = 1;
    ref_lines = '0;
    @(negedge clk);
    check(lines == '0, "reset value");
    for (int k = 0; k < 20000; k++) begin
      toggle_en = (k < 10000) ? 1'b1 : (k % 3 == 0);
      valid = ($urandom_range(3) != 0);
      code  = W'($urandom);
      prev_lines = lines;
      if (valid) ref_lines = toggle_en ? (ref_lines ^ code) : code;
      @(negedge clk);
      check(lines == ref_lines, $sformatf("lines %b expected %b", lines, ref_lines));
      if (valid && toggle_en)
        check($countones(lines ^ prev_lines) == $countones(code), "transitions equal ones");
      if (!valid)
        check(lines == prev_lines, "idle cycle holds the lines");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
