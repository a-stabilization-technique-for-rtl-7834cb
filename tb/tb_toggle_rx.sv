// tb_toggle_rx: self-checking test of the toggle-to-"1" converter.
// Random line states each cycle; with toggle_en high the output must mark exactly the
// lines that changed since the previous clock edge, with it low the lines pass. A
// reference copy of the previous state is kept here.
module tb_toggle_rx;
  localparam int unsigned W = 10;
  logic         clk = 1'b0;
  logic         rst_n, toggle_en;
  logic [W-1:0] lines, code, prev_ref;
  int checks = 0, failures = 0;

  toggle_rx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; toggle_en = 1; lines = '0;
    #12 rst_n = 1;
    prev_ref = '0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      toggle_en = (k % 4 != 3);
      lines = ($urandom_range(4) == 0) ? lines : W'($urandom);
      #1;
      checks++;
      if (code !== (toggle_en ? (lines ^ prev_ref) : lines)) begin
        failures++;
        if (failures < 20) $display("FAIL k=%0d lines=%b prev=%b code=%b", k, lines, prev_ref, code);
      end
      @(posedge clk);
      prev_ref = lines;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
