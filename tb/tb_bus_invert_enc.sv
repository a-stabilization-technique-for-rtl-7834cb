// tb_bus_invert_enc: self-checking test of the bus-invert coder.
// Drives every pair (present lines, next word) of 8-bit values and checks the coded word
// against a reference written here: invert exactly when more than 4 lines would change.
// Also checks the coder's purpose: at most 4 data lines change per word.
module tb_bus_invert_enc;
  logic [7:0] data, bus_prev;
  logic [8:0] code;
  int checks = 0, failures = 0;
  int inverted = 0;

  bus_invert_enc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      for (int d = 0; d < 256; d++) begin
        int hd;
        logic [8:0] exp;
        bus_prev = 8'(p); data = 8'(d);
        #1;
        hd = 0;
        for (int i = 0; i < 8; i++) if (p[i] != d[i]) hd++;
        exp = (hd > 4) ? {1'b1, ~8'(d)} : {1'b0, 8'(d)};
        if (exp[8]) inverted++;
        checks++;
        if (code !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL prev=%02h data=%02h code=%03h exp=%03h", p, d, code, exp);
        end
        checks++;
        if ($countones(code[7:0] ^ bus_prev) > 4) begin
          failures++;
          if (failures < 10) $display("FAIL more than 4 data lines switch: prev=%02h data=%02h", p, d);
        end
      end
    end
    if (inverted == 0) begin
      failures++;
      $display("FAIL inversion never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
