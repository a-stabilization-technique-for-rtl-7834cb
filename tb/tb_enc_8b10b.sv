// tb_enc_8b10b: self-checking test of the 8B/10B encoder.
// 1. Known code words of the standard code, written out here, at both disparities.
// 2. For all 256 bytes at both disparities: 4 to 6 ones, six ones only at RD- and four
//    only at RD+, sub-block weights 2..4 and 1..3, no comma pattern 0011111/1100000 in
//    bits a..g, and all 256 words of one disparity distinct.
// 3. A stream of random bytes: the encoder's rd output tracks the word weights, the total
//    number of ones after n words is 5n or 5n+1, and no run of equal bits is longer than 5.
module tb_enc_8b10b;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       valid;
  logic [7:0] data;
  logic [9:0] code;
  logic       rd;
  int checks = 0, failures = 0;

  enc_8b10b dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Put the encoder in a given running disparity: reset gives RD-, one unbalanced word
  // (D.3.0 at RD- has six ones) gives RD+.
  task automatic set_rd(input logic want);
    rst_n = 0; valid = 0; data = 8'h00;
    @(negedge clk);
    rst_n = 1;
    if (want) begin
      valid = 1; data = 8'h03;
      @(negedge clk);
      valid = 0;
    end
    check(rd == want, $sformatf("running disparity set to %0d", want));
  endtask

  logic [9:0] seen [2][256];

  initial begin
    typedef struct { logic [7:0] d; logic rd; logic [9:0] c; } vec_t;
    vec_t vecs[14];
    vecs = '{
      '{8'h00, 1'b0, 10'b100111_0100}, '{8'h00, 1'b1, 10'b011000_1011},   // D.0.0
      '{8'hB5, 1'b0, 10'b101010_1010}, '{8'hB5, 1'b1, 10'b101010_1010},   // D.21.5
      '{8'h4A, 1'b0, 10'b010101_0101}, '{8'h4A, 1'b1, 10'b010101_0101},   // D.10.2
      '{8'h03, 1'b0, 10'b110001_1011}, '{8'h03, 1'b1, 10'b110001_0100},   // D.3.0
      '{8'hE7, 1'b0, 10'b111000_1110}, '{8'hE7, 1'b1, 10'b000111_0001},   // D.7.7
      '{8'hF1, 1'b0, 10'b100011_0111}, '{8'hF1, 1'b1, 10'b100011_0001},   // D.17.7 (A7 at RD-)
      '{8'hEB, 1'b0, 10'b110100_1110}, '{8'hEB, 1'b1, 10'b110100_1000}    // D.11.7 (A7 at RD+)
    };
    valid = 0; data = '0; rst_n = 0;
    @(negedge clk);
    // 1. known words
    foreach (vecs[i]) begin
      set_rd(vecs[i].rd);
      data = vecs[i].d;
      #1;
      check(code == vecs[i].c, $sformatf("byte %02h rd %0d: code %b expected %b",
                                         vecs[i].d, vecs[i].rd, code, vecs[i].c));
    end
    // 2. whole table
    for (int r = 0; r < 2; r++) begin
      set_rd(r[0]);
      for (int d = 0; d < 256; d++) begin
        int ones;
        data = 8'(d);
        #1;
        seen[r][d] = code;
        ones = $countones(code);
        check(ones >= 4 && ones <= 6, $sformatf("byte %02h rd %0d weight %0d", d, r, ones));
        check(!(ones == 6 && r == 1) && !(ones == 4 && r == 0),
              $sformatf("byte %02h rd %0d weight %0d against disparity", d, r, ones));
        check($countones(code[9:4]) inside {[2:4]} && $countones(code[3:0]) inside {[1:3]},
              $sformatf("byte %02h rd %0d sub-block weights", d, r));
        check(code[9:3] != 7'b0011111 && code[9:3] != 7'b1100000,
              $sformatf("byte %02h rd %0d comma in data", d, r));
        for (int e = 0; e < d; e++)
          if (seen[r][e] == code) check(0, $sformatf("bytes %02h and %02h share a code", e, d));
      end
    end
    // 3. stream
    begin
      int total_ones, run, n;
      logic last_bit, exp_rd;
      rst_n = 0; valid = 0;
      @(negedge clk);
      rst_n = 1;
      total_ones = 0; run = 0; last_bit = 1'b0; exp_rd = 1'b0; n = 0;
      for (int k = 0; k < 20000; k++) begin
        valid = 1; data = 8'($urandom);
        #1;
        n++;
        total_ones += $countones(code);
        for (int i = 9; i >= 0; i--) begin
          if (code[i] == last_bit) run++; else run = 1;
          last_bit = code[i];
          if (k > 0 || i < 9) check(run <= 5, $sformatf("run of %0d equal bits", run));
        end
        if ($countones(code) != 5) exp_rd = ~exp_rd;
        @(negedge clk);
        check(rd == exp_rd, "rd output");
        check(total_ones == 5 * n || total_ones == 5 * n + 1,
              $sformatf("after %0d words %0d ones", n, total_ones));
      end
      valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
