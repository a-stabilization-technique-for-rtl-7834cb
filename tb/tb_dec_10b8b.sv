// tb_dec_10b8b: self-checking test of the 10B/8B decoder.
// 1. Known standard code words (written out here) decode to their bytes.
// 2. All 1024 10-bit words at RD- and at RD+: exactly 256 are accepted without error at
//    each disparity and they decode to 256 distinct bytes; the rest raise an error flag.
// 3. A stream of random bytes, encoded here with running disparity, decodes without error;
//    a word sent at the wrong disparity raises disp_err.
module tb_dec_10b8b;
  import coding_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n, valid;
  logic [9:0] code;
  logic [7:0] data;
  logic       code_err, disp_err;
  int checks = 0, failures = 0;

  dec_10b8b dut (.*);

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

  task automatic set_rd(input logic want);
    rst_n = 0; valid = 0;
    @(negedge clk);
    rst_n = 1;
    if (want) begin
      valid = 1; code = 10'b110001_1011;   // D.3.0 at RD-, six ones
      @(negedge clk);
      valid = 0;
    end
  endtask

  bit hit [256];

  initial begin
    typedef struct { logic [9:0] c; logic rd; logic [7:0] d; } vec_t;
    vec_t vecs[8];
    vecs = '{
      '{10'b100111_0100, 1'b0, 8'h00}, '{10'b011000_1011, 1'b1, 8'h00},
      '{10'b101010_1010, 1'b0, 8'hB5}, '{10'b110001_0100, 1'b1, 8'h03},
      '{10'b000111_0001, 1'b1, 8'hE7}, '{10'b100011_0111, 1'b0, 8'hF1},
      '{10'b110100_1000, 1'b1, 8'hEB}, '{10'b010101_0101, 1'b1, 8'h4A}
    };
    rst_n = 0; valid = 0; code = '0;
    @(negedge clk);
    foreach (vecs[i]) begin
      set_rd(vecs[i].rd);
      code = vecs[i].c;
      #1;
      check(data == vecs[i].d && !code_err && !disp_err,
            $sformatf("code %b rd %0d -> %02h (ce %0d de %0d), expected %02h",
                      vecs[i].c, vecs[i].rd, data, code_err, disp_err, vecs[i].d));
    end
    for (int r = 0; r < 2; r++) begin
      int good, flagged;
      set_rd(r[0]);
      good = 0; flagged = 0;
      foreach (hit[i]) hit[i] = 0;
      for (int c = 0; c < 1024; c++) begin
        code = 10'(c);
        #1;
        check(!(code_err && disp_err), "both error flags at once");
        if (!code_err && !disp_err) begin
          good++;
          check(!hit[data], $sformatf("byte %02h accepted twice", data));
          hit[data] = 1;
        end else flagged++;
      end
      check(good == 256, $sformatf("rd %0d: %0d words accepted, expected 256", r, good));
      check(flagged == 768, $sformatf("rd %0d: %0d words flagged, expected 768", r, flagged));
    end
    begin
      logic rd_tx;
      int disp_seen;
      rst_n = 0; valid = 0;
      @(negedge clk);
      rst_n = 1;
      rd_tx = 0; disp_seen = 0;
      for (int k = 0; k < 5000; k++) begin
        logic [7:0] b;
        logic [9:0] w;
        b = 8'($urandom);
        w = enc8b10b(b, rd_tx);
        if (k % 97 == 50 && enc8b10b(b, ~rd_tx) != w) begin
          // send the word of the other disparity: the decoder must notice, and, like the
          // decoder, carry on from the disparity that word leaves
          valid = 1; code = enc8b10b(b, ~rd_tx);
          #1;
          check(disp_err && !code_err && data == b, "wrong-disparity word flagged");
          disp_seen++;
          rd_tx = rd_after(rd_tx, code);
          @(negedge clk);
          continue;
        end
        valid = 1; code = w;
        #1;
        check(data == b && !code_err && !disp_err,
              $sformatf("stream word %0d: byte %02h decoded %02h ce %0d de %0d", k, b, data, code_err, disp_err));
        rd_tx = rd_after(rd_tx, w);
        @(negedge clk);
      end
      valid = 0;
      check(disp_seen > 0, "disparity error exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
