// tb_coding_rx: self-checking test of the receiver.
// The lines are driven here, from random bytes coded in each of the four modes by a
// transmitter model written in this testbench (8B/10B words come from the package tables,
// and the toggle conversion, bus inversion and raw mapping are modelled here). Every
// byte must come back one edge after its word is on the lines, without error flags. A few
// corrupted 8B/10B words must raise code_err or disp_err.
module tb_coding_rx;
  import coding_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  mode_e      mode;
  logic [9:0] pad;
  logic       pad_valid;
  logic [7:0] data;
  logic       data_valid, code_err, disp_err;
  int checks = 0, failures = 0;
  int errs_flagged = 0;

  coding_rx dut (.*);

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

  initial begin
    logic rd_tx;
    rst_n = 0; mode = MODE_RAW; pad = '0; pad_valid = 0;
    #12 rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      // Reset between modes so both ends start from lines at 0 and RD-.
      @(negedge clk);
      rst_n = 0; pad = '0; pad_valid = 0; mode = mode_e'(m);
      @(negedge clk);
      rst_n = 1;
      rd_tx = 1'b0;
      for (int k = 0; k < 3000; k++) begin
        logic [7:0] b;
        logic [9:0] w;
        logic       corrupt;
        b = 8'($urandom);
        corrupt = (mode_e'(m) inside {MODE_8B10B, MODE_8B10B_TOGGLE}) && (k % 211 == 100);
        if (k % 7 == 3) begin               // idle cycle: lines hold
          pad_valid = 0;
          @(negedge clk);
          check(!data_valid, "no output after an idle cycle");
        end
        unique case (mode_e'(m))
          MODE_RAW:     pad = {2'b00, b};
          MODE_BUS_INV: begin
            if ($urandom_range(1) == 1) pad = {2'b01, ~b};
            else                         pad = {2'b00, b};
          end
          default: begin
            w = enc8b10b(b, rd_tx);
            if (corrupt) w = (k % 2 == 0) ? 10'h000 : 10'h3FF;   // no data character has these
            rd_tx = rd_after(rd_tx, w);
            pad = (mode_e'(m) == MODE_8B10B_TOGGLE) ? (pad ^ w) : w;
          end
        endcase
        pad_valid = 1;
        @(negedge clk);
        check(data_valid, "output one edge after the word");
        if (corrupt) begin
          check(code_err || disp_err, "corrupted word flagged");
          if (code_err || disp_err) errs_flagged++;
        end else begin
          check(data == b && !code_err && !disp_err,
                $sformatf("mode %0d word %0d: got %02h (ce %0d de %0d) expected %02h",
                          m, k, data, code_err, disp_err, b));
        end
      end
      pad_valid = 0;
    end
    check(errs_flagged > 0, "error detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
