// tb_coding_tx: self-checking test of one chip (SRAM, coders, output register).
// Fills the SRAM with random bytes, then streams all of them out in each of the four modes
// with a few idle gaps, and checks every pad word:
//   RAW       pad == {00, byte}
//   BUS_INV   pad[9] == 0, pad[7:0] ^ {8{pad[8]}} == byte, at most 4 data lines change,
//             and the invert decision matches a Hamming-distance rule computed here
//   8B10B     pad decodes (table inversion) to the byte, 4..6 ones, total ones 5n or 5n+1
//   TOGGLE    the lines that changed form that same code word
// It also checks the latency: pad_valid rises two edges after the read request, and the
// pads hold between words.
module tb_coding_tx;
  import coding_pkg::*;
  localparam int unsigned AW = 8;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic          rst_n;
  mode_e         mode;
  logic          we, re;
  logic [AW-1:0] addr;
  logic [7:0]    wdata;
  logic [9:0]    pad;
  logic          pad_valid;
  logic [7:0]    mem [N];
  int checks = 0, failures = 0;

  coding_tx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reads are issued at negedges; the word for the read issued before edge k appears on
  // pad after edge k+1. The queue holds the bytes in flight.
  logic [7:0] inflight [$];
  logic [9:0] last_pad;
  int         words_seen;
  int         ones_total;
  int         inverts;
  int         issued_at [$];
  int         cycle;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    if (pad_valid) begin
      logic [7:0] b;
      logic [9:0] c;
      b = inflight.pop_front();
      check(cycle - issued_at.pop_front() == 2, "latency of two edges from read to pad");
      unique case (mode)
        MODE_RAW: check(pad == {2'b00, b}, $sformatf("raw pad %b byte %02h", pad, b));
        MODE_BUS_INV: begin
          check(pad[9] == 1'b0 && (pad[7:0] ^ {8{pad[8]}}) == b, $sformatf("bus-invert pad %b byte %02h", pad, b));
          check($countones(pad[7:0] ^ last_pad[7:0]) <= 4, "bus-invert limits switching");
          check(pad[8] == ($countones(b ^ last_pad[7:0]) > 4), "bus-invert decision");
          if (pad[8]) inverts++;
        end
        default: begin
          c = (mode == MODE_8B10B_TOGGLE) ? (pad ^ last_pad) : pad;
          check({dec4b3b(c[3:0]), dec6b5b(c[9:4])} == b, $sformatf("8b10b word %b byte %02h", c, b));
          check($countones(c) inside {[4:6]}, "8b10b weight");
          words_seen++;
          ones_total += $countones(c);
          check(ones_total == 5 * words_seen || ones_total == 5 * words_seen + 1, "8b10b balance");
        end
      endcase
    end else if (cycle > 1) begin
      check(pad == last_pad, "pads hold when idle");
    end
    last_pad = pad;
  end

  initial begin
    cycle = 0;
    rst_n = 0; mode = MODE_RAW; we = 0; re = 0; addr = '0; wdata = '0;
    words_seen = 0; ones_total = 0; inverts = 0; last_pad = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; addr = AW'(a);
      wdata = (a < 8) ? ((a % 2 != 0) ? 8'hFF : 8'h00) : 8'($urandom);
      mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int m = 0; m < 4; m++) begin
      mode = mode_e'(m);
      for (int a = 0; a < N; a++) begin
        re = 1; addr = AW'(a);
        inflight.push_back(mem[a]);
        issued_at.push_back(cycle);
        @(negedge clk);
        if (a % 13 == 5) begin
          re = 0;
          @(negedge clk);
        end
      end
      re = 0;
      repeat (4) @(negedge clk);
    end
    check(inflight.size() == 0, "every word came out");
    check(inverts > 0, "bus-invert inversion exercised");
    check(words_seen == 2 * N, "8b10b words counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
