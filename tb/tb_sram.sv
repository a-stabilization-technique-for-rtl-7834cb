// tb_sram: self-checking test of the SRAM.
// Fills every word with random data, reads every word back in random order and checks
// the one-cycle read latency, that rdata holds while no read is issued, and that a write
// in the same cycle as a read request wins (rdata does not change).
module tb_sram;
  localparam int unsigned DW = 8;
  localparam int unsigned AW = 8;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic          we, re;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [N];
  int checks = 0, failures = 0;

  sram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; addr = AW'(a); wdata = DW'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 4 * N; k++) begin
      int a;
      a = $urandom_range(N - 1);
      re = 1; addr = AW'(a);
      @(negedge clk);                      // one edge later the word is out
      re = 0;
      check(rdata, model[a], $sformatf("read addr %0d", a));
      addr = AW'($urandom);
      @(negedge clk);                      // no read: rdata holds
      check(rdata, model[a], "hold without re");
      if ((k % 16) == 0) begin              // write has priority over read
        int b;
        b = $urandom_range(N - 1);
        we = 1; re = 1; addr = AW'(b); wdata = ~model[b]; model[b] = wdata;
        @(negedge clk);
        we = 0; re = 0;
        check(rdata, model[a], "write wins over read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
