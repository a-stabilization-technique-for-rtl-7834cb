// tb_stacked_vdd_top: end-to-end test of the two stacked chips and their receivers, with
// every parameter at its default (256-word SRAMs).
//
// For each of three data-pattern pairs (worst case: upper chip alternating 00/FF, lower
// chip constant; both random; upper random, lower constant) the SRAMs of both chips are
// filled and all 256 words are streamed from both at once, in each of the four modes.
// The testbench counts how many pad lines of each chip switch; that count stands in for
// the I/O supply current of each chip, and the difference between the two for the drift
// of the node between the stacked supplies. Checks:
//   - every byte comes back from both receivers, in order, three edges after its read,
//     with no error flag;
//   - RAW, worst pattern: the switching imbalance grows by 8 lines per word (the problem);
//   - BUS_INV: at most 4 data lines plus the invert line switch per word;
//   - 8B10B_TOGGLE: each chip switches 4..6 lines per word and the cumulative counts of
//     the two chips never differ by more than one when both encoders start the run at the
//     same running disparity, or by more than two when they do not (the cure).
// Mechanisms counted and required to occur: each mode used, a mode switch, bus inversion,
// unbalanced 8B/10B words (running-disparity flips), idle cycles with held lines.
module tb_stacked_vdd_top;
  import coding_pkg::*;
  localparam int unsigned AW = 8;
  localparam int unsigned N  = 2**AW;

  logic          clk = 1'b0;
  logic          rst_n;
  mode_e         mode;
  logic          up_we, up_re, lo_we, lo_re;
  logic [AW-1:0] up_addr, lo_addr;
  logic [7:0]    up_wdata, lo_wdata;
  logic [9:0]    up_pad, lo_pad;
  logic          up_pad_valid, lo_pad_valid;
  logic [7:0]    up_data, lo_data;
  logic          up_data_valid, lo_data_valid;
  logic          up_code_err, lo_code_err, up_disp_err, lo_disp_err;

  stacked_vdd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
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

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected bytes in flight, with the cycle their read was issued.
  logic [7:0] up_q [$], lo_q [$];
  int         t_q [$];

  // Switching counters and mechanism counters.
  int     up_sw, lo_sw;                          // cumulative pad transitions in the current run
  int     max_imbalance;                      // largest |up_sw - lo_sw| in the current run
  logic   same_rd;                            // both encoders began the run at one disparity
  int     n_inversions, n_unbalanced, n_idle_hold, n_mode_switch;
  int     n_mode_used [4];
  logic [9:0] up_last, lo_last;

  always @(negedge clk) if (rst_n) begin
    int du, dl;
    du = $countones(up_pad ^ up_last);
    dl = $countones(lo_pad ^ lo_last);
    up_sw += du;
    lo_sw += dl;
    if ((up_sw - lo_sw) > max_imbalance) max_imbalance = (up_sw - lo_sw);
    if ((lo_sw - up_sw) > max_imbalance) max_imbalance = (lo_sw - up_sw);
    check(up_pad_valid == lo_pad_valid, "both chips in step");
    if (up_pad_valid) begin
      unique case (mode)
        MODE_BUS_INV: begin
          check($countones(up_pad[7:0] ^ up_last[7:0]) <= 4 && $countones(lo_pad[7:0] ^ lo_last[7:0]) <= 4,
                "bus-invert: at most 4 data lines switch");
          if (up_pad[8]) n_inversions++;
          if (lo_pad[8]) n_inversions++;
        end
        MODE_8B10B_TOGGLE: begin
          check(du inside {[4:6]} && dl inside {[4:6]}, $sformatf("toggle mode: %0d and %0d lines switched", du, dl));
          if (du != 5) n_unbalanced++;
          if (dl != 5) n_unbalanced++;
        end
        MODE_8B10B: begin
          if ($countones(up_pad) != 5) n_unbalanced++;
          if ($countones(lo_pad) != 5) n_unbalanced++;
        end
        default: ;
      endcase
    end else begin
      check(du == 0 && dl == 0, "lines hold while idle");
      n_idle_hold++;
    end
    if (up_data_valid || lo_data_valid) begin
      check(up_data_valid && lo_data_valid, "both receivers in step");
      check(cycle - t_q.pop_front() == 3, "three edges from read to received byte");
      check(up_data == up_q.pop_front(), "upper byte received");
      check(lo_data == lo_q.pop_front(), "lower byte received");
      check(!up_code_err && !lo_code_err && !up_disp_err && !lo_disp_err, "no receiver error");
    end
    up_last = up_pad;
    lo_last = lo_pad;
  end

  logic [7:0] up_mem [N], lo_mem [N];

  task automatic fill(input int pattern);
    for (int a = 0; a < N; a++) begin
      unique case (pattern)
        0:       begin up_mem[a] = (a % 2 != 0) ? 8'hFF : 8'h00; lo_mem[a] = 8'h00; end
        1:       begin up_mem[a] = 8'($urandom);                 lo_mem[a] = 8'($urandom); end
        default: begin up_mem[a] = 8'($urandom);                 lo_mem[a] = 8'hB5; end
      endcase
      up_we = 1; lo_we = 1; up_addr = AW'(a); lo_addr = AW'(a);
      up_wdata = up_mem[a]; lo_wdata = lo_mem[a];
      @(negedge clk);
    end
    up_we = 0; lo_we = 0;
  endtask

  task automatic stream(input mode_e m);
    if (m != mode) n_mode_switch++;
    mode = m;
    n_mode_used[int'(m)]++;
    up_sw = 0; lo_sw = 0; max_imbalance = 0;
    same_rd = (dut.u_upper_chip.u_enc.rd == dut.u_lower_chip.u_enc.rd);
    for (int a = 0; a < N; a++) begin
      up_re = 1; lo_re = 1; up_addr = AW'(a); lo_addr = AW'(a);
      up_q.push_back(up_mem[a]); lo_q.push_back(lo_mem[a]); t_q.push_back(cycle);
      @(negedge clk);
      if (a % 37 == 36) begin
        up_re = 0; lo_re = 0;
        @(negedge clk);
      end
    end
    up_re = 0; lo_re = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; mode = MODE_RAW;
    up_we = 0; up_re = 0; up_addr = '0; up_wdata = '0;
    lo_we = 0; lo_re = 0; lo_addr = '0; lo_wdata = '0;
    up_last = '0; lo_last = '0; up_sw = 0; lo_sw = 0; max_imbalance = 0;
    n_inversions = 0; n_unbalanced = 0; n_idle_hold = 0; n_mode_switch = 0;
    foreach (n_mode_used[i]) n_mode_used[i] = 0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 3; p++) begin
      fill(p);
      for (int m = 0; m < 4; m++) begin
        stream(mode_e'(m));
        $display("pattern %0d mode %-18s upper %0d lower %0d transitions, max imbalance %0d",
                 p, mode.name(), up_sw, lo_sw, max_imbalance);
        if (mode == MODE_8B10B_TOGGLE)
          check(max_imbalance <= (same_rd ? 1 : 2),
                $sformatf("toggle mode imbalance %0d (same start disparity %0d)", max_imbalance, same_rd));
        if (mode == MODE_RAW && p == 0)
          check(up_sw - lo_sw == 8 * (int'(N) - 1) && lo_sw == 0,
                $sformatf("raw worst-case imbalance %0d", up_sw - lo_sw));
      end
    end
    check(up_q.size() == 0 && lo_q.size() == 0, "every byte received");
    foreach (n_mode_used[i]) check(n_mode_used[i] > 0, $sformatf("mode %0d used", i));
    check(n_mode_switch > 0, "mode switch exercised");
    check(n_inversions > 0, "bus inversion exercised");
    check(n_unbalanced > 0, "unbalanced 8B/10B words exercised");
    check(n_idle_hold > 0, "idle cycles exercised");
    $display("mode switches %0d, inversions %0d, unbalanced words %0d, idle cycles %0d",
             n_mode_switch, n_inversions, n_unbalanced, n_idle_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
