// tb_gaa_afcu: fills a memory model with random fitness values (with planted
// ties and extremes), runs the unit for both population sizes and both elite
// decision factors, and compares sum, maximum, best slot, average and elite
// threshold with values computed here, and the done latency (pop + 2 cycles).
module tb_gaa_afcu;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pop128 = 0, alpha_half = 0;
  logic [ADDR_W-1:0] base;
  sm_req_t req;
  logic [WORD_W-1:0] rdata;
  logic done, busy;
  logic [SUM_W-1:0] sum;
  logic [FIT_W-1:0] max_fit, ave, thr;
  logic [SLOT_W-1:0] best_slot;
  logic [15:0] mem [0:4095];
  int checks = 0, failures = 0;

  gaa_afcu dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= req.re ? mem[req.addr[11:0]] : 16'h0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = 16'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int n, exp_best, lat;
      longint s;
      int mx, av, th;
      pop128     = t[0];
      alpha_half = t[1];
      base       = t[2] ? POP_B_BASE : POP_A_BASE;
      n = pop128 ? 128 : 64;
      // fitness values; a tie for the maximum in runs 4..7
      for (int i = 0; i < n; i++) mem[base + 8*i + 4] = 16'($urandom_range(t == 3 ? 65535 : 40000));
      if (t >= 4) begin mem[base + 8*9 + 4] = 16'd50000; mem[base + 8*(n-2) + 4] = 16'd50000; end
      s = 0; mx = -1; exp_best = 0;
      for (int i = 0; i < n; i++) begin
        int f; f = int'(mem[base + 8*i + 4]);
        s += f;
        if (f > mx) begin mx = f; exp_best = i; end
      end
      av = int'(s / n);
      th = av + (alpha_half ? (mx - av) / 2 : (mx - av) / 4);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check($sformatf("run %0d latency %0d", t, lat), lat == n + 2);
      check($sformatf("run %0d sum", t), longint'(sum) == s);
      check($sformatf("run %0d max", t), int'(max_fit) == mx);
      check($sformatf("run %0d best %0d/%0d", t, best_slot, exp_best), int'(best_slot) == exp_best);
      check($sformatf("run %0d ave", t), int'(ave) == av);
      check($sformatf("run %0d thr %0d/%0d", t, thr, th), int'(thr) == th);
      repeat (3) @(negedge clk);
      check("outputs hold", int'(max_fit) == mx && !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
