// tb_gaa_su: runs the Selection Unit on populations held in a memory model
// and checks that slot 0 of the new population is the best individual, that
// every other slot is an exact copy of some old individual, that the family
// word is rewritten in copy form (elite flag from the threshold, the
// parent's own counts), and that the picks follow the roulette: with only
// two non-zero fitness values (3:1) only those two are picked, about 3:1;
// with all-zero fitness the picks are still valid copies.
module tb_gaa_su;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pop128;
  logic [ADDR_W-1:0] src_base, dst_base;
  logic [SUM_W-1:0] sum;
  logic [SLOT_W-1:0] best_slot, mated;
  logic [FIT_W-1:0] thr;
  logic [RNG_W-1:0] rnd;
  sm_req_t req;
  logic [WORD_W-1:0] rdata;
  logic done, busy;
  logic [15:0] mem [0:4095];
  int checks = 0, failures = 0;

  gaa_su dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    rdata <= req.re ? mem[req.addr[11:0]] : 16'h0;
    if (req.we) mem[req.addr[11:0]] <= req.wdata;
    rnd <= 24'($urandom);
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: own elite counts of a family word
  function automatic logic [13:0] ref_own(logic [15:0] w, bit copy);
    int c1, c2, c3, c4;
    if (!copy) return w[13:0];
    c1 = 2 * int'(w[14]);
    c2 = 2 * int'(w[1:0]);
    c3 = 2 * int'(w[4:2]);
    c4 = 2 * int'(w[8:5]);
    return {5'(c4), 4'(c3), 3'(c2), 2'(c1)};
  endfunction

  function automatic logic [15:0] rand_fam(bit copy);
    logic [15:0] w;
    w = {1'b0, 1'($urandom), 5'($urandom_range(16)), 4'($urandom_range(8)),
         3'($urandom_range(4)), 2'($urandom_range(2))};
    if (copy) w[13:9] = 5'($urandom_range(8));  // unused by copy form's maximum
    return w;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      int n, cnt[128], b, mx;
      longint s;
      pop128   = (t != 1);
      src_base = t[0] ? POP_B_BASE : POP_A_BASE;
      dst_base = t[0] ? POP_A_BASE : POP_B_BASE;
      n = pop128 ? 128 : 64;
      mated = (t == 4) ? 7'd0 : 7'($urandom_range(n / 2 - 1));
      for (int i = 0; i < n; i++) begin
        mem[src_base + 8*i + 0] = 16'(i);           // unique code word
        mem[src_base + 8*i + 1] = 16'($urandom);
        mem[src_base + 8*i + 2] = 16'($urandom);
        mem[src_base + 8*i + 3] = 16'($urandom);
        case (t)
          2:       mem[src_base + 8*i + 4] = (i == 3) ? 16'd30000 : (i == 10) ? 16'd10000 : 16'd0;
          3:       mem[src_base + 8*i + 4] = 16'd0;
          default: mem[src_base + 8*i + 4] = 16'($urandom);
        endcase
        mem[src_base + 8*i + 5] = rand_fam(i == 0 || i > 2 * int'(mated));
      end
      s = 0; mx = -1; b = 0;
      for (int i = 0; i < n; i++) begin
        s += mem[src_base + 8*i + 4];
        if (int'(mem[src_base + 8*i + 4]) > mx) begin mx = mem[src_base + 8*i + 4]; b = i; end
      end
      sum = SUM_W'(s); best_slot = SLOT_W'(b);
      thr = 16'(s / n + (mx - s / n) / 4);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      foreach (cnt[i]) cnt[i] = 0;
      for (int d = 0; d < n; d++) begin
        int src;
        logic ok;
        src = int'(mem[dst_base + 8*d]);
        ok = (src < n);
        for (int w = 0; w < 5; w++) ok &= (mem[dst_base + 8*d + w] == mem[src_base + 8*src + w]);
        check($sformatf("run %0d slot %0d is a copy", t, d), ok);
        if (src < n) begin
          logic [15:0] fw;
          fw = mem[src_base + 8*src + 5];
          check($sformatf("run %0d slot %0d family", t, d),
                mem[dst_base + 8*d + 5] == {1'b0, mem[src_base + 8*src + 4] >= thr,
                 ref_own(fw, src == 0 || src > 2 * int'(mated))});
          if (d > 0) cnt[src]++;
        end
        if (d == 0) check($sformatf("run %0d elite slot", t), src == b);
      end
      if (t == 2) begin
        check("only non-zero fitness picked", cnt[3] + cnt[10] == n - 1);
        check($sformatf("roulette ratio %0d:%0d", cnt[3], cnt[10]), cnt[3] > 2 * cnt[10] && cnt[10] > 5);
      end
      if (t == 3) begin
        int distinct; distinct = 0;
        foreach (cnt[i]) if (cnt[i] > 0) distinct++;
        check("zero-sum picks spread", distinct > 20);
      end
      if (t == 0) begin
        // fitter half picked more often than the weaker half
        int hi, lo; hi = 0; lo = 0;
        for (int i = 0; i < n; i++)
          if (mem[src_base + 8*i + 4] >= 16'd32768) hi += cnt[i]; else lo += cnt[i];
        check($sformatf("fitness bias %0d/%0d", hi, lo), hi > lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
