// tb_gaa_cu: answers the Control Unit's start pulses like the units would
// (done after a random delay) and checks the phase sequence INIT, then
// (STAT, SEL, XOVR) per generation, then a final STAT and DONE; the memory
// owner in each phase; the crossover pair count (pop x p_cross / 512); the
// population swap; skipping XOVR when no pair is mated; and the generation
// count GEN_BASE << gen_sel.
module tb_gaa_cu;
  import gaa_pkg::*;
  localparam int GB = 3;
  logic clk = 0, rst_n = 0, start = 0;
  gaa_cfg_t cfg;
  logic [1:0] owner;
  logic afcu_start, afcu_done = 0, su_start, su_done = 0, cmu_start, cmu_init, cmu_done = 0;
  logic [SLOT_W-1:0] cmu_npairs, xo_pairs;
  logic [ADDR_W-1:0] cur_base, nxt_base;
  logic [12:0] gen;
  logic busy, done;
  int checks = 0, failures = 0;
  string log_s;

  gaa_cu #(.GEN_BASE(GB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // unit emulation: each start is answered by done after 1..6 cycles
  always begin
    @(negedge clk);
    if (afcu_start) begin
      check("afcu owner", owner == 2'd1);
      log_s = {log_s, "A"};
      repeat ($urandom_range(5)) @(posedge clk);
      @(negedge clk); afcu_done = 1; @(posedge clk); #1 afcu_done = 0;
    end else if (su_start) begin
      check("su owner", owner == 2'd2);
      check("su bases", cur_base != nxt_base);
      log_s = {log_s, "S"};
      repeat ($urandom_range(5)) @(posedge clk);
      @(negedge clk); su_done = 1; @(posedge clk); #1 su_done = 0;
    end else if (cmu_start) begin
      check("cmu owner", owner == 2'd3);
      log_s = {log_s, cmu_init ? "I" : "X"};
      if (cmu_init) check("init pairs", cmu_npairs == (cfg.pop128 ? 7'd64 : 7'd32));
      else          check("xover pairs", cmu_npairs == (cfg.pop128 ? 7'(cfg.p_cross >> 2) : 7'(cfg.p_cross >> 3)));
      check("mated pairs", xo_pairs == (cfg.pop128 ? 7'(cfg.p_cross / 4) : 7'(cfg.p_cross / 8)));
      repeat ($urandom_range(5)) @(posedge clk);
      @(negedge clk); cmu_done = 1; @(posedge clk); #1 cmu_done = 0;
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      string exp_s;
      int g, swaps;
      logic [ADDR_W-1:0] b0;
      cfg.pop128  = t[0];
      cfg.gen_sel = 2'(t >> 1);
      cfg.p_cross = (t == 3) ? 8'd3 : 8'd200;   // 3/256 x 128 / 2 < 1 pair
      g = GB << cfg.gen_sel;
      exp_s = "IA";
      for (int k = 0; k < g; k++) exp_s = {exp_s, (t == 3) ? "SA" : "SXA"};
      log_s = "";
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check("busy after start", busy && !done);
      b0 = cur_base; swaps = 0;
      while (!done) begin
        @(negedge clk);
        if (cur_base != b0) begin swaps++; b0 = cur_base; end
      end
      check($sformatf("run %0d sequence %s", t, log_s), log_s == exp_s);
      check("generations", int'(gen) == g);
      check("swaps", swaps == g);
      check("done not busy", !busy && owner == 2'd0);
      repeat (5) @(negedge clk);
      check("done holds", done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
