// tb_gaa_rng: checks the cellular-automaton generator against a cell-by-cell
// reference (rule 90 everywhere, rule 150 where the rule vector is one, zero
// boundaries), the seed load, the zero-seed guard, the hold when disabled,
// and the full period of 2^24 - 1.
module tb_gaa_rng;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [23:0] seed, rnd, ref_s;
  int checks = 0, failures = 0;
  localparam logic [23:0] R150 = 24'h884DC5;

  gaa_rng dut (.clk, .rst_n, .load, .seed, .en, .rnd);
  always #5 clk = ~clk;

  function automatic logic [23:0] ref_next(logic [23:0] s);
    logic [23:0] n;
    for (int i = 0; i < 24; i++) begin
      logic l, r;
      l = (i == 0)  ? 1'b0 : s[i-1];
      r = (i == 23) ? 1'b0 : s[i+1];
      n[i] = l ^ r ^ (R150[i] & s[i]);
    end
    return n;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;
    seed = 24'h0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check("reset state nonzero", rnd == 24'd1);
    // zero seed is replaced by 1
    load <= 1; seed <= 24'h0; @(posedge clk); load <= 0; @(negedge clk);
    check("zero seed guard", rnd == 24'd1);
    // seed load
    load <= 1; seed <= 24'hA5C3E1; @(posedge clk); load <= 0; @(negedge clk);
    check("seed load", rnd == 24'hA5C3E1);
    // hold while disabled
    repeat (3) @(posedge clk); @(negedge clk);
    check("hold when disabled", rnd == 24'hA5C3E1);
    // sequence against the reference
    ref_s = 24'hA5C3E1;
    en = 1;
    for (int k = 0; k < 2000; k++) begin
      @(posedge clk); @(negedge clk);
      ref_s = ref_next(ref_s);
      if (k < 200 || k % 100 == 0) check($sformatf("step %0d", k), rnd == ref_s);
      else if (rnd != ref_s) check($sformatf("step %0d", k), 1'b0);
    end
    // full period: the seed returns after exactly 2^24 - 1 steps
    ref_s = rnd;
    n = 0;
    do begin
      @(posedge clk); #1;
      n++;
      if (rnd == 24'd0) begin check("never zero", 1'b0); break; end
    end while (rnd != ref_s && n < 64'd20000000);
    check($sformatf("period %0d", n), n == 64'd16777215);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
