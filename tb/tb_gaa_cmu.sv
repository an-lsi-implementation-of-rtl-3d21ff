// tb_gaa_cmu: runs the Crossover and Mutation Unit on a population in a
// memory model, with the FEM Interface emulated here (fitness = 1000 x ones
// count + 7, returned after a set delay). Checks, per run:
//   - the operator chosen per pair: forced modes, and in adaptive mode the
//     elite-degree sum of equation (3) computed here from the table;
//   - without mutation, that the children are the parents with a set of
//     differing bits exchanged, contiguous for two-point crossover;
//   - with identical parents, that the mutation count is near
//     128 x p_mut / 4096 per pair and matches the unit's event pulses;
//   - that codes, fitness and family words written back are right and that
//     slot 0 and unmated slots are untouched;
//   - the 149-cycle hand-off period with a fast FEM, and stalls with a slow one;
//   - the initial-evaluation mode.
module tb_gaa_cmu;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, init = 0;
  logic [SLOT_W-1:0] npairs;
  logic [ADDR_W-1:0] base;
  xo_mode_e xo_mode;
  logic [7:0] p_mut;
  logic [15:0] t_cross;
  logic [RNG_W-1:0] rnd;
  sm_req_t req;
  logic [WORD_W-1:0] rdata;
  logic femi_load, femi_idle, res_valid, res_take;
  logic [CODE_W-1:0] code_a, code_b;
  logic [FIT_W-1:0] fit_a, fit_b;
  logic done, busy, ev_two_point, ev_uniform, ev_mutation, ev_stall;
  logic [15:0] mem [0:32767];
  logic [15:0] snap [0:2047];
  int checks = 0, failures = 0;
  int fem_delay;

  gaa_cmu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    rdata <= req.re ? mem[req.addr] : 16'h0;
    if (req.we) mem[req.addr] <= req.wdata;
    rnd <= 24'($urandom);
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] fitf(logic [63:0] c);
    return 16'(1000 * $countones(c) + 7);
  endfunction

  // FEM Interface emulation
  int fcnt;
  logic [63:0] fa_code, fb_code;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      femi_idle <= 1; res_valid <= 0; fcnt <= 0; fit_a <= 0; fit_b <= 0;
    end else begin
      if (femi_load) begin
        check("load only when idle", femi_idle);
        femi_idle <= 0; fcnt <= 0; fa_code <= code_a; fb_code <= code_b;
      end else if (!femi_idle && !res_valid) begin
        fcnt <= fcnt + 1;
        if (fcnt >= fem_delay) begin
          res_valid <= 1; fit_a <= fitf(fa_code); fit_b <= fitf(fb_code);
        end
      end else if (res_take) begin
        res_valid <= 0; femi_idle <= 1;
      end
    end
  end

  // per-pair observation
  int last_load = 0, period_bad = 0, loads = 0, n2p = 0, nun = 0, nmut = 0, nstall = 0, cyc = 0;
  logic [63:0] ch_a [0:63], ch_b [0:63];
  logic        two_pt [0:63];
  always @(posedge clk) begin
    cyc++;
    if (ev_two_point) n2p++;
    if (ev_uniform)   nun++;
    if (ev_two_point || ev_uniform) two_pt[n2p + nun - 1] = ev_two_point;
    if (ev_mutation)  nmut++;
    if (ev_stall)     nstall++;
    if (femi_load) begin
      if (loads > 0 && cyc - last_load != 149) period_bad++;
      last_load = cyc;
      ch_a[loads] = code_a; ch_b[loads] = code_b;
      loads++;
    end
  end

  function automatic logic [13:0] ref_child(logic [15:0] a, logic [15:0] b);
    int c1, c2, c3, c4;
    c1 = int'(a[14]) + int'(b[14]);
    c2 = int'(a[1:0]) + int'(b[1:0]);
    c3 = int'(a[4:2]) + int'(b[4:2]);
    c4 = int'(a[8:5]) + int'(b[8:5]);
    return {5'(c4), 4'(c3), 3'(c2), 2'(c1)};
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cmu();
    loads = 0; n2p = 0; nun = 0; nmut = 0; nstall = 0; period_bad = 0;
    for (int i = 0; i < 2048; i++) snap[i] = mem[base + i];
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int swapped, differing;
    for (int i = 0; i < 32768; i++) mem[i] = 16'($urandom);
    for (int i = 0; i < 16384; i++) mem[TABLE_BASE + i] = 16'($urandom_range(4096));
    repeat (2) @(posedge clk);
    rst_n = 1;
    base = POP_B_BASE;
    swapped = 0; differing = 0;
    for (int t = 0; t < 4; t++) begin
      // population: copy-form family words
      for (int i = 0; i < 128; i++)
        mem[base + 8*i + 5] = {1'b0, 1'($urandom), 5'd0, 4'($urandom_range(8)),
                               3'($urandom_range(4)), 2'($urandom_range(2))};
      xo_mode = xo_mode_e'(t == 3 ? 2 : t % 2);   // 2pt, uniform, 2pt, adaptive
      p_mut   = 8'd0;
      t_cross = 16'd6000;
      npairs  = 7'(20 + 10 * t);
      fem_delay = (t == 2) ? 300 : 20;
      run_cmu();
      check($sformatf("run %0d loads", t), loads == int'(npairs));
      check($sformatf("run %0d operator count", t), n2p + nun == int'(npairs));
      if (t != 2) check($sformatf("run %0d period 149 (%0d bad)", t, period_bad), period_bad == 0);
      else        check($sformatf("run %0d stalls with slow FEM %0d", t, nstall), nstall > 0);
      for (int k = 0; k < int'(npairs); k++) begin
        int sa, sb;
        logic [63:0] pa, pb, da, db;
        logic [15:0] fwa, fwb;
        logic exp2;
        int e2;
        sa = 2*k + 1; sb = sa + 1;
        pa = {snap[8*sa+3], snap[8*sa+2], snap[8*sa+1], snap[8*sa]};
        pb = {snap[8*sb+3], snap[8*sb+2], snap[8*sb+1], snap[8*sb]};
        fwa = snap[8*sa+5]; fwb = snap[8*sb+5];
        e2 = int'(mem[TABLE_BASE + fwa[13:0]]) + int'(mem[TABLE_BASE + fwb[13:0]])
           + 4096 * (int'(fwa[14]) + int'(fwb[14]));
        exp2 = (xo_mode == XO_TWO_POINT) || (xo_mode == XO_ADAPTIVE && e2 >= int'(t_cross));
        check($sformatf("run %0d pair %0d operator", t, k), two_pt[k] == exp2);
        da = ch_a[k] ^ pa; db = ch_b[k] ^ pb;
        check($sformatf("run %0d pair %0d exchange", t, k), da == db && (da & ~(pa ^ pb)) == 0);
        if (exp2 && da != 0) begin
          int lo, hi; lo = 64; hi = -1;
          for (int j = 0; j < 64; j++) if (da[j]) begin if (j < lo) lo = j; hi = j; end
          for (int j = lo; j <= hi; j++) if ((pa[j] ^ pb[j]) && !da[j]) begin
            check($sformatf("run %0d pair %0d contiguous", t, k), 1'b0); break;
          end
        end
        if (!exp2) begin swapped += $countones(da); differing += $countones(pa ^ pb); end
        check("code a written", {mem[base+8*sa+3], mem[base+8*sa+2], mem[base+8*sa+1], mem[base+8*sa]} == ch_a[k]);
        check("code b written", {mem[base+8*sb+3], mem[base+8*sb+2], mem[base+8*sb+1], mem[base+8*sb]} == ch_b[k]);
        check("fitness a", mem[base+8*sa+4] == fitf(ch_a[k]));
        check("fitness b", mem[base+8*sb+4] == fitf(ch_b[k]));
        check("family a", mem[base+8*sa+5] == {2'b00, ref_child(fwa, fwb)});
        check("family b", mem[base+8*sb+5] == {2'b00, ref_child(fwa, fwb)});
      end
      for (int i = 0; i < 128; i++) if (i == 0 || i > 2 * int'(npairs)) begin
        logic same; same = 1;
        for (int w = 0; w < 8; w++) same &= (mem[base + 8*i + w] == snap[8*i + w]);
        if (i == 0 || i == 127) check($sformatf("run %0d slot %0d untouched", t, i), same);
        else if (!same) check($sformatf("run %0d slot %0d untouched", t, i), 1'b0);
      end
      if (t == 3) check($sformatf("adaptive used both %0d/%0d", n2p, nun), n2p > 0 && nun > 0);
    end
    check($sformatf("uniform swaps about half %0d/%0d", swapped, differing),
          swapped * 10 > differing * 3 && swapped * 10 < differing * 7);
    // mutation: identical parents, two-point crossover
    for (int k = 0; k < 40; k++) for (int w = 0; w < 4; w++) mem[base + 8*(2*k+2) + w] = mem[base + 8*(2*k+1) + w];
    xo_mode = XO_TWO_POINT; p_mut = 8'd255; npairs = 7'd40; fem_delay = 5;
    run_cmu();
    begin
      int flips; flips = 0;
      for (int k = 0; k < 40; k++) begin
        logic [63:0] p;
        p = {snap[8*(2*k+1)+3], snap[8*(2*k+1)+2], snap[8*(2*k+1)+1], snap[8*(2*k+1)]};
        flips += $countones(ch_a[k] ^ p) + $countones(ch_b[k] ^ p);
      end
      check($sformatf("mutation count %0d (events %0d)", flips, nmut), flips == nmut);
      check($sformatf("mutation rate %0d, expected about 319", flips), flips > 220 && flips < 420);
    end
    // initial evaluation mode
    init = 1; npairs = 7'd64; base = POP_A_BASE; fem_delay = 50;
    run_cmu();
    check("init loads", loads == 64);
    for (int i = 0; i < 128; i++) begin
      logic [63:0] c;
      c = {mem[8*i+3], mem[8*i+2], mem[8*i+1], mem[8*i]};
      check($sformatf("init slot %0d", i), c == {snap[8*i+3], snap[8*i+2], snap[8*i+1], snap[8*i]}
            && mem[8*i+4] == fitf(c) && mem[8*i+5] == 16'h0);
    end
    check("init uses no crossover", n2p + nun == 0 && nmut == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
