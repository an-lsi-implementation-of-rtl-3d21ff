// tb_gaa_chip: end-to-end test of the GAA chip with the System Memory model
// and a one-max Fitness Evaluation Module, at a reduced generation count
// (GEN_BASE = 6). Three complete GA runs, each started by GO and finished by
// DONE, cover: population sizes 64 and 128, adaptive, two-point and uniform
// crossover, both elite decision factors, a fast FEM (the 149-cycle hand-off
// period) and a slow FEM (CMU stalls). Checks: the generation count; elitism
// (the best fitness never drops from one generation to the next); every
// individual of the final population carries the fitness of its own code;
// the best-fitness and best-address registers; progress over the initial
// population. Each mechanism is counted and must occur at least once.
module tb_gaa_chip;
  import gaa_pkg::*;
  localparam int GB = 6;
  logic clk = 0, rst_n = 0;
  logic [15:0] pc_addr = 0, pc_wdata = 0, pc_rdata;
  logic pc_we = 0, pc_re = 0, go = 0, done, busy;
  logic [ADDR_W-1:0] sm_addr;
  logic sm_oe, sm_we;
  logic [WORD_W-1:0] sm_wdata, sm_rdata;
  logic fem_out_valid, fem_out_last, fem_out_ready, fem_in_valid, fem_in_ready;
  logic [WORD_W-1:0] fem_out_data, fem_in_data;
  int fem_delay = 10;
  int checks = 0, failures = 0;

  gaa_chip #(.GEN_BASE(GB)) dut (.*);
  sram_32kx16 u_sm (.clk, .addr(sm_addr), .oe(sm_oe), .we(sm_we), .wdata(sm_wdata), .rdata(sm_rdata));
  fem_model #(.FUNC(0)) u_fem (.clk, .rst_n, .delay(fem_delay),
    .out_valid(fem_out_valid), .out_data(fem_out_data), .out_last(fem_out_last), .out_ready(fem_out_ready),
    .in_valid(fem_in_valid), .in_data(fem_in_data), .in_ready(fem_in_ready));
  always #5 clk = ~clk;

  `include "gaa_host.svh"

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_two_point = 0, n_uniform = 0, n_mutation = 0, n_stall = 0, n_period149 = 0;
  int n_gen = 0, n_elite_drop = 0, n_roulette = 0, n_init_pairs = 0, cyc = 0, last_load = 0;
  logic [15:0] prev_max = '0;
  logic first_stat = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (dut.ev_two_point) n_two_point++;
    if (dut.ev_uniform)   n_uniform++;
    if (dut.ev_mutation)  n_mutation++;
    if (dut.ev_stall)     n_stall++;
    if (dut.u_su.state == dut.u_su.U_SCAN_CMP) n_roulette++;
    if (dut.femi_load) begin
      if (cyc - last_load == 149) n_period149++;
      last_load = cyc;
      if (dut.cmu_init) n_init_pairs++;
    end
    if (rst_n && dut.afcu_done) begin
      if (!first_stat && dut.max_fit < prev_max) n_elite_drop++;
      prev_max   = dut.max_fit;
      first_stat = 1'b0;
      n_gen++;
    end
  end

  function automatic logic [15:0] onemax(logic [63:0] c);
    return 16'(1000 * $countones(c));
  endfunction

  task automatic run_ga(input logic pop128, input int xo, input int gen_sel, input logic alpha_half,
                        input int p_cross, input int slow_after);
    int n, g, best, best_i, init_best;
    logic [15:0] d, bf, ba, gr;
    n = pop128 ? 128 : 64;
    g = GB << gen_sel;
    load_population(n);
    init_best = 0;
    configure(pop128, xo, gen_sel, alpha_half, p_cross, 40, 5000, $urandom);
    first_stat = 1'b1; n_gen = 0; n_elite_drop = 0; fem_delay = 10;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done) begin
      @(negedge clk);
      if (n_gen == 1 && init_best == 0) init_best = int'(dut.max_fit);
      if (n_gen == slow_after) fem_delay = 400;
    end
    pc_read(16'h8008, d);  check("status done", d == 16'h0002);
    pc_read(16'h800B, gr); check($sformatf("generations %0d", gr), int'(gr) == g);
    check("AFCU passes", n_gen == g + 1);
    check($sformatf("elitism, %0d drops", n_elite_drop), n_elite_drop == 0);
    pc_read(16'h8009, bf);
    pc_read(16'h800A, ba);
    best = -1; best_i = 0;
    for (int i = 0; i < n; i++) begin
      logic [15:0] w0, w1, w2, w3, f;
      int a;
      a = int'(ba) & 16'h0400;   // area of the final population
      pc_read(16'(a + 8*i), w0); pc_read(16'(a + 8*i + 1), w1);
      pc_read(16'(a + 8*i + 2), w2); pc_read(16'(a + 8*i + 3), w3);
      pc_read(16'(a + 8*i + 4), f);
      check($sformatf("slot %0d fitness matches code", i), f == onemax({w3, w2, w1, w0}));
      if (int'(f) > best) begin best = int'(f); best_i = a + 8*i; end
    end
    check($sformatf("best fitness %0d / %0d", bf, best), int'(bf) == best);
    check("best address", int'(ba) == best_i);
    check($sformatf("progress %0d -> %0d", init_best, best), best > init_best);
    $display("run pop=%0d xo=%0d: best %0d after %0d generations", n, xo, best, g);
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_edeg_table(0.5);
    run_ga(1'b0, 2, 0, 1'b0, 220, 3);   // pop 64, adaptive, slow FEM from generation 3
    run_ga(1'b1, 0, 1, 1'b1, 160, 99);  // pop 128, two-point, 12 generations
    run_ga(1'b0, 1, 0, 1'b1, 255, 99);  // pop 64, uniform
    check($sformatf("two-point crossovers %0d", n_two_point), n_two_point > 0);
    check($sformatf("uniform crossovers %0d", n_uniform), n_uniform > 0);
    check($sformatf("mutations %0d", n_mutation), n_mutation > 0);
    check($sformatf("FEM stalls %0d", n_stall), n_stall > 0);
    check($sformatf("149-cycle hand-offs %0d", n_period149), n_period149 > 0);
    check($sformatf("roulette scan steps %0d", n_roulette), n_roulette > 0);
    check($sformatf("initial evaluations %0d", n_init_pairs), n_init_pairs == 32 + 64 + 32);
    $display("two-point %0d uniform %0d mutations %0d stalls %0d period149 %0d",
             n_two_point, n_uniform, n_mutation, n_stall, n_period149);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
