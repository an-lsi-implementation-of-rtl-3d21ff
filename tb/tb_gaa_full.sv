// tb_gaa_full: one complete GA run of the GAA chip with every parameter at
// its default (512 generations), population 128, adaptive crossover, on De
// Jong's step function f3 (five 10-bit variables, shifted so that the optimum
// is 0). The FEM model answers after 50 cycles. Checks: DONE after exactly 512
// generations, elitism in every generation, the final population's fitness
// values against their codes, the best-fitness register, and that the
// optimum f3 = 0 is found; reports the generation where it first appears.
module tb_gaa_full;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] pc_addr = 0, pc_wdata = 0, pc_rdata;
  logic pc_we = 0, pc_re = 0, go = 0, done, busy;
  logic [ADDR_W-1:0] sm_addr;
  logic sm_oe, sm_we;
  logic [WORD_W-1:0] sm_wdata, sm_rdata;
  logic fem_out_valid, fem_out_last, fem_out_ready, fem_in_valid, fem_in_ready;
  logic [WORD_W-1:0] fem_out_data, fem_in_data;
  int fem_delay = 50;
  int checks = 0, failures = 0;
  localparam logic [15:0] OPT_FIT = 16'd56000;   // f3 = 0

  gaa_chip dut (.*);
  sram_32kx16 u_sm (.clk, .addr(sm_addr), .oe(sm_oe), .we(sm_we), .wdata(sm_wdata), .rdata(sm_rdata));
  fem_model #(.FUNC(1)) u_fem (.clk, .rst_n, .delay(fem_delay),
    .out_valid(fem_out_valid), .out_data(fem_out_data), .out_last(fem_out_last), .out_ready(fem_out_ready),
    .in_valid(fem_in_valid), .in_data(fem_in_data), .in_ready(fem_in_ready));
  always #5 clk = ~clk;

  `include "gaa_host.svh"

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_stat = 0, n_drop = 0, opt_gen = -1, cyc = 0;
  logic [15:0] prev_max = '0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.afcu_done) begin
      if (n_stat > 0 && dut.max_fit < prev_max) n_drop++;
      if (dut.max_fit == OPT_FIT && opt_gen < 0) opt_gen = n_stat;
      prev_max = dut.max_fit;
      n_stat++;
    end
  end

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d, bf, ba;
    int best, t0;
    opt_gen = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_edeg_table(0.5);
    load_population(128);
    configure(1'b1, 2, 0, 1'b0, 154, 10, 8192, 32'h3A5C71);
    t0 = cyc;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    $display("GA run: %0d cycles, %0d per generation", cyc - t0, (cyc - t0) / 512);
    pc_read(16'h800B, d); check($sformatf("generations %0d", d), d == 16'd512);
    check($sformatf("AFCU passes %0d", n_stat), n_stat == 513);
    check($sformatf("elitism drops %0d", n_drop), n_drop == 0);
    pc_read(16'h8009, bf);
    pc_read(16'h800A, ba);
    best = -1;
    for (int i = 0; i < 128; i++) begin
      logic [15:0] w0, w1, w2, w3, f;
      int a;
      a = (int'(ba) & 32'h0400) + 8*i;
      pc_read(16'(a), w0); pc_read(16'(a + 1), w1); pc_read(16'(a + 2), w2); pc_read(16'(a + 3), w3);
      pc_read(16'(a + 4), f);
      check($sformatf("slot %0d fitness", i), f == u_fem.fitness({w3, w2, w1, w0}));
      if (int'(f) > best) best = int'(f);
    end
    check("best register", int'(bf) == best);
    check($sformatf("optimum found (best fitness %0d)", best), bf == OPT_FIT);
    $display("De Jong f3: best f3 = %0d, optimum first reached in generation %0d", 56 - best / 1000, opt_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
