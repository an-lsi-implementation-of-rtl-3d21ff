// tb_gaa_dejong: De Jong's step function f3 (five 10-bit variables, shifted
// so that the optimum is 0) solved with each crossover operator: two-point,
// uniform and adaptive, RUNS runs each of at most 512 generations,
// population 128. A run is ended by reset as soon as the optimum appears
// (the memory model keeps its contents; the host reloads it anyway). For
// every run it checks that the optimum is found and that the best fitness
// never drops, and it reports the generation at which the optimum first
// appeared and the average per operator.
module tb_gaa_dejong;
  import gaa_pkg::*;
  localparam int RUNS = 10;
  logic clk = 0, rst_n = 0;
  logic [15:0] pc_addr = 0, pc_wdata = 0, pc_rdata;
  logic pc_we = 0, pc_re = 0, go = 0, done, busy;
  logic [ADDR_W-1:0] sm_addr;
  logic sm_oe, sm_we;
  logic [WORD_W-1:0] sm_wdata, sm_rdata;
  logic fem_out_valid, fem_out_last, fem_out_ready, fem_in_valid, fem_in_ready;
  logic [WORD_W-1:0] fem_out_data, fem_in_data;
  int fem_delay = 40;
  int checks = 0, failures = 0;
  localparam logic [15:0] OPT_FIT = 16'd56000;

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

  int n_stat = 0, n_drop = 0, opt_gen = -1;
  logic [15:0] prev_max = '0;
  always @(posedge clk) begin
    if (rst_n && dut.afcu_done) begin
      if (n_stat > 0 && dut.max_fit < prev_max) n_drop++;
      if (dut.max_fit == OPT_FIT && opt_gen < 0) opt_gen = n_stat;
      prev_max = dut.max_fit;
      n_stat++;
    end
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names[3] = '{"two-point", "uniform", "adaptive"};
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_edeg_table(0.5);
    for (int xo = 0; xo < 3; xo++) begin
      int total, found;
      total = 0; found = 0;
      for (int r = 0; r < RUNS; r++) begin
        logic [15:0] bf;
        load_population(128);
        configure(1'b1, xo, 0, 1'b0, 154, 10, 8192, 1000 * r + 17 * xo + 5);
        n_stat = 0; n_drop = 0; opt_gen = -1;
        @(negedge clk); go = 1; @(negedge clk); go = 0;
        while (!done && opt_gen < 0) @(negedge clk);
        if (done) begin
          pc_read(16'h8009, bf);
          check("generations", n_stat == 513);
        end else begin
          bf = dut.max_fit;
          rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
        end
        check($sformatf("%s run %0d: optimum found (f3 = %0d)", names[xo], r, 56 - int'(bf) / 1000), bf == OPT_FIT);
        check($sformatf("%s run %0d: elitism", names[xo], r), n_drop == 0);
        if (opt_gen >= 0) begin total += opt_gen; found++; end
        $display("%s run %0d: optimum first in generation %0d", names[xo], r, opt_gen);
      end
      if (found > 0) $display("%s: average generation of the optimum %0d", names[xo], total / found);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
