// tb_gaa_exec_time: execution time per generation of the GAA chip (population
// 128, adaptive crossover, one-max FEM, GEN_BASE = 2 generations per run).
//  1. Against the crossover rate (0, 64, 128, 192, 255 /256) with a fast FEM:
//     the time per generation must grow with the rate, by about 149 cycles
//     per mated pair.
//  2. Against the clock frequency for FEM times of 1, 5 and 10 us per pair:
//     the FEM delay in cycles is time x frequency. The CMU must never wait
//     while a pair's evaluation fits in its 149-cycle period, and must wait
//     when it does not (10 us at 20 MHz and above).
// Prints the cycle counts and the resulting times.
module tb_gaa_exec_time;
  import gaa_pkg::*;
  localparam int GB = 2;
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

  int cyc = 0, stalls = 0, n_stat = 0, t_first = 0, t_last = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.ev_stall && !dut.cmu_init) stalls++;
    if (rst_n && dut.afcu_done) begin
      if (n_stat == 0) t_first = cyc;
      t_last = cyc;
      n_stat++;
    end
  end

  // cycles per generation (from the first to the last statistics pass)
  task automatic run(input int p_cross, input int delay, output int per_gen, output int n_stalls);
    load_population(128);
    configure(1'b1, 2, 0, 1'b0, p_cross, 8, 8192, 12345);
    fem_delay = delay; stalls = 0; n_stat = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    per_gen  = (t_last - t_first) / GB;
    n_stalls = stalls;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, pg, st;
    int rates[5] = '{0, 64, 128, 192, 255};
    int fem_us[3] = '{1, 5, 10};
    int mhz[5] = '{5, 10, 20, 40, 50};
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_edeg_table(0.5);
    // 1. crossover rate
    prev = 0;
    foreach (rates[i]) begin
      int pairs;
      run(rates[i], 10, pg, st);
      pairs = rates[i] >> 2;
      $display("p_cross %3d/256: %0d pairs, %0d cycles per generation, %0d stall cycles", rates[i], pairs, pg, st);
      check($sformatf("time grows with crossover rate (%0d)", rates[i]), pg > prev);
      if (i > 0) check($sformatf("about 149 cycles per pair (%0d)", rates[i]),
                       (pg - prev) >= 149 * (pairs - (rates[i-1] >> 2)) - 20 * 64);
      check("no stall with a fast FEM", st == 0);
      prev = pg;
    end
    // 2. FEM time x clock frequency
    foreach (fem_us[u]) foreach (mhz[m]) begin
      int dly;
      dly = fem_us[u] * mhz[m];
      run(154, dly, pg, st);
      $display("FEM %2d us, %2d MHz: delay %3d cycles, %0d cycles = %0d us per generation, %0d stall cycles",
               fem_us[u], mhz[m], dly, pg, pg / mhz[m], st);
      if (dly + 8 + 4 <= 128) check($sformatf("overlapped at %0d cycles", dly), st == 0);
      if (dly >= 149)         check($sformatf("FEM-bound at %0d cycles", dly), st > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
