// gaa_chip: Genetic Algorithm Accelerator (GAA) chip, top level.
//
// A generation-based genetic algorithm in hardware: roulette-wheel selection
// with the elitist strategy, two-point / uniform / adaptive crossover, and
// bit mutation, on 64-bit chromosomes with 16-bit fitness. Fitness itself is
// computed outside the chip by a Fitness Evaluation Module (FEM), and the
// population lives in an external 32K x 16 System Memory (SM). In adaptive
// mode the crossover operator is chosen per pair from the parents' elite
// degrees, read from a host-computed table in the SM.
//
// Units: PC Interface (host bus, GO/DONE, parameters), Control Unit
// (generation loop), Average Fitness Calculation Unit, Selection Unit,
// Crossover and Mutation Unit, Random Number Generator (free running, seeded
// at GO), System Memory Interface and FEM Interface.
//
// Ports: the host bus (pc_*, go, done, busy), the SM pins (sm_*: address,
// output enable, write enable, write data, read data sampled one clock after
// the address is driven) and the two FEM handshakes (fem_out_*: eight 16-bit
// words per chromosome pair; fem_in_*: two 16-bit fitness words back).
// GEN_BASE is the number of generations for gen_sel = 0 (512 in the
// document's configuration); it exists so that short simulations can run.
// Single clock, asynchronous active-low reset.
module gaa_chip
  import gaa_pkg::*;
#(
  parameter int unsigned GEN_BASE = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  // PC interface
  input  logic [15:0]         pc_addr,
  input  logic                pc_we,
  input  logic                pc_re,
  input  logic [WORD_W-1:0]   pc_wdata,
  output logic [WORD_W-1:0]   pc_rdata,
  input  logic                go,
  output logic                done,
  output logic                busy,
  // System Memory
  output logic [ADDR_W-1:0]   sm_addr,
  output logic                sm_oe,
  output logic                sm_we,
  output logic [WORD_W-1:0]   sm_wdata,
  input  logic [WORD_W-1:0]   sm_rdata,
  // Fitness Evaluation Module
  output logic                fem_out_valid,
  output logic [WORD_W-1:0]   fem_out_data,
  output logic                fem_out_last,
  input  logic                fem_out_ready,
  input  logic                fem_in_valid,
  input  logic [WORD_W-1:0]   fem_in_data,
  output logic                fem_in_ready
);

  gaa_cfg_t          cfg;
  logic              start;
  logic [1:0]        owner;
  sm_req_t           req_pc, req_afcu, req_su, req_cmu;
  logic [WORD_W-1:0] rdata;
  logic [RNG_W-1:0]  rnd;

  logic              afcu_start, afcu_done, afcu_busy;
  logic [SUM_W-1:0]  sum;
  logic [FIT_W-1:0]  max_fit, ave, thr;
  logic [SLOT_W-1:0] best_slot;
  logic              su_start, su_done, su_busy;
  logic              cmu_start, cmu_init, cmu_done, cmu_busy;
  logic [SLOT_W-1:0] cmu_npairs, xo_pairs;
  logic [ADDR_W-1:0] cur_base, nxt_base;
  logic [12:0]       gen;

  logic              femi_load, femi_idle, res_valid, res_take;
  logic [CODE_W-1:0] code_a, code_b;
  logic [FIT_W-1:0]  fit_a, fit_b;
  logic              ev_two_point, ev_uniform, ev_mutation, ev_stall;

  gaa_pci u_pci (
    .clk, .rst_n, .pc_addr, .pc_we, .pc_re, .pc_wdata, .pc_rdata, .go,
    .cfg, .start, .busy, .done,
    .best_fit (max_fit),
    .best_addr(slot_addr(cur_base, best_slot, 0)),
    .gen, .ave,
    .req      (req_pc),
    .sm_rdata (rdata)
  );

  gaa_cu #(.GEN_BASE(GEN_BASE)) u_cu (
    .clk, .rst_n, .start, .cfg, .owner,
    .afcu_start, .afcu_done, .su_start, .su_done,
    .cmu_start, .cmu_init, .cmu_npairs, .xo_pairs, .cmu_done,
    .cur_base, .nxt_base, .gen, .busy, .done
  );

  gaa_rng u_rng (
    .clk, .rst_n,
    .load (start),
    .seed (cfg.seed),
    .en   (1'b1),
    .rnd
  );

  gaa_afcu u_afcu (
    .clk, .rst_n,
    .start     (afcu_start),
    .pop128    (cfg.pop128),
    .alpha_half(cfg.alpha_half),
    .base      (cur_base),
    .req       (req_afcu),
    .rdata,
    .done      (afcu_done),
    .busy      (afcu_busy),
    .sum, .max_fit, .best_slot, .ave, .thr
  );

  gaa_su u_su (
    .clk, .rst_n,
    .start    (su_start),
    .pop128   (cfg.pop128),
    .src_base (cur_base),
    .dst_base (nxt_base),
    .sum, .best_slot, .thr, .rnd,
    .mated    (xo_pairs),
    .req      (req_su),
    .rdata,
    .done     (su_done),
    .busy     (su_busy)
  );

  gaa_cmu u_cmu (
    .clk, .rst_n,
    .start   (cmu_start),
    .init    (cmu_init),
    .npairs  (cmu_npairs),
    .base    (cmu_init ? cur_base : nxt_base),
    .xo_mode (cfg.xo_mode),
    .p_mut   (cfg.p_mut),
    .t_cross (cfg.t_cross),
    .rnd,
    .req     (req_cmu),
    .rdata,
    .femi_load, .code_a, .code_b, .femi_idle, .res_valid, .fit_a, .fit_b, .res_take,
    .done    (cmu_done),
    .busy    (cmu_busy),
    .ev_two_point, .ev_uniform, .ev_mutation, .ev_stall
  );

  gaa_smi u_smi (
    .clk, .rst_n, .owner, .req_pc, .req_afcu, .req_su, .req_cmu, .rdata,
    .sm_addr, .sm_oe, .sm_we, .sm_wdata, .sm_rdata
  );

  gaa_femi u_femi (
    .clk, .rst_n,
    .load (femi_load),
    .code_a, .code_b,
    .idle (femi_idle),
    .res_valid, .fit_a, .fit_b, .res_take,
    .fem_out_valid, .fem_out_data, .fem_out_last, .fem_out_ready,
    .fem_in_valid, .fem_in_data, .fem_in_ready
  );

endmodule
