// gaa_cu: Control Unit.
//
// Sequences the generation-based GA and decides which unit owns the System
// Memory. After `start`:
//   INIT  the Crossover and Mutation Unit (CMU) sends the host-loaded initial
//         population, pair by pair, to the Fitness Evaluation Module and
//         stores the fitness values (no crossover, no mutation);
//   STAT  the Average Fitness Calculation Unit (AFCU) scans the current
//         population for sum, average, maximum and best slot;
//   SEL   the Selection Unit (SU) builds the next population: the best
//         individual (elitist strategy) plus roulette-wheel picks;
//   XOVR  the CMU mates (pop x p_cross)/2 pairs of the next population,
//         mutates the children and has them evaluated;
// then the two population areas swap roles and STAT follows again. After the
// programmed number of generations (GEN_BASE << gen_sel) the final STAT
// leaves the best individual's fitness and address readable and `done` rises;
// it stays high until the next start.
// The unit's existence and the roulette/elitist/adaptive-crossover generation
// loop follow the document; the phase order and the memory ownership are
// this design's choice. Unit starts are one-cycle pulses, one cycle after the
// state is entered, and each unit answers with a one-cycle done.
module gaa_cu
  import gaa_pkg::*;
#(
  parameter int unsigned GEN_BASE = 512   // generations for gen_sel = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  gaa_cfg_t            cfg,
  output logic [1:0]          owner,      // 0 PC, 1 AFCU, 2 SU, 3 CMU
  output logic                afcu_start,
  input  logic                afcu_done,
  output logic                su_start,
  input  logic                su_done,
  output logic                cmu_start,
  output logic                cmu_init,
  output logic [SLOT_W-1:0]   cmu_npairs,
  output logic [SLOT_W-1:0]   xo_pairs,   // pairs mated per generation
  input  logic                cmu_done,
  output logic [ADDR_W-1:0]   cur_base,
  output logic [ADDR_W-1:0]   nxt_base,
  output logic [12:0]         gen,
  output logic                busy,
  output logic                done
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_STAT, S_SEL, S_XOVR, S_FIN} cu_state_e;
  cu_state_e state;
  logic [12:0] gen_total;

  assign gen_total = 13'(GEN_BASE << cfg.gen_sel);
  // (pop x p_cross/256) / 2 pairs
  assign xo_pairs  = cfg.pop128 ? SLOT_W'(cfg.p_cross >> 2) : SLOT_W'(cfg.p_cross >> 3);
  assign nxt_base  = (cur_base == POP_A_BASE) ? POP_B_BASE : POP_A_BASE;
  assign busy      = (state != S_IDLE) && (state != S_FIN);
  assign done      = (state == S_FIN);

  always_comb begin
    unique case (state)
      S_INIT, S_XOVR: owner = 2'd3;
      S_STAT:         owner = 2'd1;
      S_SEL:          owner = 2'd2;
      default:        owner = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      gen        <= '0;
      cur_base   <= POP_A_BASE;
      afcu_start <= 1'b0;
      su_start   <= 1'b0;
      cmu_start  <= 1'b0;
      cmu_init   <= 1'b0;
      cmu_npairs <= '0;
    end else begin
      afcu_start <= 1'b0;
      su_start   <= 1'b0;
      cmu_start  <= 1'b0;
      unique case (state)
        S_IDLE, S_FIN: if (start) begin
          gen        <= '0;
          cur_base   <= POP_A_BASE;
          cmu_init   <= 1'b1;
          cmu_npairs <= cfg.pop128 ? 7'd64 : 7'd32;
          cmu_start  <= 1'b1;
          state      <= S_INIT;
        end
        S_INIT: if (cmu_done) begin
          afcu_start <= 1'b1;
          state      <= S_STAT;
        end
        S_STAT: if (afcu_done) begin
          if (gen == gen_total) begin
            state <= S_FIN;
          end else begin
            su_start <= 1'b1;
            state    <= S_SEL;
          end
        end
        S_SEL: if (su_done) begin
          if (xo_pairs == '0) begin
            cur_base   <= nxt_base;
            gen        <= gen + 1'b1;
            afcu_start <= 1'b1;
            state      <= S_STAT;
          end else begin
            cmu_init   <= 1'b0;
            cmu_npairs <= xo_pairs;
            cmu_start  <= 1'b1;
            state      <= S_XOVR;
          end
        end
        S_XOVR: if (cmu_done) begin
          cur_base   <= nxt_base;
          gen        <= gen + 1'b1;
          afcu_start <= 1'b1;
          state      <= S_STAT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
