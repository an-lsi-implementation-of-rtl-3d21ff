// gaa_cmu: Crossover and Mutation Unit, with on-the-fly crossover selection.
//
// Mates `npairs` pairs of the population at `base`: pair k is slots
// (2k+1, 2k+2) (slot 0 holds the elite and is left alone). The Selection Unit
// filled the population by roulette-wheel picks in random order, so
// neighbouring slots are randomly chosen pairs. For each pair:
//   1. read both family words, the two elite degrees from the look-up table
//      (System Memory address TABLE_BASE + elite counts) and both codes;
//   2. choose the operator. In adaptive mode
//        E_deg2 = E_deg(a) + E_deg(b) + E1(a) + E1(b)      (1.0 = 4096)
//      selects two-point crossover when E_deg2 >= t_cross and uniform
//      crossover otherwise; the other modes force one operator. Two-point
//      crossover swaps bits [lo, hi) between two random cut points; uniform
//      crossover swaps the bits where a 64-bit random mask has ones;
//   3. mutate bit-serially: the 128 bits of both children rotate through a
//      one-bit window, one bit per cycle, and each is flipped when a 12-bit
//      random number is below p_mut (rate p_mut/4096 per bit);
//   4. hand both children to the FEM Interface and write their codes back.
// The children's family words (counts derived from both parents) and the
// fitness values returned by the FEM for the previous pair are written while
// the memory port is idle during mutation, so the FEM works in parallel.
//
// Timing: 12 read cycles, crossover in the cycle the last word arrives, 128
// mutation cycles, then the hand-off together with the first of 8 code
// writes: a new pair reaches the FEM every 149 cycles, as long as the FEM
// returns each pair's fitness within about 130 cycles; otherwise the unit
// waits before the hand-off. `done` pulses after the last fitness is stored.
// With `init` set the unit instead sends slots (2k, 2k+1), k < npairs,
// unchanged to the FEM and stores their fitness and a zero family word: this
// evaluates the initial population.
// The operators, the selection rule (equation 3), the table look-up, the
// mutation rate scale and the 149-cycle hand-off period follow the document;
// the cycle schedule that produces that period, bit-serial mutation, the
// cut-point and mask generation and the slot pairing are this design's choice.
module gaa_cmu
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                init,
  input  logic [SLOT_W-1:0]   npairs,
  input  logic [ADDR_W-1:0]   base,
  input  xo_mode_e            xo_mode,
  input  logic [7:0]          p_mut,
  input  logic [15:0]         t_cross,
  input  logic [RNG_W-1:0]    rnd,
  // System Memory
  output sm_req_t             req,
  input  logic [WORD_W-1:0]   rdata,
  // FEM Interface
  output logic                femi_load,
  output logic [CODE_W-1:0]   code_a,
  output logic [CODE_W-1:0]   code_b,
  input  logic                femi_idle,
  input  logic                res_valid,
  input  logic [FIT_W-1:0]    fit_a,
  input  logic [FIT_W-1:0]    fit_b,
  output logic                res_take,
  // status and event pulses
  output logic                done,
  output logic                busy,
  output logic                ev_two_point,
  output logic                ev_uniform,
  output logic                ev_mutation,
  output logic                ev_stall
);

  typedef enum logic [2:0] {C_IDLE, C_RD, C_XO, C_MUT, C_HAND, C_WR, C_FLUSH} cmu_state_e;
  cmu_state_e state;

  logic [3:0]          cnt;          // read / write word counter
  logic [6:0]          mcnt;         // mutation bit counter
  logic [SLOT_W-1:0]   pair_cnt;
  logic [SLOT_W-1:0]   slot_a;       // current pair is (slot_a, slot_a + 1)
  logic [SLOT_W-1:0]   slot_b;
  logic [15:0]         fam_a_q, fam_b_q;
  logic [15:0]         tbl_a_q, tbl_b_q;
  logic [CODE_W-1:0]   pa_q, pb_q;
  logic [CODE_W-1:0]   umask_q;
  logic [2*CODE_W-1:0] ch_q;         // {child b, child a}
  logic [15:0]         child_fam_q;
  logic [1:0]          fam_pending;  // family words still to write
  logic                fit_pending;  // previous pair's fitness still to write
  logic                fit_sub;      // 0: fitness of A next, 1: of B
  logic [SLOT_W-1:0]   fit_slot_a, fit_slot_b;

  assign slot_b = slot_a + 1'b1;
  assign busy   = (state != C_IDLE);
  assign code_a = ch_q[CODE_W-1:0];
  assign code_b = ch_q[2*CODE_W-1:CODE_W];

  // ---------------------------------------------------------------- crossover
  logic [CODE_W-1:0] pb_full, xmask, mask2, cut_lo_m, cut_hi_m;
  logic [5:0]        cut1, cut2, lo, hi;
  logic [17:0]       edeg2;
  logic              use_two_point;

  always_comb begin
    pb_full  = {rdata, pb_q[47:0]};            // last word arrives now
    cut1     = rnd[17:12];
    cut2     = rnd[23:18];
    lo       = (cut1 < cut2) ? cut1 : cut2;
    hi       = (cut1 < cut2) ? cut2 : cut1;
    cut_lo_m = (64'd1 << lo) - 64'd1;
    cut_hi_m = (64'd1 << hi) - 64'd1;
    mask2    = cut_hi_m ^ cut_lo_m;            // bits lo .. hi-1
    edeg2    = 18'(tbl_a_q) + 18'(tbl_b_q)
             + (fam_a_q[14] ? 18'(EDEG_ONE) : 18'd0)
             + (fam_b_q[14] ? 18'(EDEG_ONE) : 18'd0);
    unique case (xo_mode)
      XO_TWO_POINT: use_two_point = 1'b1;
      XO_UNIFORM:   use_two_point = 1'b0;
      default:      use_two_point = (edeg2 >= 18'(t_cross));
    endcase
    xmask = use_two_point ? mask2 : umask_q;
  end

  // ---------------------------------------------------------------- mutation
  logic flip;
  assign flip = (rnd[11:0] < {4'd0, p_mut});

  // ---------------------------------------------------------- memory requests
  logic hand_clear;
  logic do_pending_fam, do_pending_fit;
  assign hand_clear     = (fam_pending == 2'd0) && !fit_pending && femi_idle;
  assign do_pending_fam = (fam_pending != 2'd0);
  assign do_pending_fit = !do_pending_fam && fit_pending && res_valid;

  logic pending_slot;   // state in which the port is free for pending writes
  assign pending_slot = (state == C_MUT) || (state == C_FLUSH) ||
                        ((state == C_HAND) && !hand_clear);

  always_comb begin
    req      = SM_IDLE;
    res_take = 1'b0;
    if (state == C_RD) begin
      req.re = 1'b1;
      unique case (cnt)
        4'd0:    req.addr = slot_addr(base, slot_a, OFF_FAM);
        4'd1:    req.addr = slot_addr(base, slot_b, OFF_FAM);
        4'd2:    req.addr = TABLE_BASE | ADDR_W'(fam_a_q[13:0]);
        4'd3:    req.addr = TABLE_BASE | ADDR_W'(fam_b_q[13:0]);
        default: req.addr = (cnt < 4'd8) ? slot_addr(base, slot_a, 32'(cnt - 4'd4))
                                         : slot_addr(base, slot_b, 32'(cnt - 4'd8));
      endcase
    end else if (((state == C_HAND) && hand_clear && !init) || (state == C_WR)) begin
      req.we = 1'b1;
      unique case (cnt[2])
        1'b0: begin
          req.addr  = slot_addr(base, slot_a, 32'(cnt[1:0]));
          req.wdata = code_a[16*cnt[1:0] +: 16];
        end
        default: begin
          req.addr  = slot_addr(base, slot_b, 32'(cnt[1:0]));
          req.wdata = code_b[16*cnt[1:0] +: 16];
        end
      endcase
    end else if (pending_slot && do_pending_fam) begin
      req.we    = 1'b1;
      req.addr  = slot_addr(base, (fam_pending == 2'd2) ? slot_a : slot_b, OFF_FAM);
      req.wdata = child_fam_q;
    end else if (pending_slot && do_pending_fit) begin
      req.we    = 1'b1;
      req.addr  = slot_addr(base, fit_sub ? fit_slot_b : fit_slot_a, OFF_FIT);
      req.wdata = fit_sub ? fit_b : fit_a;
      res_take  = fit_sub;
    end
  end

  assign femi_load    = (state == C_HAND) && hand_clear;
  assign ev_stall     = (state == C_HAND) && !hand_clear;
  assign ev_mutation  = (state == C_MUT) && flip;

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      cnt          <= '0;
      mcnt         <= '0;
      pair_cnt     <= '0;
      slot_a       <= '0;
      fam_a_q      <= '0;
      fam_b_q      <= '0;
      tbl_a_q      <= '0;
      tbl_b_q      <= '0;
      pa_q         <= '0;
      pb_q         <= '0;
      umask_q      <= '0;
      ch_q         <= '0;
      child_fam_q  <= '0;
      fam_pending  <= '0;
      fit_pending  <= 1'b0;
      fit_sub      <= 1'b0;
      fit_slot_a   <= '0;
      fit_slot_b   <= '0;
      done         <= 1'b0;
      ev_two_point <= 1'b0;
      ev_uniform   <= 1'b0;
    end else begin
      done         <= 1'b0;
      ev_two_point <= 1'b0;
      ev_uniform   <= 1'b0;

      // pending writes of family words and of the previous pair's fitness
      if (pending_slot && do_pending_fam) begin
        fam_pending <= fam_pending - 1'b1;
      end else if (pending_slot && do_pending_fit) begin
        fit_sub <= ~fit_sub;
        if (fit_sub) fit_pending <= 1'b0;
      end

      unique case (state)
        C_IDLE: if (start) begin
          slot_a   <= init ? SLOT_W'(0) : SLOT_W'(1);
          pair_cnt <= '0;
          cnt      <= '0;
          state    <= (npairs == '0) ? C_FLUSH : C_RD;
        end

        C_RD: begin
          umask_q <= {umask_q[CODE_W-RNG_W-1:0], rnd};
          if (cnt != 4'd0) begin
            unique case (cnt)
              4'd1:  fam_a_q <= rdata;
              4'd2:  fam_b_q <= rdata;
              4'd3:  tbl_a_q <= rdata;
              4'd4:  tbl_b_q <= rdata;
              4'd5, 4'd6, 4'd7, 4'd8:
                     pa_q[16*(cnt-4'd5) +: 16] <= rdata;
              default: pb_q[16*(cnt-4'd9) +: 16] <= rdata;
            endcase
          end
          cnt <= cnt + 1'b1;
          if (cnt == 4'd11) state <= C_XO;
        end

        C_XO: begin
          fam_pending <= 2'd2;
          mcnt        <= '0;
          cnt         <= '0;
          if (init) begin
            ch_q        <= {pb_full, pa_q};
            child_fam_q <= 16'd0;
            state       <= C_HAND;
          end else begin
            ch_q        <= {(pb_full & ~xmask) | (pa_q & xmask),
                            (pa_q & ~xmask) | (pb_full & xmask)};
            child_fam_q <= {2'b00, child_counts(fam_a_q, fam_b_q)};
            ev_two_point <= use_two_point;
            ev_uniform   <= !use_two_point;
            state       <= C_MUT;
          end
        end

        C_MUT: begin
          ch_q <= {ch_q[0] ^ flip, ch_q[2*CODE_W-1:1]};
          mcnt <= mcnt + 1'b1;
          if (mcnt == 7'd127) state <= C_HAND;
        end

        C_HAND: if (hand_clear) begin
          fit_pending <= 1'b1;
          fit_sub     <= 1'b0;
          fit_slot_a  <= slot_a;
          fit_slot_b  <= slot_b;
          cnt         <= 4'd1;
          if (init) begin
            pair_cnt <= pair_cnt + 1'b1;
            slot_a   <= slot_a + 7'd2;
            cnt      <= '0;
            state    <= (pair_cnt + 1'b1 == npairs) ? C_FLUSH : C_RD;
          end else begin
            state <= C_WR;
          end
        end

        C_WR: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'd7) begin
            pair_cnt <= pair_cnt + 1'b1;
            slot_a   <= slot_a + 7'd2;
            cnt      <= '0;
            state    <= (pair_cnt + 1'b1 == npairs) ? C_FLUSH : C_RD;
          end
        end

        C_FLUSH: if (!fit_pending && (fam_pending == 2'd0)) begin
          done  <= 1'b1;
          state <= C_IDLE;
        end

        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
