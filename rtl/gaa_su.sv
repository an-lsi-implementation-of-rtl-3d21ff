// gaa_su: Selection Unit (roulette-wheel selection with elitist strategy).
//
// Builds the next population (at dst_base) from the current one (at
// src_base). Slot 0 of the next population receives the best individual of
// the current one (elitist strategy: the best chromosome found so far is never
// lost, and slot 0 is never mated). Every other slot receives a roulette-wheel
// pick, made without a divider:
//   1. draw r uniformly from [0, sum): take the random number masked to the
//      bit length of `sum` and draw again while r >= sum (a comparison);
//   2. walk the population from slot 0, reading each fitness f: if r < f the
//      slot is picked, otherwise r = r - f (a subtraction) and go on.
// A slot is thus picked with probability f / sum, i.e. pop * f / sum =
// f / ave copies are expected. If every fitness is zero a uniformly random
// slot is taken. The picked individual's code, fitness and family word are
// copied word by word (read, then write). The family word is rewritten in
// copy form: bit 14 the parent's elite flag (fitness >= thr, from the AFCU)
// and bits 13:0 the parent's own elite counts. The parent's word is itself
// in copy form unless the parent was a mated child, i.e. unless its slot is
// in 1 .. 2 x mated.
//
// Timing: per slot, 1 cycle per draw, 2 cycles per scanned slot, 12 cycles of
// copying; `done` pulses once after the last slot.
// Roulette selection by subtraction and comparison and the elitist strategy
// follow the document; the rejection draw, the scan order, the elite slot
// and the word-by-word copy are this design's choice.
module gaa_su
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                pop128,
  input  logic [ADDR_W-1:0]   src_base,
  input  logic [ADDR_W-1:0]   dst_base,
  input  logic [SUM_W-1:0]    sum,
  input  logic [SLOT_W-1:0]   best_slot,
  input  logic [SLOT_W-1:0]   mated,      // pairs mated in the source population
  input  logic [FIT_W-1:0]    thr,
  input  logic [RNG_W-1:0]    rnd,
  output sm_req_t             req,
  input  logic [WORD_W-1:0]   rdata,
  output logic                done,
  output logic                busy
);

  typedef enum logic [2:0] {U_IDLE, U_PICK, U_SCAN_RD, U_SCAN_CMP, U_CPY_RD, U_CPY_WR} su_state_e;
  su_state_e state;

  logic [SLOT_W-1:0] dst_slot, src_slot, scan_slot;
  logic [SUM_W-1:0]  rem;
  logic [2:0]        w;
  logic [FIT_W-1:0]  fit_q;
  logic [SUM_W-1:0]  sum_mask, r_draw;
  logic [SLOT_W-1:0] last_slot;
  logic              src_copy;

  assign busy      = (state != U_IDLE);
  assign last_slot = pop128 ? 7'd127 : 7'd63;
  assign src_copy  = (src_slot == '0) || ({1'b0, src_slot} > {mated, 1'b0});

  // All ones up to the most significant one of sum.
  always_comb begin
    sum_mask = sum;
    for (int k = 1; k < SUM_W; k = k * 2) sum_mask = sum_mask | (sum_mask >> k);
    r_draw = rnd[SUM_W-1:0] & sum_mask;
  end

  always_comb begin
    req = SM_IDLE;
    unique case (state)
      U_SCAN_RD: begin
        req.re   = 1'b1;
        req.addr = slot_addr(src_base, scan_slot, OFF_FIT);
      end
      U_CPY_RD: begin
        req.re   = 1'b1;
        req.addr = slot_addr(src_base, src_slot, 32'(w));
      end
      U_CPY_WR: begin
        req.we   = 1'b1;
        req.addr = slot_addr(dst_base, dst_slot, 32'(w));
        if (w == 3'(OFF_FAM))
          req.wdata = {1'b0, (fit_q >= thr), own_counts(rdata, src_copy)};
        else
          req.wdata = rdata;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= U_IDLE;
      dst_slot  <= '0;
      src_slot  <= '0;
      scan_slot <= '0;
      rem       <= '0;
      w         <= '0;
      fit_q     <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        U_IDLE: if (start) begin
          dst_slot <= '0;
          state    <= U_PICK;
        end
        U_PICK: begin
          w <= '0;
          if (dst_slot == '0) begin
            src_slot <= best_slot;
            state    <= U_CPY_RD;
          end else if (sum == '0) begin
            src_slot <= rnd[SLOT_W-1:0] & last_slot;
            state    <= U_CPY_RD;
          end else if (r_draw < sum) begin
            rem       <= r_draw;
            scan_slot <= '0;
            state     <= U_SCAN_RD;
          end
        end
        U_SCAN_RD: state <= U_SCAN_CMP;
        U_SCAN_CMP: begin
          if ((rem < SUM_W'(rdata)) || (scan_slot == last_slot)) begin
            src_slot <= scan_slot;
            state    <= U_CPY_RD;
          end else begin
            rem       <= rem - SUM_W'(rdata);
            scan_slot <= scan_slot + 1'b1;
            state     <= U_SCAN_RD;
          end
        end
        U_CPY_RD: state <= U_CPY_WR;
        U_CPY_WR: begin
          if (w == 3'(OFF_FIT)) fit_q <= rdata;
          if (w == 3'(OFF_FAM)) begin
            if (dst_slot == last_slot) begin
              state <= U_IDLE;
              done  <= 1'b1;
            end else begin
              dst_slot <= dst_slot + 1'b1;
              state    <= U_PICK;
            end
          end else begin
            w     <= w + 1'b1;
            state <= U_CPY_RD;
          end
        end
        default: state <= U_IDLE;
      endcase
    end
  end

endmodule
