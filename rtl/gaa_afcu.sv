// gaa_afcu: Average Fitness Calculation Unit.
//
// After a generation has been evaluated, `start` makes the unit read the
// fitness word of every slot of the population at `base`, one read per cycle,
// and accumulate the sum, the maximum and the slot holding the maximum (the
// first such slot on ties). From them it derives
//   ave = sum / pop                      (a shift: pop is 64 or 128)
//   thr = ave + alpha * (max - ave)      (alpha = 0.25 or 0.5, a shift)
// thr is the elite condition of equation (1): an individual is an elite when
// its fitness is at least thr.
//
// Timing: the pop reads are issued in the pop cycles after start and the
// last datum arrives one cycle later; `done` pulses pop + 2 cycles after
// start and the outputs then
// hold until the next start.
// The document gives the function (average and maximum per generation, the
// elite condition and alpha); reading the values back from memory in one pass
// and the truncating shifts are this design's choice.
module gaa_afcu
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                pop128,
  input  logic                alpha_half,
  input  logic [ADDR_W-1:0]   base,
  output sm_req_t             req,
  input  logic [WORD_W-1:0]   rdata,
  output logic                done,
  output logic                busy,
  output logic [SUM_W-1:0]    sum,
  output logic [FIT_W-1:0]    max_fit,
  output logic [SLOT_W-1:0]   best_slot,
  output logic [FIT_W-1:0]    ave,
  output logic [FIT_W-1:0]    thr
);

  logic [SLOT_W:0]   issue_cnt;   // next slot to read
  logic [SLOT_W-1:0] data_slot;   // slot whose fitness arrives this cycle
  logic              data_vld;
  logic              first;
  logic [SLOT_W:0]   pop_n;

  assign pop_n = pop128 ? 8'd128 : 8'd64;

  always_comb begin
    req = SM_IDLE;
    if (busy && (issue_cnt < pop_n)) begin
      req.re   = 1'b1;
      req.addr = slot_addr(base, issue_cnt[SLOT_W-1:0], OFF_FIT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      issue_cnt <= '0;
      data_slot <= '0;
      data_vld  <= 1'b0;
      first     <= 1'b0;
      done      <= 1'b0;
      sum       <= '0;
      max_fit   <= '0;
      best_slot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy      <= 1'b1;
        issue_cnt <= '0;
        data_vld  <= 1'b0;
        first     <= 1'b1;
        sum       <= '0;
        max_fit   <= '0;
        best_slot <= '0;
      end else if (busy) begin
        data_vld  <= (issue_cnt < pop_n);
        data_slot <= issue_cnt[SLOT_W-1:0];
        if (issue_cnt < pop_n) issue_cnt <= issue_cnt + 1'b1;
        if (data_vld) begin
          sum <= sum + SUM_W'(rdata);
          if (first || (rdata > max_fit)) begin
            max_fit   <= rdata;
            best_slot <= data_slot;
          end
          first <= 1'b0;
          if (data_slot == SLOT_W'(pop_n - 1'b1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  logic [FIT_W-1:0] spread;
  always_comb begin
    ave    = pop128 ? FIT_W'(sum >> 7) : FIT_W'(sum >> 6);
    spread = max_fit - ave;
    thr    = ave + (alpha_half ? (spread >> 1) : (spread >> 2));
  end

endmodule
