// gaa_femi: Fitness Evaluation Module Interface.
//
// Hands a pair of new chromosomes to the external Fitness Evaluation Module
// (FEM) and collects their two fitness values, so that the FEM can work while
// the Crossover and Mutation Unit builds the next pair.
//
// Chip side: when `idle` is high, a one-cycle `load` captures the two 64-bit
// codes. The FEM's two results are presented on `fit_a`/`fit_b` with
// `res_valid`; a one-cycle `res_take` releases them and makes the interface
// idle again. One pair is in flight at a time.
//
// FEM side, two valid/ready handshakes (a word moves on a clock edge where
// both are high):
//   out: eight 16-bit words, code A bits 15:0 first ... code B bits 63:48 last;
//        `fem_out_last` marks the eighth word.
//   in:  two 16-bit words, the fitness of A then of B.
// The document asks for a handshaking interface to which any FEM can be
// attached; the 16-bit word transfers (the chip has only 76 signal pins) and
// the valid/ready protocol are this design's choice.
module gaa_femi
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // chip side
  input  logic                load,
  input  logic [CODE_W-1:0]   code_a,
  input  logic [CODE_W-1:0]   code_b,
  output logic                idle,
  output logic                res_valid,
  output logic [FIT_W-1:0]    fit_a,
  output logic [FIT_W-1:0]    fit_b,
  input  logic                res_take,
  // FEM side
  output logic                fem_out_valid,
  output logic [WORD_W-1:0]   fem_out_data,
  output logic                fem_out_last,
  input  logic                fem_out_ready,
  input  logic                fem_in_valid,
  input  logic [WORD_W-1:0]   fem_in_data,
  output logic                fem_in_ready
);

  typedef enum logic [1:0] {F_IDLE, F_SEND, F_RECV, F_HOLD} fstate_e;
  fstate_e state;
  logic [2*CODE_W-1:0] buf_q;   // {code_b, code_a}, shifted out 16 bits at a time
  logic [2:0] wcnt;
  logic       rcnt;

  assign idle          = (state == F_IDLE);
  assign res_valid     = (state == F_HOLD);
  assign fem_out_valid = (state == F_SEND);
  assign fem_out_data  = buf_q[WORD_W-1:0];
  assign fem_out_last  = (state == F_SEND) && (wcnt == 3'd7);
  assign fem_in_ready  = (state == F_RECV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE;
      buf_q <= '0;
      wcnt  <= '0;
      rcnt  <= 1'b0;
      fit_a <= '0;
      fit_b <= '0;
    end else begin
      unique case (state)
        F_IDLE: if (load) begin
          buf_q <= {code_b, code_a};
          wcnt  <= '0;
          state <= F_SEND;
        end
        F_SEND: if (fem_out_ready) begin
          buf_q <= buf_q >> WORD_W;
          wcnt  <= wcnt + 1'b1;
          if (wcnt == 3'd7) begin
            rcnt  <= 1'b0;
            state <= F_RECV;
          end
        end
        F_RECV: if (fem_in_valid) begin
          if (!rcnt) fit_a <= fem_in_data;
          else       fit_b <= fem_in_data;
          rcnt <= 1'b1;
          if (rcnt) state <= F_HOLD;
        end
        F_HOLD: if (res_take) state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end

  // Handshake rules: an offered word stays put until it is taken, and the
  // chip side loads only when idle.
  a_out_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (fem_out_valid && !fem_out_ready) |=> (fem_out_valid && $stable(fem_out_data)));
  a_load_idle : assert property (@(posedge clk) disable iff (!rst_n)
    load |-> idle);
  a_take_valid : assert property (@(posedge clk) disable iff (!rst_n)
    res_take |-> res_valid);

endmodule
