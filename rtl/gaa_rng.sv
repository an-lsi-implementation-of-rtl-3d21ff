// gaa_rng: 24-bit cellular-automaton pseudorandom number generator.
//
// A one-dimensional hybrid rule-90/rule-150 cellular automaton of 24 cells
// with null (zero) boundaries. Every clock each cell becomes the XOR of its two
// neighbours (rule 90), also XORed with its own value where RULE150 has a one
// (rule 150). The rule vector 24'h884DC5 gives the maximum period, 2^24 - 1:
// every non-zero state is visited once. The state is the 24-bit random number
// and is read directly on `rnd`.
//
// `load` (one cycle) loads `seed`; a zero seed, which the automaton would
// never leave, is replaced by 1. `en` advances the automaton; `rnd` changes in
// the cycle after an enabled edge.
// The document specifies a cellular-automaton generator with a 24-bit output
// and a user-set seed; the rule vector, boundaries and zero-seed handling are
// this design's choice.
module gaa_rng #(
  parameter int unsigned           W       = 24,
  parameter logic [W-1:0]          RULE150 = 24'h884DC5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] rnd
);

  logic [W-1:0] state;
  logic [W-1:0] nxt;

  always_comb begin
    nxt = (state << 1) ^ (state >> 1) ^ (state & RULE150);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W'(1);
    end else if (load) begin
      state <= (seed == '0) ? W'(1) : seed;
    end else if (en) begin
      state <= nxt;
    end
  end

  assign rnd = state;

endmodule
