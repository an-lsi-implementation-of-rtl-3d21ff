// fem_model: behavioural Fitness Evaluation Module for simulation.
// Accepts the eight 16-bit words of a chromosome pair (always ready), waits
// `delay` cycles, then returns the two fitness values, one per accepted
// handshake. Fitness functions (FUNC):
//   0  "one-max": 1000 x number of one bits of the 64-bit code
//   1  De Jong's f3 on five 10-bit fields x_i = (v_i - 512)/100 of bits 49:0:
//      f3 = 30 + sum floor(x_i) (0 is the optimum); fitness = 1000 x (56 - f3)
module fem_model #(
  parameter int FUNC = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          delay,
  input  logic        out_valid,
  input  logic [15:0] out_data,
  input  logic        out_last,
  output logic        out_ready,
  output logic        in_valid,
  output logic [15:0] in_data,
  input  logic        in_ready
);

  function automatic int f3_of(logic [63:0] c);
    int s;
    s = 30;
    for (int i = 0; i < 5; i++) begin
      int v;
      v = int'(c[10*i +: 10]) - 512;
      // floor division by 100
      s += (v >= 0) ? (v / 100) : -((-v + 99) / 100);
    end
    return s;
  endfunction

  function automatic logic [15:0] fitness(logic [63:0] c);
    if (FUNC == 1) return 16'(1000 * (56 - f3_of(c)));
    return 16'(1000 * $countones(c));
  endfunction

  logic [127:0] buf_q;
  int           wcnt, wait_cnt, phase;
  logic [15:0]  fa, fb;

  assign out_ready = (phase == 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 0; wcnt <= 0; wait_cnt <= 0; in_valid <= 1'b0; in_data <= '0; buf_q <= '0;
    end else begin
      case (phase)
        0: if (out_valid) begin
             buf_q <= {out_data, buf_q[127:16]};
             wcnt  <= wcnt + 1;
             if (out_last) begin
               phase    <= 1;
               wait_cnt <= 0;
             end
           end
        1: begin
             fa = fitness(buf_q[63:0]);
             fb = fitness(buf_q[127:64]);
             if (wait_cnt >= delay) begin
               in_valid <= 1'b1;
               in_data  <= fa;
               phase    <= 2;
             end
             wait_cnt <= wait_cnt + 1;
           end
        2: if (in_ready) begin
             in_data <= fb;
             phase   <= 3;
           end
        3: if (in_ready) begin
             in_valid <= 1'b0;
             phase    <= 0;
             wcnt     <= 0;
           end
        default: phase <= 0;
      endcase
    end
  end
endmodule
