// gaa_host.svh: host-side tasks shared by the chip-level testbenches. They
// drive the PC bus of a `gaa_chip` instance through the signals pc_addr,
// pc_we, pc_re, pc_wdata and pc_rdata of the including module.

task automatic pc_write(input logic [15:0] a, input logic [15:0] d);
  @(negedge clk); pc_addr = a; pc_wdata = d; pc_we = 1'b1; pc_re = 1'b0;
  @(negedge clk); pc_we = 1'b0;
endtask

task automatic pc_read(input logic [15:0] a, output logic [15:0] d);
  @(negedge clk); pc_addr = a; pc_re = 1'b1; pc_we = 1'b0;
  @(negedge clk); pc_re = 1'b0; d = pc_rdata;
endtask

// Elite-degree table with elite influence factor beta: the degree of the
// counts (c1..c4) is sum(cj * beta^j) / sum(2^j * beta^j), in units of 1/4096.
task automatic load_edeg_table(input real beta);
  real den;
  den = 0.0;
  for (int j = 1; j <= 4; j++) den += (2.0 ** j) * (beta ** j);
  for (int a = 0; a < 16384; a++) begin
    real num;
    int c1, c2, c3, c4;
    c1 = a & 3; c2 = (a >> 2) & 7; c3 = (a >> 5) & 15; c4 = (a >> 9) & 31;
    num = c1 * beta + c2 * beta ** 2 + c3 * beta ** 3 + c4 * beta ** 4;
    pc_write(16'h4000 | 16'(a), 16'($rtoi(num / den * 4096.0 + 0.5)));
  end
endtask

// Random initial population in area A (slot i at word 8*i).
task automatic load_population(input int n);
  for (int i = 0; i < n; i++)
    for (int w = 0; w < 4; w++) pc_write(16'(8 * i + w), 16'($urandom));
endtask

task automatic configure(input logic pop128, input int xo, input int gen_sel,
                         input logic alpha_half, input int p_cross, input int p_mut,
                         input int t_cross, input int seed);
  pc_write(16'h8000, {10'd0, alpha_half, 2'(gen_sel), 2'(xo), pop128});
  pc_write(16'h8001, 16'(p_cross));
  pc_write(16'h8002, 16'(p_mut));
  pc_write(16'h8003, 16'(t_cross));
  pc_write(16'h8004, 16'(seed));
  pc_write(16'h8005, 16'(seed >> 16));
endtask
