// tb_gaa_pci: writes and reads back every parameter register, checks the
// clamping of the elite threshold, the read-only status registers, the
// one-cycle start on a rising GO edge only while idle, the memory request
// pass-through and its blocking while the GA is busy, and the read-data path.
module tb_gaa_pci;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] pc_addr = 0;
  logic pc_we = 0, pc_re = 0, go = 0;
  logic [WORD_W-1:0] pc_wdata = 0, pc_rdata;
  gaa_cfg_t cfg;
  logic start, busy = 0, done = 0;
  logic [FIT_W-1:0] best_fit = 16'hBEEF, ave = 16'h1234;
  logic [ADDR_W-1:0] best_addr = 15'h0408;
  logic [12:0] gen = 13'd77;
  sm_req_t req;
  logic [WORD_W-1:0] sm_rdata;
  int checks = 0, failures = 0, starts = 0;

  gaa_pci dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) sm_rdata <= req.re ? {1'b0, req.addr} ^ 16'h5A5A : 16'h0;
  always_ff @(posedge clk) if (start) starts++;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); pc_addr = a; pc_wdata = d; pc_we = 1; @(negedge clk); pc_we = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); pc_addr = a; pc_re = 1; @(negedge clk); pc_re = 0; d = pc_rdata;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wr(16'h8000, 16'h002B);   // alpha 0.5, gen_sel 1, uniform, pop 128
    rd(16'h8000, d);
    check("mode readback", d == 16'h002B);
    check("mode fields", cfg.pop128 && cfg.xo_mode == XO_UNIFORM && cfg.gen_sel == 2'd1 && cfg.alpha_half);
    wr(16'h8001, 16'h00C8); rd(16'h8001, d); check("p_cross", d == 16'h00C8 && cfg.p_cross == 8'd200);
    wr(16'h8002, 16'h0011); rd(16'h8002, d); check("p_mut", d == 16'h0011 && cfg.p_mut == 8'd17);
    wr(16'h8003, 16'h2800); rd(16'h8003, d); check("t_cross", cfg.t_cross == 16'h2800 && d == 16'h2800);
    wr(16'h8003, 16'hFFFF); check("t_cross clamp", cfg.t_cross == 16'd16384);
    wr(16'h8004, 16'hCAFE); wr(16'h8005, 16'h00BA);
    check("seed", cfg.seed == 24'hBACAFE);
    wr(16'h8000, 16'h0006); check("mode 3 means adaptive", cfg.xo_mode == XO_ADAPTIVE);
    rd(16'h8009, d); check("best fit", d == 16'hBEEF);
    rd(16'h800A, d); check("best addr", d == 16'h0408);
    rd(16'h800B, d); check("gen", d == 16'd77);
    rd(16'h800C, d); check("ave", d == 16'h1234);
    done = 1; rd(16'h8008, d); check("status", d == 16'h0002); done = 0;
    // memory access while idle
    @(negedge clk); pc_addr = 16'h1234; pc_wdata = 16'h7777; pc_we = 1; #1;
    check("mem write passes", req.we && req.addr == 15'h1234 && req.wdata == 16'h7777);
    @(negedge clk); pc_we = 0;
    rd(16'h0456, d); check("mem read data", d == (16'h0456 ^ 16'h5A5A));
    // GO edge
    @(negedge clk); go = 1; #1; check("start on go edge", start);
    @(negedge clk); #1; check("single start", !start);
    repeat (3) @(negedge clk); go = 0; @(negedge clk);
    check("one start", starts == 1);
    // busy blocks memory, registers and GO
    busy = 1;
    @(negedge clk); pc_addr = 16'h0010; pc_we = 1; pc_re = 0; #1;
    check("mem blocked when busy", !req.we && !req.re);
    @(negedge clk); pc_we = 0;
    wr(16'h8001, 16'h0001); check("regs locked when busy", cfg.p_cross == 8'd200);
    rd(16'h8008, d); check("busy status", d == 16'h0001);
    @(negedge clk); go = 1; #1; check("no start when busy", !start);
    @(negedge clk); go = 0; busy = 0;
    repeat (2) @(negedge clk);
    check("start count", starts == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
