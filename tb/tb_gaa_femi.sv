// tb_gaa_femi: loads random chromosome pairs, accepts the eight outgoing
// words with random back-pressure, checks their order and the last-word
// flag, returns two fitness words with random gaps, and checks the results
// seen by the chip side and the idle/valid/take protocol.
module tb_gaa_femi;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load = 0, idle, res_valid, res_take = 0;
  logic [CODE_W-1:0] code_a, code_b;
  logic [FIT_W-1:0] fit_a, fit_b;
  logic fem_out_valid, fem_out_last, fem_out_ready = 0;
  logic [WORD_W-1:0] fem_out_data, fem_in_data;
  logic fem_in_valid = 0, fem_in_ready;
  int checks = 0, failures = 0;

  gaa_femi dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] expw;
    logic [15:0]  fa, fb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 50; p++) begin
      @(negedge clk);
      check("idle before load", idle && !res_valid && !fem_out_valid);
      code_a = {$urandom, $urandom}; code_b = {$urandom, $urandom};
      expw = {code_b, code_a};
      load = 1; @(negedge clk); load = 0;
      check("busy after load", !idle);
      for (int w = 0; w < 8; w++) begin
        fem_out_ready = 0;
        while ($urandom_range(2) == 0) begin
          @(negedge clk);
          check("valid held", fem_out_valid);
        end
        fem_out_ready = 1;
        #1;
        check($sformatf("pair %0d word %0d", p, w), fem_out_valid && fem_out_data == expw[16*w +: 16]);
        check("last flag", fem_out_last == (w == 7));
        @(negedge clk);
      end
      fem_out_ready = 0;
      check("no more words", !fem_out_valid);
      fa = 16'($urandom); fb = 16'($urandom);
      repeat ($urandom_range(4)) @(negedge clk);
      check("ready for result", fem_in_ready);
      fem_in_valid = 1; fem_in_data = fa; @(negedge clk);
      fem_in_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
      check("no result after one word", !res_valid);
      fem_in_valid = 1; fem_in_data = fb; @(negedge clk);
      fem_in_valid = 0;
      check("result valid", res_valid && !fem_in_ready);
      check("fit a", fit_a == fa);
      check("fit b", fit_b == fb);
      repeat ($urandom_range(3)) @(negedge clk);
      check("result held", res_valid && fit_a == fa && fit_b == fb);
      res_take = 1; @(negedge clk); res_take = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
