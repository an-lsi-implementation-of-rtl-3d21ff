// tb_gaa_smi: drives random requests from all four requesters, switches the
// owner, and checks that the memory pins carry the owner's request and that
// read data comes back one cycle later from a memory model.
module tb_gaa_smi;
  import gaa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] owner;
  sm_req_t req_pc, req_afcu, req_su, req_cmu, sel;
  logic [WORD_W-1:0] rdata, sm_wdata, sm_rdata;
  logic [ADDR_W-1:0] sm_addr;
  logic sm_oe, sm_we;
  logic [15:0] mem [0:32767];
  int checks = 0, failures = 0;

  gaa_smi dut (.*);
  always #5 clk = ~clk;
  assign sm_rdata = mem[sm_addr];
  always @(posedge clk) if (sm_we) mem[sm_addr] <= sm_wdata;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic sm_req_t rnd_req();
    sm_req_t r;
    r.addr  = 15'($urandom);
    r.wdata = 16'($urandom);
    r.we    = ($urandom_range(3) == 0);
    r.re    = !r.we && ($urandom_range(1) == 0);
    return r;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        exp_vld;
    logic [15:0] exp_data;
    for (int i = 0; i < 32768; i++) mem[i] = 16'(i * 7 + 3);
    owner = 0; req_pc = SM_IDLE; req_afcu = SM_IDLE; req_su = SM_IDLE; req_cmu = SM_IDLE;
    exp_vld = 0; exp_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (exp_vld) check($sformatf("read data %0d", k), rdata == exp_data);
      owner    = 2'($urandom);
      req_pc   = (owner == 0) ? rnd_req() : SM_IDLE;
      req_afcu = (owner == 1) ? rnd_req() : SM_IDLE;
      req_su   = (owner == 2) ? rnd_req() : SM_IDLE;
      req_cmu  = (owner == 3) ? rnd_req() : SM_IDLE;
      // non-owners may present an address, but no access
      if (owner != 0) req_pc.addr = 15'($urandom);
      case (owner) 0: sel = req_pc; 1: sel = req_afcu; 2: sel = req_su; default: sel = req_cmu; endcase
      #1;
      check("address", sm_addr == sel.addr);
      check("write enable", sm_we == sel.we);
      check("output enable", sm_oe == (sel.re && !sel.we));
      if (sel.we) check("write data", sm_wdata == sel.wdata);
      exp_vld  = sel.re && !sel.we;
      exp_data = mem[sel.addr];
      if (sel.we) mem[sel.addr] = sel.wdata;   // model the write here too
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
