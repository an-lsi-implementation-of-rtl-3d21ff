// gaa_smi: System Memory Interface.
//
// The System Memory is one external 32K x 16 static RAM with a single port.
// Four requesters share it: the PC Interface (only while the GA is idle), the
// Average Fitness Calculation Unit, the Selection Unit and the Crossover and
// Mutation Unit. The Control Unit runs them one at a time and names the owner
// on `owner`; the interface forwards that requester's address, write enable
// and write data to the memory pins in the same cycle and registers the
// memory's read data, so every requester sees the word it read on `rdata`
// in the next cycle. A request from a unit that does not own the memory is
// dropped (and flagged by an assertion).
// The 16-bit data and 15-bit address widths follow the document; the
// ownership scheme and the one-cycle read latency (an asynchronous SRAM
// whose output is sampled at the next clock edge) are this design's choice.
module gaa_smi
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          owner,     // 0 PC, 1 AFCU, 2 SU, 3 CMU
  input  sm_req_t             req_pc,
  input  sm_req_t             req_afcu,
  input  sm_req_t             req_su,
  input  sm_req_t             req_cmu,
  output logic [WORD_W-1:0]   rdata,
  // memory pins
  output logic [ADDR_W-1:0]   sm_addr,
  output logic                sm_oe,
  output logic                sm_we,
  output logic [WORD_W-1:0]   sm_wdata,
  input  logic [WORD_W-1:0]   sm_rdata
);

  sm_req_t sel;

  always_comb begin
    unique case (owner)
      2'd0:    sel = req_pc;
      2'd1:    sel = req_afcu;
      2'd2:    sel = req_su;
      default: sel = req_cmu;
    endcase
  end

  assign sm_addr  = sel.addr;
  assign sm_oe    = sel.re & ~sel.we;
  assign sm_we    = sel.we;
  assign sm_wdata = sel.wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (sm_oe) rdata <= sm_rdata;
  end

  // Only the owner may access the memory.
  a_owner_only : assert property (@(posedge clk) disable iff (!rst_n)
    ((owner != 2'd1) -> !(req_afcu.re || req_afcu.we)) &&
    ((owner != 2'd2) -> !(req_su.re   || req_su.we))   &&
    ((owner != 2'd3) -> !(req_cmu.re  || req_cmu.we)));

endmodule
