// gaa_pci: PC Interface.
//
// Connects the chip to the host PC's local bus. The host programs the GA
// parameters of Table 1 in a small register file, loads the System Memory
// (initial population and elite-degree table) through the chip, starts the GA
// with the GO pin and waits for the DONE pin, then reads the results.
//
// Bus: one access per cycle. pc_addr[15] = 1 selects a register
// (pc_addr[3:0]); pc_addr[15] = 0 selects System Memory word pc_addr[14:0].
// pc_we writes pc_wdata; pc_re reads, and the data appears on pc_rdata in
// the next cycle. Memory accesses are ignored while the GA runs (busy).
//   reg 0 MODE    [0] pop128 [2:1] crossover (0 two-point, 1 uniform,
//                 2 adaptive) [4:3] generations 512<<n [5] alpha 0.5
//   reg 1 P_CROSS [7:0] crossover rate /256
//   reg 2 P_MUT   [7:0] mutation rate /4096
//   reg 3 T_CROSS elite threshold, 1.0 = 4096
//   reg 4 SEED_LO, reg 5 SEED_HI [7:0]: random number generator seed
//   reg 8 STATUS  [0] busy [1] done (read only)
//   reg 9 BEST_FIT, reg 10 BEST_ADDR (memory address of the best
//   individual), reg 11 GEN (generations completed), reg 12 AVE (read only)
// A rising edge on `go` while idle gives a one-cycle `start`.
// GO, DONE and the programmable parameters follow the document; the register
// map, the bus protocol and the reset values are this design's choice.
module gaa_pci
  import gaa_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // host bus
  input  logic [15:0]         pc_addr,
  input  logic                pc_we,
  input  logic                pc_re,
  input  logic [WORD_W-1:0]   pc_wdata,
  output logic [WORD_W-1:0]   pc_rdata,
  input  logic                go,
  // chip side
  output gaa_cfg_t            cfg,
  output logic                start,
  input  logic                busy,
  input  logic                done,
  input  logic [FIT_W-1:0]    best_fit,
  input  logic [ADDR_W-1:0]   best_addr,
  input  logic [12:0]         gen,
  input  logic [FIT_W-1:0]    ave,
  output sm_req_t             req,
  input  logic [WORD_W-1:0]   sm_rdata
);

  logic             go_q;
  logic             reg_rd_q;
  logic [WORD_W-1:0] reg_rdata_q;
  logic [WORD_W-1:0] reg_rdata;

  assign start = go && !go_q && !busy;

  always_comb begin
    req = SM_IDLE;
    if (!pc_addr[15] && !busy) begin
      req.re    = pc_re;
      req.we    = pc_we;
      req.addr  = pc_addr[ADDR_W-1:0];
      req.wdata = pc_wdata;
    end
  end

  always_comb begin
    unique case (pc_addr[3:0])
      4'd0:    reg_rdata = {10'd0, cfg.alpha_half, cfg.gen_sel, cfg.xo_mode, cfg.pop128};
      4'd1:    reg_rdata = {8'd0, cfg.p_cross};
      4'd2:    reg_rdata = {8'd0, cfg.p_mut};
      4'd3:    reg_rdata = cfg.t_cross;
      4'd4:    reg_rdata = cfg.seed[15:0];
      4'd5:    reg_rdata = {8'd0, cfg.seed[23:16]};
      4'd8:    reg_rdata = {14'd0, done, busy};
      4'd9:    reg_rdata = best_fit;
      4'd10:   reg_rdata = {1'b0, best_addr};
      4'd11:   reg_rdata = {3'd0, gen};
      4'd12:   reg_rdata = ave;
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_q         <= 1'b0;
      reg_rd_q     <= 1'b0;
      reg_rdata_q  <= '0;
      cfg.pop128     <= 1'b1;
      cfg.xo_mode    <= XO_ADAPTIVE;
      cfg.gen_sel    <= 2'd0;
      cfg.alpha_half <= 1'b0;
      cfg.p_cross    <= 8'd154;
      cfg.p_mut      <= 8'd4;
      cfg.t_cross    <= 16'd8192;
      cfg.seed       <= 24'h000001;
    end else begin
      go_q <= go;
      if (pc_re) begin
        reg_rd_q    <= pc_addr[15];
        reg_rdata_q <= reg_rdata;
      end
      if (pc_we && pc_addr[15] && !busy) begin
        unique case (pc_addr[3:0])
          4'd0: begin
            cfg.pop128     <= pc_wdata[0];
            cfg.xo_mode    <= (pc_wdata[2:1] == 2'd3) ? XO_ADAPTIVE : xo_mode_e'(pc_wdata[2:1]);
            cfg.gen_sel    <= pc_wdata[4:3];
            cfg.alpha_half <= pc_wdata[5];
          end
          4'd1: cfg.p_cross      <= pc_wdata[7:0];
          4'd2: cfg.p_mut        <= pc_wdata[7:0];
          4'd3: cfg.t_cross      <= (pc_wdata > 16'd16384) ? 16'd16384 : pc_wdata;
          4'd4: cfg.seed[15:0]   <= pc_wdata;
          4'd5: cfg.seed[23:16]  <= pc_wdata[7:0];
          default: ;
        endcase
      end
    end
  end

  assign pc_rdata = reg_rd_q ? reg_rdata_q : sm_rdata;

endmodule
