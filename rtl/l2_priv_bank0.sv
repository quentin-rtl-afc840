// l2_priv_bank0: private L2 bank 0, 8 KB of SCM plus 24 KB of SRAM.
//
// The bank has three bus ports: the core's instruction port (read only), the
// core's data port, and a system port that the low-latency interconnect
// arbitrates among all other masters. The SCM part is a 3-read/2-write
// register file (scm_3r2w), so the three ports reach it in the same cycle
// without waiting, as the published design intends. The SRAM part is a single
// cut; when several ports target it in one cycle a round-robin arbiter serves
// one and the others wait (gnt low). Instruction-port writes are ignored.
//
// Own choices: the SCM covers the first 8 KB of the bank, the SRAM the
// remaining 24 KB. Every port answers a grant with rvalid one cycle later.
module l2_priv_bank0
  import quentin_pkg::*;
#(
  parameter int unsigned WORDS     = PRIV_WORDS,
  parameter int unsigned SCM_WORDS = PRIV0_SCM_WORDS,
  parameter logic [31:0] BASE      = PRIV0_BASE
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      sram_pwr_on_i,
  input  tcdm_req_t instr_req_i,
  output tcdm_rsp_t instr_rsp_o,
  input  tcdm_req_t data_req_i,
  output tcdm_rsp_t data_rsp_o,
  input  tcdm_req_t sys_req_i,
  output tcdm_rsp_t sys_rsp_o
);

  localparam int unsigned SRAM_WORDS = WORDS - SCM_WORDS;
  localparam int unsigned RW   = $clog2(WORDS);
  localparam int unsigned SCAW = $clog2(SCM_WORDS);
  localparam int unsigned SRAW = $clog2(SRAM_WORDS);

  // Port order: 0 = instruction, 1 = data, 2 = system.
  tcdm_req_t [2:0] preq;
  tcdm_rsp_t [2:0] prsp;
  assign preq = {sys_req_i, data_req_i, instr_req_i};
  assign instr_rsp_o = prsp[0];
  assign data_rsp_o  = prsp[1];
  assign sys_rsp_o   = prsp[2];

  logic [2:0][RW-1:0] row;
  logic [2:0]         to_scm, sram_req;
  logic [2:0]         gnt, sel_scm_q;

  for (genvar p = 0; p < 3; p++) begin : g_dec
    logic [31:0] offset;
    assign offset      = preq[p].addr - BASE;
    assign row[p]      = offset[RW+1:2];
    assign to_scm[p]   = row[p] < RW'(SCM_WORDS);
    assign sram_req[p] = preq[p].req && !to_scm[p];
  end

  // ---- SCM: all three ports at once ----------------------------------------
  logic [2:0]            scm_re;
  logic [2:0][SCAW-1:0]  scm_raddr;
  logic [2:0][31:0]      scm_rdata;
  logic [1:0]            scm_we;
  logic [1:0][SCAW-1:0]  scm_waddr;
  logic [1:0][3:0]       scm_wbe;
  logic [1:0][31:0]      scm_wdata;

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      scm_re[p]    = preq[p].req && to_scm[p] && (p == 0 || !preq[p].we);
      scm_raddr[p] = row[p][SCAW-1:0];
    end
    // write port 0 <- data, write port 1 <- system
    scm_we[0]    = preq[1].req && to_scm[1] && preq[1].we;
    scm_waddr[0] = row[1][SCAW-1:0];
    scm_wbe[0]   = preq[1].be;
    scm_wdata[0] = preq[1].wdata;
    scm_we[1]    = preq[2].req && to_scm[2] && preq[2].we;
    scm_waddr[1] = row[2][SCAW-1:0];
    scm_wbe[1]   = preq[2].be;
    scm_wdata[1] = preq[2].wdata;
  end

  scm_3r2w #(.WORDS(SCM_WORDS)) i_scm (
    .clk_i,
    .re_i   (scm_re),
    .raddr_i(scm_raddr),
    .rdata_o(scm_rdata),
    .we_i   (scm_we),
    .waddr_i(scm_waddr),
    .wbe_i  (scm_wbe),
    .wdata_i(scm_wdata)
  );

  // ---- SRAM: one port, round-robin among the three -------------------------
  logic [2:0] sram_gnt;
  logic [1:0] sram_idx;
  logic       sram_valid;
  logic [31:0] sram_rdata;
  logic [RW-1:0] sram_row;

  rr_arbiter #(.N(3)) i_arb (
    .clk_i,
    .rst_ni,
    .req_i  (sram_req),
    .ack_i  (1'b1),
    .gnt_o  (sram_gnt),
    .idx_o  (sram_idx),
    .valid_o(sram_valid)
  );

  assign sram_row = row[sram_idx] - RW'(SCM_WORDS);

  sram_cut #(.WORDS(SRAM_WORDS)) i_sram (
    .clk_i,
    .pwr_on_i(sram_pwr_on_i),
    .req_i   (sram_valid),
    .we_i    (preq[sram_idx].we && sram_idx != 2'd0),
    .be_i    (preq[sram_idx].be),
    .addr_i  (sram_row[SRAW-1:0]),
    .wdata_i (preq[sram_idx].wdata),
    .rdata_o (sram_rdata)
  );

  // ---- responses ------------------------------------------------------------
  logic [2:0] rvalid_q;
  for (genvar p = 0; p < 3; p++) begin : g_rsp
    assign gnt[p] = preq[p].req && (to_scm[p] || sram_gnt[p]);
    assign prsp[p].gnt    = gnt[p];
    assign prsp[p].rvalid = rvalid_q[p];
    assign prsp[p].rdata  = sel_scm_q[p] ? scm_rdata[p] : sram_rdata;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_q   <= '0;
      sel_scm_q  <= '0;
    end else begin
      rvalid_q <= gnt;
      for (int p = 0; p < 3; p++)
        if (gnt[p]) sel_scm_q[p] <= to_scm[p];
    end
  end

endmodule
