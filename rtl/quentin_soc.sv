// quentin_soc: the memory and I/O fabric of the Quentin PULPissimo SoC.
//
// A 520 KB L2 memory is shared by the core (fabric controller), the uDMA and
// the JTAG debug bridge. It is organised as four 114 KB word-interleaved banks behind
// a multiport crossbar, plus two 32 KB private banks behind a low-latency
// crossbar that the core can use without bank conflicts. 16 KB of the L2 is
// standard-cell memory (SCM): 2 KB in each interleaved bank and 8 KB in
// private bank 0, where a 3-read/2-write register file gives the core's
// instruction and data ports their own access paths. The SRAM cuts have a
// power input (sram_pwr_on_i) driven by an off-chip power manager; with it low
// only the SCMs work, which is the SoC's lowest-power mode. The boot ROM, the
// APB bridge and the uDMA complete the fabric.
//
// A JTAG debug bridge gives a debugger read and write access to the whole
// memory map as the interconnect's fifth master.
//
// Not included, and brought out as ports: the RISC-V core (its instruction
// and data bus ports), the APB peripherals other than the uDMA configuration
// (an APB master port), and the peripheral controllers behind the uDMA (one
// TX and one RX word stream per uDMA channel, plus end-of-transfer events).
//
// Memory map (this design's choice, PULPissimo-like): 0x1A00_0000 ROM (8 KB),
// 0x1A10_0000 APB (1 MB, uDMA configuration at 0x1A10_2000), 0x1C00_0000
// private bank 0 (SCM in its first 8 KB), 0x1C00_8000 private bank 1,
// 0x1C01_0000 interleaved region (456 KB, SCM in its first 8 KB).
// The core's bus ports use the quentin_pkg request/response structs: hold req
// until gnt; rvalid follows a grant by one cycle. JTAG is sampled with clk_i
// (TCK at most clk_i / 6).
module quentin_soc
  import quentin_pkg::*;
#(
  parameter int unsigned UDMA_CH = 8
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  input  logic                      sram_pwr_on_i,
  // core bus masters
  input  tcdm_req_t                 fc_instr_req_i,
  output tcdm_rsp_t                 fc_instr_rsp_o,
  input  tcdm_req_t                 fc_data_req_i,
  output tcdm_rsp_t                 fc_data_rsp_o,
  // JTAG debug port
  input  logic                      jtag_tck_i,
  input  logic                      jtag_tms_i,
  input  logic                      jtag_tdi_i,
  input  logic                      jtag_trst_ni,
  output logic                      jtag_tdo_o,
  // APB master towards the other peripherals
  output logic [31:0]               apb_paddr_o,
  output logic [31:0]               apb_pwdata_o,
  output logic                      apb_pwrite_o,
  output logic                      apb_psel_o,
  output logic                      apb_penable_o,
  input  logic [31:0]               apb_prdata_i,
  input  logic                      apb_pready_i,
  input  logic                      apb_pslverr_i,
  output logic                      apb_err_o,
  // uDMA peripheral streams and events
  output logic [UDMA_CH-1:0][31:0]  udma_tx_data_o,
  output logic [UDMA_CH-1:0]        udma_tx_valid_o,
  input  logic [UDMA_CH-1:0]        udma_tx_ready_i,
  input  logic [UDMA_CH-1:0][31:0]  udma_rx_data_i,
  input  logic [UDMA_CH-1:0]        udma_rx_valid_i,
  output logic [UDMA_CH-1:0]        udma_rx_ready_o,
  output logic [UDMA_CH-1:0]        udma_evt_tx_o,
  output logic [UDMA_CH-1:0]        udma_evt_rx_o
);

  tcdm_req_t [NB_MASTERS-1:0]  m_req;
  tcdm_rsp_t [NB_MASTERS-1:0]  m_rsp;
  tcdm_req_t [NB_IL_BANKS-1:0] il_req;
  tcdm_rsp_t [NB_IL_BANKS-1:0] il_rsp;
  tcdm_req_t p0i_req, p0d_req, p0s_req, p1_req, rom_req, apb_req;
  tcdm_rsp_t p0i_rsp, p0d_rsp, p0s_rsp, p1_rsp, rom_rsp, apb_rsp;
  tcdm_req_t udma_tx_req, udma_rx_req, dbg_req;

  always_comb begin
    m_req[M_FC_INSTR] = fc_instr_req_i;
    m_req[M_FC_DATA]  = fc_data_req_i;
    m_req[M_UDMA_TX]  = udma_tx_req;
    m_req[M_UDMA_RX]  = udma_rx_req;
    m_req[M_DEBUG]    = dbg_req;
  end
  assign fc_instr_rsp_o = m_rsp[M_FC_INSTR];
  assign fc_data_rsp_o  = m_rsp[M_FC_DATA];

  // ---- JTAG debug bridge ----------------------------------------------------------
  jtag_dbg_bridge i_dbg_bridge (
    .clk_i, .rst_ni,
    .tck_i(jtag_tck_i), .tms_i(jtag_tms_i), .tdi_i(jtag_tdi_i),
    .trst_ni(jtag_trst_ni), .tdo_o(jtag_tdo_o),
    .req_o(dbg_req), .rsp_i(m_rsp[M_DEBUG])
  );

  l2_interconnect i_interconnect (
    .clk_i, .rst_ni,
    .m_req_i(m_req), .m_rsp_o(m_rsp),
    .il_req_o(il_req), .il_rsp_i(il_rsp),
    .p0_instr_req_o(p0i_req), .p0_instr_rsp_i(p0i_rsp),
    .p0_data_req_o (p0d_req), .p0_data_rsp_i (p0d_rsp),
    .p0_sys_req_o  (p0s_req), .p0_sys_rsp_i  (p0s_rsp),
    .p1_req_o (p1_req),  .p1_rsp_i (p1_rsp),
    .rom_req_o(rom_req), .rom_rsp_i(rom_rsp),
    .apb_req_o(apb_req), .apb_rsp_i(apb_rsp)
  );

  // ---- L2 memory --------------------------------------------------------------
  for (genvar b = 0; b < NB_IL_BANKS; b++) begin : g_il_bank
    l2_il_bank i_bank (
      .clk_i, .rst_ni, .sram_pwr_on_i,
      .req_i(il_req[b]), .rsp_o(il_rsp[b])
    );
  end

  l2_priv_bank0 i_priv0 (
    .clk_i, .rst_ni, .sram_pwr_on_i,
    .instr_req_i(p0i_req), .instr_rsp_o(p0i_rsp),
    .data_req_i (p0d_req), .data_rsp_o (p0d_rsp),
    .sys_req_i  (p0s_req), .sys_rsp_o  (p0s_rsp)
  );

  l2_sram_bank i_priv1 (
    .clk_i, .rst_ni, .sram_pwr_on_i,
    .req_i(p1_req), .rsp_o(p1_rsp)
  );

  boot_rom i_rom (
    .clk_i, .rst_ni,
    .req_i(rom_req), .rsp_o(rom_rsp)
  );

  // ---- APB ----------------------------------------------------------------------
  logic [31:0] paddr, pwdata, prdata, udma_prdata;
  logic        pwrite, psel, penable, pready, pslverr;
  logic        udma_pready, udma_pslverr, to_udma;

  apb_bridge i_apb_bridge (
    .clk_i, .rst_ni,
    .req_i(apb_req), .rsp_o(apb_rsp), .slverr_o(apb_err_o),
    .paddr_o(paddr), .pwdata_o(pwdata), .pwrite_o(pwrite),
    .psel_o(psel), .penable_o(penable),
    .prdata_i(prdata), .pready_i(pready), .pslverr_i(pslverr)
  );

  assign to_udma = in_range(paddr, UDMA_BASE, UDMA_SIZE);

  assign apb_paddr_o   = paddr;
  assign apb_pwdata_o  = pwdata;
  assign apb_pwrite_o  = pwrite;
  assign apb_psel_o    = psel && !to_udma;
  assign apb_penable_o = penable && !to_udma;
  assign prdata  = to_udma ? udma_prdata  : apb_prdata_i;
  assign pready  = to_udma ? udma_pready  : apb_pready_i;
  assign pslverr = to_udma ? udma_pslverr : apb_pslverr_i;

  // ---- uDMA -----------------------------------------------------------------------
  udma #(.NB_CH(UDMA_CH)) i_udma (
    .clk_i, .rst_ni,
    .paddr_i(paddr[11:0]), .pwdata_i(pwdata), .pwrite_i(pwrite),
    .psel_i(psel && to_udma), .penable_i(penable && to_udma),
    .prdata_o(udma_prdata), .pready_o(udma_pready), .pslverr_o(udma_pslverr),
    .tx_req_o(udma_tx_req), .tx_rsp_i(m_rsp[M_UDMA_TX]),
    .rx_req_o(udma_rx_req), .rx_rsp_i(m_rsp[M_UDMA_RX]),
    .tx_data_o(udma_tx_data_o), .tx_valid_o(udma_tx_valid_o),
    .tx_ready_i(udma_tx_ready_i),
    .rx_data_i(udma_rx_data_i), .rx_valid_i(udma_rx_valid_i),
    .rx_ready_o(udma_rx_ready_o),
    .evt_tx_o(udma_evt_tx_o), .evt_rx_o(udma_evt_rx_o)
  );

endmodule
