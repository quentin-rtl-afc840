// l2_interconnect: the L2 memory interconnect of the SoC.
//
// Two crossbars share the masters (core instruction, core data, uDMA TX,
// uDMA RX, debug). The multiport interleaved crossbar spreads the
// interleaved region over its four banks word by word (bank = address bits
// [3:2]), so masters walking through memory rarely collide and the four banks
// give up to four accesses per cycle. The low-latency crossbar serves the
// private banks, the boot ROM and the APB bridge. The core's instruction and
// data ports reach private bank 0 over dedicated ports that bypass the
// arbitration, matching the bank's multi-ported SCM; every other master
// reaches bank 0 through the low-latency crossbar's system port. An access
// to an unmapped address is granted at once and reads back ERR_RDATA.
//
// The split into the two crossbars and the bank count follow the published
// design; the address map, the arbitration (round robin per slave) and the
// bus protocol are this design's choices. Timing: a master that wins gets gnt
// in the cycle of its request and rvalid one cycle after the grant.
module l2_interconnect
  import quentin_pkg::*;
#(
  parameter int unsigned NB_M = NB_MASTERS
) (
  input  logic                         clk_i,
  input  logic                         rst_ni,
  input  tcdm_req_t [NB_M-1:0]         m_req_i,
  output tcdm_rsp_t [NB_M-1:0]         m_rsp_o,
  // interleaved banks
  output tcdm_req_t [NB_IL_BANKS-1:0]  il_req_o,
  input  tcdm_rsp_t [NB_IL_BANKS-1:0]  il_rsp_i,
  // private bank 0: core instruction, core data, system
  output tcdm_req_t                    p0_instr_req_o,
  input  tcdm_rsp_t                    p0_instr_rsp_i,
  output tcdm_req_t                    p0_data_req_o,
  input  tcdm_rsp_t                    p0_data_rsp_i,
  output tcdm_req_t                    p0_sys_req_o,
  input  tcdm_rsp_t                    p0_sys_rsp_i,
  // other low-latency slaves
  output tcdm_req_t                    p1_req_o,
  input  tcdm_rsp_t                    p1_rsp_i,
  output tcdm_req_t                    rom_req_o,
  input  tcdm_rsp_t                    rom_rsp_i,
  output tcdm_req_t                    apb_req_o,
  input  tcdm_rsp_t                    apb_rsp_i
);

  localparam int unsigned ILW = $clog2(NB_IL_BANKS);
  localparam int unsigned LLW = $clog2(NB_LL_SLAVES);

  tcdm_req_t [NB_M-1:0]          il_m_req, ll_m_req;
  tcdm_rsp_t [NB_M-1:0]          il_m_rsp, ll_m_rsp;
  logic [NB_M-1:0][ILW-1:0]      il_tgt;
  logic [NB_M-1:0][LLW-1:0]      ll_tgt;
  logic [NB_M-1:0]               direct;
  tcdm_req_t [NB_LL_SLAVES-1:0]  ll_s_req;
  tcdm_rsp_t [NB_LL_SLAVES-1:0]  ll_s_rsp;

  always_comb begin
    for (int m = 0; m < NB_M; m++) begin
      logic il;
      ll_tgt_e t;
      il = is_interleaved(m_req_i[m].addr);
      t  = ll_decode(m_req_i[m].addr);
      direct[m] = (m == M_FC_INSTR || m == M_FC_DATA) && !il && t == LL_PRIV0;
      il_tgt[m] = m_req_i[m].addr[2 +: ILW];
      ll_tgt[m] = LLW'(t);
      il_m_req[m] = m_req_i[m];
      il_m_req[m].req = m_req_i[m].req && il;
      ll_m_req[m] = m_req_i[m];
      ll_m_req[m].req = m_req_i[m].req && !il && !direct[m];
    end
  end

  tcdm_xbar #(.NB_M(NB_M), .NB_S(NB_IL_BANKS)) i_il_xbar (
    .clk_i, .rst_ni,
    .m_req_i(il_m_req), .m_tgt_i(il_tgt), .m_rsp_o(il_m_rsp),
    .s_req_o(il_req_o), .s_rsp_i(il_rsp_i)
  );

  tcdm_xbar #(.NB_M(NB_M), .NB_S(NB_LL_SLAVES)) i_ll_xbar (
    .clk_i, .rst_ni,
    .m_req_i(ll_m_req), .m_tgt_i(ll_tgt), .m_rsp_o(ll_m_rsp),
    .s_req_o(ll_s_req), .s_rsp_i(ll_s_rsp)
  );

  assign p0_sys_req_o = ll_s_req[LL_PRIV0];
  assign p1_req_o     = ll_s_req[LL_PRIV1];
  assign rom_req_o    = ll_s_req[LL_ROM];
  assign apb_req_o    = ll_s_req[LL_APB];

  // Unmapped addresses: grant at once, answer ERR_RDATA.
  logic err_rvalid_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) err_rvalid_q <= 1'b0;
    else         err_rvalid_q <= ll_s_req[LL_ERR].req;
  end

  always_comb begin
    ll_s_rsp[LL_PRIV0] = p0_sys_rsp_i;
    ll_s_rsp[LL_PRIV1] = p1_rsp_i;
    ll_s_rsp[LL_ROM]   = rom_rsp_i;
    ll_s_rsp[LL_APB]   = apb_rsp_i;
    ll_s_rsp[LL_ERR]   = '{gnt: ll_s_req[LL_ERR].req, rvalid: err_rvalid_q,
                           rdata: ERR_RDATA};
  end

  // Dedicated core ports into private bank 0.
  always_comb begin
    p0_instr_req_o     = m_req_i[M_FC_INSTR];
    p0_instr_req_o.req = m_req_i[M_FC_INSTR].req && direct[M_FC_INSTR];
    p0_data_req_o      = m_req_i[M_FC_DATA];
    p0_data_req_o.req  = m_req_i[M_FC_DATA].req && direct[M_FC_DATA];
  end

  // Merge: a master is granted by at most one path per cycle, and rvalid
  // always follows its grant by one cycle, so the paths never overlap.
  always_comb begin
    for (int m = 0; m < NB_M; m++) begin
      tcdm_rsp_t d;
      d = '0;
      if (m == M_FC_INSTR) d = p0_instr_rsp_i;
      if (m == M_FC_DATA)  d = p0_data_rsp_i;
      if (m != M_FC_INSTR && m != M_FC_DATA) d = '0;
      m_rsp_o[m].gnt    = il_m_rsp[m].gnt | ll_m_rsp[m].gnt | (d.gnt & direct[m]);
      m_rsp_o[m].rvalid = il_m_rsp[m].rvalid | ll_m_rsp[m].rvalid | d.rvalid;
      m_rsp_o[m].rdata  = il_m_rsp[m].rvalid ? il_m_rsp[m].rdata :
                          ll_m_rsp[m].rvalid ? ll_m_rsp[m].rdata : d.rdata;
    end
  end

endmodule
