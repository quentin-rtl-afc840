// tcdm_xbar: crossbar from NB_M bus masters to NB_S bus slaves.
//
// Every master names its target slave on m_tgt_i (decoding is done outside).
// Each slave has its own round-robin arbiter (rr_arbiter), so masters that
// target different slaves proceed in the same cycle and only masters that
// collide on a slave wait. The winner's request goes to the slave; the master
// sees gnt when the slave grants. The crossbar remembers, per slave, which
// master was granted and routes the slave's rvalid/rdata of the next cycle
// back to it. Requests of a waiting master are held by the arbiter so a
// slave that stalls sees a stable request.
//
// Timing: request to slave and gnt back are combinational; responses pass
// through unregistered. Slaves must answer a grant with rvalid one cycle later.
module tcdm_xbar
  import quentin_pkg::*;
#(
  parameter int unsigned NB_M = 5,
  parameter int unsigned NB_S = 4,
  localparam int unsigned SW  = (NB_S > 1) ? $clog2(NB_S) : 1,
  localparam int unsigned MW  = (NB_M > 1) ? $clog2(NB_M) : 1
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  tcdm_req_t [NB_M-1:0] m_req_i,
  input  logic [NB_M-1:0][SW-1:0] m_tgt_i,
  output tcdm_rsp_t [NB_M-1:0] m_rsp_o,
  output tcdm_req_t [NB_S-1:0] s_req_o,
  input  tcdm_rsp_t [NB_S-1:0] s_rsp_i
);

  logic [NB_S-1:0][NB_M-1:0] s_m_req, s_m_gnt;
  logic [NB_S-1:0][MW-1:0]   s_idx, s_idx_q;
  logic [NB_S-1:0]           s_valid;

  for (genvar s = 0; s < NB_S; s++) begin : g_slave
    for (genvar m = 0; m < NB_M; m++) begin : g_req
      assign s_m_req[s][m] = m_req_i[m].req && (m_tgt_i[m] == SW'(s));
    end

    rr_arbiter #(.N(NB_M)) i_arb (
      .clk_i,
      .rst_ni,
      .req_i  (s_m_req[s]),
      .ack_i  (s_rsp_i[s].gnt),
      .gnt_o  (s_m_gnt[s]),
      .idx_o  (s_idx[s]),
      .valid_o(s_valid[s])
    );

    always_comb begin
      s_req_o[s]     = m_req_i[s_idx[s]];
      s_req_o[s].req = s_valid[s];
    end

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni)                         s_idx_q[s] <= '0;
      else if (s_valid[s] && s_rsp_i[s].gnt) s_idx_q[s] <= s_idx[s];
    end
  end

  always_comb begin
    for (int m = 0; m < NB_M; m++) begin
      m_rsp_o[m] = '0;
      for (int s = 0; s < NB_S; s++) begin
        if (s_m_gnt[s][m] && s_rsp_i[s].gnt) m_rsp_o[m].gnt = 1'b1;
        if (s_rsp_i[s].rvalid && s_idx_q[s] == MW'(m)) begin
          m_rsp_o[m].rvalid = 1'b1;
          m_rsp_o[m].rdata  = s_rsp_i[s].rdata;
        end
      end
    end
  end

endmodule
