// apb_bridge: bridge from the L2 interconnect to the APB peripheral bus.
//
// Converts one bus request at a time into an APB (AMBA 3) transfer: a setup
// cycle (psel high, penable low), then access cycles (penable high) until the
// slave raises pready. The request is granted in the access cycle that
// completes, and rvalid with the captured prdata follows one cycle later, as
// for every other slave of the interconnect. So a transfer with a zero-wait
// APB slave takes two cycles from request to grant. Byte enables are not
// carried (APB3 has no strobes); pslverr is reported on slverr_o for one
// cycle with the response. The bridge exists in the published block diagram;
// its protocol details are this design's own.
module apb_bridge
  import quentin_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  tcdm_req_t   req_i,
  output tcdm_rsp_t   rsp_o,
  output logic        slverr_o,
  output logic [31:0] paddr_o,
  output logic [31:0] pwdata_o,
  output logic        pwrite_o,
  output logic        psel_o,
  output logic        penable_o,
  input  logic [31:0] prdata_i,
  input  logic        pready_i,
  input  logic        pslverr_i
);

  typedef enum logic [1:0] {IDLE, SETUP, ACCESS} state_e;
  state_e state_q, state_d;

  logic done;
  assign done = (state_q == ACCESS) && pready_i;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      IDLE:    if (req_i.req) state_d = SETUP;
      SETUP:   state_d = ACCESS;
      ACCESS:  if (pready_i) state_d = IDLE;
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q      <= IDLE;
      rsp_o.rvalid <= 1'b0;
      rsp_o.rdata  <= '0;
      slverr_o     <= 1'b0;
    end else begin
      state_q      <= state_d;
      rsp_o.rvalid <= done;
      slverr_o     <= done && pslverr_i;
      if (done) rsp_o.rdata <= prdata_i;
    end
  end

  assign rsp_o.gnt = done;
  assign psel_o    = (state_q == SETUP) || (state_q == ACCESS);
  assign penable_o = (state_q == ACCESS);
  assign paddr_o   = req_i.addr;
  assign pwdata_o  = req_i.wdata;
  assign pwrite_o  = req_i.we;

  // The interconnect keeps a request stable until it is granted.
  property p_req_held;
    @(posedge clk_i) disable iff (!rst_ni)
      (state_q != IDLE) |-> req_i.req;
  endproperty
  a_req_held: assert property (p_req_held);

endmodule
