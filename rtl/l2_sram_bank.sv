// l2_sram_bank: private L2 bank built from SRAM only (32 KB).
//
// The second private bank of the L2 memory. It is reached through the
// low-latency interconnect and is not interleaved, so software can keep the
// core's program, stack or private data there without conflicting with
// masters that use the interleaved banks.
//
// Interface: a bus slave port. It never stalls: gnt equals req, rvalid/rdata
// follow one cycle later. BASE is the bank's first byte address.
module l2_sram_bank
  import quentin_pkg::*;
#(
  parameter int unsigned WORDS = PRIV_WORDS,
  parameter logic [31:0] BASE  = PRIV1_BASE
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      sram_pwr_on_i,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] offset;
  assign offset = req_i.addr - BASE;

  sram_cut #(.WORDS(WORDS)) i_sram (
    .clk_i,
    .pwr_on_i(sram_pwr_on_i),
    .req_i   (req_i.req),
    .we_i    (req_i.we),
    .be_i    (req_i.be),
    .addr_i  (offset[AW+1:2]),
    .wdata_i (req_i.wdata),
    .rdata_o (rsp_o.rdata)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rsp_o.rvalid <= 1'b0;
    else         rsp_o.rvalid <= req_i.req;
  end

  assign rsp_o.gnt = req_i.req;

endmodule
