// l2_il_bank: one of the four word-interleaved L2 banks (114 KB).
//
// Consecutive 32-bit words of the interleaved region go to consecutive banks,
// so a bank sees the word address divided by the bank count as its row. Each
// bank is a mix of an SCM cut (2 KB, the published split) and SRAM (112 KB).
// Own choice: the SCM holds the lowest rows of the bank, so the first 8 KB of
// the interleaved region live entirely in SCM and stay usable with the SRAMs
// power gated.
//
// Interface: a bus slave port (quentin_pkg request/response structs). The
// bank never stalls: gnt equals req, and rvalid/rdata follow one cycle later.
// Addresses are absolute; BASE is the start of the interleaved region.
module l2_il_bank
  import quentin_pkg::*;
#(
  parameter int unsigned WORDS     = IL_BANK_WORDS,
  parameter int unsigned SCM_WORDS = IL_SCM_WORDS,
  parameter int unsigned NB_BANKS  = NB_IL_BANKS,
  parameter logic [31:0] BASE      = IL_BASE
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      sram_pwr_on_i,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);

  localparam int unsigned SRAM_WORDS = WORDS - SCM_WORDS;
  localparam int unsigned RW   = $clog2(WORDS);
  localparam int unsigned SCAW = $clog2(SCM_WORDS);
  localparam int unsigned SRAW = $clog2(SRAM_WORDS);
  localparam int unsigned SH   = 2 + $clog2(NB_BANKS);

  logic [31:0]   offset;
  logic [RW-1:0] row;
  logic          to_scm;
  logic          scm_sel_q;
  logic [31:0]   scm_rdata, sram_rdata;
  logic [RW-1:0] sram_row;

  assign offset   = req_i.addr - BASE;
  assign row      = RW'(offset >> SH);
  assign to_scm   = row < RW'(SCM_WORDS);
  assign sram_row = row - RW'(SCM_WORDS);

  scm_1rw #(.WORDS(SCM_WORDS)) i_scm (
    .clk_i,
    .req_i  (req_i.req && to_scm),
    .we_i   (req_i.we),
    .be_i   (req_i.be),
    .addr_i (row[SCAW-1:0]),
    .wdata_i(req_i.wdata),
    .rdata_o(scm_rdata)
  );

  sram_cut #(.WORDS(SRAM_WORDS)) i_sram (
    .clk_i,
    .pwr_on_i(sram_pwr_on_i),
    .req_i   (req_i.req && !to_scm),
    .we_i    (req_i.we),
    .be_i    (req_i.be),
    .addr_i  (sram_row[SRAW-1:0]),
    .wdata_i (req_i.wdata),
    .rdata_o (sram_rdata)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rsp_o.rvalid <= 1'b0;
      scm_sel_q    <= 1'b0;
    end else begin
      rsp_o.rvalid <= req_i.req;
      if (req_i.req) scm_sel_q <= to_scm;
    end
  end

  assign rsp_o.gnt   = req_i.req;
  assign rsp_o.rdata = scm_sel_q ? scm_rdata : sram_rdata;

endmodule
