// boot_rom: read-only memory holding the boot code.
//
// The SoC starts from this ROM. Its size and contents are this design's own:
// 8 KB whose first three words are a minimal RV32I boot stub that jumps to
// BOOT_ADDR in L2 (lui t0, %hi; addi t0, t0, %lo; jalr x0, 0(t0)); every other
// word is a nop (addi x0, x0, 0). A loader that copies a program from
// external flash would sit here in a full product. The contents are computed
// by a function, so no data file is needed.
//
// Interface: a bus slave port. It never stalls: gnt equals req, rvalid/rdata
// follow one cycle later. Writes are granted and ignored.
module boot_rom
  import quentin_pkg::*;
#(
  parameter int unsigned WORDS     = 2048,
  parameter logic [31:0] BASE      = ROM_BASE,
  parameter logic [31:0] BOOT_JUMP = BOOT_ADDR
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam logic [31:0] NOP = 32'h0000_0013;

  // RV32I encodings of the boot stub (x5 = t0).
  function automatic logic [31:0] rom_word(logic [AW-1:0] idx);
    logic [31:0] hi, lo;
    lo = {{20{BOOT_JUMP[11]}}, BOOT_JUMP[11:0]};
    hi = BOOT_JUMP - lo;                       // upper 20 bits, rounded for addi
    unique case (idx)
      AW'(0):  return {hi[31:12], 5'd5, 7'b0110111};                // lui  t0, hi
      AW'(1):  return {lo[11:0], 5'd5, 3'b000, 5'd5, 7'b0010011};  // addi t0, t0, lo
      AW'(2):  return {12'd0, 5'd5, 3'b000, 5'd0, 7'b1100111};     // jalr x0, 0(t0)
      default: return NOP;
    endcase
  endfunction

  logic [31:0] offset;
  assign offset = req_i.addr - BASE;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rsp_o.rvalid <= 1'b0;
      rsp_o.rdata  <= '0;
    end else begin
      rsp_o.rvalid <= req_i.req;
      if (req_i.req && !req_i.we) rsp_o.rdata <= rom_word(offset[AW+1:2]);
    end
  end

  assign rsp_o.gnt = req_i.req;

endmodule
