// scm_1rw: single-port standard-cell memory (SCM) cut.
//
// Each interleaved L2 bank holds 2 KB of SCM next to its SRAM. SCMs are built
// from standard cells, so they stay on the logic supply, keep working when the
// SRAMs are power gated and reach lower voltages and higher clocks than the
// SRAMs. Functionally the cut is a word array with byte-enabled writes.
//
// Interface: req_i/we_i/be_i/addr_i (word index)/wdata_i. Timing: writes take
// effect at the clock edge; read data appears on rdata_o one cycle after the
// request. The default size (512 words = 2 KB) is the published one.
module scm_1rw #(
  parameter int unsigned WORDS = 512,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk_i,
  input  logic          req_i,
  input  logic          we_i,
  input  logic [3:0]    be_i,
  input  logic [AW-1:0] addr_i,
  input  logic [31:0]   wdata_i,
  output logic [31:0]   rdata_o
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i && we_i) begin
      for (int b = 0; b < 4; b++)
        if (be_i[b]) mem[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
    end
  end

  always_ff @(posedge clk_i) begin
    if (req_i && !we_i) rdata_o <= mem[addr_i];
  end

endmodule
