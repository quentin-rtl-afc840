// sram_cut: single-port SRAM cut with a separate power switch.
//
// Stands for the SRAM macros of the L2 memory. In the published chip the SRAM
// array and periphery have their own supplies, so an off-chip power manager
// can switch them off and run the SoC from the standard-cell memories alone.
// Here pwr_on_i models that switch: while it is low a read returns zero and a
// write is dropped (the real array would also lose its contents; this model
// keeps them, so software must not rely on them across a power cycle).
//
// Interface: one port, req_i/we_i/be_i (byte enables)/addr_i (word index)/
// wdata_i. Timing: a write takes effect at the clock edge; read data appears
// on rdata_o the cycle after the request and holds until the next read.
// The word count is a parameter; the default is the SRAM part of one
// interleaved bank (112 KB).
module sram_cut #(
  parameter int unsigned WORDS = 28672,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk_i,
  input  logic          pwr_on_i,
  input  logic          req_i,
  input  logic          we_i,
  input  logic [3:0]    be_i,
  input  logic [AW-1:0] addr_i,
  input  logic [31:0]   wdata_i,
  output logic [31:0]   rdata_o
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i && pwr_on_i && we_i) begin
      for (int b = 0; b < 4; b++)
        if (be_i[b]) mem[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
    end
  end

  always_ff @(posedge clk_i) begin
    if (req_i && !we_i) rdata_o <= pwr_on_i ? mem[addr_i] : '0;
  end

endmodule
