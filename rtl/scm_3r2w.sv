// scm_3r2w: 3-read, 2-write-port standard-cell register file.
//
// The 8 KB SCM of private L2 bank 0. Following the published organisation,
// read port 0 serves the core's instruction fetch, read port 1 and write port
// 0 serve the core's data interface, and read port 2 with write port 1 serve
// the interconnect for every other master. All five ports work in the same
// cycle, so the core never waits for the rest of the system here.
//
// Own choices: reads are registered (data one cycle after re), a read sees
// the contents before a write in the same cycle, and when both write ports hit
// the same word in one cycle write port 0 (the core) wins for each byte it
// enables. Writes are byte-enabled.
module scm_3r2w #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic                clk_i,
  input  logic [2:0]          re_i,
  input  logic [2:0][AW-1:0]  raddr_i,
  output logic [2:0][31:0]    rdata_o,
  input  logic [1:0]          we_i,
  input  logic [1:0][AW-1:0]  waddr_i,
  input  logic [1:0][3:0]     wbe_i,
  input  logic [1:0][31:0]    wdata_i
);

  logic [31:0] mem [WORDS];

  // Port 1 is applied first so that port 0 overrides it on a collision.
  always_ff @(posedge clk_i) begin
    for (int p = 1; p >= 0; p--) begin
      if (we_i[p]) begin
        for (int b = 0; b < 4; b++)
          if (wbe_i[p][b]) mem[waddr_i[p]][8*b +: 8] <= wdata_i[p][8*b +: 8];
      end
    end
  end

  for (genvar r = 0; r < 3; r++) begin : g_rd
    always_ff @(posedge clk_i) begin
      if (re_i[r]) rdata_o[r] <= mem[raddr_i[r]];
    end
  end

endmodule
