// tb_sram_cut: self-checking test of the power-gateable SRAM cut.
//
// Writes random words (with random byte enables) to random addresses, keeps a
// reference copy in an associative array and reads everything back. Then
// switches the cut off and checks that reads return zero and writes are
// dropped, and that the data is there again once power returns (the model
// keeps contents). Also checks the one-cycle read latency and that rdata
// holds between reads. Runs at the default size (112 KB).
module tb_sram_cut;
  localparam int unsigned WORDS = 28672;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 0, pwr_on, req, we;
  logic [3:0] be;
  logic [AW-1:0] addr;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;

  sram_cut #(.WORDS(WORDS)) dut (.clk_i(clk), .pwr_on_i(pwr_on), .req_i(req), .we_i(we),
    .be_i(be), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [int];
  int unsigned addrs [64];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h exp %08h", what, got, exp);
    end
  endtask

  task automatic wr(int unsigned a, logic [31:0] d, logic [3:0] b);
    @(negedge clk); req = 1; we = 1; addr = AW'(a); wdata = d; be = b;
    @(negedge clk); req = 0; we = 0;
  endtask

  task automatic rd(int unsigned a, output logic [31:0] d);
    @(negedge clk); req = 1; we = 0; addr = AW'(a);
    @(negedge clk); req = 0; d = rdata;
  endtask

  initial begin
    logic [31:0] d, m;
    req = 0; we = 0; be = 0; addr = 0; wdata = 0; pwr_on = 1;
    // full-word initialisation of the addresses used
    for (int i = 0; i < 64; i++) begin
      addrs[i] = (i == 0) ? 0 : (i == 1) ? WORDS - 1 : $urandom_range(WORDS - 1);
      d = $urandom;
      wr(addrs[i], d, 4'hF);
      ref_mem[addrs[i]] = d;
    end
    // partial writes
    for (int i = 0; i < 64; i++) begin
      logic [3:0] b;
      b = 4'($urandom);
      d = $urandom;
      wr(addrs[i], d, b);
      m = ref_mem[addrs[i]];
      for (int k = 0; k < 4; k++) if (b[k]) m[8*k +: 8] = d[8*k +: 8];
      ref_mem[addrs[i]] = m;
    end
    for (int i = 0; i < 64; i++) begin
      rd(addrs[i], d);
      check("readback", d, ref_mem[addrs[i]]);
    end
    // read data holds while idle
    rd(addrs[5], d);
    repeat (3) @(negedge clk);
    check("hold", rdata, ref_mem[addrs[5]]);
    // power gated: reads give zero, writes are dropped
    pwr_on = 0;
    rd(addrs[3], d);
    check("gated read", d, 32'h0);
    wr(addrs[3], ~ref_mem[addrs[3]], 4'hF);
    pwr_on = 1;
    rd(addrs[3], d);
    check("gated write dropped", d, ref_mem[addrs[3]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
