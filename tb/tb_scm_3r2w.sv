// tb_scm_3r2w: self-checking test of the 3-read/2-write SCM register file.
//
// Random cycles drive all five ports at once against a reference array:
// three reads and two writes per cycle, with byte enables. Checks that every
// read returns the contents from before the same cycle's writes, one cycle
// later, and that write port 0 wins a same-word collision. Runs at the
// default size (8 KB).
module tb_scm_3r2w;
  localparam int unsigned WORDS = 2048;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 0;
  logic [2:0] re;
  logic [2:0][AW-1:0] raddr;
  logic [2:0][31:0] rdata;
  logic [1:0] we;
  logic [1:0][AW-1:0] waddr;
  logic [1:0][3:0] wbe;
  logic [1:0][31:0] wdata;
  int checks = 0, failures = 0;
  int collisions = 0;

  scm_3r2w #(.WORDS(WORDS)) dut (.clk_i(clk), .re_i(re), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wbe_i(wbe), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] ref_mem [WORDS];

  initial begin
    logic [2:0][31:0] exp;
    logic [2:0] chk;
    re = 0; we = 0; raddr = '0; waddr = '0; wbe = '0; wdata = '0;
    // initialise through both write ports, 2 words per cycle
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      we = 2'b11; wbe = {4'hF, 4'hF};
      waddr[0] = AW'(i); waddr[1] = AW'(i + 1);
      wdata[0] = $urandom; wdata[1] = $urandom;
      ref_mem[i] = wdata[0]; ref_mem[i + 1] = wdata[1];
    end
    @(negedge clk); we = 0;
    // random mixed traffic on a small address window to force collisions
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      re = 3'($urandom); we = 2'($urandom);
      for (int p = 0; p < 3; p++) raddr[p] = AW'($urandom_range(15));
      for (int p = 0; p < 2; p++) begin
        waddr[p] = AW'($urandom_range(15));
        wbe[p]   = 4'($urandom);
        wdata[p] = $urandom;
      end
      for (int p = 0; p < 3; p++) exp[p] = ref_mem[raddr[p]];
      chk = re;
      if (we == 2'b11 && waddr[0] == waddr[1]) collisions++;
      for (int p = 1; p >= 0; p--)
        if (we[p])
          for (int b = 0; b < 4; b++)
            if (wbe[p][b]) ref_mem[waddr[p]][8*b +: 8] = wdata[p][8*b +: 8];
      @(negedge clk);
      re = 0; we = 0;
      for (int p = 0; p < 3; p++) begin
        if (chk[p]) begin
          checks++;
          if (rdata[p] !== exp[p]) begin
            failures++;
            $display("FAIL port %0d: got %08h exp %08h", p, rdata[p], exp[p]);
          end
        end
      end
    end
    // final readback of the window through port 2
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); re = 3'b100; raddr[2] = AW'(i);
      @(negedge clk); re = 0;
      checks++;
      if (rdata[2] !== ref_mem[i]) begin
        failures++;
        $display("FAIL final %0d: got %08h exp %08h", i, rdata[2], ref_mem[i]);
      end
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no write collision exercised"); end
    $display("write collisions: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
