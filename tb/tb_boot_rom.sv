// tb_boot_rom: self-checking test of the boot ROM.
//
// Reads the three boot-stub words and compares them with hand-assembled
// RV32I encodings for a jump to 0x1C00_8080 (lui t0, 0x1C008; addi t0, t0,
// 0x080; jalr x0, 0(t0)); reads other words and expects nops; checks that a
// write is granted and changes nothing, and the one-cycle read latency.
module tb_boot_rom;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;

  boot_rom dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h exp %08h", what, got, exp);
    end
  endtask

  task automatic xfer(logic w, logic [31:0] a, output logic [31:0] r);
    @(negedge clk);
    req.req = 1; req.we = w; req.addr = a; req.wdata = 32'hFFFF_FFFF; req.be = 4'hF;
    #1 check("gnt", 32'(rsp.gnt), 1);
    @(negedge clk);
    req.req = 0;
    check("rvalid", 32'(rsp.rvalid), 1);
    r = rsp.rdata;
  endtask

  initial begin
    logic [31:0] r;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xfer(0, ROM_BASE + 0, r);  check("lui",  r, 32'h1C00_82B7);
    xfer(0, ROM_BASE + 4, r);  check("addi", r, 32'h0802_8293);
    xfer(0, ROM_BASE + 8, r);  check("jalr", r, 32'h0002_8067);
    for (int i = 0; i < 20; i++) begin
      xfer(0, ROM_BASE + 12 + 32'($urandom_range(2044)) * 4, r);
      check("nop", r, 32'h0000_0013);
    end
    xfer(0, ROM_BASE + 32'h1FFC, r); check("last word", r, 32'h0000_0013);
    xfer(1, ROM_BASE + 4, r);
    xfer(0, ROM_BASE + 4, r);  check("write ignored", r, 32'h0802_8293);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
