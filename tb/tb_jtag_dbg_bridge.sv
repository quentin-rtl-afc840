// tb_jtag_dbg_bridge: self-checking test of the JTAG debug bridge.
//
// A debugger model (tasks in jtag_driver.svh) drives TCK at one tenth of the
// system clock. A memory model answers the bridge's bus requests with random
// grant delays and rvalid one cycle after the grant. Checks: IDCODE is
// selected after a TAP reset and shifts out the right value; the
// instruction register captures 4'b0001; BYPASS delays TDI by one bit; ACCESS
// writes land in memory with the right address and data; ACCESS reads return
// memory contents and report completion; a command scanned with valid = 0
// starts no access; TRSTn returns the TAP to IDCODE.
module tb_jtag_dbg_bridge;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 0, tdo;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;

  jtag_dbg_bridge dut (.clk_i(clk), .rst_ni(rst_n), .tck_i(tck), .tms_i(tms), .tdi_i(tdi),
    .trst_ni(trst_n), .tdo_o(tdo), .req_o(req), .rsp_i(rsp));

  always #5 clk = ~clk;

  `include "jtag_driver.svh"

  initial begin
    repeat (200000) @(posedge clk);
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

  // memory model
  logic [31:0] mem [int];
  logic stall, rv_q;
  logic [31:0] rd_q;
  int n_access = 0;
  assign rsp.gnt    = req.req && !stall;
  assign rsp.rvalid = rv_q;
  assign rsp.rdata  = rd_q;
  always @(posedge clk) begin
    stall <= $urandom_range(2) != 0;
    rv_q  <= rsp.gnt && rst_n;
    if (rsp.gnt && rst_n) begin
      n_access++;
      if (req.we) mem[req.addr] = req.wdata;
      else rd_q <= mem.exists(req.addr) ? mem[req.addr] : 32'hDEAD_BEEF;
    end
  end

  initial begin
    logic [65:0] o;
    logic [3:0] ir_out;
    logic [31:0] d, a;
    logic done;
    int n_before;
    repeat (3) @(negedge clk);
    rst_n = 1; trst_n = 1;
    jtag_reset();
    // IDCODE after reset
    jtag_dr(32, '0, o);
    check("IDCODE", o[31:0], 32'h1000_0001);
    // BYPASS: one-bit register, so TDO is TDI delayed by one
    jtag_ir(4'b1111, ir_out);
    check("IR capture", 32'(ir_out), 32'b0001);
    jtag_dr(9, 66'h1A5, o);
    check("BYPASS", 32'(o[8:0]), 32'(9'h1A5 << 1) & 32'h1FF);
    // ACCESS writes and reads
    jtag_ir(4'b0010, ir_out);
    for (int i = 0; i < 6; i++) begin
      a = 32'h1C00_0000 + 32'($urandom_range(255)) * 4;
      d = $urandom;
      jtag_write(a, d);
      check("write landed", mem.exists(a) ? mem[a] : 32'hFFFF_FFFF, d);
      jtag_read(a, d, done);
      check("read data", d, mem[a]);
      check("access done", 32'(done), 1);
    end
    // a scan with valid = 0 starts nothing
    n_before = n_access;
    jtag_dr(66, {1'b0, 1'b1, 32'h1C00_0000, 32'h0}, o);
    repeat (10) jtag_clock(0, 0, o[0]);
    check("no access without valid", n_access, n_before);
    // TRSTn brings back IDCODE
    trst_n = 0;
    repeat (10) @(negedge clk);
    trst_n = 1;
    repeat (5) @(negedge clk);
    jtag_clock(0, 0, o[0]);      // Run-Test/Idle
    jtag_dr(32, '0, o);
    check("IDCODE after TRSTn", o[31:0], 32'h1000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
