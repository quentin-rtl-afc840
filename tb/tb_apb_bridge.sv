// tb_apb_bridge: self-checking test of the bus-to-APB bridge.
//
// An APB slave model in the testbench holds 16 registers and inserts a random
// number of wait states (0 to 3), sometimes flagging pslverr. Each bus
// transfer is checked for: the APB phases (setup cycle with psel and no
// penable, then access cycles), stable address and data during the transfer,
// the grant in the completing access cycle (2 + wait states cycles after the
// request), rvalid with the read data one cycle later, and slverr_o.
module tb_apb_bridge;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  logic slverr;
  logic [31:0] paddr, pwdata, prdata;
  logic pwrite, psel, penable, pready, pslverr;
  int checks = 0, failures = 0;

  apb_bridge dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .slverr_o(slverr),
    .paddr_o(paddr), .pwdata_o(pwdata), .pwrite_o(pwrite), .psel_o(psel), .penable_o(penable),
    .prdata_i(prdata), .pready_i(pready), .pslverr_i(pslverr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // APB slave model
  logic [31:0] regs [16];
  int waits, wait_cnt;
  logic err_next;
  always_comb begin
    pready  = psel && penable && (wait_cnt >= waits);
    prdata  = pready ? regs[paddr[5:2]] : 32'hDEAD_0000;
    pslverr = pready && err_next;
  end
  always_ff @(posedge clk) begin
    if (psel && penable && !pready) wait_cnt <= wait_cnt + 1;
    if (pready) begin
      wait_cnt <= 0;
      if (pwrite) regs[paddr[5:2]] <= pwdata;
    end
  end

  task automatic xfer(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    int cycles;
    logic exp_err;
    waits    = $urandom_range(3);
    err_next = ($urandom_range(4) == 0);
    exp_err  = err_next;
    @(negedge clk);
    req.req = 1; req.we = w; req.addr = a; req.wdata = d; req.be = 4'hF;
    cycles = 0;
    #1;
    while (!rsp.gnt) begin
      if (cycles == 0) check("idle cycle: no psel yet", 32'(psel), 0);
      if (cycles == 1) check("setup: psel, no penable", 32'({psel, penable}), 32'b10);
      if (cycles >= 2) check("access: psel and penable", 32'({psel, penable}), 32'b11);
      if (psel) begin
        check("paddr stable", paddr, a);
        check("pwrite", 32'(pwrite), 32'(w));
        if (w) check("pwdata", pwdata, d);
      end
      @(negedge clk); #1;
      cycles++;
    end
    check("grant cycle = 2 + waits", cycles, 2 + waits);
    @(negedge clk);
    req.req = 0;
    check("rvalid", 32'(rsp.rvalid), 1);
    check("slverr", 32'(slverr), 32'(exp_err));
    r = rsp.rdata;
    #1;
    @(negedge clk);
    check("bus idle after", 32'(psel), 0);
  endtask

  initial begin
    logic [31:0] r, v [16];
    req = '0; wait_cnt = 0; waits = 0; err_next = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      v[i] = $urandom;
      xfer(1, APB_BASE + 32'(i) * 4, v[i], r);
    end
    for (int k = 0; k < 40; k++) begin
      int i;
      i = $urandom_range(15);
      xfer(0, APB_BASE + 32'(i) * 4, 0, r);
      check("read data", r, v[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
