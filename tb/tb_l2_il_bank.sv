// tb_l2_il_bank: self-checking test of one interleaved L2 bank.
//
// Accesses the bank (default size, 114 KB, bank 2 of 4) at addresses of the
// interleaved region that map to it, both in the SCM rows (the first 512) and
// in the SRAM rows, including the first and last row. Checks data, byte
// enables, gnt in the request cycle and rvalid exactly one cycle after. Then
// gates the SRAM and checks that the SCM rows still work while SRAM rows read
// zero.
module tb_l2_il_bank;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0, pwr_on = 1;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;
  localparam int unsigned BANK = 2;

  l2_il_bank dut (.clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(pwr_on), .req_i(req), .rsp_o(rsp));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic logic [31:0] row_addr(int unsigned row);
    return IL_BASE + 32'(row) * 16 + 32'(BANK) * 4;
  endfunction

  task automatic xfer(logic w, logic [31:0] a, logic [31:0] d, logic [3:0] b,
                      output logic [31:0] r);
    @(negedge clk);
    req.req = 1; req.we = w; req.addr = a; req.wdata = d; req.be = b;
    #1 check("gnt", 32'(rsp.gnt), 1);
    @(negedge clk);
    req.req = 0;
    check("rvalid", 32'(rsp.rvalid), 1);
    r = rsp.rdata;
    #1;
    @(negedge clk);
    check("rvalid low", 32'(rsp.rvalid), 0);
  endtask

  logic [31:0] ref_mem [int];
  int unsigned rows [40];

  initial begin
    logic [31:0] r, d;
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      rows[i] = (i == 0) ? 0 : (i == 1) ? 511 : (i == 2) ? 512 : (i == 3) ? IL_BANK_WORDS - 1 :
                (i < 20) ? $urandom_range(511) : $urandom_range(IL_BANK_WORDS - 1, 512);
      d = $urandom;
      xfer(1, row_addr(rows[i]), d, 4'hF, r);
      ref_mem[rows[i]] = d;
    end
    // byte-enable write on an SCM and an SRAM row
    xfer(1, row_addr(rows[0]), 32'hA5A5_A5A5, 4'b0101, r);
    ref_mem[rows[0]] = {ref_mem[rows[0]][31:24], 8'hA5, ref_mem[rows[0]][15:8], 8'hA5};
    xfer(1, row_addr(rows[2]), 32'h5A5A_5A5A, 4'b1000, r);
    ref_mem[rows[2]] = {8'h5A, ref_mem[rows[2]][23:0]};
    for (int i = 0; i < 40; i++) begin
      xfer(0, row_addr(rows[i]), 0, 4'hF, r);
      check($sformatf("read row %0d", rows[i]), r, ref_mem[rows[i]]);
    end
    // SRAM gated: SCM rows still serve, SRAM rows read zero
    pwr_on = 0;
    for (int i = 0; i < 8; i++) begin
      xfer(0, row_addr(rows[i]), 0, 4'hF, r);
      check($sformatf("gated row %0d", rows[i]), r, rows[i] < 512 ? ref_mem[rows[i]] : 32'h0);
    end
    d = $urandom;
    xfer(1, row_addr(rows[1]), d, 4'hF, r);
    xfer(0, row_addr(rows[1]), 0, 4'hF, r);
    check("gated SCM write", r, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
