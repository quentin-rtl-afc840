// tb_l2_sram_bank: self-checking test of private L2 bank 1 (32 KB SRAM).
//
// Writes and reads words across the whole bank (first and last word
// included), with byte enables, checking gnt in the request cycle and rvalid
// exactly one cycle later. Then gates the SRAM and checks that reads return
// zero and writes are dropped.
module tb_l2_sram_bank;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0, pwr_on = 1;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;

  l2_sram_bank dut (.clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(pwr_on), .req_i(req), .rsp_o(rsp));

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
    return PRIV1_BASE + 32'(row) * 4;
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
      rows[i] = (i == 0) ? 0 : (i == 1) ? 511 : (i == 2) ? 512 : (i == 3) ? PRIV_WORDS - 1 :
                $urandom_range(PRIV_WORDS - 1);
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
    // SRAM gated: reads give zero, writes are dropped
    pwr_on = 0;
    for (int i = 0; i < 4; i++) begin
      xfer(0, row_addr(rows[i]), 0, 4'hF, r);
      check("gated read", r, 32'h0);
    end
    xfer(1, row_addr(rows[1]), ~ref_mem[rows[1]], 4'hF, r);
    pwr_on = 1;
    xfer(0, row_addr(rows[1]), 0, 4'hF, r);
    check("gated write dropped", r, ref_mem[rows[1]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
