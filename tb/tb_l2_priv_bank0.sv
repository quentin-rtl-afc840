// tb_l2_priv_bank0: self-checking test of private L2 bank 0 (8 KB SCM + 24 KB SRAM).
//
// The three ports (core instruction, core data, system) issue random traffic
// over a few SCM and a few SRAM words, holding each request until granted.
// A reference model checks, cycle by cycle: every SCM request is granted at
// once, even with all three ports active (counted as "parallel SCM cycles");
// at most one SRAM request is granted per cycle, one is always granted when
// any is pending, and no port waits more than two cycles (round robin);
// rvalid follows each grant by one cycle with the data from before that
// cycle's writes; a same-cycle SCM write by data and system port to one word
// leaves the data port's bytes. The instruction port only reads.
module tb_l2_priv_bank0;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0, pwr_on = 1;
  tcdm_req_t [2:0] req;
  tcdm_rsp_t [2:0] rsp;
  int checks = 0, failures = 0;
  int par_scm = 0, sram_conflicts = 0;

  l2_priv_bank0 dut (.clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(pwr_on),
    .instr_req_i(req[0]), .instr_rsp_o(rsp[0]),
    .data_req_i(req[1]),  .data_rsp_o(rsp[1]),
    .sys_req_i(req[2]),   .sys_rsp_o(rsp[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h exp %08h at %0t", what, got, exp, $time);
    end
  endtask

  logic [31:0] ref_mem [PRIV_WORDS];
  logic [2:0]  exp_v;
  logic [2:0][31:0] exp_d;
  int wait_cnt [3];

  function automatic int unsigned widx(logic [31:0] a);
    return (a - PRIV0_BASE) >> 2;
  endfunction

  function automatic logic [31:0] rnd_addr();
    int unsigned w;
    w = $urandom_range(1) ? $urandom_range(3) : PRIV0_SCM_WORDS + $urandom_range(3);
    return PRIV0_BASE + 32'(w) * 4;
  endfunction

  initial begin
    int n_sram, n_sram_gnt, n_scm;
    req = '0;
    exp_v = '0;
    for (int i = 0; i < PRIV_WORDS; i++) ref_mem[i] = 32'(i) * 32'h0101_0101;
    // preload the window through the data port
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 2; k++) begin
        int unsigned w;
        w = (k == 0) ? i : PRIV0_SCM_WORDS + i;
        @(negedge clk);
        req[1] = '{req: 1, we: 1, be: 4'hF, addr: PRIV0_BASE + 32'(w) * 4, wdata: ref_mem[w]};
        #1;
        while (!rsp[1].gnt) begin @(negedge clk); #1; end
        @(negedge clk); req[1] = '0;
      end
    end
    @(negedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // new requests on idle ports
      for (int p = 0; p < 3; p++) begin
        if (!req[p].req && $urandom_range(3) != 0) begin
          req[p].req   = 1;
          req[p].we    = (p != 0) && $urandom_range(1);
          req[p].addr  = rnd_addr();
          req[p].be    = 4'($urandom) | 4'b0001;
          req[p].wdata = $urandom;
          wait_cnt[p]  = 0;
        end
      end
      #1;
      n_sram = 0; n_sram_gnt = 0; n_scm = 0;
      for (int p = 0; p < 3; p++) begin
        if (req[p].req) begin
          if (widx(req[p].addr) < PRIV0_SCM_WORDS) begin
            n_scm++;
            check("SCM granted at once", 32'(rsp[p].gnt), 1);
          end else begin
            n_sram++;
            if (rsp[p].gnt) n_sram_gnt++;
          end
        end else begin
          check("no gnt without req", 32'(rsp[p].gnt), 0);
        end
      end
      if (n_scm == 3) par_scm++;
      if (n_sram > 1) sram_conflicts++;
      check("SRAM grants", n_sram_gnt, n_sram > 0 ? 1 : 0);
      // expected read data: contents before this cycle's writes
      for (int p = 0; p < 3; p++) begin
        exp_v[p] = req[p].req && rsp[p].gnt;
        exp_d[p] = ref_mem[widx(req[p].addr)];
      end
      // apply writes: system first, then data (data wins a collision)
      for (int p = 2; p >= 1; p--) begin
        if (req[p].req && rsp[p].gnt && req[p].we)
          for (int b = 0; b < 4; b++)
            if (req[p].be[b]) ref_mem[widx(req[p].addr)][8*b +: 8] = req[p].wdata[8*b +: 8];
      end
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        check("rvalid", 32'(rsp[p].rvalid), 32'(exp_v[p]));
        if (exp_v[p] && !req[p].we) check($sformatf("rdata port %0d", p), rsp[p].rdata, exp_d[p]);
        if (exp_v[p]) req[p] = '0;
        else if (req[p].req) begin
          wait_cnt[p]++;
          check("round-robin wait <= 2", 32'(wait_cnt[p] <= 2), 1);
        end
      end
    end
    checks++;
    if (par_scm == 0 || sram_conflicts == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised: parallel SCM %0d, SRAM conflicts %0d",
               par_scm, sram_conflicts);
    end
    $display("parallel SCM cycles %0d, SRAM conflict cycles %0d", par_scm, sram_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
