// tb_l2_interconnect: self-checking test of the L2 interconnect.
//
// Five masters issue random reads and writes, each held until granted, to
// all regions: the interleaved banks (a small window, to force bank
// conflicts), both private banks, the ROM, the APB bridge and an unmapped
// address. Slave models answer a grant with rvalid one cycle later and data
// that encodes which slave answered, the address and the write data
// (tag ^ addr ^ wdata); the APB model stalls at random. The testbench works
// out independently which slave each address must reach (bank = address bits
// [3:2]; core ports to private bank 0 use their dedicated ports) and checks
// every response. It also checks that masters on different banks are served
// in the same cycle (all four banks at once at least once), that colliding
// masters wait (counted) and that no master waits longer than the round
// robin allows.
module tb_l2_interconnect;
  import quentin_pkg::*;

  logic clk = 0, rst_n = 0;
  tcdm_req_t [NB_MASTERS-1:0]  m_req;
  tcdm_rsp_t [NB_MASTERS-1:0]  m_rsp;
  tcdm_req_t [NB_IL_BANKS-1:0] il_req;
  tcdm_rsp_t [NB_IL_BANKS-1:0] il_rsp;
  // slave order: 0..3 interleaved, 4 p0 instr, 5 p0 data, 6 p0 sys, 7 p1, 8 rom, 9 apb
  localparam int NS = 10;
  tcdm_req_t [NS-1:0] s_req;
  tcdm_rsp_t [NS-1:0] s_rsp;
  int checks = 0, failures = 0;
  int conflicts = 0, parallel = 0, all_four = 0, direct_par = 0, apb_stalls = 0, err_hits = 0;

  l2_interconnect dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(m_req), .m_rsp_o(m_rsp),
    .il_req_o(il_req), .il_rsp_i(il_rsp),
    .p0_instr_req_o(s_req[4]), .p0_instr_rsp_i(s_rsp[4]),
    .p0_data_req_o(s_req[5]),  .p0_data_rsp_i(s_rsp[5]),
    .p0_sys_req_o(s_req[6]),   .p0_sys_rsp_i(s_rsp[6]),
    .p1_req_o(s_req[7]),  .p1_rsp_i(s_rsp[7]),
    .rom_req_o(s_req[8]), .rom_rsp_i(s_rsp[8]),
    .apb_req_o(s_req[9]), .apb_rsp_i(s_rsp[9]));

  for (genvar b = 0; b < NB_IL_BANKS; b++) begin : g_il
    assign s_req[b]  = il_req[b];
    assign il_rsp[b] = s_rsp[b];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic logic [31:0] tag(int s);
    return 32'(s + 1) << 28;
  endfunction

  // slave models
  logic apb_stall;
  logic [NS-1:0] rv_q;
  logic [NS-1:0][31:0] rd_q;
  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_rsp[s].gnt    = s_req[s].req && !(s == 9 && apb_stall);
      s_rsp[s].rvalid = rv_q[s];
      s_rsp[s].rdata  = rd_q[s];
    end
  end
  always_ff @(posedge clk) begin
    apb_stall <= $urandom_range(1);
    for (int s = 0; s < NS; s++) begin
      rv_q[s] <= s_rsp[s].gnt && rst_n;
      rd_q[s] <= tag(s) ^ s_req[s].addr ^ s_req[s].wdata;
    end
  end

  // expected slave for a master's address
  function automatic int exp_slave(int m, logic [31:0] a);
    if (a >= IL_BASE && a < IL_BASE + IL_SIZE) return int'(a[3:2]);
    if (a >= PRIV0_BASE && a < PRIV0_BASE + PRIV_SIZE)
      return (m == M_FC_INSTR) ? 4 : (m == M_FC_DATA) ? 5 : 6;
    if (a >= PRIV1_BASE && a < PRIV1_BASE + PRIV_SIZE) return 7;
    if (a >= ROM_BASE && a < ROM_BASE + ROM_SIZE) return 8;
    if (a >= APB_BASE && a < APB_BASE + APB_SIZE) return 9;
    return -1;
  endfunction

  function automatic logic [31:0] rnd_addr();
    unique case ($urandom_range(9))
      0, 1, 2, 3, 4: return IL_BASE + 32'($urandom_range(15)) * 4;
      5:       return PRIV0_BASE + 32'($urandom_range(8191)) * 4;
      6:       return PRIV1_BASE + 32'($urandom_range(8191)) * 4;
      7:       return ROM_BASE + 32'($urandom_range(2047)) * 4;
      8:       return APB_BASE + 32'($urandom_range(1023)) * 4;
      default: return 32'h3000_0000 + 32'($urandom_range(255)) * 4;
    endcase
  endfunction

  logic [NB_MASTERS-1:0] exp_v;
  logic [NB_MASTERS-1:0][31:0] exp_d;
  int waitc [NB_MASTERS];

  initial begin
    int il_gnt, bank_req [NB_IL_BANKS];
    m_req = '0;
    exp_v = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      for (int m = 0; m < NB_MASTERS; m++) begin
        if (!m_req[m].req && $urandom_range(3) != 0) begin
          m_req[m].req   = 1;
          m_req[m].we    = (m != M_FC_INSTR) && $urandom_range(1);
          m_req[m].addr  = rnd_addr();
          m_req[m].be    = 4'hF;
          m_req[m].wdata = $urandom;
          waitc[m] = 0;
        end
      end
      // occasionally drive both core ports into private bank 0 together
      if (cyc % 50 == 0 && !m_req[0].req && !m_req[1].req) begin
        m_req[0] = '{req: 1, we: 0, be: 4'hF, addr: PRIV0_BASE + 4, wdata: 32'h1};
        m_req[1] = '{req: 1, we: 1, be: 4'hF, addr: PRIV0_BASE + 8, wdata: 32'h2};
        waitc[0] = 0; waitc[1] = 0;
      end
      #1;
      il_gnt = 0;
      for (int b = 0; b < NB_IL_BANKS; b++) bank_req[b] = 0;
      for (int m = 0; m < NB_MASTERS; m++) begin
        int s;
        s = exp_slave(m, m_req[m].addr);
        exp_v[m] = m_req[m].req && m_rsp[m].gnt;
        exp_d[m] = (s < 0) ? ERR_RDATA : tag(s) ^ m_req[m].addr ^ m_req[m].wdata;
        if (m_req[m].req && s >= 0 && s < 4) begin
          bank_req[s]++;
          if (m_rsp[m].gnt) il_gnt++;
        end
        if (m_req[m].req && s == 9 && !m_rsp[m].gnt && apb_stall) apb_stalls++;
        if (m_req[m].req && s < 0 && m_rsp[m].gnt) err_hits++;
        // a request must reach exactly the slave it addresses, unmodified
        if (exp_v[m] && s >= 0)
          check("slave sees request", s_req[s].addr, m_req[m].addr);
      end
      for (int b = 0; b < NB_IL_BANKS; b++) begin
        if (bank_req[b] > 1) conflicts++;
      end
      if (il_gnt >= 3) parallel++;
      if (il_gnt == 4) all_four++;
      if (m_req[0].req && m_req[1].req && m_rsp[0].gnt && m_rsp[1].gnt &&
          exp_slave(0, m_req[0].addr) == 4 && exp_slave(1, m_req[1].addr) == 5) direct_par++;
      // every bank with requesters grants exactly one of them
      for (int b = 0; b < NB_IL_BANKS; b++) begin
        int g;
        g = 0;
        for (int m = 0; m < NB_MASTERS; m++)
          if (m_req[m].req && m_rsp[m].gnt && exp_slave(m, m_req[m].addr) == b) g++;
        check("one grant per busy bank", 32'(g), bank_req[b] > 0 ? 1 : 0);
      end
      @(negedge clk);
      for (int m = 0; m < NB_MASTERS; m++) begin
        check($sformatf("rvalid m%0d", m), 32'(m_rsp[m].rvalid), 32'(exp_v[m]));
        if (exp_v[m]) check($sformatf("rdata m%0d", m), m_rsp[m].rdata, exp_d[m]);
        if (exp_v[m]) m_req[m] = '0;
        else if (m_req[m].req && exp_slave(m, m_req[m].addr) != 9) begin
          waitc[m]++;
          check("round-robin bound", 32'(waitc[m] < NB_MASTERS), 1);
        end
      end
    end
    checks++;
    if (conflicts == 0 || parallel == 0 || all_four == 0 || direct_par == 0 || apb_stalls == 0 || err_hits == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("bank conflicts %0d, >=3 banks in parallel %0d, all 4 banks %0d, core direct ports in parallel %0d",
             conflicts, parallel, all_four, direct_par);
    $display("APB stalls %0d, unmapped accesses %0d", apb_stalls, err_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
