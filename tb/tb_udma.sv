// tb_udma: self-checking test of the I/O DMA.
//
// The testbench plays the APB master (configuration), the L2 memory on the
// uDMA's two ports (with random grant stalls, rvalid one cycle after a
// grant), and eight peripherals on each side (TX sinks with random ready,
// RX sources with random valid). All TX and RX channels are started with
// different lengths at once. Checks: every TX channel delivers exactly the
// L2 words of its buffer, in order; every RX channel leaves its words in L2
// at the right addresses; no access falls outside a configured buffer; each
// channel raises exactly one end-of-transfer event and reads back as idle,
// with zero bytes remaining; and the ports carry back-to-back transfers from
// different channels (one word per cycle per port at best).
module tb_udma;
  import quentin_pkg::*;

  localparam int unsigned NB_CH = 8;

  logic clk = 0, rst_n = 0;
  logic [11:0] paddr;
  logic [31:0] pwdata, prdata;
  logic pwrite, psel, penable, pready, pslverr;
  tcdm_req_t tx_req, rx_req;
  tcdm_rsp_t tx_rsp, rx_rsp;
  logic [NB_CH-1:0][31:0] tx_data, rx_data;
  logic [NB_CH-1:0] tx_valid, tx_ready, rx_valid, rx_ready, evt_tx, evt_rx;
  int checks = 0, failures = 0;

  udma #(.NB_CH(NB_CH)) dut (.clk_i(clk), .rst_ni(rst_n),
    .paddr_i(paddr), .pwdata_i(pwdata), .pwrite_i(pwrite), .psel_i(psel), .penable_i(penable),
    .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .tx_req_o(tx_req), .tx_rsp_i(tx_rsp), .rx_req_o(rx_req), .rx_rsp_i(rx_rsp),
    .tx_data_o(tx_data), .tx_valid_o(tx_valid), .tx_ready_i(tx_ready),
    .rx_data_i(rx_data), .rx_valid_i(rx_valid), .rx_ready_o(rx_ready),
    .evt_tx_o(evt_tx), .evt_rx_o(evt_rx));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---- APB master ----
  task automatic apb_wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); paddr = a; pwdata = d; pwrite = 1; psel = 1; penable = 0;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_rd(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); paddr = a; pwrite = 0; psel = 1; penable = 0;
    @(negedge clk); penable = 1; #1 d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask
  function automatic logic [11:0] reg_addr(int dir, int ch, int r);
    return 12'(dir * 256 + ch * 16 + r * 4);
  endfunction

  // ---- L2 model ----
  logic [31:0] mem [int];
  logic [31:0] tx_rd_q;
  logic        tx_rv_q, rx_rv_q;
  int tx_b2b = 0, rx_b2b = 0, tx_last_gnt = 0, rx_last_gnt = 0, cyc = 0;
  logic [31:0] tx_base [NB_CH], rx_base [NB_CH];
  int tx_len [NB_CH], rx_len [NB_CH];
  int stray = 0;

  function automatic logic in_buf(logic [31:0] a, logic [31:0] base [NB_CH], int len [NB_CH]);
    for (int c = 0; c < NB_CH; c++)
      if (a >= base[c] && a < base[c] + 32'(len[c]) * 4) return 1;
    return 0;
  endfunction

  logic tx_stall, rx_stall;
  always_comb begin
    tx_rsp.gnt    = tx_req.req && !tx_stall;
    tx_rsp.rvalid = tx_rv_q;
    tx_rsp.rdata  = tx_rd_q;
    rx_rsp.gnt    = rx_req.req && !rx_stall;
    rx_rsp.rvalid = rx_rv_q;
    rx_rsp.rdata  = '0;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tx_stall <= ($urandom_range(3) == 0);
    rx_stall <= ($urandom_range(3) == 0);
    tx_rv_q <= tx_rsp.gnt;
    rx_rv_q <= rx_rsp.gnt;
    if (tx_rsp.gnt && rst_n) begin
      tx_rd_q <= mem.exists(tx_req.addr) ? mem[tx_req.addr] : 32'hEEEE_EEEE;
      if (tx_req.we || !in_buf(tx_req.addr, tx_base, tx_len)) stray++;
      if (tx_last_gnt == cyc - 1) tx_b2b++;
      tx_last_gnt <= cyc;
    end
    if (rx_rsp.gnt && rst_n) begin
      mem[rx_req.addr] = rx_req.wdata;
      if (!rx_req.we || rx_req.be != 4'hF || !in_buf(rx_req.addr, rx_base, rx_len)) stray++;
      if (rx_last_gnt == cyc - 1) rx_b2b++;
      rx_last_gnt <= cyc;
    end
  end

  // ---- peripherals ----
  int tx_cnt [NB_CH], rx_cnt [NB_CH], evt_tx_cnt [NB_CH], evt_rx_cnt [NB_CH];
  logic [31:0] tx_got [NB_CH][$];
  always @(posedge clk) begin
    for (int c = 0; c < NB_CH; c++) begin
      tx_ready[c] <= $urandom_range(1);
      if (tx_valid[c] && tx_ready[c]) tx_got[c].push_back(tx_data[c]);
      if (rx_valid[c] && rx_ready[c]) begin
        rx_cnt[c] <= rx_cnt[c] + 1;
        rx_valid[c] <= 1'b0;
      end else if (!rx_valid[c] && rx_cnt[c] < rx_len[c] && $urandom_range(1)) begin
        rx_valid[c] <= 1'b1;
      end
      rx_data[c] <= 32'(c) << 24 | 32'(rx_cnt[c] + ((rx_valid[c] && rx_ready[c]) ? 1 : 0));
      if (evt_tx[c] && rst_n) evt_tx_cnt[c]++;
      if (evt_rx[c] && rst_n) evt_rx_cnt[c]++;
    end
  end

  initial begin
    logic [31:0] d;
    paddr = 0; pwdata = 0; pwrite = 0; psel = 0; penable = 0;
    tx_ready = '0; rx_valid = '0; rx_data = '0; tx_stall = 0; rx_stall = 0;
    tx_rv_q = 0; rx_rv_q = 0; tx_rd_q = 0;
    for (int c = 0; c < NB_CH; c++) begin
      tx_cnt[c] = 0; rx_cnt[c] = 0; evt_tx_cnt[c] = 0; evt_rx_cnt[c] = 0;
      tx_base[c] = 32'h1C01_0000 + 32'(c) * 32'h400;
      rx_base[c] = 32'h1C02_0000 + 32'(c) * 32'h400;
      tx_len[c]  = 5 + c * 7;
      rx_len[c]  = 3 + c * 9;
      for (int i = 0; i < tx_len[c]; i++) mem[tx_base[c] + 32'(i) * 4] = $urandom;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NB_CH; c++) begin
      apb_wr(reg_addr(1, c, 0), tx_base[c]);
      apb_wr(reg_addr(1, c, 1), 32'(tx_len[c]) * 4);
      apb_wr(reg_addr(0, c, 0), rx_base[c]);
      apb_wr(reg_addr(0, c, 1), 32'(rx_len[c]) * 4);
    end
    apb_rd(reg_addr(1, 3, 0), d); check("SADDR readback", d, tx_base[3]);
    apb_rd(reg_addr(0, 5, 1), d); check("SIZE readback", d, 32'(rx_len[5]) * 4);
    for (int c = 0; c < NB_CH; c++) begin
      apb_wr(reg_addr(1, c, 2), 1);
      apb_wr(reg_addr(0, c, 2), 1);
    end
    apb_rd(reg_addr(1, 7, 2), d); check("busy after start", d, 1);
    // wait until all channels are idle
    for (int t = 0; t < 5000; t++) begin
      logic all_idle;
      all_idle = 1;
      for (int c = 0; c < NB_CH; c++)
        if (evt_tx_cnt[c] == 0 || evt_rx_cnt[c] == 0) all_idle = 0;
      if (all_idle) break;
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int c = 0; c < NB_CH; c++) begin
      check($sformatf("tx words ch%0d", c), tx_got[c].size(), tx_len[c]);
      for (int i = 0; i < tx_len[c] && i < tx_got[c].size(); i++)
        check($sformatf("tx data ch%0d[%0d]", c, i), tx_got[c][i], mem[tx_base[c] + 32'(i) * 4]);
      for (int i = 0; i < rx_len[c]; i++)
        check($sformatf("rx data ch%0d[%0d]", c, i),
              mem.exists(rx_base[c] + 32'(i) * 4) ? mem[rx_base[c] + 32'(i) * 4] : 32'hFFFF_FFFF,
              32'(c) << 24 | 32'(i));
      check($sformatf("tx event ch%0d", c), evt_tx_cnt[c], 1);
      check($sformatf("rx event ch%0d", c), evt_rx_cnt[c], 1);
      apb_rd(reg_addr(1, c, 2), d); check("tx idle", d, 0);
      apb_rd(reg_addr(0, c, 3), d); check("rx remaining", d, 0);
    end
    check("no stray accesses", stray, 0);
    check("back-to-back TX grants seen", 32'(tx_b2b > 0), 1);
    check("back-to-back RX grants seen", 32'(rx_b2b > 0), 1);
    $display("back-to-back grants: tx %0d rx %0d", tx_b2b, rx_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
