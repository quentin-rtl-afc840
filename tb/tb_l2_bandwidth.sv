// tb_l2_bandwidth: L2 bandwidth of the interleaved banks under four masters.
//
// The four interleaved banks can each serve one access per cycle, so the
// region can move four words per cycle, against one for a single-port
// memory. This testbench runs quentin_soc at its default size and keeps four
// masters streaming through the interleaved region at once:
//   - the core instruction port reads consecutive words (a code stream);
//   - the core data port writes consecutive words (a data stream);
//   - the uDMA TX port reads, all 8 TX channels active;
//   - the uDMA RX port writes, all 8 RX channels active.
// Every master issues a new request in the cycle after each grant, which the
// bus protocol allows. The testbench counts the bank accesses in every cycle
// of the uDMA transfer and requires
//   - that all four banks were busy in the same cycle at least once, and
//   - an average of at least 2.5 accesses per cycle. Bank conflicts between
//     the streams cost the rest of the four; the default design reaches
//     about 3 (the value is printed).
// It also checks every word the core read and the words the uDMA moved.
module tb_l2_bandwidth;
  import quentin_pkg::*;

  localparam int unsigned CH = 8;
  localparam int unsigned WORDS = 64;   // per uDMA channel and direction
  localparam logic [31:0] CODE_BASE = IL_BASE + 32'h1_0000;
  localparam logic [31:0] DATA_BASE = IL_BASE + 32'h2_0004;

  logic clk = 0, rst_n = 0;
  tcdm_req_t mreq [2];
  tcdm_rsp_t mrsp [2];
  logic [31:0] paddr, pwdata;
  logic pwrite, psel, penable, apb_err;
  logic [CH-1:0][31:0] tx_data, rx_data;
  logic [CH-1:0] tx_valid, tx_ready, rx_valid, rx_ready, evt_tx, evt_rx;
  int checks = 0, failures = 0;

  quentin_soc dut (
    .clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(1'b1),
    .fc_instr_req_i(mreq[0]), .fc_instr_rsp_o(mrsp[0]),
    .fc_data_req_i(mreq[1]),  .fc_data_rsp_o(mrsp[1]),
    .jtag_tck_i(1'b0), .jtag_tms_i(1'b1), .jtag_tdi_i(1'b0), .jtag_trst_ni(1'b1),
    .jtag_tdo_o(),
    .apb_paddr_o(paddr), .apb_pwdata_o(pwdata), .apb_pwrite_o(pwrite),
    .apb_psel_o(psel), .apb_penable_o(penable), .apb_prdata_i(32'h0),
    .apb_pready_i(1'b1), .apb_pslverr_i(1'b0), .apb_err_o(apb_err),
    .udma_tx_data_o(tx_data), .udma_tx_valid_o(tx_valid), .udma_tx_ready_i(tx_ready),
    .udma_rx_data_i(rx_data), .udma_rx_valid_i(rx_valid), .udma_rx_ready_o(rx_ready),
    .udma_evt_tx_o(evt_tx), .udma_evt_rx_o(evt_rx));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic xfer(int m, logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    mreq[m] = '{req: 1, we: w, be: 4'hF, addr: a, wdata: d};
    #1;
    while (!mrsp[m].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[m] = '0;
    r = mrsp[m].rdata;
  endtask

  function automatic logic [31:0] code_word(logic [31:0] a);
    return a ^ 32'h5A5A_0000;
  endfunction
  function automatic logic [31:0] tx_addr(int c, int i);
    return IL_BASE + 32'h3_0008 + 32'(c) * WORDS * 4 + 32'(i) * 4;
  endfunction
  function automatic logic [31:0] rx_addr(int c, int i);
    return IL_BASE + 32'h4_000C + 32'(c) * WORDS * 4 + 32'(i) * 4;
  endfunction

  // ---- uDMA peripherals: always ready / always valid ----
  int tx_n [CH], rx_n [CH], evt_tx_n = 0, evt_rx_n = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < CH; c++) begin
        if (tx_valid[c] && tx_ready[c]) begin
          checks++;
          if (tx_data[c] !== (32'(c) << 16 | 32'(tx_n[c]))) begin
            failures++;
            $display("FAIL tx ch%0d word %0d: %08h", c, tx_n[c], tx_data[c]);
          end
          tx_n[c]++;
        end
        if (rx_valid[c] && rx_ready[c]) rx_n[c]++;
        if (evt_tx[c]) evt_tx_n++;
        if (evt_rx[c]) evt_rx_n++;
      end
    end
  end
  always_comb begin
    for (int c = 0; c < CH; c++) begin
      rx_data[c] = 32'hAB00_0000 | 32'(c) << 16 | 32'(rx_n[c]);
      rx_valid[c] = 1'b1;
      tx_ready[c] = 1'b1;
    end
  end

  // ---- bank accesses per cycle, counted while `measuring` is set ----
  logic measuring = 0;
  int cycles = 0, accesses = 0, all_four = 0;
  always @(posedge clk) begin
    if (rst_n && measuring) begin
      int n;
      n = 0;
      for (int b = 0; b < NB_IL_BANKS; b++)
        if (dut.il_req[b].req && dut.il_rsp[b].gnt) n++;
      cycles++;
      accesses += n;
      if (n == NB_IL_BANKS) all_four++;
    end
  end

  // ---- core streams: a new request in the cycle after every grant ----
  // gnt is sampled at the clock edge (before the arbiters move on); the
  // requests change at the falling edge.
  logic streaming = 0;
  int fetched = 0, stored = 0;
  logic g0 = 0, g1 = 0;
  logic [31:0] fetch_pend [$];
  always @(posedge clk) begin
    g0 = streaming && mreq[0].req && mrsp[0].gnt;
    g1 = streaming && mreq[1].req && mrsp[1].gnt;
    if (g0) fetch_pend.push_back(mreq[0].addr);
  end
  always @(negedge clk) begin
    if (streaming) begin
      // read data of the grant one cycle earlier
      if (mrsp[0].rvalid && fetch_pend.size() > 0) begin
        checks++;
        if (mrsp[0].rdata !== code_word(fetch_pend[0])) begin
          failures++;
          $display("FAIL fetch %08h: %08h", fetch_pend[0], mrsp[0].rdata);
        end
        void'(fetch_pend.pop_front());
      end
      if (g0) fetched++;
      if (g1) stored++;
      mreq[0] = '{req: 1, we: 0, be: 4'hF, addr: CODE_BASE + 32'(fetched % 512) * 4, wdata: 0};
      mreq[1] = '{req: 1, we: 1, be: 4'hF, addr: DATA_BASE + 32'(stored) * 4,
                  wdata: 32'hD000_0000 | 32'(stored)};
    end
  end

  initial begin
    logic [31:0] r;
    real per_cycle;
    for (int m = 0; m < 2; m++) mreq[m] = '0;
    for (int c = 0; c < CH; c++) begin tx_n[c] = 0; rx_n[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // code for the instruction stream and data for the TX channels
    for (int i = 0; i < 512; i++) xfer(1, 1, CODE_BASE + 32'(i) * 4, code_word(CODE_BASE + 32'(i) * 4), r);
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < WORDS; i++) xfer(1, 1, tx_addr(c, i), 32'(c) << 16 | 32'(i), r);
    for (int c = 0; c < CH; c++) begin
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 0, tx_addr(c, 0), r);
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 4, WORDS * 4, r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 0, rx_addr(c, 0), r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 4, WORDS * 4, r);
    end
    for (int c = 0; c < CH; c++) begin
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 8, 1, r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 8, 1, r);
    end
    // the last start is done: stream on both core ports until the uDMA ends
    @(negedge clk);
    streaming = 1;
    measuring = 1;
    while (evt_tx_n < CH || evt_rx_n < CH) @(negedge clk);
    measuring = 0;
    streaming = 0;
    mreq[0] = '0; mreq[1] = '0;
    repeat (2) @(negedge clk);

    per_cycle = real'(accesses) / real'(cycles);
    $display("%0d bank accesses in %0d cycles: %0.2f per cycle (single port: 1.00)",
             accesses, cycles, per_cycle);
    $display("all four banks busy in %0d cycles; core fetched %0d, stored %0d words",
             all_four, fetched, stored);
    check("all four banks in one cycle", 32'(all_four > 0), 1);
    check("at least 2.5 accesses per cycle", 32'(per_cycle >= 2.5), 1);
    check("core instruction stream ran", 32'(fetched > cycles / 2), 1);
    check("core data stream ran", 32'(stored > cycles / 2), 1);
    for (int c = 0; c < CH; c++) check("tx words", 32'(tx_n[c]), WORDS);
    for (int i = 0; i < stored; i += 13) begin
      xfer(1, 0, DATA_BASE + 32'(i) * 4, 0, r);
      check("stored word", r, 32'hD000_0000 | 32'(i));
    end
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < WORDS; i += 9) begin
        xfer(1, 0, rx_addr(c, i), 0, r);
        check("rx word in L2", r, 32'hAB00_0000 | 32'(c) << 16 | 32'(i));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
