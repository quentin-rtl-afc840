// tb_udma_bandwidth: aggregated uDMA bandwidth through the whole SoC fabric.
//
// All 8 TX and all 8 RX uDMA channels run at once against the real L2 of
// quentin_soc (default parameters), with peripherals that are always ready
// (TX) and always have a word (RX): the worst case when every peripheral
// streams. TX buffers sit in the interleaved SRAM, RX buffers in private
// bank 1. The testbench counts the words moved per cycle from the first
// start to the last end-of-transfer event and requires at least 28.1 bits
// per cycle: the 1.6 Gbit/s that the peripherals need at a 57 MHz clock.
// It also checks every word that was moved.
module tb_udma_bandwidth;
  import quentin_pkg::*;

  localparam int unsigned CH = 8;
  localparam int unsigned WORDS = 64;   // per channel and direction

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

  function automatic logic [31:0] tx_addr(int c, int i);
    return IL_BASE + 32'h8000 + 32'(c) * WORDS * 4 + 32'(i) * 4;
  endfunction
  function automatic logic [31:0] rx_addr(int c, int i);
    return PRIV1_BASE + 32'(c) * WORDS * 4 + 32'(i) * 4;
  endfunction

  // peripherals: always ready / always valid
  int tx_n [CH], rx_n [CH], evt_tx_n = 0, evt_rx_n = 0, words = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < CH; c++) begin
        if (tx_valid[c] && tx_ready[c]) begin
          if (tx_data[c] !== (32'(c) << 16 | 32'(tx_n[c]))) begin
            failures++;
            $display("FAIL tx ch%0d word %0d: %08h", c, tx_n[c], tx_data[c]);
          end
          checks++;
          tx_n[c]++;
          words++;
        end
        if (rx_valid[c] && rx_ready[c]) begin
          rx_n[c]++;
          words++;
        end
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

  initial begin
    logic [31:0] r;
    int t0, t1;
    real bits_per_cycle;
    for (int m = 0; m < 2; m++) mreq[m] = '0;
    for (int c = 0; c < CH; c++) begin tx_n[c] = 0; rx_n[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < WORDS; i++) xfer(1, 1, tx_addr(c, i), 32'(c) << 16 | 32'(i), r);
    for (int c = 0; c < CH; c++) begin
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 0, tx_addr(c, 0), r);
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 4, WORDS * 4, r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 0, rx_addr(c, 0), r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 4, WORDS * 4, r);
    end
    // start all channels back to back
    t0 = $time / 10;
    for (int c = 0; c < CH; c++) begin
      xfer(1, 1, UDMA_BASE + 32'h100 + 32'(c) * 16 + 8, 1, r);
      xfer(1, 1, UDMA_BASE + 32'(c) * 16 + 8, 1, r);
    end
    while (evt_tx_n < CH || evt_rx_n < CH) @(negedge clk);
    t1 = $time / 10;
    bits_per_cycle = real'(words) * 32.0 / real'(t1 - t0);
    $display("moved %0d words in %0d cycles: %0.1f bit/cycle (%0.2f Gbit/s at 57 MHz)",
             words, t1 - t0, bits_per_cycle, bits_per_cycle * 57.0e6 / 1.0e9);
    check("all words moved", 32'(words), 2 * CH * WORDS);
    check("bandwidth >= 28.1 bit/cycle", 32'(bits_per_cycle >= 28.1), 1);
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < WORDS; i += 7) begin
        xfer(1, 0, rx_addr(c, i), 0, r);
        check("rx word in L2", r, 32'hAB00_0000 | 32'(c) << 16 | 32'(i));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
