// tb_quentin_soc: end-to-end test of the SoC fabric at its full size.
//
// The testbench stands in for the parts outside the fabric: the core's
// instruction and data ports (bus masters), a JTAG debugger, the APB
// peripherals (a register model with wait states), the peripherals behind
// the uDMA (a TX sink and an RX source) and the off-chip power manager
// (sram_pwr_on). It runs one complete sequence:
//   1. reads the boot stub from the ROM and follows its jump target;
//   2. fills and reads back words in every L2 bank, SRAM and SCM parts;
//   3. has both core ports and the JTAG debug bridge hit private bank 0's SCM
//      in the same cycle (all granted), and two masters collide on one
//      interleaved bank (one waits);
//   4. programs the uDMA over APB: a TX channel streams an L2 buffer to a
//      peripheral while an RX channel writes a peripheral's words into L2,
//      and both end with an event;
//   5. accesses an APB peripheral outside the fabric and an unmapped address;
//   6. gates the SRAMs and runs from the 16 KB of SCM alone.
// Debug reads and writes go through JTAG (IDCODE checked, then ACCESS).
// Each mechanism is counted and a failure is recorded for one that never
// happened. All parameters are at their defaults.
module tb_quentin_soc;
  import quentin_pkg::*;

  localparam int unsigned CH = 8;

  logic clk = 0, rst_n = 0, pwr_on = 1;
  tcdm_req_t mreq [2];   // 0 = core instruction, 1 = core data
  tcdm_rsp_t mrsp [2];
  logic tck = 0, tms = 1, tdi = 0, trst_n = 0, tdo;
  logic [31:0] paddr, pwdata, prdata;
  logic pwrite, psel, penable, pready, pslverr, apb_err;
  logic [CH-1:0][31:0] tx_data, rx_data;
  logic [CH-1:0] tx_valid, tx_ready, rx_valid, rx_ready, evt_tx, evt_rx;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_boot = 0, n_scm_par = 0, n_bank_conflict = 0, n_udma_tx = 0, n_udma_rx = 0;
  int n_apb_ext = 0, n_apb_wait = 0, n_unmapped = 0, n_scm_only = 0, n_gated_read = 0;

  quentin_soc dut (
    .clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(pwr_on),
    .fc_instr_req_i(mreq[0]), .fc_instr_rsp_o(mrsp[0]),
    .fc_data_req_i(mreq[1]),  .fc_data_rsp_o(mrsp[1]),
    .jtag_tck_i(tck), .jtag_tms_i(tms), .jtag_tdi_i(tdi), .jtag_trst_ni(trst_n),
    .jtag_tdo_o(tdo),
    .apb_paddr_o(paddr), .apb_pwdata_o(pwdata), .apb_pwrite_o(pwrite),
    .apb_psel_o(psel), .apb_penable_o(penable), .apb_prdata_i(prdata),
    .apb_pready_i(pready), .apb_pslverr_i(pslverr), .apb_err_o(apb_err),
    .udma_tx_data_o(tx_data), .udma_tx_valid_o(tx_valid), .udma_tx_ready_i(tx_ready),
    .udma_rx_data_i(rx_data), .udma_rx_valid_i(rx_valid), .udma_rx_ready_o(rx_ready),
    .udma_evt_tx_o(evt_tx), .udma_evt_rx_o(evt_rx));

  always #5 clk = ~clk;

  `include "jtag_driver.svh"

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ---- bus master task: hold req until gnt, take the response a cycle later ----
  // master 2 is the JTAG debugger
  int n_jtag = 0;
  task automatic xfer(int m, logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    if (m == 2) begin
      logic done;
      if (w) jtag_write(a, d);
      else begin
        jtag_read(a, r, done);
        check("JTAG access done", 32'(done), 1);
      end
      n_jtag++;
      return;
    end
    @(negedge clk);
    mreq[m] = '{req: 1, we: w, be: 4'hF, addr: a, wdata: d};
    #1;
    while (!mrsp[m].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[m] = '0;
    check("rvalid", 32'(mrsp[m].rvalid), 1);
    r = mrsp[m].rdata;
  endtask

  task automatic wr(int m, logic [31:0] a, logic [31:0] d);
    logic [31:0] r;
    xfer(m, 1, a, d, r);
  endtask

  task automatic rd_check(int m, logic [31:0] a, logic [31:0] exp, string what);
    logic [31:0] r;
    xfer(m, 0, a, 0, r);
    check(what, r, exp);
  endtask

  // ---- external APB peripheral model: 8 registers, 1 wait state ----
  logic [31:0] ext_regs [8];
  logic ext_wait;
  always_comb begin
    pready  = psel && penable && !ext_wait;
    prdata  = ext_regs[paddr[4:2]];
    pslverr = 1'b0;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) ext_wait <= 1'b1;
    else if (psel && penable) begin
      ext_wait <= !ext_wait;
      if (ext_wait) n_apb_wait++;
      if (pready && pwrite) ext_regs[paddr[4:2]] <= pwdata;
      if (pready) n_apb_ext++;
    end
  end

  // ---- uDMA peripherals: TX sink on channel 0, RX source on channel 1 ----
  logic [31:0] tx_got [$];
  int rx_sent = 0;
  localparam int RX_WORDS = 24;
  always @(posedge clk) begin
    tx_ready <= CH'($urandom_range(1));
    if (rst_n && tx_valid[0] && tx_ready[0]) tx_got.push_back(tx_data[0]);
    if (rst_n && rx_valid[1] && rx_ready[1]) begin
      rx_sent = rx_sent + 1;
      rx_valid[1] <= 1'b0;
    end else if (rst_n && !rx_valid[1] && rx_sent < RX_WORDS) begin
      rx_valid[1] <= 1'b1;
    end
    rx_data[1] <= 32'hC0DE_0000 | 32'(rx_sent);
    if (rst_n && evt_tx[0]) n_udma_tx++;
    if (rst_n && evt_rx[1]) n_udma_rx++;
  end

  function automatic logic [31:0] pat(logic [31:0] a);
    return a ^ 32'h5A5A_1234;
  endfunction

  logic [31:0] test_addr [$];

  initial begin
    logic [31:0] r, w0, w1, w2, target;
    logic [65:0] jo;
    logic [3:0] ir_o;
    for (int m = 0; m < 2; m++) mreq[m] = '0;
    rx_valid = '0; rx_data = '0; tx_ready = '0;
    for (int i = 0; i < 8; i++) ext_regs[i] = 32'(i) * 32'h1111_1111;
    repeat (3) @(negedge clk);
    rst_n = 1; trst_n = 1;
    jtag_reset();
    jtag_dr(32, '0, jo);
    check("JTAG IDCODE", jo[31:0], 32'h1000_0001);
    jtag_ir(4'b0010, ir_o);   // ACCESS

    // 1. boot stub: decode lui/addi/jalr and follow the jump
    xfer(0, 0, ROM_BASE + 0, 0, w0);
    xfer(0, 0, ROM_BASE + 4, 0, w1);
    xfer(0, 0, ROM_BASE + 8, 0, w2);
    check("lui opcode",  32'(w0[6:0]), 32'h37);
    check("addi opcode", 32'(w1[6:0]), 32'h13);
    check("jalr opcode", 32'(w2[6:0]), 32'h67);
    target = {w0[31:12], 12'h0} + {{20{w1[31]}}, w1[31:20]};
    check("boot target", target, BOOT_ADDR);
    if (target == BOOT_ADDR) n_boot++;

    // 2. every bank, SCM and SRAM parts, first and last words
    test_addr = '{PRIV0_BASE, PRIV0_BASE + 32'h1FFC, PRIV0_BASE + 32'h2000, PRIV0_BASE + 32'h7FFC,
                  PRIV1_BASE, PRIV1_BASE + 32'h7FFC,
                  IL_BASE, IL_BASE + 4, IL_BASE + 8, IL_BASE + 12,
                  IL_BASE + 32'h1FFC, IL_BASE + 32'h2000, IL_BASE + 32'h2004,
                  IL_BASE + IL_SIZE - 16, IL_BASE + IL_SIZE - 4};
    for (int i = 0; i < 20; i++) test_addr.push_back(IL_BASE + 32'($urandom_range(IL_SIZE / 4 - 1)) * 4);
    foreach (test_addr[i]) wr(1, test_addr[i], pat(test_addr[i]));
    foreach (test_addr[i]) rd_check(i < 4 ? 2 : 0, test_addr[i], pat(test_addr[i]), "L2 readback");
    rd_check(0, PRIV0_BASE + 32'h2000, pat(PRIV0_BASE + 32'h2000), "fetch from private SRAM");

    // 3a. core instruction, core data and JTAG on private bank 0's SCM at once:
    //     the core ports keep accessing the SCM while a JTAG read is running
    fork
      begin
        logic d;
        rd_check(2, PRIV0_BASE + 32'h1FFC, pat(PRIV0_BASE + 32'h1FFC), "JTAG read of SCM");
      end
      begin
        for (int t = 0; t < 3000 && n_scm_par == 0; t++) begin
          @(negedge clk);
          mreq[0] = '{req: 1, we: 0, be: 4'hF, addr: PRIV0_BASE, wdata: 0};
          mreq[1] = '{req: 1, we: 1, be: 4'hF, addr: PRIV0_BASE + 32'h100, wdata: 32'hFACE_0001};
          #1;
          check("core SCM ports never wait", 32'({mrsp[0].gnt, mrsp[1].gnt}), 32'b11);
          if (dut.i_priv0.gnt == 3'b111) n_scm_par++;
          @(negedge clk);
          check("instr rdata", mrsp[0].rdata, pat(PRIV0_BASE));
          mreq[0] = '0; mreq[1] = '0;
        end
      end
    join
    rd_check(0, PRIV0_BASE + 32'h100, 32'hFACE_0001, "SCM write by core");

    // 3b. core instruction and data ports on the same interleaved bank: one waits
    @(negedge clk);
    mreq[0] = '{req: 1, we: 0, be: 4'hF, addr: IL_BASE + 4, wdata: 0};
    mreq[1] = '{req: 1, we: 0, be: 4'hF, addr: IL_BASE + 32'h2004, wdata: 0};
    #1;
    check("one of two grants on a bank conflict", 32'(mrsp[0].gnt) + 32'(mrsp[1].gnt), 1);
    if (mrsp[0].gnt != mrsp[1].gnt) n_bank_conflict++;
    begin
      int first;
      first = mrsp[0].gnt ? 0 : 1;
      @(negedge clk);
      check("first rdata", mrsp[first].rdata, pat(mreq[first].addr));
      mreq[first] = '0;
      #1;
      check("loser granted next", 32'(mrsp[1 - first].gnt), 1);
      @(negedge clk);
      check("second rdata", mrsp[1 - first].rdata, pat(mreq[1 - first].addr));
      mreq[1 - first] = '0;
    end

    // 4. uDMA: TX ch0 streams 32 words from the interleaved region,
    //    RX ch1 writes RX_WORDS words into private bank 1
    for (int i = 0; i < 32; i++) wr(1, IL_BASE + 32'h4000 + 32'(i) * 4, 32'hD0D0_0000 + 32'(i));
    wr(2, UDMA_BASE + 32'h100 + 32'h00, IL_BASE + 32'h4000);  // TX ch0 SADDR, by JTAG
    wr(1, UDMA_BASE + 32'h100 + 32'h04, 32 * 4);              // TX ch0 SIZE
    wr(1, UDMA_BASE + 32'h010 + 32'h00, PRIV1_BASE + 32'h400); // RX ch1 SADDR
    wr(1, UDMA_BASE + 32'h010 + 32'h04, RX_WORDS * 4);        // RX ch1 SIZE
    rd_check(2, UDMA_BASE + 32'h100, IL_BASE + 32'h4000, "uDMA SADDR readback");
    wr(1, UDMA_BASE + 32'h100 + 32'h08, 1);
    wr(1, UDMA_BASE + 32'h010 + 32'h08, 1);
    // the core keeps working on the interleaved banks meanwhile
    for (int t = 0; t < 2000 && (n_udma_tx == 0 || n_udma_rx == 0); t++)
      rd_check(1, IL_BASE + 32'h4000 + 32'(t % 32) * 4, 32'hD0D0_0000 + 32'(t % 32), "core during DMA");
    check("TX event", n_udma_tx, 1);
    check("RX event", n_udma_rx, 1);
    check("TX words", tx_got.size(), 32);
    foreach (tx_got[i]) check("TX data", tx_got[i], 32'hD0D0_0000 + 32'(i));
    for (int i = 0; i < RX_WORDS; i++)
      rd_check(1, PRIV1_BASE + 32'h400 + 32'(i) * 4, 32'hC0DE_0000 | 32'(i), "RX data in L2");
    rd_check(1, UDMA_BASE + 32'h100 + 32'h08, 0, "TX channel idle");

    // 5. external APB peripheral and an unmapped address
    wr(1, APB_BASE + 32'h14, 32'hA5B0_0005);
    rd_check(2, APB_BASE + 32'h14, 32'hA5B0_0005, "APB register");
    rd_check(1, APB_BASE + 32'h8, 32'h2222_2222, "APB register reset value");
    rd_check(1, 32'h3000_0000, ERR_RDATA, "unmapped read");
    n_unmapped++;

    // 6. SRAMs gated: the 16 KB of SCM keep working
    pwr_on = 0;
    wr(1, PRIV0_BASE + 32'h40, 32'h5C30_0001);
    wr(1, IL_BASE + 32'h1F00, 32'h5C30_0002);
    rd_check(0, PRIV0_BASE + 32'h40, 32'h5C30_0001, "SCM-only private");
    rd_check(2, IL_BASE + 32'h1F00, 32'h5C30_0002, "SCM-only interleaved");
    rd_check(2, PRIV0_BASE + 32'h1FFC, pat(PRIV0_BASE + 32'h1FFC), "SCM kept its data");
    n_scm_only++;
    rd_check(1, PRIV1_BASE, 32'h0, "gated SRAM reads zero");
    rd_check(2, IL_BASE + 32'h2000, 32'h0, "gated interleaved SRAM reads zero");
    n_gated_read++;
    pwr_on = 1;

    // mechanism summary
    $display("boot %0d, SCM parallel %0d, bank conflict %0d, uDMA tx %0d rx %0d",
             n_boot, n_scm_par, n_bank_conflict, n_udma_tx, n_udma_rx);
    $display("APB ext transfers %0d (wait states %0d), unmapped %0d, SCM-only %0d, gated reads %0d",
             n_apb_ext, n_apb_wait, n_unmapped, n_scm_only, n_gated_read);
    $display("JTAG debug accesses %0d", n_jtag);
    checks++;
    if (n_boot == 0 || n_scm_par == 0 || n_bank_conflict == 0 || n_udma_tx == 0 ||
        n_udma_rx == 0 || n_apb_ext == 0 || n_apb_wait == 0 || n_unmapped == 0 ||
        n_scm_only == 0 || n_gated_read == 0 || n_jtag == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
