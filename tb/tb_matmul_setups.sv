// tb_matmul_setups: the 8x8 32-bit matrix multiplication benchmark's memory
// traffic in the three memory setups of the SoC.
//
// The RISC-V core is not part of this RTL, so the testbench acts as the core:
// for every instruction of the kernel it fetches a word on the instruction
// port and, for loads and stores, accesses data on the data port in the same
// cycle, waiting until both are granted. The kernel is
//   for i, j: acc = 0; for k: acc += A[i][k] * B[k][j]; C[i][j] = acc
// with two loads per inner step and one store per result, and a fixed
// number of non-memory instructions in between. A and B are loaded through
// the core data port before the kernel starts, C is read back through it
// afterwards and compared with a reference
// product (32-bit wrap-around). The fetched code words are checked too.
// Setups (placement is this testbench's choice):
//   SRAM:        code in private bank 0's SRAM part, data in private bank 1;
//   SCM, SRAM on: code and data in private bank 0's SCM;
//   SCM, SRAM off: as before, with the SRAMs power gated.
// Checks: correct C in all three, the same cycle count in all three (the
// setups differ only in voltage and power, not in cycles), and no core stall
// in the SCM setups, where instruction and data have separate SCM ports.
module tb_matmul_setups;
  import quentin_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned CODE_WORDS = 16;
  localparam int unsigned ALU_PER_STEP = 2;   // non-memory instructions per inner step

  logic clk = 0, rst_n = 0, pwr_on = 1;
  tcdm_req_t mreq [2];
  tcdm_rsp_t mrsp [2];
  logic [31:0] paddr, pwdata;
  logic pwrite, psel, penable, apb_err;
  logic [7:0][31:0] tx_data;
  logic [7:0] tx_valid, rx_ready, evt_tx, evt_rx;
  int checks = 0, failures = 0;

  quentin_soc dut (
    .clk_i(clk), .rst_ni(rst_n), .sram_pwr_on_i(pwr_on),
    .fc_instr_req_i(mreq[0]), .fc_instr_rsp_o(mrsp[0]),
    .fc_data_req_i(mreq[1]),  .fc_data_rsp_o(mrsp[1]),
    .jtag_tck_i(1'b0), .jtag_tms_i(1'b1), .jtag_tdi_i(1'b0), .jtag_trst_ni(1'b1),
    .jtag_tdo_o(),
    .apb_paddr_o(paddr), .apb_pwdata_o(pwdata), .apb_pwrite_o(pwrite),
    .apb_psel_o(psel), .apb_penable_o(penable), .apb_prdata_i(32'h0),
    .apb_pready_i(1'b1), .apb_pslverr_i(1'b0), .apb_err_o(apb_err),
    .udma_tx_data_o(tx_data), .udma_tx_valid_o(tx_valid), .udma_tx_ready_i(8'h0),
    .udma_rx_data_i('0), .udma_rx_valid_i(8'h0), .udma_rx_ready_o(rx_ready),
    .udma_evt_tx_o(evt_tx), .udma_evt_rx_o(evt_rx));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic load(logic w, logic [31:0] a, logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    mreq[1] = '{req: 1, we: w, be: 4'hF, addr: a, wdata: d};
    #1;
    while (!mrsp[1].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq[1] = '0;
    r = mrsp[1].rdata;
  endtask

  // core model state
  logic [31:0] code_base, pc;
  int cycles, stalls;

  // one instruction: fetch at pc, plus an optional data access, in one cycle
  task automatic step(logic dv, logic dw, logic [31:0] da, logic [31:0] dd, output logic [31:0] dr);
    logic ig, dg;
    @(negedge clk);
    mreq[0] = '{req: 1, we: 0, be: 4'hF, addr: pc, wdata: 0};
    mreq[1] = '{req: dv, we: dw, be: 4'hF, addr: da, wdata: dd};
    ig = 0; dg = !dv;
    forever begin
      #1;
      if (mrsp[0].gnt) ig = 1;
      if (mrsp[1].gnt && dv) dg = 1;
      @(negedge clk);
      cycles++;
      if (mrsp[0].rvalid) begin
        check("fetched code word", mrsp[0].rdata, ~pc);
        mreq[0] = '0;
      end
      if (mrsp[1].rvalid) begin
        dr = mrsp[1].rdata;
        mreq[1] = '0;
      end
      if (ig && dg) break;
      stalls++;
    end
    pc = code_base + ((pc - code_base + 4) % (CODE_WORDS * 4));
  endtask

  logic [31:0] A [N][N], B [N][N];

  task automatic run(string name, logic [31:0] cbase, logic [31:0] dbase, logic gate,
                     output int cyc, output int stl);
    logic [31:0] r, acc, a, b;
    logic [31:0] a_base, b_base, c_base;
    a_base = dbase; b_base = dbase + N * N * 4; c_base = dbase + 2 * N * N * 4;
    pwr_on = 1;
    code_base = cbase;
    // load code (word at address x holds ~x) and matrices
    for (int i = 0; i < CODE_WORDS; i++) load(1, cbase + 32'(i) * 4, ~(cbase + 32'(i) * 4), r);
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        load(1, a_base + 32'(i * N + k) * 4, A[i][k], r);
        load(1, b_base + 32'(i * N + k) * 4, B[i][k], r);
      end
    pwr_on = !gate;
    pc = cbase; cycles = 0; stalls = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        acc = 0;
        for (int k = 0; k < N; k++) begin
          step(1, 0, a_base + 32'(i * N + k) * 4, 0, a);
          step(1, 0, b_base + 32'(k * N + j) * 4, 0, b);
          for (int x = 0; x < ALU_PER_STEP; x++) step(0, 0, 0, 0, r);
          acc = acc + a * b;
        end
        step(1, 1, c_base + 32'(i * N + j) * 4, acc, r);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] ref_c;
        ref_c = 0;
        for (int k = 0; k < N; k++) ref_c += A[i][k] * B[k][j];
        load(0, c_base + 32'(i * N + j) * 4, 0, r);
        check($sformatf("%s C[%0d][%0d]", name, i, j), r, ref_c);
      end
    pwr_on = 1;
    cyc = cycles; stl = stalls;
    $display("%-14s: %0d cycles, %0d core stall cycles", name, cyc, stl);
  endtask

  initial begin
    int c_sram, s_sram, c_scm, s_scm, c_gated, s_gated;
    for (int m = 0; m < 2; m++) mreq[m] = '0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        A[i][k] = $urandom;
        B[i][k] = $urandom;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run("SRAM",          PRIV0_BASE + 32'h2000, PRIV1_BASE,          0, c_sram,  s_sram);
    run("SCM, SRAM on",  PRIV0_BASE,            PRIV0_BASE + 32'h400, 0, c_scm,   s_scm);
    run("SCM, SRAM off", PRIV0_BASE,            PRIV0_BASE + 32'h400, 1, c_gated, s_gated);
    check("same cycles SRAM vs SCM", c_sram, c_scm);
    check("same cycles SCM on vs off", c_scm, c_gated);
    check("no stall on SCM", s_scm + s_gated, 0);
    check("one cycle per instruction", c_scm, N * N * (N * (2 + ALU_PER_STEP) + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
