// udma: I/O DMA that moves peripheral data to and from L2 autonomously.
//
// The core only programs a transfer (start address and length) and is told by
// an event when it ends; the uDMA then moves every word itself. As in the
// published design it has two dedicated 32-bit ports on the L2 interconnect,
// one for the transmit side (L2 -> peripherals, reads) and one for the
// receive side (peripherals -> L2, writes), and a configuration port on APB.
//
// Each direction has NB_CH channels, one per peripheral stream. A channel
// holds a one-word buffer. TX: a busy channel with an empty buffer and no
// read in flight asks for the port; a round-robin arbiter picks one channel
// per cycle, the read is issued, and the returned word waits in the buffer
// until the peripheral takes it (tx_valid_o/tx_ready_i). RX: the peripheral
// fills the buffer (rx_valid_i/rx_ready_o), the arbiter picks a full channel
// and the word is written to L2. Different channels are served in
// consecutive cycles, so one port can carry a word per cycle.
// A channel raises its event output for one cycle when its last word has
// reached the peripheral (TX) or L2 (RX).
//
// Own choices (the published text gives the function, not the insides):
// channel count, one-word buffers, word-only transfers, and the register map.
// Registers, at byte offset {dir, ch, reg} = {addr[8], addr[7:4], addr[3:2]}
// with dir 0 = RX, 1 = TX:  0 SADDR (start address), 1 SIZE (bytes, a
// multiple of 4), 2 CFG (write bit 0 = start, ignored while busy; read bit 0 =
// busy), 3 remaining bytes (read only). APB answers with no wait states.
module udma
  import quentin_pkg::*;
#(
  parameter int unsigned NB_CH = 8,
  localparam int unsigned CW   = (NB_CH > 1) ? $clog2(NB_CH) : 1
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  // APB configuration port
  input  logic [11:0]             paddr_i,
  input  logic [31:0]             pwdata_i,
  input  logic                    pwrite_i,
  input  logic                    psel_i,
  input  logic                    penable_i,
  output logic [31:0]             prdata_o,
  output logic                    pready_o,
  output logic                    pslverr_o,
  // L2 ports
  output tcdm_req_t               tx_req_o,
  input  tcdm_rsp_t               tx_rsp_i,
  output tcdm_req_t               rx_req_o,
  input  tcdm_rsp_t               rx_rsp_i,
  // peripheral streams
  output logic [NB_CH-1:0][31:0]  tx_data_o,
  output logic [NB_CH-1:0]        tx_valid_o,
  input  logic [NB_CH-1:0]        tx_ready_i,
  input  logic [NB_CH-1:0][31:0]  rx_data_i,
  input  logic [NB_CH-1:0]        rx_valid_i,
  output logic [NB_CH-1:0]        rx_ready_o,
  // end-of-transfer events
  output logic [NB_CH-1:0]        evt_tx_o,
  output logic [NB_CH-1:0]        evt_rx_o
);

  typedef struct packed {
    logic [31:0] saddr;
    logic [31:0] size;
    logic [31:0] addr;
    logic [31:0] rem;
    logic        busy;
    logic        pend;
    logic        bvalid;
    logic [31:0] buffer;
  } chan_t;

  chan_t [1:0][NB_CH-1:0] ch_q;   // [0] = RX, [1] = TX

  // ---- APB register access ---------------------------------------------------
  logic          apb_wr;
  logic          sel_dir;
  logic [3:0]    sel_ch;
  logic [1:0]    sel_reg;
  assign sel_dir = paddr_i[8];
  assign sel_ch  = paddr_i[7:4];
  assign sel_reg = paddr_i[3:2];
  assign apb_wr  = psel_i && penable_i && pwrite_i && (32'(sel_ch) < NB_CH);

  assign pready_o  = 1'b1;
  assign pslverr_o = psel_i && penable_i && (32'(sel_ch) >= NB_CH);

  always_comb begin
    prdata_o = '0;
    if (32'(sel_ch) < NB_CH) begin
      unique case (sel_reg)
        2'd0: prdata_o = ch_q[sel_dir][sel_ch[CW-1:0]].saddr;
        2'd1: prdata_o = ch_q[sel_dir][sel_ch[CW-1:0]].size;
        2'd2: prdata_o = {31'd0, ch_q[sel_dir][sel_ch[CW-1:0]].busy};
        2'd3: prdata_o = ch_q[sel_dir][sel_ch[CW-1:0]].rem;
        default: prdata_o = '0;
      endcase
    end
  end

  // ---- arbitration ----------------------------------------------------------
  logic [NB_CH-1:0] tx_elig, rx_elig, tx_gnt_oh, rx_gnt_oh;
  logic [CW-1:0]    tx_idx, rx_idx, tx_idx_q;
  logic             tx_val, rx_val;

  for (genvar c = 0; c < NB_CH; c++) begin : g_elig
    assign tx_elig[c]    = ch_q[1][c].busy && ch_q[1][c].rem != 0 &&
                           !ch_q[1][c].pend && !ch_q[1][c].bvalid;
    assign rx_elig[c]    = ch_q[0][c].busy && ch_q[0][c].bvalid;
    assign tx_valid_o[c] = ch_q[1][c].bvalid;
    assign tx_data_o[c]  = ch_q[1][c].buffer;
    assign rx_ready_o[c] = ch_q[0][c].busy && ch_q[0][c].rem != 0 &&
                           !ch_q[0][c].bvalid;
  end

  rr_arbiter #(.N(NB_CH)) i_tx_arb (
    .clk_i, .rst_ni, .req_i(tx_elig), .ack_i(tx_rsp_i.gnt),
    .gnt_o(tx_gnt_oh), .idx_o(tx_idx), .valid_o(tx_val)
  );

  rr_arbiter #(.N(NB_CH)) i_rx_arb (
    .clk_i, .rst_ni, .req_i(rx_elig), .ack_i(rx_rsp_i.gnt),
    .gnt_o(rx_gnt_oh), .idx_o(rx_idx), .valid_o(rx_val)
  );

  always_comb begin
    tx_req_o       = '0;
    tx_req_o.req   = tx_val;
    tx_req_o.addr  = ch_q[1][tx_idx].addr;
    tx_req_o.be    = 4'hF;
    rx_req_o       = '0;
    rx_req_o.req   = rx_val;
    rx_req_o.we    = 1'b1;
    rx_req_o.be    = 4'hF;
    rx_req_o.addr  = ch_q[0][rx_idx].addr;
    rx_req_o.wdata = ch_q[0][rx_idx].buffer;
  end

  // ---- channel state --------------------------------------------------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ch_q     <= '0;
      tx_idx_q <= '0;
      evt_tx_o <= '0;
      evt_rx_o <= '0;
    end else begin
      evt_tx_o <= '0;
      evt_rx_o <= '0;

      // TX side
      if (tx_val && tx_rsp_i.gnt) begin
        ch_q[1][tx_idx].addr <= ch_q[1][tx_idx].addr + 32'd4;
        ch_q[1][tx_idx].rem  <= ch_q[1][tx_idx].rem - 32'd4;
        ch_q[1][tx_idx].pend <= 1'b1;
        tx_idx_q             <= tx_idx;
      end
      if (tx_rsp_i.rvalid) begin
        ch_q[1][tx_idx_q].pend   <= 1'b0;
        ch_q[1][tx_idx_q].bvalid <= 1'b1;
        ch_q[1][tx_idx_q].buffer <= tx_rsp_i.rdata;
      end
      for (int c = 0; c < NB_CH; c++) begin
        if (ch_q[1][c].bvalid && tx_ready_i[c]) ch_q[1][c].bvalid <= 1'b0;
        if (ch_q[1][c].busy && ch_q[1][c].rem == 0 && !ch_q[1][c].pend &&
            !ch_q[1][c].bvalid) begin
          ch_q[1][c].busy <= 1'b0;
          evt_tx_o[c]     <= 1'b1;
        end
      end

      // RX side
      for (int c = 0; c < NB_CH; c++) begin
        if (rx_ready_o[c] && rx_valid_i[c]) begin
          ch_q[0][c].bvalid <= 1'b1;
          ch_q[0][c].buffer <= rx_data_i[c];
        end
        if (ch_q[0][c].busy && ch_q[0][c].rem == 0 && !ch_q[0][c].bvalid) begin
          ch_q[0][c].busy <= 1'b0;
          evt_rx_o[c]     <= 1'b1;
        end
      end
      if (rx_val && rx_rsp_i.gnt) begin
        ch_q[0][rx_idx].bvalid <= 1'b0;
        ch_q[0][rx_idx].addr   <= ch_q[0][rx_idx].addr + 32'd4;
        ch_q[0][rx_idx].rem    <= ch_q[0][rx_idx].rem - 32'd4;
      end

      // configuration writes (last, so a start wins over the updates above
      // only for an idle channel, whose state the updates do not touch)
      if (apb_wr) begin
        unique case (sel_reg)
          2'd0: ch_q[sel_dir][sel_ch[CW-1:0]].saddr <= pwdata_i;
          2'd1: ch_q[sel_dir][sel_ch[CW-1:0]].size  <= pwdata_i;
          2'd2: if (pwdata_i[0] && !ch_q[sel_dir][sel_ch[CW-1:0]].busy) begin
                  ch_q[sel_dir][sel_ch[CW-1:0]].busy <= 1'b1;
                  ch_q[sel_dir][sel_ch[CW-1:0]].addr <= ch_q[sel_dir][sel_ch[CW-1:0]].saddr;
                  ch_q[sel_dir][sel_ch[CW-1:0]].rem  <= ch_q[sel_dir][sel_ch[CW-1:0]].size;
                end
          default: ;
        endcase
      end
    end
  end

endmodule
