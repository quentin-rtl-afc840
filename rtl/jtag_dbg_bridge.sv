// jtag_dbg_bridge: JTAG debug bridge, from a JTAG port to an L2 bus master.
//
// A debugger reads and writes any memory-mapped location of the SoC
// (memories, core and peripheral registers) over JTAG. This design's
// bridge has a standard IEEE 1149.1 TAP controller and a 4-bit instruction
// register with three instructions:
//   IDCODE (4'b0001, selected after reset): 32-bit identification register;
//   ACCESS (4'b0010): 66-bit access register;
//   BYPASS (4'b1111, and any other code): 1-bit bypass register.
// ACCESS register, shifted LSB first: [31:0] wdata, [63:32] addr, [64] we,
// [65] valid. On Update-DR with valid set and no access running, the bridge
// issues one bus access (req held until gnt; rdata taken with rvalid). On
// Capture-DR it loads [31:0] = read data of the last access and [32] = 1 when
// no access is running, so a read is an ACCESS scan with the command followed
// by a second scan (valid = 0) that brings the data out.
//
// Timing: TCK, TMS, TDI and TRSTn are sampled with the system clock through
// two-flop synchronizers and TCK edges are detected in the clk_i domain, so
// the whole bridge is synchronous to clk_i. TCK must stay high and low for at
// least 3 clk_i cycles each. TDO changes after a falling TCK edge. All of this
// (instruction codes, register layout, oversampling) is this design's choice;
// the published design states only that debug works by reads and writes of
// memory-mapped registers through JTAG.
module jtag_dbg_bridge
  import quentin_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1000_0001
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      tck_i,
  input  logic      tms_i,
  input  logic      tdi_i,
  input  logic      trst_ni,
  output logic      tdo_o,
  output tcdm_req_t req_o,
  input  tcdm_rsp_t rsp_i
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UP_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UP_IR
  } tap_e;

  typedef enum logic [3:0] {
    IR_IDCODE = 4'b0001,
    IR_ACCESS = 4'b0010,
    IR_BYPASS = 4'b1111
  } ir_e;

  localparam int unsigned DRW = 66;

  // ---- synchronizers and TCK edge detection ----------------------------------
  logic [2:0] tck_s;
  logic [1:0] tms_s, tdi_s, trst_s;
  logic       tck_rise, tck_fall, tap_rst;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      tck_s  <= '0;
      tms_s  <= '1;
      tdi_s  <= '0;
      trst_s <= '0;
    end else begin
      tck_s  <= {tck_s[1:0], tck_i};
      tms_s  <= {tms_s[0], tms_i};
      tdi_s  <= {tdi_s[0], tdi_i};
      trst_s <= {trst_s[0], trst_ni};
    end
  end
  assign tck_rise = tck_s[1] && !tck_s[2];
  assign tck_fall = !tck_s[1] && tck_s[2];
  assign tap_rst  = !trst_s[1];

  // ---- TAP controller -----------------------------------------------------------
  tap_e state_q, state_d;
  logic tms;
  assign tms = tms_s[1];

  always_comb begin
    unique case (state_q)
      TLR:     state_d = tms ? TLR    : RTI;
      RTI:     state_d = tms ? SEL_DR : RTI;
      SEL_DR:  state_d = tms ? SEL_IR : CAP_DR;
      CAP_DR:  state_d = tms ? EX1_DR : SH_DR;
      SH_DR:   state_d = tms ? EX1_DR : SH_DR;
      EX1_DR:  state_d = tms ? UP_DR  : PA_DR;
      PA_DR:   state_d = tms ? EX2_DR : PA_DR;
      EX2_DR:  state_d = tms ? UP_DR  : SH_DR;
      UP_DR:   state_d = tms ? SEL_DR : RTI;
      SEL_IR:  state_d = tms ? TLR    : CAP_IR;
      CAP_IR:  state_d = tms ? EX1_IR : SH_IR;
      SH_IR:   state_d = tms ? EX1_IR : SH_IR;
      EX1_IR:  state_d = tms ? UP_IR  : PA_IR;
      PA_IR:   state_d = tms ? EX2_IR : PA_IR;
      EX2_IR:  state_d = tms ? UP_IR  : SH_IR;
      UP_IR:   state_d = tms ? SEL_DR : RTI;
      default: state_d = TLR;
    endcase
  end

  // ---- instruction and data registers -------------------------------------------
  logic [3:0]     ir_q, ir_sr;
  logic [DRW-1:0] dr_sr;
  logic           start;
  logic           busy_q;
  logic [31:0]    rdata_q;

  function automatic logic [DRW-1:0] capture_value(logic [3:0] ir, logic busy,
                                                   logic [31:0] rdata);
    unique case (ir)
      IR_IDCODE: return DRW'(IDCODE);
      IR_ACCESS: return DRW'({!busy, rdata});
      default:   return '0;
    endcase
  endfunction

  function automatic int unsigned dr_len(logic [3:0] ir);
    unique case (ir)
      IR_IDCODE: return 32;
      IR_ACCESS: return DRW;
      default:   return 1;
    endcase
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= TLR;
      ir_q    <= IR_IDCODE;
      ir_sr   <= '0;
      dr_sr   <= '0;
      tdo_o   <= 1'b0;
      start   <= 1'b0;
    end else if (tap_rst) begin
      state_q <= TLR;
      ir_q    <= IR_IDCODE;
      start   <= 1'b0;
    end else begin
      start <= 1'b0;
      if (tck_rise) begin
        state_q <= state_d;
        unique case (state_q)
          TLR:    ir_q  <= IR_IDCODE;
          CAP_IR: ir_sr <= 4'b0001;
          SH_IR:  ir_sr <= {tdi_s[1], ir_sr[3:1]};
          UP_IR:  ir_q  <= ir_sr;
          CAP_DR: dr_sr <= capture_value(ir_q, busy_q, rdata_q);
          SH_DR: begin
            // shift the selected register's length: TDI enters at its MSB
            dr_sr <= dr_sr >> 1;
            dr_sr[dr_len(ir_q) - 1] <= tdi_s[1];
          end
          UP_DR:  start <= (ir_q == IR_ACCESS) && dr_sr[65];
          default: ;
        endcase
      end
      if (tck_fall) begin
        if (state_q == SH_IR)      tdo_o <= ir_sr[0];
        else if (state_q == SH_DR) tdo_o <= dr_sr[0];
        else                       tdo_o <= 1'b0;
      end
    end
  end

  // ---- bus master ------------------------------------------------------------------
  logic waiting_q;   // granted, waiting for rvalid

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      req_o     <= '0;
      busy_q    <= 1'b0;
      waiting_q <= 1'b0;
      rdata_q   <= '0;
    end else begin
      if (start && !busy_q) begin
        busy_q      <= 1'b1;
        req_o.req   <= 1'b1;
        req_o.we    <= dr_sr[64];
        req_o.addr  <= dr_sr[63:32];
        req_o.wdata <= dr_sr[31:0];
        req_o.be    <= 4'hF;
      end
      if (req_o.req && rsp_i.gnt) begin
        req_o.req <= 1'b0;
        waiting_q <= 1'b1;
      end
      if (waiting_q && rsp_i.rvalid) begin
        waiting_q <= 1'b0;
        busy_q    <= 1'b0;
        if (!req_o.we) rdata_q <= rsp_i.rdata;
      end
    end
  end

  // A request, once raised, is held unchanged until it is granted.
  property p_req_stable;
    @(posedge clk_i) disable iff (!rst_ni)
      (req_o.req && !rsp_i.gnt) |=> (req_o.req && $stable(req_o.addr) && $stable(req_o.we));
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
