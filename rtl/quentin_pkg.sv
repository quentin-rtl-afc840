// quentin_pkg: types and constants shared by the Quentin SoC memory system.
//
// The L2 memory (520 KB in total) is split into two private 32 KB banks and
// four word-interleaved 114 KB banks (456 KB). Sizes, bank counts and the
// SRAM/SCM split follow the published design. The address map, the bus
// request/response structs and the bus protocol are this design's own
// choices, modelled on the PULP family: a master holds req (with addr, we, be,
// wdata) until gnt; every granted request, read or write, is answered by
// rvalid (with rdata for reads) exactly one cycle after the grant.
package quentin_pkg;

  // ---- bus types -----------------------------------------------------------
  typedef struct packed {
    logic        req;
    logic        we;
    logic [3:0]  be;
    logic [31:0] addr;
    logic [31:0] wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } tcdm_rsp_t;

  // ---- L2 geometry (published sizes) ---------------------------------------
  localparam int unsigned NB_IL_BANKS      = 4;      // interleaved banks
  localparam int unsigned IL_BANK_WORDS    = 29184;  // 114 KB / 4 B
  localparam int unsigned IL_SCM_WORDS     = 512;    // 2 KB of each bank is SCM
  localparam int unsigned PRIV_WORDS       = 8192;   // 32 KB private bank
  localparam int unsigned PRIV0_SCM_WORDS  = 2048;   // 8 KB SCM in private bank 0

  // ---- address map (own choice, PULPissimo-like) ----------------------------
  localparam logic [31:0] PRIV0_BASE  = 32'h1C00_0000;
  localparam logic [31:0] PRIV1_BASE  = 32'h1C00_8000;
  localparam logic [31:0] PRIV_SIZE   = 32'h0000_8000;
  localparam logic [31:0] IL_BASE     = 32'h1C01_0000;
  localparam logic [31:0] IL_SIZE     = 32'h0007_2000;  // 456 KB
  localparam logic [31:0] ROM_BASE    = 32'h1A00_0000;
  localparam logic [31:0] ROM_SIZE    = 32'h0000_2000;  // 8 KB
  localparam logic [31:0] APB_BASE    = 32'h1A10_0000;
  localparam logic [31:0] APB_SIZE    = 32'h0010_0000;
  localparam logic [31:0] UDMA_BASE   = 32'h1A10_2000;  // uDMA configuration
  localparam logic [31:0] UDMA_SIZE   = 32'h0000_1000;
  localparam logic [31:0] BOOT_ADDR   = 32'h1C00_8080;  // boot code jumps here

  // Targets of the low-latency interconnect.
  typedef enum logic [2:0] {
    LL_PRIV0 = 3'd0,
    LL_PRIV1 = 3'd1,
    LL_ROM   = 3'd2,
    LL_APB   = 3'd3,
    LL_ERR   = 3'd4
  } ll_tgt_e;
  localparam int unsigned NB_LL_SLAVES = 5;

  // Masters of the L2 interconnect.
  localparam int unsigned M_FC_INSTR = 0;
  localparam int unsigned M_FC_DATA  = 1;
  localparam int unsigned M_UDMA_TX  = 2;
  localparam int unsigned M_UDMA_RX  = 3;
  localparam int unsigned M_DEBUG    = 4;
  localparam int unsigned NB_MASTERS = 5;

  // Value returned for an access to an unmapped address.
  localparam logic [31:0] ERR_RDATA = 32'hBADA_CCE5;

  function automatic logic in_range(logic [31:0] addr, logic [31:0] base,
                                    logic [31:0] size);
    return (addr >= base) && ((addr - base) < size);
  endfunction

  function automatic logic is_interleaved(logic [31:0] addr);
    return in_range(addr, IL_BASE, IL_SIZE);
  endfunction

  function automatic ll_tgt_e ll_decode(logic [31:0] addr);
    if (in_range(addr, PRIV0_BASE, PRIV_SIZE)) return LL_PRIV0;
    if (in_range(addr, PRIV1_BASE, PRIV_SIZE)) return LL_PRIV1;
    if (in_range(addr, ROM_BASE, ROM_SIZE))    return LL_ROM;
    if (in_range(addr, APB_BASE, APB_SIZE))    return LL_APB;
    return LL_ERR;
  endfunction

endpackage
