// jem_pkg: constants and types shared by the Jet/Energy Processor Module RTL.
//
// The module is reached from VME through one synchronous local register bus.
// A request (reg_req_t) lasts one clock; a target answers a read with data
// registered on the next clock. Register byte offsets below are those of the
// module's register maps (VME CPLD, Sum processor, Input FPGA, input channel).
// The bus format itself is a choice of this design.
package jem_pkg;

  // Local register bus request: valid for one clock.
  typedef struct packed {
    logic        req;    // access strobe
    logic        we;     // 1 = write, 0 = read
    logic [12:0] addr;   // register byte address inside the FPGA (bit 0 = 0)
    logic [15:0] wdata;
  } reg_req_t;

  // Local bus targets (index into the one-hot target select)
  typedef enum logic [2:0] {
    TGT_CPLD = 3'd0, TGT_ACE = 3'd1, TGT_SUM = 3'd2, TGT_JET = 3'd3,
    TGT_IN_R = 3'd4, TGT_IN_S = 3'd5, TGT_IN_T = 3'd6, TGT_IN_U = 3'd7
  } tgt_e;
  localparam int unsigned NTGT = 8;

  // Mode field, VME address bits 18:17
  localparam logic [1:0] MODE_REGS = 2'b00;
  localparam logic [1:0] MODE_CFG  = 2'b10;

  // VME CPLD registers
  localparam logic [12:0] CPLD_MOD_ID_A   = 13'h000;
  localparam logic [12:0] CPLD_MOD_ID_B   = 13'h002;
  localparam logic [12:0] CPLD_VERSION    = 13'h004;
  localparam logic [12:0] CPLD_STATUS     = 13'h006;
  localparam logic [12:0] CPLD_CFG_MASK   = 13'h010;
  localparam logic [12:0] CPLD_FPGA_RESET = 13'h012;

  // Sum processor registers
  localparam logic [12:0] SUM_VERSION     = 13'h000;
  localparam logic [12:0] SUM_STATUS      = 13'h002;
  localparam logic [12:0] SUM_CONTROL     = 13'h004;
  localparam logic [12:0] SUM_PULSE       = 13'h006;
  localparam logic [12:0] SUM_CFG_MASK    = 13'h010;
  localparam logic [12:0] SUM_FPGA_RESET  = 13'h012;
  localparam logic [12:0] SUM_DONE        = 13'h014;
  localparam logic [12:0] SUM_TTC_CONTROL = 13'h040;
  localparam logic [12:0] SUM_TTC_STATUS  = 13'h042;
  localparam logic [12:0] SUM_RR_DELAY    = 13'h060;
  localparam logic [12:0] SUM_ROC_SLICE   = 13'h062;
  localparam logic [12:0] SUM_BC_PRESET   = 13'h064;
  localparam logic [12:0] SUM_SPY_EXY     = 13'h0A0;
  localparam logic [12:0] SUM_SPY_EXY_RST = 13'h0A2;
  localparam logic [12:0] SUM_SPY_ET      = 13'h0A4;
  localparam logic [12:0] SUM_SPY_ET_RST  = 13'h0A6;

  // Input FPGA registers
  localparam logic [12:0] IN_VERSION      = 13'h000;
  localparam logic [12:0] IN_STATUS       = 13'h002;
  localparam logic [12:0] IN_CONTROL      = 13'h004;
  localparam logic [12:0] IN_PULSE        = 13'h006;
  localparam logic [12:0] IN_THR_LOW      = 13'h008;
  localparam logic [12:0] IN_THR_HIGH     = 13'h00A;
  localparam logic [12:0] IN_PLAYSPY      = 13'h010;
  localparam logic [12:0] IN_PLAYSPY_RST  = 13'h012;
  localparam logic [12:0] IN_CH_BASE      = 13'h1000;
  localparam int unsigned IN_CH_STRIDE    = 'h40;

  // Channel registers (offset inside a channel's 0x40 window)
  localparam logic [5:0] CH_STATUS   = 6'h00;
  localparam logic [5:0] CH_CONTROL  = 6'h02;
  localparam logic [5:0] CH_LINK_ERR = 6'h04;
  localparam logic [5:0] CH_PAR_ERR  = 6'h06;
  localparam logic [5:0] CH_TP_ERR   = 6'h08;
  localparam logic [5:0] CH_MULT     = 6'h0A;

  // Input channel control register fields
  typedef struct packed {
    logic       mask;    // bit 3: 1 = channel off
    logic [1:0] delay;   // bits 2:1: delay in ticks
    logic       phase;   // bit 0: +1/2 tick
  } ch_ctrl_t;

endpackage
