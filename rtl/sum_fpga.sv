// sum_fpga: Sum processor FPGA of the Jet/Energy Processor Module.
//
// Register map (byte offsets, sub-address 4):
//   0x00 RO VERSION   0x02 RO STATUS (bit 0 DLL locked)
//   0x04 RW CONTROL   bit 4 enable spy mode
//   0x06 PR PULSE     bit 0 module reset, bit 1 simulate short broadcast,
//                     bit 10 simulate Level-1 accept
//   0x10 RW CFG_MASK  bits 0,4..7: enable configuration of Jet, Input R..U
//   0x12 PR FPGA_RESET bits 0,4..7: clear configuration of Jet, Input R..U
//   0x14 RO DONE      bits 0,4..7: DONE lines of Jet, Input R..U
//   0x40 RW TTC_CONTROL  [7:0] data, [12:8] TTCrx sub-address,
//                        [13] 1 = write, [15] reset I2C controller
//   0x42 RO TTC_STATUS   [7:0] read data, [13] busy, [14] error
//   0x60 RW READ_REQUEST_DELAY [5:0]   0x62 RW ROC_SLICE [2:0]
//   0x64 RW BC_PRESET [11:0]
//   0xA0 RO spy Exy port {Ey,Ex}  0xA2 PR reset its read pointer
//   0xA4 RO spy Et port {parity,Et}  0xA6 PR reset its read pointer
//
// Inside: the energy merger output stage (sums of the four Input FPGAs,
// quad-linear codes, Et parity), two 256-deep spy memories that copy that
// output while spy mode is on, the bunch counter preset on BC reset, the
// read-request delay and slice sequencer, and the TTCrx I2C controller.
// Short broadcast and L1A come from the TTC inputs or from the pulse
// register; the short broadcast is passed on (sbc_o) to reset the
// playback/spy pointers of the Input FPGAs too. Module reset clears the
// datapath state (pointers, counters, sequencer, I2C controller), not the
// registers.
//
// Timing: register reads return data one clock after the request. The
// register layout follows the module's programming model; module-reset
// scope, spy capture scheme and the I2C start rule (every TTC_CONTROL
// write while idle starts a transaction) are choices of this design.
module sum_fpga
  import jem_pkg::*;
#(
  parameter logic [15:0] VERSION      = 16'h0102,
  parameter int unsigned PROG_TICKS   = 16,
  parameter int unsigned I2C_DIV      = 100,
  parameter logic [5:0]  TTCRX_I2C_ID = 6'd0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_req_t           bus,
  input  logic               sel,
  output logic [15:0]        rdata,
  // status inputs
  input  logic               dll_locked,
  input  logic               done_jet,
  input  logic [3:0]         done_in,
  // TTC
  input  logic               ttc_l1a,
  input  logic               ttc_bc_reset,
  input  logic               ttc_sbc,
  // energy sums of the Input FPGAs
  input  logic signed [15:0] ex_in [4],
  input  logic signed [15:0] ey_in [4],
  input  logic        [13:0] et_in [4],
  // to the energy sum merger
  output logic [7:0]         ex_code,
  output logic [7:0]         ey_code,
  output logic [7:0]         et_code,
  output logic               et_par,
  // configuration control
  output logic [7:0]         cfg_mask,
  output logic               prog_jet,
  output logic [3:0]         prog_in,
  // distribution
  output logic               sbc_o,
  output logic               read_request,
  output logic               slice_strobe,
  output logic [2:0]         slice_idx,
  output logic [11:0]        bcid,
  // TTCrx I2C
  output logic               i2c_scl_oe,
  output logic               i2c_sda_oe,
  input  logic               i2c_sda_i
);

  logic acc, wr, rd;
  assign acc = bus.req && sel;
  assign wr  = acc && bus.we;
  assign rd  = acc && !bus.we;

  function automatic logic pulse_bit(input reg_req_t b, input logic w, input logic [12:0] a, input int n);
    return w && (b.addr == a) && b.wdata[n];
  endfunction

  // ---------------- registers ----------------
  logic        spy_en;
  logic [13:0] ttc_ctrl;
  logic [5:0]  rr_delay;
  logic [2:0]  roc_slice;
  logic [11:0] bc_preset;
  logic        mod_rst, sim_sbc, sim_l1a;
  logic [4:0]  prog_trig;
  logic        i2c_start, i2c_rst;
  logic        i2c_busy, i2c_err;
  logic [7:0]  i2c_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spy_en <= 1'b0; cfg_mask <= '0; ttc_ctrl <= '0;
      rr_delay <= '0; roc_slice <= '0; bc_preset <= '0;
      mod_rst <= 1'b0; sim_sbc <= 1'b0; sim_l1a <= 1'b0;
      prog_trig <= '0; i2c_start <= 1'b0; i2c_rst <= 1'b0;
    end else begin
      mod_rst   <= pulse_bit(bus, wr, SUM_PULSE, 0);
      sim_sbc   <= pulse_bit(bus, wr, SUM_PULSE, 1);
      sim_l1a   <= pulse_bit(bus, wr, SUM_PULSE, 10);
      prog_trig <= (wr && bus.addr == SUM_FPGA_RESET) ? {bus.wdata[7:4], bus.wdata[0]} : 5'b0;
      i2c_start <= 1'b0;
      i2c_rst   <= 1'b0;
      if (wr) begin
        unique case (bus.addr)
          SUM_CONTROL:  spy_en    <= bus.wdata[4];
          SUM_CFG_MASK: cfg_mask  <= {bus.wdata[7:4], 3'b000, bus.wdata[0]};
          SUM_RR_DELAY: rr_delay  <= bus.wdata[5:0];
          SUM_ROC_SLICE: roc_slice <= bus.wdata[2:0];
          SUM_BC_PRESET: bc_preset <= bus.wdata[11:0];
          SUM_TTC_CONTROL: begin
            if (bus.wdata[15]) begin
              i2c_rst <= 1'b1;
            end else if (!i2c_busy) begin
              ttc_ctrl  <= bus.wdata[13:0];
              i2c_start <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // ---------------- read mux ----------------
  typedef enum logic [1:0] {R_REG, R_SPY_EXY, R_SPY_ET} rsrc_e;
  rsrc_e       rsrc;
  logic [15:0] reg_q, spy_exy_q;
  logic [8:0]  spy_et_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsrc  <= R_REG;
      reg_q <= '0;
    end else if (rd) begin
      rsrc  <= (bus.addr == SUM_SPY_EXY) ? R_SPY_EXY :
               (bus.addr == SUM_SPY_ET)  ? R_SPY_ET  : R_REG;
      unique case (bus.addr)
        SUM_VERSION:     reg_q <= VERSION;
        SUM_STATUS:      reg_q <= {15'b0, dll_locked};
        SUM_CONTROL:     reg_q <= {11'b0, spy_en, 4'b0};
        SUM_CFG_MASK:    reg_q <= {8'b0, cfg_mask};
        SUM_DONE:        reg_q <= {8'b0, done_in, 3'b000, done_jet};
        SUM_TTC_CONTROL: reg_q <= {2'b00, ttc_ctrl};
        SUM_TTC_STATUS:  reg_q <= {1'b0, i2c_err, i2c_busy, 5'b0, i2c_rdata};
        SUM_RR_DELAY:    reg_q <= {10'b0, rr_delay};
        SUM_ROC_SLICE:   reg_q <= {13'b0, roc_slice};
        SUM_BC_PRESET:   reg_q <= {4'b0, bc_preset};
        default:         reg_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (rsrc)
      R_SPY_EXY: rdata = spy_exy_q;
      R_SPY_ET:  rdata = {7'b0, spy_et_q};
      default:   rdata = reg_q;
    endcase
  end

  // ---------------- TTC signals ----------------
  logic l1a;
  assign sbc_o = ttc_sbc | sim_sbc;
  assign l1a   = ttc_l1a | sim_l1a;

  bc_counter u_bc (
    .clk(clk), .rst_n(rst_n), .clr(mod_rst), .bc_reset(ttc_bc_reset),
    .preset(bc_preset), .bcid(bcid));

  readout_ctrl u_ro (
    .clk(clk), .rst_n(rst_n), .clr(mod_rst), .l1a(l1a),
    .delay(rr_delay), .slices(roc_slice),
    .read_request(read_request), .slice_strobe(slice_strobe), .slice_idx(slice_idx));

  ttc_i2c_master #(.DIV(I2C_DIV), .I2C_ID(TTCRX_I2C_ID)) u_i2c (
    .clk(clk), .rst_n(rst_n), .soft_rst(i2c_rst | mod_rst),
    .start(i2c_start), .write(ttc_ctrl[13]), .subaddr(ttc_ctrl[12:8]), .wdata(ttc_ctrl[7:0]),
    .busy(i2c_busy), .error(i2c_err), .rdata(i2c_rdata),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .sda_i(i2c_sda_i));

  // ---------------- configuration clear pulses ----------------
  pulse_stretch #(.TICKS(PROG_TICKS)) u_prog_jet (
    .clk(clk), .rst_n(rst_n), .trig(prog_trig[0]), .pulse(prog_jet));
  for (genvar i = 0; i < 4; i++) begin : g_prog
    pulse_stretch #(.TICKS(PROG_TICKS)) u_prog_in (
      .clk(clk), .rst_n(rst_n), .trig(prog_trig[1+i]), .pulse(prog_in[i]));
  end

  // ---------------- merger output and spy memories ----------------
  energy_merge u_merge (
    .clk(clk), .rst_n(rst_n), .ex_in(ex_in), .ey_in(ey_in), .et_in(et_in),
    .ex_code(ex_code), .ey_code(ey_code), .et_code(et_code), .et_par(et_par));

  spy_mem #(.W(16), .DEPTH(256)) u_spy_exy (
    .clk(clk), .rst_n(rst_n), .cap_en(spy_en), .cap_rst(sbc_o | mod_rst),
    .cap_data({ey_code, ex_code}),
    .rd(rd && bus.addr == SUM_SPY_EXY),
    .rd_ptr_rst(pulse_bit(bus, wr, SUM_SPY_EXY_RST, 0) | mod_rst),
    .rd_data(spy_exy_q));

  spy_mem #(.W(9), .DEPTH(256)) u_spy_et (
    .clk(clk), .rst_n(rst_n), .cap_en(spy_en), .cap_rst(sbc_o | mod_rst),
    .cap_data({et_par, et_code}),
    .rd(rd && bus.addr == SUM_SPY_ET),
    .rd_ptr_rst(pulse_bit(bus, wr, SUM_SPY_ET_RST, 0) | mod_rst),
    .rd_data(spy_et_q));

endmodule
