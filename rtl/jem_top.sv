// jem_top: Jet/Energy Processor Module (JEM) control and energy path.
//
// The module sits in a VME crate and is programmed through VME A24/D16.
// vme_slave decodes the module's address space and turns every VME cycle
// into one access on a synchronous local register bus, or into a
// configuration write. The bus reaches the VME CPLD (sub-address 0), the
// Sum processor FPGA (4) and the four Input FPGAs R, S, T, U (C..F). The
// SystemACE (2) and the Jet processor FPGA (8) are outside this RTL: their
// bus requests and read data are ports. cfg_download routes configuration
// data to the FPGAs selected by the configuration masks.
//
// Energy path: each Input FPGA receives 24 link channels and produces Ex,
// Ey and Et sums of its 12 jet elements; the Sum FPGA adds the four, codes
// them quad-linearly for the energy sum merger and keeps spy copies. The
// TTC signals (L1A, BC reset, short broadcast) enter the Sum FPGA, which
// forwards the short broadcast to the Input FPGAs and produces the delayed
// read request and slice strobes for DAQ readout. TTCrx register access
// goes over the I2C pins.
//
// Everything runs on the 40 MHz bunch-crossing clock `clk`; rst_n is the
// power-up reset (all registers and memories come up zero).
// Signal index conventions: cfg_strobe/prog/fpga_done [0] Sum, [1] Jet,
// [2..5] Input R..U; lnk_data[f][c] is channel c of Input FPGA f (0 = R).
module jem_top
  import jem_pkg::*;
#(
  parameter int unsigned BASE_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // board settings and status
  input  logic [BASE_W-1:0] base_addr,
  input  logic [7:0]        serial,
  input  logic [7:0]        revision,
  input  logic              ttc_clk_ok,
  input  logic              dll_locked,
  input  logic [5:0]        fpga_done,
  // VME
  input  logic [23:1]       vme_addr,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_din,
  output logic [15:0]       vme_dout,
  output logic              vme_dout_en,
  output logic              vme_dtack_n,
  // configuration
  output logic [5:0]        cfg_strobe,
  output logic [15:0]       cfg_data,
  output logic [5:0]        prog,
  // SystemACE and Jet FPGA local bus (not part of this RTL)
  output reg_req_t          ext_bus,
  output logic              ace_sel,
  input  logic [15:0]       ace_rdata,
  output logic              jet_sel,
  input  logic [15:0]       jet_rdata,
  // TTC
  input  logic              ttc_l1a,
  input  logic              ttc_bc_reset,
  input  logic              ttc_sbc,
  output logic              i2c_scl_oe,
  output logic              i2c_sda_oe,
  input  logic              i2c_sda_i,
  // links
  input  logic [9:0]        lnk_data [4][24],
  input  logic [23:0]       lnk_err  [4],
  // energy sum merger
  output logic [7:0]        ex_code,
  output logic [7:0]        ey_code,
  output logic [7:0]        et_code,
  output logic              et_par,
  // readout
  output logic              read_request,
  output logic              slice_strobe,
  output logic [2:0]        slice_idx,
  output logic [11:0]       bcid
);

  reg_req_t        bus;
  logic [NTGT-1:0] tgt_sel;
  logic [15:0]     tgt_rdata [NTGT];
  logic            cfg_wr;
  logic [1:0]      cfg_sel;
  logic [15:0]     cfg_wdata;

  vme_slave #(.BASE_W(BASE_W)) u_vme (
    .clk(clk), .rst_n(rst_n), .base_addr(base_addr),
    .vme_addr(vme_addr), .vme_as_n(vme_as_n), .vme_ds_n(vme_ds_n),
    .vme_write_n(vme_write_n), .vme_din(vme_din), .vme_dout(vme_dout),
    .vme_dout_en(vme_dout_en), .vme_dtack_n(vme_dtack_n),
    .bus(bus), .tgt_sel(tgt_sel), .tgt_rdata(tgt_rdata),
    .cfg_wr(cfg_wr), .cfg_sel(cfg_sel), .cfg_wdata(cfg_wdata));

  assign ext_bus = bus;
  assign ace_sel = tgt_sel[TGT_ACE];
  assign jet_sel = tgt_sel[TGT_JET];
  assign tgt_rdata[TGT_ACE] = ace_rdata;
  assign tgt_rdata[TGT_JET] = jet_rdata;

  // VME CPLD
  logic cpld_mask;
  cpld_regs u_cpld (
    .clk(clk), .rst_n(rst_n), .bus(bus), .sel(tgt_sel[TGT_CPLD]),
    .rdata(tgt_rdata[TGT_CPLD]), .serial(serial), .revision(revision),
    .ttc_clk_ok(ttc_clk_ok), .sum_done(fpga_done[0]),
    .cfg_mask(cpld_mask), .prog_sum(prog[0]));

  // Sum processor
  logic [7:0]         sum_mask;
  logic               sbc;
  logic signed [15:0] ex [4], ey [4];
  logic [13:0]        et [4];

  sum_fpga u_sum (
    .clk(clk), .rst_n(rst_n), .bus(bus), .sel(tgt_sel[TGT_SUM]),
    .rdata(tgt_rdata[TGT_SUM]), .dll_locked(dll_locked),
    .done_jet(fpga_done[1]), .done_in(fpga_done[5:2]),
    .ttc_l1a(ttc_l1a), .ttc_bc_reset(ttc_bc_reset), .ttc_sbc(ttc_sbc),
    .ex_in(ex), .ey_in(ey), .et_in(et),
    .ex_code(ex_code), .ey_code(ey_code), .et_code(et_code), .et_par(et_par),
    .cfg_mask(sum_mask), .prog_jet(prog[1]), .prog_in(prog[5:2]),
    .sbc_o(sbc), .read_request(read_request), .slice_strobe(slice_strobe),
    .slice_idx(slice_idx), .bcid(bcid),
    .i2c_scl_oe(i2c_scl_oe), .i2c_sda_oe(i2c_sda_oe), .i2c_sda_i(i2c_sda_i));

  // Input FPGAs R, S, T, U
  for (genvar f = 0; f < 4; f++) begin : g_in
    input_fpga u_in (
      .clk(clk), .rst_n(rst_n), .bus(bus), .sel(tgt_sel[TGT_IN_R + f]),
      .rdata(tgt_rdata[TGT_IN_R + f]), .lnk_data(lnk_data[f]), .lnk_err(lnk_err[f]),
      .sbc(sbc), .ex(ex[f]), .ey(ey[f]), .et(et[f]));
  end

  // configuration download
  cfg_download u_cfg (
    .clk(clk), .rst_n(rst_n), .cfg_wr(cfg_wr), .cfg_sel(cfg_sel),
    .cfg_wdata(cfg_wdata), .cpld_mask(cpld_mask), .sum_mask(sum_mask),
    .cfg_strobe(cfg_strobe), .cfg_data(cfg_data));

endmodule
