// cpld_regs: register map of the VME CPLD (sub-address 0).
//
//   0x00 RO MOD_ID_A     module type (parameter MODULE_TYPE)
//   0x02 RO MOD_ID_B     {revision[7:0], serial[7:0]} from board inputs
//   0x04 RO VERSION_REG  firmware version (parameter VERSION)
//   0x06 RO STATUS_REG   bit 0 TTC clock available, bit 1 Sum FPGA DONE
//   0x10 RW CFG_MASK_REG bit 0 enable Sum FPGA configuration
//   0x12 PR FPGA_RESET   bit 0 clears the Sum FPGA configuration
// Only defined bits are stored; other bits and pulse registers read 0.
// Writes to read-only registers change nothing. A '1' written to the
// FPGA_RESET bit produces a PROG pulse of PROG_TICKS clocks on prog_sum.
//
// Timing: a read request on clock n gives rdata on clock n+1. The
// identifier values and the PROG pulse length are choices of this design;
// the register layout follows the module's programming model.
module cpld_regs
  import jem_pkg::*;
#(
  parameter logic [15:0] MODULE_TYPE = 16'h0EE0,
  parameter logic [15:0] VERSION     = 16'h0102,
  parameter int unsigned PROG_TICKS  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    bus,
  input  logic        sel,
  output logic [15:0] rdata,
  input  logic [7:0]  serial,
  input  logic [7:0]  revision,
  input  logic        ttc_clk_ok,
  input  logic        sum_done,
  output logic        cfg_mask,
  output logic        prog_sum
);

  logic acc, wr, rd, prog_trig;
  assign acc = bus.req && sel;
  assign wr  = acc && bus.we;
  assign rd  = acc && !bus.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_mask  <= 1'b0;
      prog_trig <= 1'b0;
      rdata     <= '0;
    end else begin
      prog_trig <= wr && (bus.addr == CPLD_FPGA_RESET) && bus.wdata[0];
      if (wr && bus.addr == CPLD_CFG_MASK) cfg_mask <= bus.wdata[0];
      if (rd) begin
        unique case (bus.addr)
          CPLD_MOD_ID_A: rdata <= MODULE_TYPE;
          CPLD_MOD_ID_B: rdata <= {revision, serial};
          CPLD_VERSION:  rdata <= VERSION;
          CPLD_STATUS:   rdata <= {14'b0, sum_done, ttc_clk_ok};
          CPLD_CFG_MASK: rdata <= {15'b0, cfg_mask};
          default:       rdata <= '0;
        endcase
      end
    end
  end

  pulse_stretch #(.TICKS(PROG_TICKS)) u_prog (
    .clk(clk), .rst_n(rst_n), .trig(prog_trig), .pulse(prog_sum));

endmodule
