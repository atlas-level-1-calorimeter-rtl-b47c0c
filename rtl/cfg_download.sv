// cfg_download: routes configuration-space writes to the FPGAs being loaded.
//
// A VME write with mode bits A18..A17 = 10 is configuration data. Address
// bits 16..15 say which group of FPGAs is addressed, as in the sub-address
// map: 01 = Sum FPGA, 10 = Jet FPGA, 11 = the four Input FPGAs (R,S,T,U).
// A group member only receives the data if its enable bit is set: the VME
// CPLD's CFG_MASK bit 0 for the Sum FPGA, the Sum processor's CFG_MASK bit 0
// for the Jet FPGA and bits 4..7 for the Input FPGAs R..U. Several Input
// FPGAs can thus be loaded with the same stream at once.
//
// Interface: cfg_strobe[0] Sum, [1] Jet, [2..5] Input R..U, with cfg_data.
// Timing: outputs are registered, one clock after cfg_wr. The FPGA-side
// configuration port protocol is outside this block.
module cfg_download (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_wr,
  input  logic [1:0]  cfg_sel,
  input  logic [15:0] cfg_wdata,
  input  logic        cpld_mask,   // CPLD CFG_MASK bit 0
  input  logic [7:0]  sum_mask,    // Sum processor CFG_MASK
  output logic [5:0]  cfg_strobe,
  output logic [15:0] cfg_data
);

  logic [5:0] sel;
  always_comb begin
    sel = '0;
    unique case (cfg_sel)
      2'b01:   sel[0]   = cpld_mask;
      2'b10:   sel[1]   = sum_mask[0];
      2'b11:   sel[5:2] = sum_mask[7:4];
      default: sel      = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_strobe <= '0;
      cfg_data   <= '0;
    end else begin
      cfg_strobe <= cfg_wr ? sel : 6'b0;
      if (cfg_wr) cfg_data <= cfg_wdata;
    end
  end

endmodule
