// bc_counter: local bunch-crossing counter of the Sum processor.
//
// Counts clock ticks (bunch crossings) and wraps to 0 after
// BC_PER_ORBIT-1. A BC reset from the TTC receiver loads the value of the
// BC_PRESET register instead, which compensates the timing offset between
// the BC reset and the data at this module. The preset value is seen on
// bcid one clock after bc_reset; module reset (clr) sets the counter to 0.
// The preset-on-BC-reset behaviour follows the programming model; the
// orbit length (3564, the LHC orbit) is taken from the accelerator.
module bc_counter #(
  parameter int unsigned BC_PER_ORBIT = 3564
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        bc_reset,
  input  logic [11:0] preset,
  output logic [11:0] bcid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   bcid <= '0;
    else if (clr)                                 bcid <= '0;
    else if (bc_reset)                            bcid <= preset;
    else if (bcid >= 12'(BC_PER_ORBIT - 1))       bcid <= '0;
    else                                          bcid <= bcid + 1'b1;
  end
endmodule
