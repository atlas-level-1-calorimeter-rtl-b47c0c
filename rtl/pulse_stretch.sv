// pulse_stretch: widens a one-clock trigger into a pulse of TICKS clocks.
//
// Used for the FPGA configuration-clear (PROG) lines, which need a minimum
// low time far longer than one 25 ns tick. A new trigger restarts the count.
// The length is a choice of this design.
module pulse_stretch #(
  parameter int unsigned TICKS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse
);
  logic [$clog2(TICKS+1)-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (trig)       cnt <= TICKS[$clog2(TICKS+1)-1:0];
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end
  assign pulse = (cnt != '0);
endmodule
