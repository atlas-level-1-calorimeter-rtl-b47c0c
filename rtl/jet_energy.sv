// jet_energy: energy sums of the NJE jet elements of one Input FPGA.
//
// A jet element is the sum of an electromagnetic channel (even number 2k)
// and the matching hadronic channel (odd number 2k+1); a masked channel
// counts as 0. For each element E_k:
//  * Ex and Ey: if E_k is above thr_low, E_k is weighted with the element's
//    X coefficient cx[k] (Ch_mult of channel 2k) and Y coefficient cy[k]
//    (Ch_mult of channel 2k+1). The products are summed and scaled down by
//    2^FRAC, so the coefficients are signed fixed-point numbers with FRAC
//    fraction bits (about cos and sin of the element's azimuth).
//  * Et: E_k is added if it is above thr_high.
// Outputs ex, ey (signed) and et (unsigned) are the partial sums this FPGA
// sends on for merging.
//
// Timing: two clocks, elements registered, then sums registered. The use of
// the two thresholds and the two coefficients follows the programming
// model; the coefficient format, the strict "above" comparison and the
// widths are choices of this design.
module jet_energy #(
  parameter int unsigned NJE  = 12,
  parameter int unsigned FRAC = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [8:0]         ch_data [2*NJE],
  input  logic [2*NJE-1:0]   mask,
  input  logic signed [11:0] cx [NJE],
  input  logic signed [11:0] cy [NJE],
  input  logic [9:0]         thr_low,
  input  logic [9:0]         thr_high,
  output logic signed [15:0] ex,
  output logic signed [15:0] ey,
  output logic [13:0]        et
);
  localparam int unsigned PW = 23 + $clog2(NJE);  // product sum width

  logic [9:0] je [NJE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NJE; k++) je[k] <= '0;
    end else begin
      for (int k = 0; k < NJE; k++)
        je[k] <= (mask[2*k]   ? 10'd0 : {1'b0, ch_data[2*k]}) +
                 (mask[2*k+1] ? 10'd0 : {1'b0, ch_data[2*k+1]});
    end
  end

  logic signed [PW-1:0] sx, sy;
  logic [13:0]          st;
  always_comb begin
    sx = '0; sy = '0; st = '0;
    for (int k = 0; k < NJE; k++) begin
      if (je[k] > thr_low) begin
        sx += PW'($signed({1'b0, je[k]}) * cx[k]);
        sy += PW'($signed({1'b0, je[k]}) * cy[k]);
      end
      if (je[k] > thr_high) st += 14'(je[k]);
    end
  end

  logic signed [PW-1:0] sx_sh, sy_sh;
  assign sx_sh = sx >>> FRAC;
  assign sy_sh = sy >>> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= '0; ey <= '0; et <= '0;
    end else begin
      ex <= sx_sh[15:0];
      ey <= sy_sh[15:0];
      et <= st;
    end
  end
endmodule
