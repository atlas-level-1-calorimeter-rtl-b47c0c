// quad_lin_enc: quad-linear compression of an energy sum into 8 bits.
//
// The code is {range[1:0], mantissa[5:0]}. Range r scales the mantissa by
// 4^r, so the four ranges cover the value linearly with steps of 1, 4, 16
// and 64. The encoder picks the smallest range whose mantissa can hold the
// value shifted right by 2r (truncation towards minus infinity) and
// saturates at range 3. With SIGNED = 1 the input and the mantissa are two's
// complement (mantissa -32..31, full scale -2048..1984); with SIGNED = 0
// they are unsigned (mantissa 0..63, full scale 4032, saturating at 0xFF).
// Purely combinational. The module's programming model names the encoding
// ("quad linear"); the bit layout and rounding are choices of this design.
module quad_lin_enc #(
  parameter int unsigned IN_W   = 18,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [IN_W-1:0] val,
  output logic [7:0]      code
);
  logic signed [IN_W:0] v;          // sign-extended or zero-extended value
  logic signed [IN_W:0] sh;
  logic                 fits;

  always_comb begin
    v    = SIGNED ? $signed({val[IN_W-1], val}) : $signed({1'b0, val});
    code = '0;
    fits = 1'b0;
    for (int r = 0; r < 4; r++) begin
      sh = v >>> (2 * r);
      if (!fits) begin
        if (SIGNED ? (sh >= -32 && sh <= 31) : (sh <= 63)) begin
          fits = 1'b1;
          code = {2'(r), sh[5:0]};
        end
      end
    end
    if (!fits) begin
      if (SIGNED) code = v[IN_W] ? 8'b11_100000 : 8'b11_011111;
      else        code = 8'hFF;
    end
  end
endmodule
