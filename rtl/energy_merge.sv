// energy_merge: energy sums sent from the module to the energy sum merger.
//
// Adds the Ex, Ey (signed) and Et (unsigned) partial sums of the four Input
// FPGAs, compresses each total into an 8-bit quad-linear code and appends an
// odd parity bit to the Et code, so that {et_par, et_code} always holds an
// odd number of ones. Outputs are registered: one clock from the inputs.
// The quantities and the odd parity follow the programming model's
// description of the merger data; widths are choices of this design.
module energy_merge #(
  parameter int unsigned NIN  = 4,
  parameter int unsigned EX_W = 16,
  parameter int unsigned ET_W = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [EX_W-1:0] ex_in [NIN],
  input  logic signed [EX_W-1:0] ey_in [NIN],
  input  logic        [ET_W-1:0] et_in [NIN],
  output logic [7:0]             ex_code,
  output logic [7:0]             ey_code,
  output logic [7:0]             et_code,
  output logic                   et_par
);
  localparam int unsigned SW = EX_W + $clog2(NIN);
  localparam int unsigned TW = ET_W + $clog2(NIN);

  logic signed [SW-1:0] ex_sum, ey_sum;
  logic        [TW-1:0] et_sum;
  logic [7:0]           ex_c, ey_c, et_c;

  always_comb begin
    ex_sum = '0; ey_sum = '0; et_sum = '0;
    for (int i = 0; i < NIN; i++) begin
      ex_sum += SW'(ex_in[i]);
      ey_sum += SW'(ey_in[i]);
      et_sum += TW'(et_in[i]);
    end
  end

  quad_lin_enc #(.IN_W(SW), .SIGNED(1'b1)) u_ex (.val(ex_sum), .code(ex_c));
  quad_lin_enc #(.IN_W(SW), .SIGNED(1'b1)) u_ey (.val(ey_sum), .code(ey_c));
  quad_lin_enc #(.IN_W(TW), .SIGNED(1'b0)) u_et (.val(et_sum), .code(et_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_code <= '0; ey_code <= '0; et_code <= '0; et_par <= 1'b1;
    end else begin
      ex_code <= ex_c;
      ey_code <= ey_c;
      et_code <= et_c;
      et_par  <= ~(^et_c);
    end
  end
endmodule
