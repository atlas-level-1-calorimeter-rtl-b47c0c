// spy_mem: 256-deep spy memory with an auto-incrementing VME read port.
//
// While cap_en is high the memory records cap_data on every clock at a
// capture pointer that steps once per clock and wraps after DEPTH words, so
// it always holds the last DEPTH ticks; clearing cap_en freezes the
// contents. cap_rst (short broadcast or module reset) sets the capture
// pointer to 0. The VME side reads the word at a separate read pointer; each
// read strobe returns that word on the next clock and then advances the
// pointer, so consecutive reads walk the memory. rd_ptr_rst sets the read
// pointer to 0. The memory powers up as all zeros.
//
// The depth and the auto-increment read port follow the module's
// programming model; the circular capture scheme is a choice of this design.
module spy_mem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cap_en,
  input  logic         cap_rst,
  input  logic [W-1:0] cap_data,
  input  logic         rd,
  input  logic         rd_ptr_rst,
  output logic [W-1:0] rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] cap_ptr, rd_ptr;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (cap_en) mem[cap_ptr] <= cap_data;
    if (rd)     rd_data      <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_ptr <= '0;
      rd_ptr  <= '0;
    end else begin
      if (cap_rst)     cap_ptr <= '0;
      else if (cap_en) cap_ptr <= (cap_ptr == AW'(DEPTH-1)) ? '0 : cap_ptr + 1'b1;
      if (rd_ptr_rst)  rd_ptr  <= '0;
      else if (rd)     rd_ptr  <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
    end
  end
endmodule
