// playspy_mem: playback/spy memory of an Input FPGA, NCH words x DEPTH deep.
//
// One W-bit word per channel and depth. The VME port walks the memory with
// one pointer, channel (word) first, then depth: word 0..NCH-1 of depth 0,
// then of depth 1, and so on; the pointer advances after every read or
// write and wraps at the end. vme_ptr_rst sets it to word 0, depth 0.
// On the data side an operating pointer steps through the depths, one per
// clock, while playback or spy mode is on, and wraps after DEPTH; sbc
// (short broadcast) resets it to 0 so that the stored pattern lines up with
// a known bunch crossing. In spy mode all NCH received words are written at
// the operating depth each clock; in playback mode play_out gives the
// stored words of the current depth, replacing the link data.
//
// Timing: vme_rdata is registered (one clock after vme_rd); play_out is
// registered, the word of the depth the pointer held on the previous clock.
// A spy write wins over a VME write to the same word. Size and pointer
// order follow the programming model; the operating pointer scheme is a
// choice of this design. The memory powers up as all zeros.
module playspy_mem #(
  parameter int unsigned NCH   = 24,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         play_en,
  input  logic         spy_en,
  input  logic         sbc,
  input  logic [W-1:0] spy_in   [NCH],
  output logic [W-1:0] play_out [NCH],
  input  logic         vme_rd,
  input  logic         vme_wr,
  input  logic [W-1:0] vme_wdata,
  output logic [W-1:0] vme_rdata,
  input  logic         vme_ptr_rst
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(NCH);

  logic [AW-1:0] op_ptr, v_dep;
  logic [CW-1:0] v_word;

  for (genvar c = 0; c < NCH; c++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    always_ff @(posedge clk) begin
      if (spy_en)
        mem[op_ptr] <= spy_in[c];
      else if (vme_wr && v_word == CW'(c))
        mem[v_dep] <= vme_wdata;
      play_out[c] <= mem[op_ptr];
    end
  end

  // VME read: select the addressed bank
  logic [W-1:0] bank_rd [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_rd
    assign bank_rd[c] = g_bank[c].mem[v_dep];
  end
  always_ff @(posedge clk) begin
    if (vme_rd) vme_rdata <= bank_rd[v_word];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_ptr <= '0; v_dep <= '0; v_word <= '0;
    end else begin
      if (sbc)                     op_ptr <= '0;
      else if (play_en || spy_en)  op_ptr <= (op_ptr == AW'(DEPTH-1)) ? '0 : op_ptr + 1'b1;
      if (vme_ptr_rst) begin
        v_word <= '0; v_dep <= '0;
      end else if (vme_rd || vme_wr) begin
        if (v_word == CW'(NCH-1)) begin
          v_word <= '0;
          v_dep  <= (v_dep == AW'(DEPTH-1)) ? '0 : v_dep + 1'b1;
        end else begin
          v_word <= v_word + 1'b1;
        end
      end
    end
  end
endmodule
