// input_fpga: one of the four Input FPGAs (R, S, T, U) of the module.
//
// It receives NCH = 24 link channels (even numbers electromagnetic, odd
// numbers hadronic), aligns and monitors them (in_channel), can replace or
// record them with the playback/spy memory (playspy_mem), and computes the
// Ex, Ey and Et partial sums of its 12 jet elements (jet_energy).
//
// Register map (byte offsets inside the FPGA's sub-address):
//   0x0000 RO VERSION        0x0002 RO STATUS (not in use, reads 0)
//   0x0004 RW CONTROL        bit 0 playback mode, bit 1 spy mode
//   0x0006 PR PULSE          bit 0 clear link error counters, bit 1 parity
//                            error counters, bit 2 test pattern error
//                            counters, bit 4 reset playback/spy VME pointer
//   0x0008 RW THRESHOLD_LOW  [9:0], applied before the Ex/Ey sums
//   0x000A RW THRESHOLD_HIGH [9:0], applied before the Et sum
//   0x0010 RW PLAYSPY        [9:0] playback/spy memory port, auto increment
//   0x0012 PR RESET_PLAYSPY_COUNTER bit 0
//   0x1000 + 0x40*ch, ch = 0..23, channel registers:
//     +0 RO status (bit 0 link error)  +2 RW control (bit 0 phase,
//     bits 2:1 delay, bit 3 mask)  +4/+6/+8 RO link, parity and test
//     pattern error counters (12 bit)  +A RW Ch_mult (12-bit coefficient;
//     even channels X, odd channels Y)
//
// Data path: link word -> in_channel alignment -> (playback replaces it) ->
// mask -> energy bits 8:0 -> jet_energy. The spy memory records the aligned
// link words. The error counters always watch the link, not the playback
// data. Register reads return data one clock after the request.
//
// The register map follows the module's programming model, except that the
// playback/spy pointer reset sits at 0x0012 (the map's 0x0011 cannot be
// reached by 16-bit accesses). Data-path order is a choice of this design.
module input_fpga
  import jem_pkg::*;
#(
  parameter logic [15:0] VERSION = 16'h0102,
  parameter int unsigned NCH     = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  reg_req_t           bus,
  input  logic               sel,
  output logic [15:0]        rdata,
  input  logic [9:0]         lnk_data [NCH],
  input  logic [NCH-1:0]     lnk_err,
  input  logic               sbc,
  output logic signed [15:0] ex,
  output logic signed [15:0] ey,
  output logic [13:0]        et
);
  localparam int unsigned NJE = NCH / 2;

  logic acc, wr, rd;
  assign acc = bus.req && sel;
  assign wr  = acc && bus.we;
  assign rd  = acc && !bus.we;

  // channel window decode
  logic                 ch_space;
  logic [$clog2(NCH)-1:0] ch_num;
  logic [5:0]           ch_off;
  assign ch_space = bus.addr[12] && (bus.addr[11:6] < 6'(NCH));
  assign ch_num   = bus.addr[6 +: $clog2(NCH)];
  assign ch_off   = bus.addr[5:0];

  // ---------------- FPGA-wide registers ----------------
  logic       play_en, spy_en;
  logic [9:0] thr_low, thr_high;
  logic       clr_link, clr_par, clr_tp, ps_rst;
  ch_ctrl_t          ch_ctrl [NCH];
  logic signed [11:0] ch_mult [NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_en <= 1'b0; spy_en <= 1'b0; thr_low <= '0; thr_high <= '0;
      clr_link <= 1'b0; clr_par <= 1'b0; clr_tp <= 1'b0; ps_rst <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        ch_ctrl[c] <= '0;
        ch_mult[c] <= '0;
      end
    end else begin
      clr_link <= wr && bus.addr == IN_PULSE && bus.wdata[0];
      clr_par  <= wr && bus.addr == IN_PULSE && bus.wdata[1];
      clr_tp   <= wr && bus.addr == IN_PULSE && bus.wdata[2];
      ps_rst   <= wr && ((bus.addr == IN_PULSE       && bus.wdata[4]) ||
                         (bus.addr == IN_PLAYSPY_RST && bus.wdata[0]));
      if (wr && !bus.addr[12]) begin
        unique case (bus.addr)
          IN_CONTROL:  begin play_en <= bus.wdata[0]; spy_en <= bus.wdata[1]; end
          IN_THR_LOW:  thr_low  <= bus.wdata[9:0];
          IN_THR_HIGH: thr_high <= bus.wdata[9:0];
          default: ;
        endcase
      end
      if (wr && ch_space) begin
        if (ch_off == CH_CONTROL) ch_ctrl[ch_num] <= bus.wdata[3:0];
        if (ch_off == CH_MULT)    ch_mult[ch_num] <= bus.wdata[11:0];
      end
    end
  end

  // ---------------- channels ----------------
  logic [9:0]  al_data  [NCH];
  logic [9:0]  play_out [NCH];
  logic [NCH-1:0] st_err;
  logic [11:0] cnt_link [NCH], cnt_par [NCH], cnt_tp [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    in_channel u_ch (
      .clk(clk), .rst_n(rst_n), .lnk_data(lnk_data[c]), .lnk_err(lnk_err[c]),
      .phase(ch_ctrl[c].phase), .delay(ch_ctrl[c].delay),
      .clr_link(clr_link), .clr_par(clr_par), .clr_tp(clr_tp),
      .data(al_data[c]), .link_err_q(st_err[c]),
      .cnt_link(cnt_link[c]), .cnt_par(cnt_par[c]), .cnt_tp(cnt_tp[c]));
  end

  // ---------------- playback / spy ----------------
  logic [9:0] ps_rdata;
  playspy_mem #(.NCH(NCH), .DEPTH(256), .W(10)) u_ps (
    .clk(clk), .rst_n(rst_n), .play_en(play_en), .spy_en(spy_en), .sbc(sbc),
    .spy_in(al_data), .play_out(play_out),
    .vme_rd(rd && bus.addr == IN_PLAYSPY), .vme_wr(wr && bus.addr == IN_PLAYSPY),
    .vme_wdata(bus.wdata[9:0]), .vme_rdata(ps_rdata), .vme_ptr_rst(ps_rst));

  // ---------------- energy sums ----------------
  logic [8:0]         e_in [NCH];
  logic [NCH-1:0]     mask;
  logic signed [11:0] cx [NJE], cy [NJE];
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      e_in[c] = play_en ? play_out[c][8:0] : al_data[c][8:0];
      mask[c] = ch_ctrl[c].mask;
    end
    for (int k = 0; k < NJE; k++) begin
      cx[k] = ch_mult[2*k];
      cy[k] = ch_mult[2*k+1];
    end
  end

  jet_energy #(.NJE(NJE)) u_je (
    .clk(clk), .rst_n(rst_n), .ch_data(e_in), .mask(mask), .cx(cx), .cy(cy),
    .thr_low(thr_low), .thr_high(thr_high), .ex(ex), .ey(ey), .et(et));

  // ---------------- read mux ----------------
  logic        rd_ps;
  logic [15:0] reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ps <= 1'b0; reg_q <= '0;
    end else if (rd) begin
      rd_ps <= (bus.addr == IN_PLAYSPY);
      reg_q <= '0;
      if (ch_space) begin
        unique case (ch_off)
          CH_STATUS:   reg_q <= {15'b0, st_err[ch_num]};
          CH_CONTROL:  reg_q <= {12'b0, ch_ctrl[ch_num]};
          CH_LINK_ERR: reg_q <= {4'b0, cnt_link[ch_num]};
          CH_PAR_ERR:  reg_q <= {4'b0, cnt_par[ch_num]};
          CH_TP_ERR:   reg_q <= {4'b0, cnt_tp[ch_num]};
          CH_MULT:     reg_q <= {4'b0, ch_mult[ch_num]};
          default:     reg_q <= '0;
        endcase
      end else if (!bus.addr[12]) begin
        unique case (bus.addr)
          IN_VERSION:  reg_q <= VERSION;
          IN_CONTROL:  reg_q <= {14'b0, spy_en, play_en};
          IN_THR_LOW:  reg_q <= {6'b0, thr_low};
          IN_THR_HIGH: reg_q <= {6'b0, thr_high};
          default:     reg_q <= '0;
        endcase
      end
    end
  end
  assign rdata = rd_ps ? {6'b0, ps_rdata} : reg_q;

endmodule
