// in_channel: receive stage of one Input FPGA channel (EM or hadronic).
//
// A link word is 10 bits: energy in bits 8:0 and an odd parity bit in bit
// 9. The stage aligns the word in time and monitors the link:
//  * phase: 0 samples the word on the rising clock edge, 1 on the falling
//    edge, i.e. half a tick later. Both paths have the same latency, so the
//    phase bit moves only the sampling point.
//  * delay: 0..3 further ticks through a shift register.
//  * link_err_q: the link error line, registered (current status).
//  * cnt_link: transitions of the link error line (both directions).
//  * cnt_par: words whose 10 bits do not hold an odd number of ones.
//  * cnt_tp: words whose energy is not the previous energy + 1 (mod 512),
//    the check for the ramp test pattern sent by the upstream module.
// All three counters are 12-bit, saturating, and cleared by clr_*.
//
// Timing: with phase 0 a word sampled on rising edge n appears on data
// after rising edge n+1+delay; with phase 1 the word sampled on the falling
// edge between n and n+1 appears at the same time. The channel control fields,
// the saturating counters and what they count follow the programming model;
// the word format, the parity sense and the edge scheme are choices of
// this design. The falling-edge register is the only logic clocked on the
// falling edge; it is what the half-tick phase control is made of.
module in_channel #(
  parameter int unsigned CNT_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [9:0]       lnk_data,
  input  logic             lnk_err,
  input  logic             phase,
  input  logic [1:0]       delay,
  input  logic             clr_link,
  input  logic             clr_par,
  input  logic             clr_tp,
  output logic [9:0]       data,
  output logic             link_err_q,
  output logic [CNT_W-1:0] cnt_link,
  output logic [CNT_W-1:0] cnt_par,
  output logic [CNT_W-1:0] cnt_tp
);
  logic [9:0] pos_q, neg_q, al_q;
  logic [9:0] dly [4];
  logic [8:0] prev;
  logic       err_prev;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) neg_q <= '0;
    else        neg_q <= lnk_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0; al_q <= '0; prev <= '0;
      link_err_q <= 1'b0; err_prev <= 1'b0;
      for (int i = 0; i < 4; i++) dly[i] <= '0;
    end else begin
      pos_q  <= lnk_data;
      al_q   <= phase ? neg_q : pos_q;
      dly[0] <= al_q;
      for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];
      prev       <= data[8:0];
      link_err_q <= lnk_err;
      err_prev   <= link_err_q;
    end
  end

  assign data = (delay == 2'd0) ? al_q : dly[delay - 2'd1];

  sat_counter #(.W(CNT_W)) u_link (.clk(clk), .rst_n(rst_n), .clr(clr_link),
    .inc(link_err_q != err_prev), .cnt(cnt_link));
  sat_counter #(.W(CNT_W)) u_par (.clk(clk), .rst_n(rst_n), .clr(clr_par),
    .inc(~(^data)), .cnt(cnt_par));
  sat_counter #(.W(CNT_W)) u_tp (.clk(clk), .rst_n(rst_n), .clr(clr_tp),
    .inc(data[8:0] != prev + 9'd1), .cnt(cnt_tp));
endmodule
