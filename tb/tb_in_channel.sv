// tb_in_channel: drives a channel with words that change between the
// rising and the falling clock edge, so the two phase settings see
// different samples. A software model keeps the values present at each
// edge and predicts the aligned output for every phase/delay setting,
// and the three saturating error counters (link transitions, odd parity,
// ramp test pattern), including clears and saturation at 4095.
module tb_in_channel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] lnk_data = '0, data;
  logic lnk_err = 0, phase = 0, clr_link = 0, clr_par = 0, clr_tp = 0, link_err_q;
  logic [1:0] delay = '0;
  logic [11:0] cnt_link, cnt_par, cnt_tp;

  in_channel dut (.*);
  always #5 clk = ~clk;

  localparam int N = 16000;
  logic [9:0] pos_h [N], neg_h [N];
  logic       err_h [N];

  // pos_h[m]: word at rising edge m; neg_h[m]: word at the falling edge
  // just before rising edge m; err_h[m]: link error line at rising edge m.
  int m = 0;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int e_link = 0, e_par = 0, e_tp = 0;
  logic [9:0] last_data = '0, prev_data = '0;
  bit p_clr_link = 0, p_clr_par = 0, p_clr_tp = 0;
  int settle = 0;
  int mode = 0;        // 0 random words, 1 good ramp, 2 ramp with bad parity
  logic [8:0] ramp = '0;

  function automatic int sat(int v); return (v > 4095) ? 4095 : v; endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    err_h[0] = lnk_err;
    #1;
    for (int cyc = 0; cyc < 15000; cyc++) begin
      // t = 10m+1, just after rising edge m
      // ---- configuration schedule ----
      if (cyc % 1000 == 0 && cyc < 8000) begin
        phase = (cyc / 1000) % 2; delay = 2'((cyc / 2000) % 4); settle = 8;
      end
      if (cyc == 8000)  begin mode = 1; phase = 0; delay = 2'd1; settle = 8; end
      if (cyc == 9000)  begin mode = 2; end
      if (cyc == 10000) begin mode = 0; phase = 1; delay = 2'd3; settle = 8; end
      #1;
      clr_link = (cyc == 0) || (cyc == 8010) || (cyc == 12000);
      clr_par  = (cyc == 0) || (cyc == 8010);
      clr_tp   = (cyc == 0) || (cyc == 8010) || (cyc == 9500);
      #4;                               // t = 10m+6, after the falling edge
      neg_h[m+1] = lnk_data;
      #1;                               // t = 10m+7: new word, seen by rising edge m+1 only
      prev_data = last_data;
      last_data = data;                 // what rising edge m+1 checks
      if (cyc % 37 == 0) lnk_err = ~lnk_err;
      if (mode == 0) lnk_data = 10'($urandom);
      else begin
        ramp = ramp + 9'd1;
        lnk_data = {(mode == 1) ? ~(^ramp) : (^ramp), ramp};
      end
      @(posedge clk);
      m++;
      pos_h[m] = lnk_data;
      err_h[m] = lnk_err;
      #1;
      // ---- counter model: what rising edge m did ----
      if (clr_link) e_link = 0; else if (m >= 2 && err_h[m-1] != err_h[m-2]) e_link = sat(e_link + 1);
      if (clr_par)  e_par  = 0; else if (~(^last_data)) e_par = sat(e_par + 1);
      if (clr_tp)   e_tp   = 0; else if (last_data[8:0] != prev_data[8:0] + 9'd1) e_tp = sat(e_tp + 1);
      if (cyc > 5) begin
        checks += 4;
        if (cnt_link != 12'(e_link)) begin failures++; if (failures < 10) $display("cyc %0d link %0d exp %0d", cyc, cnt_link, e_link); end
        if (cnt_par  != 12'(e_par))  begin failures++; if (failures < 10) $display("cyc %0d par %0d exp %0d", cyc, cnt_par, e_par); end
        if (cnt_tp   != 12'(e_tp))   begin failures++; if (failures < 10) $display("cyc %0d tp %0d exp %0d", cyc, cnt_tp, e_tp); end
        if (link_err_q != err_h[m])  begin failures++; if (failures < 10) $display("cyc %0d link status", cyc); end
      end
      // ---- aligned data ----
      if (settle > 0) settle--;
      else if (m > 8) begin
        logic [9:0] exp_d;
        exp_d = phase ? neg_h[m - delay] : pos_h[m - 1 - delay];
        checks++;
        if (data !== exp_d) begin failures++; if (failures < 10) $display("cyc %0d ph %0d dly %0d data %h exp %h", cyc, phase, delay, data, exp_d); end
      end
    end
    // coverage of the interesting counter cases
    checks += 2;
    if (e_tp != 4095) begin failures++; $display("tp never saturated"); end
    if (e_par == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
