// tb_input_fpga: one Input FPGA through its register bus. Checks the
// register map (stored bits, read-only registers, channel windows), the
// link monitoring counters with ramp data and injected parity and link
// errors, their clear pulses, the energy sums with known coefficients,
// thresholds and masks, playback (replay period 256 clocks after a short
// broadcast) and spy recording read back through the auto-incrementing
// port, including its pointer reset at 0x0012.
module tb_input_fpga;
  import jem_pkg::*;
  int checks = 0, failures = 0;
  localparam int NCH = 24;
  logic clk = 0, rst_n = 0, sel = 0, sbc = 0;
  reg_req_t bus = '0;
  logic [15:0] rdata;
  logic [9:0] lnk_data [NCH];
  logic [NCH-1:0] lnk_err = '0;
  logic signed [15:0] ex, ey;
  logic [13:0] et;

  input_fpga dut (.*);
  always #5 clk = ~clk;

  // link driver: mode 0 = ramps (odd parity), 1 = static words
  int mode = 0, t = 0;
  logic [8:0] stat_v [NCH];
  int bad_par_ch = -1;
  function automatic logic [9:0] w(logic [8:0] v, bit good); return {good ? ~(^v) : (^v), v}; endfunction
  always @(posedge clk) begin
    t <= t + 1;
    for (int c = 0; c < NCH; c++)
      lnk_data[c] <= (mode == 0) ? w(9'(t + 7*c), c != bad_par_ch) : w(stat_v[c], 1'b1);
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [12:0] a, logic [15:0] d);
    @(negedge clk); bus = '{req: 1, we: 1, addr: a, wdata: d}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
  endtask
  task automatic rd(logic [12:0] a, output logic [15:0] q);
    @(negedge clk); bus = '{req: 1, we: 0, addr: a, wdata: 0}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
    q = rdata;
  endtask
  task automatic rd_chk(logic [12:0] a, logic [15:0] exp, string what);
    logic [15:0] q;
    rd(a, q);
    checks++;
    if (q !== exp) begin failures++; $display("FAIL %s (%h): %h exp %h", what, a, q, exp); end
  endtask
  function automatic logic [12:0] ch(int c, logic [5:0] off); return 13'(IN_CH_BASE + c*IN_CH_STRIDE + off); endfunction

  initial begin
    logic [15:0] q, q2;
    int hits [$];
    for (int c = 0; c < NCH; c++) stat_v[c] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- register map ----
    rd_chk(IN_VERSION, 16'h0102, "version");
    rd_chk(IN_STATUS, 16'h0000, "status");
    wr(IN_VERSION, 16'hFFFF); rd_chk(IN_VERSION, 16'h0102, "version ro");
    wr(IN_THR_LOW, 16'hFFFF);  rd_chk(IN_THR_LOW, 16'h03FF, "thr low");
    wr(IN_THR_HIGH, 16'h1234); rd_chk(IN_THR_HIGH, 16'h0234, "thr high");
    wr(IN_CONTROL, 16'hFFFC);  rd_chk(IN_CONTROL, 16'h0000, "control");
    for (int c = 0; c < NCH; c += 5) begin
      wr(ch(c, CH_CONTROL), 16'hFFF0 | 16'(c % 8)); rd_chk(ch(c, CH_CONTROL), 16'(c % 8), "ch control");
      wr(ch(c, CH_MULT), 16'hF000 | 16'(c * 100)); rd_chk(ch(c, CH_MULT), 16'(c * 100), "ch mult");
      wr(ch(c, CH_CONTROL), 16'h0000);
    end
    rd_chk(13'h1000 + 13'(24 * 'h40), 16'h0000, "beyond channel 23");
    // ---- link monitoring ----
    repeat (20) @(negedge clk);
    wr(IN_PULSE, 16'h0007);                       // clear all error counters
    repeat (50) @(negedge clk);
    rd_chk(ch(3, CH_TP_ERR), 16'd0, "tp clean");
    rd_chk(ch(3, CH_PAR_ERR), 16'd0, "par clean");
    @(negedge clk) bad_par_ch = 5;
    repeat (10) @(negedge clk);
    bad_par_ch = -1;
    for (int i = 0; i < 3; i++) begin             // link 3: three transitions each
      @(negedge clk) lnk_err[3] = ~lnk_err[3];
      repeat (4) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    rd_chk(ch(5, CH_PAR_ERR), 16'd10, "parity errors ch5");
    rd_chk(ch(4, CH_PAR_ERR), 16'd0, "parity errors ch4");
    rd_chk(ch(3, CH_LINK_ERR), 16'd3, "link transitions ch3");
    rd_chk(ch(3, CH_STATUS), 16'd1, "link status ch3");
    rd_chk(ch(2, CH_STATUS), 16'd0, "link status ch2");
    wr(IN_PULSE, 16'h0002);
    rd_chk(ch(5, CH_PAR_ERR), 16'd0, "parity cleared");
    rd_chk(ch(3, CH_LINK_ERR), 16'd3, "link not cleared by parity clear");
    wr(IN_PULSE, 16'h0001);
    rd_chk(ch(3, CH_LINK_ERR), 16'd0, "link cleared");
    // ---- spy recording of the ramps ----
    wr(IN_CONTROL, 16'h0002);
    repeat (300) @(negedge clk);
    wr(IN_CONTROL, 16'h0000);
    wr(IN_PLAYSPY_RST, 16'h0001);
    for (int d = 0; d < 3; d++)
      for (int c = 0; c < NCH; c++) begin
        rd(IN_PLAYSPY, q);
        checks++;
        // neighbouring channels differ by 7 in the ramp, depths by 1
        if (c > 0 && q[8:0] != 9'(q2[8:0] + 7)) begin failures++; $display("FAIL spy c%0d d%0d %h prev %h", c, d, q, q2); end
        q2 = q;
      end
    // ---- energy sums from static words ----
    mode = 1;
    for (int c = 0; c < NCH; c++) stat_v[c] = 9'(10 + c);
    wr(ch(0, CH_MULT), 16'd1024);                 // x = +1.0
    wr(ch(1, CH_MULT), 16'hFE00);                 // y = -0.5
    wr(ch(2, CH_MULT), 16'd512);                  // x = +0.5
    for (int c = 3; c < NCH; c++) wr(ch(c, CH_MULT), 16'd0);
    wr(IN_THR_LOW, 16'd0); wr(IN_THR_HIGH, 16'd0);
    repeat (6) @(negedge clk);
    // E0 = 10+11 = 21, E1 = 12+13 = 25 ; Ex = 21 + 12.5 -> 33 (floor), Ey = -10.5 -> -11
    checks += 3;
    if (ex != 16'sd33)  begin failures++; $display("FAIL ex %0d", ex); end
    if (ey != -16'sd11) begin failures++; $display("FAIL ey %0d", ey); end
    // Et = sum over 24 channels of (10+c) = 240 + 276 = 516
    if (et != 14'd516)  begin failures++; $display("FAIL et %0d", et); end
    wr(IN_THR_LOW, 16'd21);                       // E0 = 21 no longer above
    wr(IN_THR_HIGH, 16'd50);                      // elements 21..(10+22+10+23=65): 20+21>50? pairs (2k,2k+1) sum 21+4k
    wr(ch(1, CH_CONTROL), 16'h0008);              // mask channel 1
    repeat (6) @(negedge clk);
    begin
      int e_et; e_et = 0;
      for (int k = 0; k < 12; k++) begin
        int e; e = (10 + 2*k) + ((k == 0) ? 0 : (11 + 2*k));
        if (e > 50) e_et += e;
      end
      checks += 2;
      if (ex != 16'sd12) begin failures++; $display("FAIL ex thr %0d", ex); end  // E0 = 10 (masked) <= 21, E1 = 25 -> 12.5
      if (et != 14'(e_et)) begin failures++; $display("FAIL et thr %0d exp %0d", et, e_et); end
    end
    wr(ch(1, CH_CONTROL), 16'h0000);
    wr(IN_THR_LOW, 16'd0); wr(IN_THR_HIGH, 16'd0);
    // ---- playback: depth 0 holds words of 100, depth 1 of 1, rest recorded ramps ----
    wr(IN_PLAYSPY_RST, 16'h0001);
    for (int c = 0; c < NCH; c++) wr(IN_PLAYSPY, 16'(w(9'd100, 1'b1)));
    for (int c = 0; c < NCH; c++) wr(IN_PLAYSPY, 16'(w(9'd1, 1'b1)));
    for (int c = 0; c < NCH; c++) stat_v[c] = 9'd0;
    wr(IN_CONTROL, 16'h0001);
    @(negedge clk) sbc = 1;
    @(negedge clk) sbc = 0;
    for (int i = 0; i < 700; i++) begin
      @(negedge clk);
      if (et == 14'd2400) hits.push_back(i);
    end
    checks += 2;
    if (hits.size() != 3) begin failures++; $display("FAIL playback hits %0d", hits.size()); end
    else if (hits[1] - hits[0] != 256 || hits[2] - hits[1] != 256) begin failures++; $display("FAIL playback period"); end
    if (hits.size() > 0 && hits[0] != 2) begin failures++; $display("FAIL playback start %0d", hits[0]); end
    wr(IN_CONTROL, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
