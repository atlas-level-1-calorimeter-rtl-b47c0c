// tb_jem_top: end-to-end test of the whole module at its default size,
// driven only through the VME bus, the TTC inputs and the link inputs.
// It walks through every mechanism of the design and counts how often each
// was seen: register access to each FPGA, DTACK on undefined addresses,
// configuration download and its 0xFFFF read, PROG pulses, TTCrx I2C
// access, L1A -> delayed read request -> slice strobes, BC preset, short
// broadcast, Sum spy readout, Input playback and spy, link/parity/test
// pattern error counters, thresholds, masks, channel delay, quad-linear
// ranges and saturation. A mechanism never seen counts as a failure.
module tb_jem_top;
  import jem_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [3:0] base_addr = 4'h5;
  logic [7:0] serial = 8'd42, revision = 8'd3;
  logic ttc_clk_ok = 1, dll_locked = 1;
  logic [5:0] fpga_done = 6'b111111;
  logic [23:1] vme_addr = '0;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [15:0] vme_din = '0, vme_dout;
  logic vme_dout_en, vme_dtack_n;
  logic [5:0] cfg_strobe, prog;
  logic [15:0] cfg_data;
  reg_req_t ext_bus;
  logic ace_sel, jet_sel;
  logic [15:0] ace_rdata = 16'hACE0, jet_rdata = 16'h7E70;
  logic ttc_l1a = 0, ttc_bc_reset = 0, ttc_sbc = 0;
  logic i2c_scl_oe, i2c_sda_oe, i2c_sda_i, slv_oe, sda_line;
  logic [9:0] lnk_data [4][24];
  logic [23:0] lnk_err [4];
  logic [7:0] ex_code, ey_code, et_code;
  logic et_par, read_request, slice_strobe;
  logic [2:0] slice_idx;
  logic [11:0] bcid;

  jem_top dut (.*);
  assign sda_line  = ~(i2c_sda_oe | slv_oe);
  assign i2c_sda_i = sda_line;
  ttcrx_i2c_model #(.I2C_ID(6'd0)) chip (.present(1'b1), .scl(~i2c_scl_oe), .sda(sda_line), .sda_oe(slv_oe));
  always #12.5 clk = ~clk;        // 40 MHz

  // ---------------- mechanism counters ----------------
  typedef enum int {M_REG, M_UNDEF, M_CFG_WR, M_CFG_RD, M_PROG, M_I2C, M_RR, M_SLICE, M_BC,
                    M_SBC, M_SUM_SPY, M_PLAY, M_IN_SPY, M_LINK, M_PAR, M_TP, M_THR, M_MASK,
                    M_DELAY, M_RANGE, M_SAT, M_N} mech_e;
  int seen [M_N];
  string mname [M_N] = '{"register access", "undefined address DTACK", "configuration write",
    "configuration read 0xFFFF", "PROG pulse", "TTCrx I2C access", "delayed read request",
    "slice strobes", "BC preset", "short broadcast", "Sum spy readout", "playback", "Input spy readout",
    "link error count", "parity error count", "test pattern error count", "threshold cut",
    "channel mask", "channel delay", "quad-linear upper range", "quad-linear saturation"};

  task automatic ok(bit c, string what, mech_e m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
    else seen[m]++;
  endtask

  // ---------------- link drivers ----------------
  int   lmode = 0;                 // 0 static words, 1 ramps
  logic [8:0] lval [4][24];
  int   t = 0;
  int   bad_par_f = -1, bad_par_c = -1;
  function automatic logic [9:0] w(logic [8:0] v, bit good); return {good ? ~(^v) : (^v), v}; endfunction
  always @(posedge clk) begin
    t <= t + 1;
    for (int f = 0; f < 4; f++)
      for (int c = 0; c < 24; c++)
        lnk_data[f][c] <= w(lmode == 1 ? 9'(t + c) : lval[f][c], !(f == bad_par_f && c == bad_par_c));
  end

  // ---------------- VME ----------------
  function automatic logic [23:1] va(logic [1:0] mode, logic [3:0] sub, logic [12:0] ra);
    return {1'b1, base_addr, mode, sub, ra[12:1]};
  endfunction
  task automatic vme(logic [23:1] a, bit wr, logic [15:0] d, output logic [15:0] q);
    int n;
    @(negedge clk);
    vme_addr = a; vme_write_n = ~wr; vme_din = d; vme_as_n = 0;
    @(negedge clk) vme_ds_n = 0;
    n = 0;
    while (vme_dtack_n && n < 50) begin @(negedge clk); n++; end
    checks++;
    if (vme_dtack_n) begin failures++; $display("FAIL no DTACK at %h", {a, 1'b0}); end
    q = vme_dout;
    vme_ds_n = 1; vme_as_n = 1;
    @(negedge clk); @(negedge clk);
  endtask
  task automatic wreg(logic [3:0] sub, logic [12:0] ra, logic [15:0] d);
    logic [15:0] q; vme(va(2'b00, sub, ra), 1, d, q);
  endtask
  task automatic rreg(logic [3:0] sub, logic [12:0] ra, output logic [15:0] q);
    vme(va(2'b00, sub, ra), 0, 16'h0, q);
  endtask
  task automatic rchk(logic [3:0] sub, logic [12:0] ra, logic [15:0] exp, string what, mech_e m);
    logic [15:0] q; rreg(sub, ra, q);
    ok(q === exp, $sformatf("%s: %h exp %h", what, q, exp), m);
  endtask

  localparam logic [3:0] SUB_CPLD = 4'h0, SUB_ACE = 4'h2, SUB_SUM = 4'h4, SUB_JET = 4'h8;
  function automatic logic [3:0] sub_in(int f); return 4'hC + 4'(f); endfunction
  function automatic logic [12:0] chr(int c, logic [5:0] off); return 13'(IN_CH_BASE + c*IN_CH_STRIDE + off); endfunction

  // expected quad-linear codes
  function automatic logic [7:0] q_u(int v);
    if (v < 64) return {2'd0, 6'(v)}; if (v < 256) return {2'd1, 6'(v/4)};
    if (v < 1024) return {2'd2, 6'(v/16)}; if (v < 4096) return {2'd3, 6'(v/64)}; return 8'hFF;
  endfunction
  function automatic logic [7:0] q_s(int v);
    int r; int m;
    if (v >= -32 && v <= 31) begin r = 0; m = v; end
    else if (v >= -128 && v <= 127) begin r = 1; m = $floor(real'(v) / 4.0); end
    else if (v >= -512 && v <= 511) begin r = 2; m = $floor(real'(v) / 16.0); end
    else if (v >= -2048 && v <= 2047) begin r = 3; m = $floor(real'(v) / 64.0); end
    else begin r = 3; m = (v < 0) ? -32 : 31; end
    return {r[1:0], m[5:0]};
  endfunction

  // prog and cfg strobe monitors
  int prog_cycles [6];
  int cfg_hits [6];
  logic [15:0] cfg_last;
  initial for (int i = 0; i < 6; i++) begin prog_cycles[i] = 0; cfg_hits[i] = 0; end
  always @(posedge clk) if (rst_n) for (int i = 0; i < 6; i++) begin
    if (prog[i]) prog_cycles[i]++;
    if (cfg_strobe[i]) begin cfg_hits[i]++; cfg_last = cfg_data; end
  end
  int rr_cnt = 0, slice_cnt = 0;
  always @(posedge clk) if (rst_n) begin if (read_request) rr_cnt++; if (slice_strobe) slice_cnt++; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int n0, tq;
    for (int f = 0; f < 4; f++) begin lnk_err[f] = '0; for (int c = 0; c < 24; c++) lval[f][c] = '0; end
    for (int i = 0; i < M_N; i++) seen[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- identification and register access on every FPGA ----
    rchk(SUB_CPLD, CPLD_MOD_ID_B, {8'd3, 8'd42}, "MOD_ID_B", M_REG);
    rchk(SUB_CPLD, CPLD_STATUS, 16'h0003, "CPLD status", M_REG);
    rchk(SUB_SUM, SUM_VERSION, 16'h0102, "Sum version", M_REG);
    for (int f = 0; f < 4; f++) begin
      wreg(sub_in(f), IN_THR_HIGH, 16'(f + 1));
      rchk(sub_in(f), IN_THR_HIGH, 16'(f + 1), "input threshold", M_REG);
    end
    rchk(SUB_ACE, 13'h0, 16'hACE0, "SystemACE bus", M_REG);
    rchk(SUB_JET, 13'h0, 16'h7E70, "Jet FPGA bus", M_REG);
    rchk(4'h6, 13'h0, 16'h0000, "undefined sub-address", M_UNDEF);
    vme(va(2'b11, SUB_SUM, 13'h0), 0, 0, q); ok(q == 16'h0, "undefined mode", M_UNDEF);

    // ---- configuration download ----
    vme(va(2'b10, SUB_SUM, 13'h0), 0, 0, q); ok(q == 16'hFFFF, "config read", M_CFG_RD);
    vme(va(2'b10, SUB_SUM, 13'h0), 1, 16'h1111, q);
    ok(cfg_hits[0] == 0, "sum config masked", M_CFG_WR);
    wreg(SUB_CPLD, CPLD_CFG_MASK, 16'h0001);
    vme(va(2'b10, SUB_SUM, 13'h0), 1, 16'h2222, q);
    ok(cfg_hits[0] == 1 && cfg_last == 16'h2222, "sum config write", M_CFG_WR);
    wreg(SUB_SUM, SUM_CFG_MASK, 16'h0050);           // input R and T
    vme(va(2'b10, 4'hC, 13'h0), 1, 16'h3333, q);
    ok(cfg_hits[2] == 1 && cfg_hits[4] == 1 && cfg_hits[3] == 0 && cfg_hits[5] == 0, "input config write", M_CFG_WR);
    wreg(SUB_CPLD, CPLD_FPGA_RESET, 16'h0001);
    wreg(SUB_SUM, SUM_FPGA_RESET, 16'h0081);
    repeat (30) @(negedge clk);
    ok(prog_cycles[0] == 16 && prog_cycles[1] == 16 && prog_cycles[5] == 16 && prog_cycles[2] == 0, "prog pulses", M_PROG);

    // ---- TTCrx over I2C ----
    wreg(SUB_SUM, SUM_TTC_CONTROL, 16'h2000 | (16'd3 << 8) | 16'hA5);
    do rreg(SUB_SUM, SUM_TTC_STATUS, q); while (q[13]);
    ok(chip.regs[3] == 8'hA5 && !q[14], "ttcrx write", M_I2C);
    wreg(SUB_SUM, SUM_TTC_CONTROL, (16'd3 << 8));
    do rreg(SUB_SUM, SUM_TTC_STATUS, q); while (q[13]);
    ok(q == 16'h00A5, "ttcrx read", M_I2C);

    // ---- L1A, read request, slices ----
    wreg(SUB_SUM, SUM_RR_DELAY, 16'd20);
    wreg(SUB_SUM, SUM_ROC_SLICE, 16'd4);
    n0 = slice_cnt;
    @(negedge clk) ttc_l1a = 1; @(negedge clk) ttc_l1a = 0;
    tq = 1;
    while (!read_request && tq < 200) begin @(negedge clk); tq++; end
    ok(tq == 21, $sformatf("read request latency %0d", tq), M_RR);
    repeat (10) @(negedge clk);
    ok(slice_cnt - n0 == 4, "slices", M_SLICE);
    wreg(SUB_SUM, SUM_PULSE, 16'h0400);              // simulated L1A
    repeat (40) @(negedge clk);
    ok(rr_cnt == 2 && slice_cnt - n0 == 8, "simulated L1A", M_RR);

    // ---- bunch counter ----
    wreg(SUB_SUM, SUM_BC_PRESET, 16'd3000);
    @(negedge clk) ttc_bc_reset = 1; @(negedge clk) ttc_bc_reset = 0;
    ok(bcid == 12'd3000, "bc preset", M_BC);
    repeat (600) @(negedge clk);
    ok(bcid == 12'(3600 - 3564), $sformatf("bc wrap %0d", bcid), M_BC);

    // ---- energy sums: all channels 10, R ch0 x=1.0, S ch1 y=-1.0 ----
    for (int f = 0; f < 4; f++) begin
      wreg(sub_in(f), IN_THR_HIGH, 16'd0);
      for (int c = 0; c < 24; c++) lval[f][c] = 9'd10;
    end
    wreg(4'hC, chr(0, CH_MULT), 16'd1024);
    wreg(4'hD, chr(1, CH_MULT), 16'hFC00);
    repeat (8) @(negedge clk);
    ok(et_code == q_u(960) && et_par == ~(^et_code), $sformatf("et %h", et_code), M_RANGE);
    ok(ex_code == q_s(20) && ey_code == q_s(-20), $sformatf("ex %h ey %h", ex_code, ey_code), M_REG);
    // threshold: elements of 20 are cut when the low threshold is 20
    wreg(4'hC, IN_THR_LOW, 16'd20);
    repeat (8) @(negedge clk);
    ok(ex_code == 8'h00 && ey_code == q_s(-20), "low threshold cut", M_THR);
    wreg(4'hC, IN_THR_LOW, 16'd0);
    wreg(4'hE, IN_THR_HIGH, 16'd25);                 // input T contributes no Et
    repeat (8) @(negedge clk);
    ok(et_code == q_u(720), "high threshold cut", M_THR);
    wreg(4'hE, IN_THR_HIGH, 16'd0);
    wreg(4'hC, chr(0, CH_CONTROL), 16'h0008);        // mask R channel 0 -> Ex 10
    repeat (8) @(negedge clk);
    ok(ex_code == q_s(10) && et_code == q_u(950), "mask", M_MASK);
    wreg(4'hC, chr(0, CH_CONTROL), 16'h0000);
    // saturation
    for (int f = 0; f < 4; f++) for (int c = 0; c < 24; c++) lval[f][c] = 9'd511;
    repeat (8) @(negedge clk);
    ok(et_code == 8'hFF && ex_code == q_s(1022) && ey_code == q_s(-1022), "saturation", M_SAT);
    for (int f = 0; f < 4; f++) for (int c = 0; c < 24; c++) lval[f][c] = 9'd0;

    // ---- channel delay: a step on R ch0 reaches Ex 3 ticks later with delay 3 ----
    wreg(4'hC, chr(0, CH_CONTROL), 16'h0006);
    repeat (8) @(negedge clk);
    @(negedge clk) lval[0][0] = 9'd40;
    tq = 0;
    while (ex_code == 8'h00 && tq < 20) begin @(negedge clk); tq++; end
    ok(tq == 9, $sformatf("delay 3 step after %0d", tq), M_DELAY);
    wreg(4'hC, chr(0, CH_CONTROL), 16'h0000);
    @(negedge clk) lval[0][0] = 9'd0;
    repeat (8) @(negedge clk);
    @(negedge clk) lval[0][0] = 9'd40;
    tq = 0;
    while (ex_code == 8'h00 && tq < 20) begin @(negedge clk); tq++; end
    ok(tq == 6, $sformatf("delay 0 step after %0d", tq), M_DELAY);
    lval[0][0] = 9'd0;

    // ---- Sum spy memory: capture after a short broadcast ----
    wreg(SUB_SUM, SUM_CONTROL, 16'h0010);
    @(negedge clk) ttc_sbc = 1; @(negedge clk) ttc_sbc = 0;
    ok(1'b1, "short broadcast", M_SBC);
    for (int s = 1; s <= 6; s++) begin
      @(negedge clk) lval[1][2] = 9'(s * 50);      // S element 1, y coefficient 0, Et only
    end
    repeat (6) @(negedge clk);
    wreg(SUB_SUM, SUM_CONTROL, 16'h0000);
    wreg(SUB_SUM, SUM_SPY_ET_RST, 16'h0001);
    begin
      int nmatch; int s; nmatch = 0; s = 1;
      for (int k = 0; k < 24; k++) begin
        rreg(SUB_SUM, SUM_SPY_ET, q);
        if (s <= 6 && q[7:0] == q_u(s * 50)) begin
          nmatch++; s++;
          ok(q[8] == ~(^q[7:0]), "spy parity", M_SUM_SPY);
        end
      end
      ok(nmatch == 6, $sformatf("sum spy sequence %0d", nmatch), M_SUM_SPY);
    end
    lval[1][2] = 9'd0;

    // ---- Input FPGA U: playback of VME-written pattern ----
    wreg(4'hF, chr(4, CH_MULT), 16'd1024);            // U element 2, x = 1.0
    wreg(4'hF, IN_PLAYSPY_RST, 16'h0001);
    for (int d = 0; d < 4; d++)
      for (int c = 0; c < 24; c++)
        wreg(4'hF, IN_PLAYSPY, 16'(w((c == 4) ? 9'(d * 30 + 5) : 9'd0, 1'b1)));
    wreg(4'hF, IN_CONTROL, 16'h0001);
    wreg(SUB_SUM, SUM_PULSE, 16'h0002);               // simulated short broadcast
    begin
      int got [$];
      repeat (12) begin @(negedge clk); if (ex_code != 0) got.push_back(ex_code); end
      ok(got.size() >= 4 && got[0] == q_s(5) && got[1] == q_s(35) && got[2] == q_s(65) && got[3] == q_s(95),
         $sformatf("playback sequence (%0d codes)", got.size()), M_PLAY);
    end
    wreg(4'hF, IN_CONTROL, 16'h0000);

    // ---- Input FPGA S: spy of ramp data, monitoring counters ----
    lmode = 1;
    repeat (10) @(negedge clk);
    wreg(4'hD, IN_PULSE, 16'h0007);
    wreg(4'hD, IN_CONTROL, 16'h0002);
    repeat (260) @(negedge clk);
    wreg(4'hD, IN_CONTROL, 16'h0000);
    rchk(4'hD, chr(7, CH_TP_ERR), 16'd0, "ramp clean", M_REG);
    wreg(4'hD, IN_PLAYSPY_RST, 16'h0001);
    begin
      logic [15:0] a, b;
      rreg(4'hD, IN_PLAYSPY, a);
      for (int k = 1; k < 24; k++) rreg(4'hD, IN_PLAYSPY, b);
      rreg(4'hD, IN_PLAYSPY, b);                      // channel 0 of the next depth
      ok(b[8:0] == 9'(a[8:0] + 1) && a[9] == ~(^a[8:0]), "input spy ramp", M_IN_SPY);
    end
    @(negedge clk) begin bad_par_f = 1; bad_par_c = 7; end
    repeat (5) @(negedge clk);
    bad_par_f = -1;
    lmode = 0;                                        // ramp stops: one test pattern error per tick
    repeat (3) @(negedge clk);
    lmode = 1;
    @(negedge clk) lnk_err[1][9] = 1;
    repeat (3) @(negedge clk) lnk_err[1][9] = 0;
    repeat (6) @(negedge clk);
    rchk(4'hD, chr(7, CH_PAR_ERR), 16'd5, "parity errors", M_PAR);
    rreg(4'hD, chr(7, CH_TP_ERR), q);
    ok(q >= 3 && q <= 5, $sformatf("test pattern errors %0d", q), M_TP);
    rchk(4'hD, chr(9, CH_LINK_ERR), 16'd2, "link transitions", M_LINK);
    wreg(4'hD, IN_PULSE, 16'h0001);
    rchk(4'hD, chr(9, CH_LINK_ERR), 16'd0, "link counter clear", M_LINK);

    // ---- report ----
    for (int i = 0; i < M_N; i++) begin
      $display("mechanism %-28s seen %0d", mname[i], seen[i]);
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", mname[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
