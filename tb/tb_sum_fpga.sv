// tb_sum_fpga: the Sum processor through its register bus. Checks the
// register map, configuration mask/reset/done bits, simulated L1A through
// the read-request delay and slice count, the bunch counter preset on BC
// reset, the simulated short broadcast output, TTCrx register write and
// read over I2C (against a TTCrx model), the merger output codes, and the
// two spy memories read through their auto-incrementing ports.
module tb_sum_fpga;
  import jem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sel = 0;
  reg_req_t bus = '0;
  logic [15:0] rdata;
  logic dll_locked = 1, done_jet = 1;
  logic [3:0] done_in = 4'b1010;
  logic ttc_l1a = 0, ttc_bc_reset = 0, ttc_sbc = 0;
  logic signed [15:0] ex_in [4], ey_in [4];
  logic [13:0] et_in [4];
  logic [7:0] ex_code, ey_code, et_code, cfg_mask;
  logic et_par, prog_jet, sbc_o, read_request, slice_strobe;
  logic [3:0] prog_in;
  logic [2:0] slice_idx;
  logic [11:0] bcid;
  logic i2c_scl_oe, i2c_sda_oe, i2c_sda_i, slv_oe, sda_line;

  sum_fpga #(.I2C_DIV(4), .TTCRX_I2C_ID(6'h11)) dut (.*);
  assign sda_line  = ~(i2c_sda_oe | slv_oe);
  assign i2c_sda_i = sda_line;
  ttcrx_i2c_model #(.I2C_ID(6'h11)) chip (.present(1'b1), .scl(~i2c_scl_oe), .sda(sda_line), .sda_oe(slv_oe));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
  task automatic ok(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Et quad-linear code of a value, with its parity
  function automatic logic [8:0] et_word(int v);
    logic [7:0] c;
    if (v < 64) c = {2'd0, 6'(v)}; else if (v < 256) c = {2'd1, 6'(v/4)};
    else if (v < 1024) c = {2'd2, 6'(v/16)}; else if (v < 4096) c = {2'd3, 6'(v/64)}; else c = 8'hFF;
    return {~(^c), c};
  endfunction

  function automatic logic [7:0] q_s(int v);
    int r; int m;
    if (v >= -32 && v <= 31)          begin r = 0; m = v; end
    else if (v >= -128 && v <= 127)   begin r = 1; m = $floor(real'(v) / 4.0); end
    else if (v >= -512 && v <= 511)   begin r = 2; m = $floor(real'(v) / 16.0); end
    else if (v >= -2048 && v <= 2047) begin r = 3; m = $floor(real'(v) / 64.0); end
    else begin r = 3; m = (v < 0) ? -32 : 31; end
    return {r[1:0], m[5:0]};
  endfunction

  initial begin
    logic [15:0] q;
    int tq, n, wprog;
    logic [8:0] et_hist [8];
    logic [8:0] spy_et [16];
    logic [15:0] spy_exy [16];
    int found;
    for (int i = 0; i < 4; i++) begin ex_in[i] = 0; ey_in[i] = 0; et_in[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---- register map ----
    rd_chk(SUM_VERSION, 16'h0102, "version");
    rd_chk(SUM_STATUS, 16'h0001, "dll");
    wr(SUM_CONTROL, 16'hFFFF);     rd_chk(SUM_CONTROL, 16'h0010, "control");
    wr(SUM_CONTROL, 16'h0000);
    wr(SUM_CFG_MASK, 16'hFFFF);    rd_chk(SUM_CFG_MASK, 16'h00F1, "cfg mask");
    ok(cfg_mask == 8'hF1, "cfg mask out");
    rd_chk(SUM_DONE, 16'h00A1, "done");
    wr(SUM_RR_DELAY, 16'hFFFF);    rd_chk(SUM_RR_DELAY, 16'h003F, "rr delay");
    wr(SUM_ROC_SLICE, 16'hFFFB);   rd_chk(SUM_ROC_SLICE, 16'h0003, "roc slice");
    wr(SUM_BC_PRESET, 16'hFABC);   rd_chk(SUM_BC_PRESET, 16'h0ABC, "bc preset");
    rd_chk(SUM_PULSE, 16'h0000, "pulse reads 0");
    // ---- configuration clear: jet and input T ----
    wr(SUM_FPGA_RESET, 16'h0041);
    wprog = 0;
    repeat (30) begin @(negedge clk); if (prog_jet && prog_in == 4'b0100) wprog++; end
    ok(wprog == 16, $sformatf("prog width %0d", wprog));
    // ---- L1A simulated through the pulse register ----
    wr(SUM_RR_DELAY, 16'd7);
    wr(SUM_ROC_SLICE, 16'd5);
    @(negedge clk); bus = '{req: 1, we: 1, addr: SUM_PULSE, wdata: 16'h0400}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
    tq = 1;                       // l1a (registered pulse) is high now
    while (!read_request && tq < 100) begin @(negedge clk); tq++; end
    ok(tq == 9, $sformatf("read request %0d clocks after the write", tq));
    n = 0;
    repeat (10) begin @(negedge clk); if (slice_strobe) n++; end
    ok(n == 5, $sformatf("slices %0d", n));
    // TTC L1A input path too
    wr(SUM_ROC_SLICE, 16'd2);
    @(negedge clk) ttc_l1a = 1; @(negedge clk) ttc_l1a = 0;
    n = 0;
    repeat (15) begin @(negedge clk); if (slice_strobe) n++; end
    ok(n == 2, "slices from ttc l1a");
    // ---- bunch counter ----
    @(negedge clk) ttc_bc_reset = 1; @(negedge clk) ttc_bc_reset = 0;
    ok(bcid == 12'hABC, $sformatf("bc preset %h", bcid));
    repeat (10) @(negedge clk);
    ok(bcid == 12'hABC + 10, "bc count");
    // ---- short broadcast out ----
    @(negedge clk); bus = '{req: 1, we: 1, addr: SUM_PULSE, wdata: 16'h0002}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
    ok(sbc_o == 1'b1, "sim sbc");
    @(negedge clk) ok(sbc_o == 1'b0, "sbc one clock");
    ttc_sbc = 1; #1 ok(sbc_o == 1'b1, "ttc sbc"); @(negedge clk) ttc_sbc = 0;
    // ---- TTCrx over I2C ----
    wr(SUM_TTC_CONTROL, 16'h2000 | (16'd9 << 8) | 16'h5C);     // write 0x5C to register 9
    rd_chk(SUM_TTC_STATUS, 16'h2000, "i2c busy");
    wr(SUM_TTC_CONTROL, 16'h2000 | (16'd2 << 8) | 16'h11);     // ignored while busy
    do rd(SUM_TTC_STATUS, q); while (q[13]);
    ok(q[14] == 1'b0, "i2c no error");
    ok(chip.regs[9] == 8'h5C, "ttcrx reg 9 written");
    ok(chip.regs[2] == 8'd6, "write while busy ignored");
    rd_chk(SUM_TTC_CONTROL, 16'h295C, "ttc control readback");
    wr(SUM_TTC_CONTROL, (16'd4 << 8));                          // read register 4 (model: 12)
    do rd(SUM_TTC_STATUS, q); while (q[13]);
    ok(q == 16'h000C, $sformatf("ttcrx read %h", q));
    // ---- merger output and spy memories ----
    wr(SUM_CONTROL, 16'h0010);
    @(negedge clk); bus = '{req: 1, we: 1, addr: SUM_PULSE, wdata: 16'h0002}; sel = 1;  // capture pointer to 0
    @(negedge clk); bus = '0; sel = 0;
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 4; i++) begin ex_in[i] = 16'(s * 10 - 20); ey_in[i] = 16'(-s); et_in[i] = 14'(s * 100 + i); end
      et_hist[s] = et_word(s * 400 + 6);
      @(negedge clk);
    end
    wr(SUM_CONTROL, 16'h0000);
    ok(et_code == et_hist[7][7:0] && et_par == et_hist[7][8], "merger et");
    ok(ex_code == q_s(200), $sformatf("merger ex %h", ex_code));   // 4 x 50
    // read 16 words of each spy memory and find the 8 captured ticks
    wr(SUM_SPY_ET_RST, 16'h0001);
    wr(SUM_SPY_EXY_RST, 16'h0001);
    for (int k = 0; k < 16; k++) begin rd(SUM_SPY_ET, q); spy_et[k] = q[8:0]; end
    for (int k = 0; k < 16; k++) begin rd(SUM_SPY_EXY, q); spy_exy[k] = q; end
    found = -1;
    for (int j = 0; j < 8; j++) begin
      bit all; all = 1;
      for (int s = 0; s < 8; s++) if (spy_et[j + s] != et_hist[s]) all = 0;
      if (all && found < 0) found = j;
    end
    ok(found >= 0 && found <= 3, $sformatf("spy et sequence at %0d", found));
    if (found >= 0)
      for (int s = 0; s < 8; s++)
        ok(spy_exy[found + s] == {q_s(-4 * s), q_s(40 * s - 80)}, $sformatf("spy exy %0d: %h", s, spy_exy[found + s]));
    // ---- module reset clears the bunch counter ----
    wr(SUM_PULSE, 16'h0001);
    repeat (2) @(negedge clk);
    ok(bcid < 12'd3, $sformatf("module reset %0d", bcid));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
