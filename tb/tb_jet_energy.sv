// tb_jet_energy: random channel energies, masks, coefficients and
// thresholds; the expected Ex, Ey, Et are computed in the testbench
// (element = EM + hadronic unless masked, strict thresholds, products
// summed and shifted right by 10 with floor rounding). Latency 2 clocks.
module tb_jet_energy;
  int checks = 0, failures = 0;
  localparam int NJE = 12;
  logic clk = 0, rst_n = 0;
  logic [8:0] ch_data [2*NJE];
  logic [2*NJE-1:0] mask = '0;
  logic signed [11:0] cx [NJE], cy [NJE];
  logic [9:0] thr_low = '0, thr_high = '0;
  logic signed [15:0] ex, ey;
  logic [13:0] et;

  jet_energy dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx, sy; int st, e;
    int ex_q [$], ey_q [$], et_q [$];
    int n_low_cut = 0, n_high_cut = 0, n_masked = 0;
    for (int c = 0; c < 2*NJE; c++) ch_data[c] = '0;
    for (int k = 0; k < NJE; k++) begin cx[k] = '0; cy[k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if (n % 50 == 0) begin
        for (int k = 0; k < NJE; k++) begin
          cx[k] = 12'(int'($urandom_range(0, 4095)) - 2048);
          cy[k] = 12'(int'($urandom_range(0, 4095)) - 2048);
        end
        thr_low  = 10'($urandom_range(0, 300));
        thr_high = 10'($urandom_range(0, 600));
        mask     = (n % 100 == 0) ? 24'($urandom) : '0;
      end
      for (int c = 0; c < 2*NJE; c++) ch_data[c] = 9'($urandom_range(0, (n % 4 == 0) ? 511 : 150));
      sx = 0; sy = 0; st = 0;
      for (int k = 0; k < NJE; k++) begin
        e = (mask[2*k] ? 0 : ch_data[2*k]) + (mask[2*k+1] ? 0 : ch_data[2*k+1]);
        if (mask[2*k] || mask[2*k+1]) n_masked++;
        if (e > thr_low) begin sx += e * cx[k]; sy += e * cy[k]; end else n_low_cut++;
        if (e > thr_high) st += e; else n_high_cut++;
      end
      ex_q.push_back(int'(sx >>> 10)); ey_q.push_back(int'(sy >>> 10)); et_q.push_back(st);
      @(negedge clk);
      if (n >= 1 && n % 50 == 0) begin void'(ex_q.pop_front()); void'(ey_q.pop_front()); void'(et_q.pop_front()); end
      else if (n >= 1) begin  // (the clock after a setting change mixes old elements with new settings)
        int a, b, c2;
        a = ex_q.pop_front(); b = ey_q.pop_front(); c2 = et_q.pop_front();
        checks += 3;
        if (ex != 16'(a)) begin failures++; if (failures < 10) $display("n %0d ex %0d exp %0d", n, ex, a); end
        if (ey != 16'(b)) begin failures++; if (failures < 10) $display("n %0d ey %0d exp %0d", n, ey, b); end
        if (et != 14'(c2)) begin failures++; if (failures < 10) $display("n %0d et %0d exp %0d", n, et, c2); end
      end
    end
    checks += 3;
    if (n_low_cut == 0 || n_high_cut == 0 || n_masked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
