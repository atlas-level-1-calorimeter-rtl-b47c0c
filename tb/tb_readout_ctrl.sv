// tb_readout_ctrl: L1A -> read_request latency is delay+1 clocks for
// several delay settings, and each read request produces min(slices,5)
// slice strobes numbered 0,1,... starting one clock after read_request.
// Back-to-back requests are queued and all strobes appear.
module tb_readout_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, l1a = 0;
  logic [5:0] delay = '0;
  logic [2:0] slices = '0;
  logic read_request, slice_strobe;
  logic [2:0] slice_idx;

  readout_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // fire one L1A and check latency and slices
  task automatic one(int d, int s);
    int t_rr, n_str, exp_n;
    delay = 6'(d); slices = 3'(s);
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    t_rr = 1;                       // read_request sampled at this negedge = 1 clock after l1a
    while (!read_request && t_rr < 80) begin @(negedge clk); t_rr++; end
    check($sformatf("latency d=%0d got %0d", d, t_rr), t_rr == d + 1);
    exp_n = (s > 5) ? 5 : s;
    n_str = 0;
    @(negedge clk);
    while (slice_strobe) begin
      check("slice index", slice_idx == 3'(n_str));
      n_str++;
      @(negedge clk);
    end
    check($sformatf("slices s=%0d got %0d", s, n_str), n_str == exp_n);
    repeat (70) @(negedge clk);   // let the L1A leave the 64-stage delay line
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 1); one(1, 3); one(5, 5); one(63, 2); one(10, 7); one(2, 0); one(17, 4);
    // three L1As two clocks apart with 3 slices: 9 strobes in total
    delay = 6'd4; slices = 3'd3;
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0; @(negedge clk); l1a = 1;
    @(negedge clk); l1a = 0; @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    n = 0;
    repeat (40) begin @(negedge clk); if (slice_strobe) n++; end
    check($sformatf("queued strobes %0d", n), n == 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
