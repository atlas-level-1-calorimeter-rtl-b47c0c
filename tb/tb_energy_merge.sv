// tb_energy_merge: random partial sums from four inputs; the expected
// codes are computed in the testbench (sum, then quad-linear ranges written
// out explicitly, then odd parity) and compared one clock later.
module tb_energy_merge;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] ex_in [4], ey_in [4];
  logic [13:0] et_in [4];
  logic [7:0] ex_code, ey_code, et_code;
  logic et_par;

  energy_merge dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] q_s(int v);
    int r; int m;
    if (v >= -32 && v <= 31)          begin r = 0; m = v; end
    else if (v >= -128 && v <= 127)   begin r = 1; m = $floor(real'(v) / 4.0); end
    else if (v >= -512 && v <= 511)   begin r = 2; m = $floor(real'(v) / 16.0); end
    else if (v >= -2048 && v <= 2047) begin r = 3; m = $floor(real'(v) / 64.0); end
    else begin r = 3; m = (v < 0) ? -32 : 31; end
    return {r[1:0], m[5:0]};
  endfunction
  function automatic logic [7:0] q_u(int v);
    if (v < 64)   return {2'd0, 6'(v)};
    if (v < 256)  return {2'd1, 6'(v / 4)};
    if (v < 1024) return {2'd2, 6'(v / 16)};
    if (v < 4096) return {2'd3, 6'(v / 64)};
    return 8'hFF;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sx, sy, st, ones, scale;
    logic [7:0] ecx, ecy, ect;
    for (int i = 0; i < 4; i++) begin ex_in[i] = 0; ey_in[i] = 0; et_in[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      scale = (n % 3 == 0) ? 20 : (n % 3 == 1) ? 400 : 5000;
      sx = 0; sy = 0; st = 0;
      for (int i = 0; i < 4; i++) begin
        ex_in[i] = 16'(int'($urandom_range(0, 2*scale)) - scale);
        ey_in[i] = 16'(int'($urandom_range(0, 2*scale)) - scale);
        et_in[i] = 14'($urandom_range(0, scale));
        sx += ex_in[i]; sy += ey_in[i]; st += et_in[i];
      end
      ecx = q_s(sx); ecy = q_s(sy); ect = q_u(st);
      @(negedge clk);
      ones = $countones({et_par, et_code});
      checks += 4;
      if (ex_code !== ecx) begin failures++; $display("ex %0d: %h exp %h", sx, ex_code, ecx); end
      if (ey_code !== ecy) begin failures++; $display("ey %0d: %h exp %h", sy, ey_code, ecy); end
      if (et_code !== ect) begin failures++; $display("et %0d: %h exp %h", st, et_code, ect); end
      if (ones % 2 != 1)   begin failures++; $display("parity"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
