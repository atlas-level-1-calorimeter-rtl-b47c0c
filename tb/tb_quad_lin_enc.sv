// tb_quad_lin_enc: checks the quad-linear encoder, signed and unsigned.
// Expected codes come from range boundaries written out by hand
// (ranges x1, x4, x16, x64 with 6-bit mantissas) on edge and random values.
module tb_quad_lin_enc;
  int checks = 0, failures = 0;
  logic [17:0] sval;  logic [7:0] scode;
  logic [15:0] uval;  logic [7:0] ucode;

  quad_lin_enc #(.IN_W(18), .SIGNED(1'b1)) dut_s (.val(sval), .code(scode));
  quad_lin_enc #(.IN_W(16), .SIGNED(1'b0)) dut_u (.val(uval), .code(ucode));

  function automatic logic [7:0] ref_s(int v);
    int m; int r;
    if (v >= -32 && v <= 31)          begin r = 0; m = v; end
    else if (v >= -128 && v <= 127)   begin r = 1; m = (v < 0) ? -((-v + 3) / 4) : v / 4; end
    else if (v >= -512 && v <= 511)   begin r = 2; m = (v < 0) ? -((-v + 15) / 16) : v / 16; end
    else if (v >= -2048 && v <= 2047) begin r = 3; m = (v < 0) ? -((-v + 63) / 64) : v / 64; end
    else begin r = 3; m = (v < 0) ? -32 : 31; end
    return {r[1:0], m[5:0]};
  endfunction
  function automatic logic [7:0] ref_u(int v);
    if (v < 64)   return {2'd0, 6'(v)};
    if (v < 256)  return {2'd1, 6'(v / 4)};
    if (v < 1024) return {2'd2, 6'(v / 16)};
    if (v < 4096) return {2'd3, 6'(v / 64)};
    return 8'hFF;
  endfunction

  task automatic chk_s(int v);
    sval = 18'(v); #1;
    checks++;
    if (scode !== ref_s(v)) begin failures++; $display("signed %0d: got %h exp %h", v, scode, ref_s(v)); end
  endtask
  task automatic chk_u(int v);
    uval = 16'(v); #1;
    checks++;
    if (ucode !== ref_u(v)) begin failures++; $display("unsigned %0d: got %h exp %h", v, ucode, ref_u(v)); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int edges[] = '{0, 1, -1, 31, 32, -32, -33, 127, 128, -128, -129, 511, 512, -512, -513,
                    2047, 2048, -2048, -2049, 100000, -100000, 131071, -131072};
    foreach (edges[i]) chk_s(edges[i]);
    foreach (edges[i]) if (edges[i] >= 0 && edges[i] < 65536) chk_u(edges[i]);
    chk_u(63); chk_u(64); chk_u(255); chk_u(256); chk_u(1023); chk_u(1024); chk_u(4095); chk_u(4096); chk_u(65535);
    repeat (2000) begin
      chk_s(int'($urandom_range(0, 8000)) - 4000);
      chk_u(int'($urandom_range(0, 6000)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
