// tb_spy_mem: captures a counting pattern for 300 clocks (wraps once),
// freezes, then reads all 256 words through the auto-incrementing port and
// compares with the last 256 captured values in capture-pointer order.
// Also checks the read pointer reset and the capture pointer reset.
module tb_spy_mem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cap_en = 0, cap_rst = 0, rd = 0, rd_ptr_rst = 0;
  logic [15:0] cap_data = '0, rd_data;
  logic [15:0] model [256];

  spy_mem #(.W(16), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(logic [15:0] exp, string what);
    @(negedge clk) rd = 1;
    @(negedge clk) rd = 0;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, rd_data, exp);
    end
  endtask

  initial begin
    int p;
    for (int i = 0; i < 256; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // power-up contents are zero
    read_check(16'h0000, "power-up");
    @(negedge clk) rd_ptr_rst = 1; @(negedge clk) rd_ptr_rst = 0;
    // capture 300 words
    p = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      cap_en   = 1;
      cap_data = 16'(i * 7 + 3);
      model[p] = cap_data;
      p = (p + 1) % 256;
    end
    @(negedge clk) cap_en = 0; cap_data = 16'hDEAD;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 256; i++) read_check(model[i], $sformatf("word %0d", i));
    // pointer wrapped back to 0
    read_check(model[0], "wrap");
    // pointer reset
    read_check(model[1], "next");
    @(negedge clk) rd_ptr_rst = 1; @(negedge clk) rd_ptr_rst = 0;
    read_check(model[0], "after reset");
    // capture pointer reset: next capture lands in word 0
    @(negedge clk) cap_rst = 1; @(negedge clk) cap_rst = 0;
    @(negedge clk) begin cap_en = 1; cap_data = 16'hBEEF; end
    @(negedge clk) begin cap_en = 0; end
    @(negedge clk) rd_ptr_rst = 1; @(negedge clk) rd_ptr_rst = 0;
    read_check(16'hBEEF, "capture reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
