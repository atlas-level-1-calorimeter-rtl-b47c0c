// tb_bc_counter: bunch counter counts, wraps after 3563 and loads the
// preset on BC reset; clr sets it to zero. A software model tracks the
// expected count every clock.
module tb_bc_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, bc_reset = 0;
  logic [11:0] preset = '0, bcid;
  int exp_bc;
  bit saw_wrap = 0;

  bc_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_bc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 9000; cyc++) begin
      // stimulus for this clock
      bc_reset = (cyc == 100) || (cyc == 5000) || (cyc == 7000);
      clr      = (cyc == 6000);
      preset   = (cyc == 5000) ? 12'd3560 : 12'd17;
      @(posedge clk); #1;
      if (clr)           exp_bc = 0;
      else if (bc_reset) exp_bc = preset;
      else if (exp_bc == 3563) begin exp_bc = 0; saw_wrap = 1; end
      else               exp_bc++;
      checks++;
      if (bcid != 12'(exp_bc)) begin
        failures++;
        if (failures < 10) $display("cyc %0d: bcid %0d exp %0d", cyc, bcid, exp_bc);
      end
    end
    checks++; if (!saw_wrap) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
