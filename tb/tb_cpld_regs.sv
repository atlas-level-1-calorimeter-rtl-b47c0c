// tb_cpld_regs: reads every VME CPLD register, checks that only the
// defined CFG_MASK bit is stored, that read-only registers ignore writes,
// and that a FPGA_RESET write gives a PROG pulse of exactly PROG_TICKS
// clocks (16 here).
module tb_cpld_regs;
  import jem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sel = 0;
  reg_req_t bus = '0;
  logic [15:0] rdata;
  logic [7:0] serial = 8'h5A, revision = 8'h13;
  logic ttc_clk_ok = 1, sum_done = 0, cfg_mask, prog_sum;

  cpld_regs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [12:0] a, logic [15:0] d);
    @(negedge clk); bus = '{req: 1, we: 1, addr: a, wdata: d}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
  endtask
  task automatic rd_chk(logic [12:0] a, logic [15:0] exp);
    @(negedge clk); bus = '{req: 1, we: 0, addr: a, wdata: 0}; sel = 1;
    @(negedge clk); bus = '0; sel = 0;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL rd %h: %h exp %h", a, rdata, exp); end
  endtask

  initial begin
    int w;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rd_chk(CPLD_MOD_ID_A, 16'h0EE0);
    rd_chk(CPLD_MOD_ID_B, 16'h135A);
    rd_chk(CPLD_VERSION, 16'h0102);
    rd_chk(CPLD_STATUS, 16'h0001);
    sum_done = 1; ttc_clk_ok = 0;
    rd_chk(CPLD_STATUS, 16'h0002);
    rd_chk(CPLD_CFG_MASK, 16'h0000);
    wr(CPLD_CFG_MASK, 16'hFFFF);
    rd_chk(CPLD_CFG_MASK, 16'h0001);
    checks++; if (cfg_mask !== 1'b1) failures++;
    wr(CPLD_VERSION, 16'h1234);            // read-only: no effect
    rd_chk(CPLD_VERSION, 16'h0102);
    wr(CPLD_CFG_MASK, 16'hFFFE);
    rd_chk(CPLD_CFG_MASK, 16'h0000);
    // select low: no access
    @(negedge clk); bus = '{req: 1, we: 1, addr: CPLD_CFG_MASK, wdata: 16'h1}; sel = 0;
    @(negedge clk); bus = '0;
    rd_chk(CPLD_CFG_MASK, 16'h0000);
    // pulse register: writing 0 does nothing, writing 1 gives 16 clocks
    wr(CPLD_FPGA_RESET, 16'h0000);
    repeat (3) @(negedge clk);
    checks++; if (prog_sum !== 1'b0) failures++;
    wr(CPLD_FPGA_RESET, 16'h0001);
    w = 0;
    repeat (40) begin @(negedge clk); if (prog_sum) w++; end
    checks++;
    if (w != 16) begin failures++; $display("FAIL prog width %0d", w); end
    rd_chk(CPLD_FPGA_RESET, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
