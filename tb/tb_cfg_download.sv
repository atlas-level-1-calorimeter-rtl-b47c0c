// tb_cfg_download: every combination of address bits 16:15 and the two
// configuration masks; checks which FPGA strobes fire and the data, one
// clock after the write.
module tb_cfg_download;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_wr = 0, cpld_mask = 0;
  logic [1:0] cfg_sel = '0;
  logic [15:0] cfg_wdata = '0, cfg_data;
  logic [7:0] sum_mask = '0;
  logic [5:0] cfg_strobe, exp_s;

  cfg_download dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int cm = 0; cm < 2; cm++)
        for (int sm = 0; sm < 256; sm += 1) begin
          cfg_sel = 2'(s); cpld_mask = cm[0]; sum_mask = 8'(sm);
          cfg_wdata = 16'($urandom); cfg_wr = 1;
          exp_s = '0;
          if (s == 1) exp_s[0] = cm[0];
          if (s == 2) exp_s[1] = sum_mask[0];
          if (s == 3) exp_s[5:2] = sum_mask[7:4];
          @(negedge clk);
          cfg_wr = 0;
          checks++;
          if (cfg_strobe !== exp_s || (exp_s != 0 && cfg_data !== cfg_wdata)) begin
            failures++;
            if (failures < 10) $display("sel %0d cm %0d sm %h: strobe %b exp %b", s, cm, sm, cfg_strobe, exp_s);
          end
          @(negedge clk);
          checks++;
          if (cfg_strobe !== 0) failures++;   // one strobe per write
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
