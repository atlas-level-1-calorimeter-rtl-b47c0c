// tb_ttc_i2c_master: the I2C master against a TTCrx register-port model.
// Writes and reads back several registers, checks the model's contents,
// the transaction length (160 quarter bits of DIV clocks), the error bit
// when the chip does not acknowledge, and the controller reset.
module tb_ttc_i2c_master;
  int checks = 0, failures = 0;
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0, soft_rst = 0, start = 0, write = 0;
  logic [4:0] subaddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic busy, error, scl_oe, sda_oe, sda_i, present = 1, slv_oe;
  logic scl_line, sda_line;

  assign scl_line = ~scl_oe;
  assign sda_line = ~(sda_oe | slv_oe);
  assign sda_i    = sda_line;

  ttc_i2c_master #(.DIV(DIV), .I2C_ID(6'h2A)) dut (.*);
  ttcrx_i2c_model #(.I2C_ID(6'h2A)) chip (.present(present), .scl(scl_line), .sda(sda_line), .sda_oe(slv_oe));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xact(bit w, logic [4:0] sa, logic [7:0] d, output int cycles);
    @(negedge clk); start = 1; write = w; subaddr = sa; wdata = d;
    @(negedge clk); start = 0; wdata = 8'hXX & 8'h00;
    cycles = 1;
    while (busy && cycles < 10000) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    logic [7:0] vals [5] = '{8'hA7, 8'h00, 8'hFF, 8'h3C, 8'h81};
    logic [4:0] sas  [5] = '{5'd5, 5'd0, 5'd31, 5'd18, 5'd9};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // read of a preset register (model holds i*3)
    xact(0, 5'd7, 8'h00, cyc);
    checks += 2;
    if (rdata !== 8'd21 || error) begin failures++; $display("FAIL preset read %h err %b", rdata, error); end
    if (cyc < 160*DIV - 4 || cyc > 160*DIV + 4) begin failures++; $display("FAIL length %0d", cyc); end
    for (int i = 0; i < 5; i++) begin
      xact(1, sas[i], vals[i], cyc);
      checks += 2;
      if (error) begin failures++; $display("FAIL write error"); end
      if (chip.regs[sas[i]] !== vals[i]) begin failures++; $display("FAIL model reg %0d = %h", sas[i], chip.regs[sas[i]]); end
    end
    for (int i = 0; i < 5; i++) begin
      xact(0, sas[i], 8'h00, cyc);
      checks++;
      if (rdata !== vals[i] || error) begin failures++; $display("FAIL read %0d: %h exp %h", sas[i], rdata, vals[i]); end
    end
    // bus released and both frames closed
    checks += 2;
    if (scl_oe || sda_oe) failures++;
    if (chip.n_start != chip.n_stop) failures++;
    // missing chip: error
    present = 0;
    xact(1, 5'd3, 8'h55, cyc);
    checks += 2;
    if (!error) begin failures++; $display("FAIL no error on NACK"); end
    if (scl_oe || sda_oe) begin failures++; $display("FAIL bus held after abort"); end
    present = 1;
    xact(0, 5'd5, 8'h00, cyc);
    checks++;
    if (error || rdata !== 8'hA7) begin failures++; $display("FAIL recovery"); end
    // controller reset in the middle of a transaction
    @(negedge clk); start = 1; write = 1; subaddr = 5'd1; wdata = 8'h11;
    @(negedge clk); start = 0;
    repeat (100) @(negedge clk);
    soft_rst = 1; @(negedge clk); soft_rst = 0;
    checks++;
    if (busy || scl_oe || sda_oe) begin failures++; $display("FAIL soft reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
