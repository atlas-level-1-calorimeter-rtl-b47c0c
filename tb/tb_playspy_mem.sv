// tb_playspy_mem: fills part of the playback/spy memory through the VME
// port (channel first, then depth), reads it back, plays it out after a
// short broadcast, records spy data and reads that back, and checks that
// the VME pointer wraps after 24 x 256 accesses.
module tb_playspy_mem;
  int checks = 0, failures = 0;
  localparam int NCH = 24, DEPTH = 256;
  logic clk = 0, rst_n = 0, play_en = 0, spy_en = 0, sbc = 0;
  logic [9:0] spy_in [NCH], play_out [NCH];
  logic vme_rd = 0, vme_wr = 0, vme_ptr_rst = 0;
  logic [9:0] vme_wdata = '0, vme_rdata;
  logic [9:0] model [NCH][DEPTH];

  playspy_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vwr(logic [9:0] d);
    @(negedge clk) begin vme_wr = 1; vme_wdata = d; end
    @(negedge clk) vme_wr = 0;
  endtask
  task automatic vrd(output logic [9:0] q);
    @(negedge clk) vme_rd = 1;
    @(negedge clk) vme_rd = 0;
    q = vme_rdata;
  endtask
  task automatic ptr_rst();
    @(negedge clk) vme_ptr_rst = 1;
    @(negedge clk) vme_ptr_rst = 0;
  endtask
  task automatic chk(logic [9:0] got, logic [9:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; if (failures < 10) $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [9:0] q;
    for (int c = 0; c < NCH; c++) begin
      spy_in[c] = '0;
      for (int d = 0; d < DEPTH; d++) model[c][d] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. VME fill of depths 0..5, channel first
    for (int d = 0; d < 6; d++)
      for (int c = 0; c < NCH; c++) begin
        model[c][d] = 10'($urandom);
        vwr(model[c][d]);
      end
    ptr_rst();
    for (int d = 0; d < 7; d++)
      for (int c = 0; c < NCH; c++) begin
        vrd(q); chk(q, model[c][d], $sformatf("readback c%0d d%0d", c, d));
      end
    // 2. playback after short broadcast
    @(negedge clk) begin play_en = 1; sbc = 1; end
    @(negedge clk) sbc = 0;            // op pointer is 0 now
    for (int d = 0; d < 6; d++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) chk(play_out[c], model[c][d], $sformatf("play c%0d d%0d", c, d));
    end
    @(negedge clk) play_en = 0;
    // 3. spy: 10 clocks of random words after short broadcast
    @(negedge clk) begin spy_en = 1; sbc = 1; end
    @(negedge clk) sbc = 0;
    for (int d = 0; d < 10; d++) begin
      for (int c = 0; c < NCH; c++) begin spy_in[c] = 10'($urandom); model[c][d] = spy_in[c]; end
      @(negedge clk);
    end
    spy_en = 0;
    ptr_rst();
    for (int d = 0; d < 11; d++)
      for (int c = 0; c < NCH; c++) begin
        vrd(q); chk(q, model[c][d], $sformatf("spy c%0d d%0d", c, d));
      end
    // 4. pointer wraps after NCH*DEPTH accesses
    ptr_rst();
    for (int i = 0; i < NCH * DEPTH; i++) vrd(q);
    vrd(q); chk(q, model[0][0], "wrap c0 d0");
    vrd(q); chk(q, model[1][0], "wrap c1 d0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
