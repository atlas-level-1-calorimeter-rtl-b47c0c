// tb_vme_slave: VME cycles against the slave with simple register models
// behind each target. Checks address decode (base address, mode,
// sub-address, register address), one local request per cycle, DTACK*
// on every access in the module's space (also undefined sub-addresses and
// modes), no DTACK* outside it, configuration writes and the 0xFFFF
// configuration read value, and the DTACK* latency (5 clocks from DS*).
module tb_vme_slave;
  import jem_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [3:0] base_addr = 4'hA;
  logic [23:1] vme_addr = '0;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1;
  logic [15:0] vme_din = '0, vme_dout;
  logic vme_dout_en, vme_dtack_n;
  reg_req_t bus;
  logic [NTGT-1:0] tgt_sel;
  logic [15:0] tgt_rdata [NTGT];
  logic cfg_wr;
  logic [1:0] cfg_sel;
  logic [15:0] cfg_wdata;
  int nreq = 0, ncfg = 0;
  logic [1:0] last_cfg_sel;
  logic [15:0] last_cfg_data;

  vme_slave dut (.*);
  always #12.5 clk = ~clk;

  // target models: registered read data = {target index, addr[11:0]} xor last write
  logic [15:0] store [NTGT];
  initial for (int t = 0; t < NTGT; t++) store[t] = '0;
  always @(posedge clk) begin
    if (bus.req) begin
      nreq++;
      for (int t = 0; t < NTGT; t++)
        if (tgt_sel[t]) begin
          if (bus.we) store[t] <= bus.wdata ^ {4'(t), bus.addr[12:1]};
          tgt_rdata[t] <= store[t] ^ {4'(t), bus.addr[12:1]};
        end
    end
    if (cfg_wr) begin ncfg++; last_cfg_sel <= cfg_sel; last_cfg_data <= cfg_wdata; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:1] mk(logic [3:0] base, logic [1:0] mode, logic [3:0] sub, logic [12:0] reg_a);
    return {1'b1, base, mode, sub, reg_a[12:1]};
  endfunction

  // one VME cycle; returns read data and whether DTACK came
  task automatic cycle(logic [23:1] a, bit write, logic [15:0] d, output logic [15:0] q, output bit acked, output int lat);
    int t;
    @(negedge clk);
    vme_addr = a; vme_write_n = ~write; vme_din = d; vme_as_n = 0;
    @(negedge clk); vme_ds_n = 0;
    t = 0; acked = 0;
    while (t < 40 && !acked) begin @(negedge clk); t++; if (!vme_dtack_n) acked = 1; end
    lat = t; q = vme_dout;
    if (acked) begin
      checks++;
      if (!write && !vme_dout_en) begin failures++; $display("FAIL dout_en"); end
    end
    vme_ds_n = 1; vme_as_n = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (!vme_dtack_n) begin failures++; $display("FAIL dtack held"); end
  endtask

  task automatic expect_rd(logic [23:1] a, logic [15:0] exp, string what);
    logic [15:0] q; bit ack; int lat;
    cycle(a, 0, 0, q, ack, lat);
    checks += 3;
    if (!ack) begin failures++; $display("FAIL %s: no dtack", what); end
    if (q !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, q, exp); end
    if (lat != 5) begin failures++; $display("FAIL %s: latency %0d", what, lat); end
  endtask

  initial begin
    logic [15:0] q; bit ack; int lat, n0;
    logic [3:0] subs [8] = '{4'h0, 4'h2, 4'h4, 4'h8, 4'hC, 4'hD, 4'hE, 4'hF};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // write then read each target at a few register addresses
    for (int t = 0; t < 8; t++) begin
      for (int k = 0; k < 3; k++) begin
        logic [12:0] ra;
        logic [15:0] d;
        ra = 13'({$urandom_range(0, 4095), 1'b0});
        d  = 16'($urandom);
        n0 = nreq;
        cycle(mk(base_addr, 2'b00, subs[t], ra), 1, d, q, ack, lat);
        checks += 2;
        if (!ack) begin failures++; $display("FAIL write ack t%0d", t); end
        if (nreq != n0 + 1) begin failures++; $display("FAIL request count"); end
        // model stored d ^ {t,ra}; read returns store ^ {t,ra} = d
        expect_rd(mk(base_addr, 2'b00, subs[t], ra), d, $sformatf("target %0d", t));
      end
    end
    // undefined sub-address: DTACK, reads 0, no local request
    n0 = nreq;
    expect_rd(mk(base_addr, 2'b00, 4'h1, 13'h10), 16'h0000, "undefined sub");
    expect_rd(mk(base_addr, 2'b01, 4'h4, 13'h10), 16'h0000, "undefined mode");
    checks++; if (nreq != n0) begin failures++; $display("FAIL request on undefined"); end
    // configuration space
    expect_rd(mk(base_addr, 2'b10, 4'hC, 13'h0), 16'hFFFF, "config read");
    n0 = ncfg;
    cycle(mk(base_addr, 2'b10, 4'hC, 13'h0), 1, 16'hC0DE, q, ack, lat);
    checks += 3;
    if (!ack) failures++;
    if (ncfg != n0 + 1) begin failures++; $display("FAIL cfg count"); end
    if (last_cfg_sel !== 2'b11 || last_cfg_data !== 16'hC0DE) begin failures++; $display("FAIL cfg data"); end
    cycle(mk(base_addr, 2'b10, 4'h4, 13'h0), 1, 16'h1111, q, ack, lat);
    checks++; if (last_cfg_sel !== 2'b01) failures++;
    // other base address, and A23 = 0: no DTACK, no request
    n0 = nreq;
    cycle(mk(4'h3, 2'b00, 4'h4, 13'h0), 0, 0, q, ack, lat);
    checks++; if (ack) begin failures++; $display("FAIL foreign base acked"); end
    cycle({1'b0, base_addr, 2'b00, 4'h4, 12'h0}, 0, 0, q, ack, lat);
    checks += 2; if (ack) failures++;
    if (nreq != n0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
