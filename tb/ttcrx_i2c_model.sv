// ttcrx_i2c_model: behavioural model of the I2C register port of a TTCrx
// timing receiver, for simulation only. It answers at two 7-bit addresses:
// {I2C_ID,0} is the pointer register (a written byte selects one of 32
// internal registers), {I2C_ID,1} is the data register (a write stores a
// byte in the selected register, a read returns it). With present = 0 it
// acknowledges nothing, as if the chip were missing. scl and sda are the
// wired-AND bus levels; sda_oe = 1 pulls SDA low.
module ttcrx_i2c_model #(
  parameter logic [5:0] I2C_ID = 6'd0
) (
  input  logic present,
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  typedef enum {IDLE, ADDR, DATA} ph_e;
  ph_e        ph = IDLE;
  int         bitcnt = 0;
  logic [7:0] shreg = '0, outbyte = '0;
  logic [4:0] ptr = '0;
  logic       tgt_data = 0, rd_mode = 0, ack = 0;
  logic [7:0] regs [32];
  int         n_start = 0, n_stop = 0;

  initial begin
    sda_oe = 0;
    for (int i = 0; i < 32; i++) regs[i] = 8'(i * 3);
  end

  always @(negedge sda) if (scl) begin ph = ADDR; bitcnt = -1;  // the START clock edge itself is not a bit
    rd_mode = 0; n_start++; end
  always @(posedge sda) if (scl) begin ph = IDLE; sda_oe = 0; n_stop++; end

  always @(posedge scl) if (ph != IDLE && bitcnt < 8 && !(ph == DATA && rd_mode))
    shreg = {shreg[6:0], sda};

  always @(negedge scl) if (ph != IDLE) begin
    bitcnt++;
    if (bitcnt == 8) begin
      ack = 0;
      if (ph == ADDR) begin
        if (present && shreg[7:2] == I2C_ID) begin
          ack = 1; tgt_data = shreg[1]; rd_mode = shreg[0];
        end
      end else if (!rd_mode) begin
        ack = present;
        if (present) begin
          if (!tgt_data) ptr = shreg[4:0];
          else           regs[ptr] = shreg;
        end
      end
      sda_oe = ack;                 // acknowledge slot (released for a read data byte)
    end else if (bitcnt == 9) begin
      bitcnt = 0;
      sda_oe = 0;
      if (ph == ADDR) begin
        if (!ack) ph = IDLE;
        else begin
          ph = DATA;
          if (rd_mode) begin outbyte = regs[ptr]; sda_oe = ~outbyte[7]; end
        end
      end else ph = IDLE;           // one data byte per frame
    end else if (ph == DATA && rd_mode) begin
      sda_oe = ~outbyte[7 - bitcnt];
    end
  end
endmodule
