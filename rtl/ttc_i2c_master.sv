// ttc_i2c_master: I2C master for the registers of the TTCrx timing receiver.
//
// The TTCrx exposes its internal registers through two I2C addresses: a
// pointer register at {I2C_ID,0} and a data register at {I2C_ID,1}. A
// transaction therefore has two I2C frames:
//   1. START, {I2C_ID,0}+W, sub-address, STOP        (select the register)
//   2. write: START, {I2C_ID,1}+W, data, STOP
//      read:  START, {I2C_ID,1}+R, data<-slave, NACK, STOP
// busy is high from `start` to the end of the last STOP. A missing
// acknowledge aborts the transaction with a STOP and sets `error`; error
// and rdata stay valid until the next start. soft_rst stops everything and
// releases the bus. Register-level function (sub-address, data, busy,
// error, reset) follows the TTC control/status registers of the module;
// the two-frame TTCrx access, the bit timing and error handling are choices
// of this design.
//
// Timing: each SCL bit has four phases of DIV clocks (100 kHz SCL at a
// 40 MHz clock with DIV = 100). The outputs are open-drain enables: 1 pulls
// the line low. Clock stretching is not supported.
module ttc_i2c_master #(
  parameter int unsigned DIV    = 100,
  parameter logic [5:0]  I2C_ID = 6'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_rst,
  input  logic       start,
  input  logic       write,
  input  logic [4:0] subaddr,
  input  logic [7:0] wdata,
  output logic       busy,
  output logic       error,
  output logic [7:0] rdata,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);
  typedef enum logic [1:0] {P_START, P_BYTE, P_STOP} prim_e;
  // step: 0 START,1 ptr addr,2 subaddr,3 STOP,4 START,5 data addr,6 data,7 STOP
  logic [2:0]  step;
  logic [1:0]  q;          // quarter of the current bit
  logic [3:0]  bitn;       // bit inside a byte frame: 0..7 data, 8 ack
  logic [$clog2(DIV)-1:0] div;
  logic        tick;
  logic        wr_q;
  logic [4:0]  sub_q;
  logic [7:0]  wdat_q, shreg;
  logic        scl, sda;   // wanted line levels (1 = released)
  prim_e       prim;
  logic        aborting;

  always_comb begin
    unique case (step)
      3'd0, 3'd4: prim = P_START;
      3'd3, 3'd7: prim = P_STOP;
      default:    prim = P_BYTE;
    endcase
  end

  // byte sent in a byte step (reads: data step sends nothing)
  logic [7:0] tx_byte;
  logic       rx_step;
  always_comb begin
    unique case (step)
      3'd1:    tx_byte = {I2C_ID, 1'b0, 1'b0};
      3'd2:    tx_byte = {3'b000, sub_q};
      3'd5:    tx_byte = {I2C_ID, 1'b1, ~wr_q};
      default: tx_byte = wdat_q;
    endcase
  end
  assign rx_step = (step == 3'd6) && !wr_q;

  assign tick   = (div == '0);
  assign scl_oe = ~scl;
  assign sda_oe = ~sda;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; error <= 1'b0; rdata <= '0;
      step <= '0; q <= '0; bitn <= '0; div <= '0;
      wr_q <= 1'b0; sub_q <= '0; wdat_q <= '0; shreg <= '0;
      scl <= 1'b1; sda <= 1'b1; aborting <= 1'b0;
    end else if (soft_rst) begin
      busy <= 1'b0; error <= 1'b0;
      step <= '0; q <= '0; bitn <= '0; div <= '0;
      scl <= 1'b1; sda <= 1'b1; aborting <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1; error <= 1'b0;
        wr_q <= write; sub_q <= subaddr; wdat_q <= wdata;
        step <= '0; q <= '0; bitn <= '0; div <= '0;
      end
    end else begin
      div <= tick ? $clog2(DIV)'(DIV - 1) : div - 1'b1;
      if (tick) begin
        q <= q + 1'b1;
        unique case (prim)
          P_START: begin
            unique case (q)
              2'd0: begin scl <= 1'b1; sda <= 1'b1; end
              2'd1: sda <= 1'b0;
              2'd2: scl <= 1'b0;
              default: step <= step + 1'b1;
            endcase
          end
          P_BYTE: begin
            unique case (q)
              2'd0: begin
                scl <= 1'b0;
                if (bitn == 4'd8) sda <= 1'b1;   // ack slot: slave acks a write, master NACKs a read
                else              sda <= rx_step ? 1'b1 : tx_byte[3'd7 - bitn[2:0]];
              end
              2'd1: scl <= 1'b1;
              2'd2: begin
                if (bitn == 4'd8) begin
                  if (!rx_step && sda_i) begin  // no acknowledge from the slave
                    error    <= 1'b1;
                    aborting <= 1'b1;
                  end
                end else if (rx_step) begin
                  shreg <= {shreg[6:0], sda_i};
                end
              end
              default: begin
                scl <= 1'b0;
                if (bitn == 4'd8) begin
                  bitn <= '0;
                  if (rx_step) rdata <= shreg;
                  // after a NACK go straight to the STOP of this frame
                  if (aborting) step <= (step < 3'd3) ? 3'd3 : 3'd7;
                  else          step <= step + 1'b1;
                end else begin
                  bitn <= bitn + 1'b1;
                end
              end
            endcase
          end
          default: begin   // P_STOP
            unique case (q)
              2'd0: begin scl <= 1'b0; sda <= 1'b0; end
              2'd1: scl <= 1'b1;
              2'd2: sda <= 1'b1;
              default: begin
                if (step == 3'd7 || aborting) begin
                  busy     <= 1'b0;
                  aborting <= 1'b0;
                  step     <= '0;
                end else begin
                  step <= step + 1'b1;
                end
              end
            endcase
          end
        endcase
      end
    end
  end

  // SDA may only change while SCL is low, except in START/STOP phases
  a_sda_stable: assert property (@(posedge clk) disable iff (!rst_n || soft_rst)
    (busy && prim == P_BYTE && scl && $past(scl) && $past(busy)) |-> $stable(sda));
endmodule
