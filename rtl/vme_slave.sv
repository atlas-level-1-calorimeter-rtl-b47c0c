// vme_slave: VME A24/D16 slave of the Jet/Energy Processor Module.
//
// The VME address is split as A23 = 1, A22..A19 = module base address,
// A18..A17 = mode (00 registers, 10 configuration), A16..A13 = FPGA
// sub-address (0 VME CPLD, 2 SystemACE, 4 Sum FPGA, 8 Jet FPGA, C..F Input
// FPGAs R..U) and A12..A1 = register address inside the FPGA. Each VME cycle
// that hits the module turns into exactly one local-bus request (one clock)
// to the selected target, or into a configuration write. Every access to the
// module's space answers with DTACK*, so the crate never sees a bus error:
// undefined sub-addresses and modes read 0, configuration space reads 0xFFFF.
//
// Timing: AS*/DS*/WRITE* are synchronised with two flip-flops. The request
// goes out on the clock after DS* is seen low, read data returns one clock
// later, and DTACK* is driven low on the clock after that. DTACK* is held
// until DS* goes high again. The register-bus format, the synchroniser and
// this handshake timing are choices of this design; the address split,
// the DTACK rule and the configuration read value follow the module's
// programming model.
module vme_slave
  import jem_pkg::*;
#(
  parameter int unsigned BASE_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BASE_W-1:0] base_addr,     // module base address switches
  // VME bus (A24/D16)
  input  logic [23:1]       vme_addr,
  input  logic              vme_as_n,
  input  logic              vme_ds_n,
  input  logic              vme_write_n,
  input  logic [15:0]       vme_din,
  output logic [15:0]       vme_dout,
  output logic              vme_dout_en,
  output logic              vme_dtack_n,
  // local register bus
  output reg_req_t          bus,
  output logic [NTGT-1:0]   tgt_sel,        // one-hot, valid with bus.req
  input  logic [15:0]       tgt_rdata [NTGT],
  // configuration download
  output logic              cfg_wr,
  output logic [1:0]        cfg_sel,        // address bits 16:15
  output logic [15:0]       cfg_wdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_ACK} state_e;
  state_e state;

  logic [1:0] as_sync, ds_sync;
  logic       as_q, ds_q;
  assign as_q = ~as_sync[1];   // 1 = strobe asserted
  assign ds_q = ~ds_sync[1];

  logic       hit;
  logic [1:0] mode;
  logic [3:0] sub;
  assign hit  = vme_addr[23] && (vme_addr[19 +: BASE_W] == base_addr);
  assign mode = vme_addr[18:17];
  assign sub  = vme_addr[16:13];

  // sub-address to target index; valid = a target exists there
  logic       sub_ok;
  tgt_e       sub_tgt;
  always_comb begin
    sub_ok  = 1'b1;
    sub_tgt = TGT_CPLD;
    unique case (sub)
      4'h0: sub_tgt = TGT_CPLD;
      4'h2: sub_tgt = TGT_ACE;
      4'h4: sub_tgt = TGT_SUM;
      4'h8: sub_tgt = TGT_JET;
      4'hC: sub_tgt = TGT_IN_R;
      4'hD: sub_tgt = TGT_IN_S;
      4'hE: sub_tgt = TGT_IN_T;
      4'hF: sub_tgt = TGT_IN_U;
      default: sub_ok = 1'b0;
    endcase
  end

  logic       rd_cfg, rd_valid;
  tgt_e       cur_tgt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync     <= 2'b11;
      ds_sync     <= 2'b11;
      state       <= S_IDLE;
      bus         <= '0;
      tgt_sel     <= '0;
      cfg_wr      <= 1'b0;
      cfg_sel     <= '0;
      cfg_wdata   <= '0;
      vme_dout    <= '0;
      vme_dout_en <= 1'b0;
      vme_dtack_n <= 1'b1;
      rd_cfg      <= 1'b0;
      rd_valid    <= 1'b0;
      cur_tgt     <= TGT_CPLD;
    end else begin
      as_sync <= {as_sync[0], vme_as_n};
      ds_sync <= {ds_sync[0], vme_ds_n};
      bus.req <= 1'b0;
      tgt_sel <= '0;
      cfg_wr  <= 1'b0;
      unique case (state)
        S_IDLE: if (as_q && ds_q && hit) begin
          bus.we    <= ~vme_write_n;
          bus.addr  <= {vme_addr[12:1], 1'b0};
          bus.wdata <= vme_din;
          rd_cfg    <= (mode == MODE_CFG);
          rd_valid  <= (mode == MODE_REGS) && sub_ok;
          cur_tgt   <= sub_tgt;
          if (mode == MODE_REGS && sub_ok) begin
            bus.req          <= 1'b1;
            tgt_sel[sub_tgt] <= 1'b1;
          end
          if (mode == MODE_CFG && !vme_write_n) begin
            cfg_wr    <= 1'b1;
            cfg_sel   <= vme_addr[16:15];
            cfg_wdata <= vme_din;
          end
          state <= S_REQ;
        end
        S_REQ:  state <= S_WAIT;        // target registers its read data
        S_WAIT: begin
          vme_dout    <= rd_cfg ? 16'hFFFF : (rd_valid ? tgt_rdata[cur_tgt] : 16'h0000);
          vme_dout_en <= ~bus.we;
          vme_dtack_n <= 1'b0;
          state       <= S_ACK;
        end
        S_ACK: if (!ds_q) begin
          vme_dtack_n <= 1'b1;
          vme_dout_en <= 1'b0;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTACK* is only asserted in the acknowledge state of a cycle
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    !vme_dtack_n |-> (state == S_ACK));
  // one local-bus target per request
  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n)
    bus.req |-> $onehot(tgt_sel));

endmodule
