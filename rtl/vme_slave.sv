// vme_slave: VME64x A32 slave with D32 single cycles and MBLT block reads.
//
// The card is addressed by A31..A24 == base_addr. It answers the A32 address
// modifiers 0x09/0x0D (single cycles) and 0x08/0x0C (MBLT, the VME64 64-bit
// block transfer). Registers, decoded from A7..A2:
//   0x00  CSR, read/write: bit 0 run, bit 1 full-frame mode, bit 2 extended
//         packet mode
//   0x04  status word 0 (read only, from status0)
//   0x08  output FIFO head, bits 31..0 (no pop)
//   0x0C  output FIFO head, bits 63..32; this read pops the word
//   0x10  status word 1 (read only, from status1)
//   0x14  pixel-load address, read/write: bits 17..0 pixel, bits 25..24
//         quadrant
//   0x18  pixel-load data, write only: bits 11..6 pedestal, 5..0 threshold;
//         pulses load_wr and then advances the pixel in the load address
//   0x1C  status word 2 (read only, from status2)
// An MBLT read at any address of the card streams the output FIFO: after the
// address-acknowledge strobe, each data strobe pops one 64-bit word, bits
// 63..33 on A31..A1, bit 32 on LWORD* and bits 31..0 on D31..D0. A strobe
// that finds the FIFO empty is answered with BERR*, which ends the block.
// The specification only asks for a VME64x slave with MBLT; the register map,
// the FIFO access and the BERR termination are this design's choices.
//
// The bus is handled synchronously: AS* and DS* pass two flops. Data are
// driven one clock before DTACK* falls, and DTACK*/BERR* and the drivers are
// released as soon as DS* is seen high. At 80 MHz that is about 4 clocks from
// a strobe edge to the answer. The *_oe outputs also steer the bus
// transceivers' direction.
module vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  base_addr,
  // VME bus (after the transceivers)
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_a_i,
  input  logic        vme_lword_n_i,
  input  logic [31:0] vme_d_i,
  output logic [31:0] vme_d_o,
  output logic        vme_d_oe,
  output logic [31:1] vme_a_o,
  output logic        vme_lword_n_o,
  output logic        vme_a_oe,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  // card side
  output logic [31:0] csr,
  input  logic [31:0] status0,
  input  logic [31:0] status1,
  input  logic [31:0] status2,
  output logic [31:0] load_addr,
  output logic [11:0] load_data,
  output logic        load_wr,
  input  logic        fifo_empty,
  input  logic [63:0] fifo_data,
  output logic        fifo_rd
);

  typedef enum logic [2:0] {V_IDLE, V_SC_DS, V_SC_ACK, V_MB_ADS, V_MB_AACK,
                            V_MB_DS, V_MB_ACK, V_WAIT_AS} vstate_t;
  vstate_t     state;
  logic [1:0]  as_s;
  logic [1:0]  ds0_s, ds1_s;
  logic        as, ds_any, ds_none;
  logic [7:2]  reg_a;
  logic        wr;
  logic        dtack_pend;
  logic        sel_sc, sel_mb;

  assign as      = !as_s[1];
  assign ds_any  = !ds0_s[1] || !ds1_s[1];
  assign ds_none = ds0_s[1] && ds1_s[1];
  assign sel_sc  = (vme_a_i[31:24] == base_addr) && (vme_am == 6'h09 || vme_am == 6'h0D);
  assign sel_mb  = (vme_a_i[31:24] == base_addr) && (vme_am == 6'h08 || vme_am == 6'h0C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= '1; ds0_s <= '1; ds1_s <= '1;
      state <= V_IDLE;
      reg_a <= '0; wr <= 1'b0; dtack_pend <= 1'b0;
      vme_d_o <= '0; vme_d_oe <= 1'b0; vme_a_o <= '0; vme_lword_n_o <= 1'b1;
      vme_a_oe <= 1'b0; vme_dtack_n <= 1'b1; vme_berr_n <= 1'b1;
      csr <= '0; fifo_rd <= 1'b0;
      load_addr <= '0; load_data <= '0; load_wr <= 1'b0;
    end else begin
      as_s    <= {as_s[0], vme_as_n};
      ds0_s   <= {ds0_s[0], vme_ds_n[0]};
      ds1_s   <= {ds1_s[0], vme_ds_n[1]};
      fifo_rd <= 1'b0;
      load_wr <= 1'b0;
      if (load_wr) load_addr[17:0] <= load_addr[17:0] + 1'b1;
      if (dtack_pend) begin
        vme_dtack_n <= 1'b0;
        dtack_pend  <= 1'b0;
      end
      unique case (state)
        V_IDLE: if (as) begin
          reg_a <= vme_a_i[7:2];
          wr    <= !vme_write_n;
          if (sel_mb && vme_write_n) state <= V_MB_ADS;
          else if (sel_sc)           state <= V_SC_DS;
          else                       state <= V_WAIT_AS;
        end
        // ---- single cycle ----
        V_SC_DS: if (!as) state <= V_IDLE; else if (ds_any) begin
          if (wr) begin
            unique case (reg_a)
              6'h00:   csr <= vme_d_i;
              6'h05:   load_addr <= {6'h0, vme_d_i[25:24], 6'h0, vme_d_i[17:0]};
              6'h06: begin
                load_data <= vme_d_i[11:0];
                load_wr   <= 1'b1;
              end
              default: ;
            endcase
          end else begin
            vme_d_oe <= 1'b1;
            unique case (reg_a)
              6'h00:   vme_d_o <= csr;
              6'h01:   vme_d_o <= status0;
              6'h02:   vme_d_o <= fifo_data[31:0];
              6'h03: begin
                vme_d_o <= fifo_data[63:32];
                fifo_rd <= !fifo_empty;
              end
              6'h04:   vme_d_o <= status1;
              6'h05:   vme_d_o <= load_addr;
              6'h07:   vme_d_o <= status2;
              default: vme_d_o <= '0;
            endcase
          end
          dtack_pend <= 1'b1;
          state      <= V_SC_ACK;
        end
        V_SC_ACK: if (ds_none && !dtack_pend) begin
          vme_dtack_n <= 1'b1;
          vme_d_oe    <= 1'b0;
          state       <= V_WAIT_AS;
        end
        // ---- MBLT: address acknowledge, then 64-bit data beats ----
        V_MB_ADS: if (!as) state <= V_IDLE; else if (ds_any) begin
          dtack_pend <= 1'b1;
          state      <= V_MB_AACK;
        end
        V_MB_AACK: if (ds_none && !dtack_pend) begin
          vme_dtack_n <= 1'b1;
          state       <= V_MB_DS;
        end
        V_MB_DS: if (!as) state <= V_IDLE; else if (ds_any) begin
          if (fifo_empty) begin
            vme_berr_n <= 1'b0;
          end else begin
            vme_d_o       <= fifo_data[31:0];
            vme_a_o       <= fifo_data[63:33];
            vme_lword_n_o <= fifo_data[32];
            vme_d_oe      <= 1'b1;
            vme_a_oe      <= 1'b1;
            fifo_rd       <= 1'b1;
            dtack_pend    <= 1'b1;
          end
          state <= V_MB_ACK;
        end
        V_MB_ACK: if (ds_none && !dtack_pend) begin
          vme_dtack_n <= 1'b1;
          vme_berr_n  <= 1'b1;
          vme_d_oe    <= 1'b0;
          vme_a_oe    <= 1'b0;
          state       <= vme_berr_n ? V_MB_DS : V_WAIT_AS;
        end
        V_WAIT_AS: if (!as) state <= V_IDLE;
        default: state <= V_IDLE;
      endcase
    end
  end

  // DTACK* and BERR* are never driven together
  assert property (@(posedge clk) disable iff (!rst_n) !(!vme_dtack_n && !vme_berr_n));

endmodule
