// acq_ctrl: sampling controller and SRAM sequencer for the four quadrants.
//
// The sensor's four quadrant outputs are sampled together, so one pixel index
// pix_ID and one SRAM address bus serve all quadrants. Each A/D sample period
// lasts DIV system clocks (20 MHz A/D clock from an 80 MHz system clock by
// default) and is split into phases:
//   phase 0        read of SRAM[pix_ID] on the common address bus, A/D
//                  samples captured at its end
//   phase 1        SRAM read data captured (one-cycle synchronous SRAM)
//   phase DIV-2    pixel_update forms the new words and the CDS results
//   phase DIV-1    write-back of the updated words; upd_valid reports the
//                  pixel update (and each quadrant's hit flag) to the trigger
//                  processors
// After pixel NPIX-1 the index wraps to 0, StartOfFrame marks pixel 0 and the
// 8-bit frame counter advances. A frame therefore takes NPIX A/D periods
// (262144 x 50 ns = 13.1 ms), as the specification states.
//
// While acquisition is stopped, cfg_wr writes a pixel's pedestal and
// threshold into one quadrant's SRAM, using that quadrant's own chip select,
// and clears the pixel's sample fields; cfg_wr is ignored while running.
//
// Full-frame mode (ff_start): recording continues until the frame that was
// being acquired at trigger time and the following one are complete. Then
// recording stops, and every SRAM location is read back and sent as three
// 64-bit words: frame N-1 (field E), frame N (field D), frame N+1 (field C),
// each word holding the 12-bit sample of quadrant q, padded to 16 bits, in
// bits 16q+15..16q. A word pair of data is issued only while out_ready says
// there is room for three words. At the end the detectors are reset
// (DetectorReset for RST_LEN clocks) and acquisition restarts at pixel 0.
// The three-frame choice, the 16-bit padding and the stop/restart follow the
// specification; word order, the phase plan, DIV and RST_LEN are this
// design's choices. The A/D daughter card is assumed to present the sample of
// the pixel addressed in the current period by the end of phase 0.
module acq_ctrl
  import maps_daq_pkg::*;
#(
  parameter int unsigned NQUAD   = 4,
  parameter int unsigned NPIX    = 262144,
  parameter int unsigned DIV     = 4,
  parameter int unsigned RST_LEN = 16,
  localparam int unsigned PW     = $clog2(NPIX)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,          // acquisition enable
  input  logic                 ff_start,     // full-frame trigger accepted (pulse)
  // loading of pedestal (field B) and threshold (field A), only while stopped
  input  logic                 cfg_wr,
  input  logic [$clog2(NQUAD)-1:0] cfg_quad,
  input  logic [PW-1:0]        cfg_pix,
  input  logic [PED_W-1:0]     cfg_ped,
  input  logic [NOISE_W-1:0]   cfg_noise,
  // daughter cards
  input  logic [SAMPLE_W-1:0]  adc_data [NQUAD],
  output logic                 adc_clk,      // A/D converter clock
  output logic                 det_clk,      // detector clock
  output logic                 det_sof,      // StartOfFrame
  output logic                 det_reset,    // DetectorReset
  // external SRAMs: common address and control, one data bus per quadrant
  output logic [PW-1:0]        sram_addr,
  output logic [NQUAD-1:0]     sram_cs_n,
  output logic                 sram_we_n,
  output logic                 sram_dq_oe,
  output logic [WORD_W-1:0]    sram_dq_o [NQUAD],
  input  logic [WORD_W-1:0]    sram_dq_i [NQUAD],
  // pixel update reports for the trigger processors
  output logic                 upd_valid,
  output logic [PW-1:0]        upd_pix,
  output logic [NQUAD-1:0]     upd_hit,
  output hit_t                 upd_info [NQUAD],
  output logic [7:0]           frame_cnt,
  output logic [PW-1:0]        cur_pix,
  // full-frame readout stream
  input  logic                 out_ready,    // room for three more words
  output logic                 ff_wr,
  output logic [63:0]          ff_data,
  output logic                 ff_busy,
  output logic                 ff_done       // pulse at the end of the restart
);

  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_FF_WAIT, S_FF_READ, S_RESTART} state_t;
  typedef enum logic [2:0] {R_ISSUE, R_WAIT, R_CAP, R_OUT} rd_t;

  state_t                     state;
  rd_t                        rstate;
  logic [$clog2(DIV)-1:0]     ph;
  logic [PW-1:0]              pix;
  logic [1:0]                 ends_seen;
  logic [$clog2(RST_LEN+1)-1:0] rst_cnt;
  logic [1:0]                 ff_word;
  logic [SAMPLE_W-1:0]        samp_r [NQUAD];
  pix_word_t                  rd_r   [NQUAD];
  pix_word_t                  nw     [NQUAD];
  logic [SAMPLE_W-1:0]        cds    [NQUAD];
  logic signed [CDS_W-1:0]    cds_full [NQUAD];
  logic [NQUAD-1:0]           hit;
  logic                       acquiring, last_pix;

  localparam logic [$clog2(DIV)-1:0] PH_LAST = ($clog2(DIV))'(DIV-1);
  localparam logic [$clog2(DIV)-1:0] PH_CALC = ($clog2(DIV))'(DIV-2);

  assign acquiring = (state == S_ACQ) || (state == S_FF_WAIT);
  assign last_pix  = (pix == PW'(NPIX-1));
  assign cur_pix   = pix;
  assign ff_busy   = (state == S_FF_WAIT) || (state == S_FF_READ) || (state == S_RESTART);

  // A/D and detector clocks: high during the first half of each period.
  assign adc_clk   = acquiring && (ph < ($clog2(DIV))'(DIV/2));
  assign det_clk   = adc_clk;
  assign det_sof   = acquiring && (pix == '0);
  assign det_reset = (state == S_IDLE) || (state == S_RESTART);

  for (genvar q = 0; q < NQUAD; q++) begin : g_upd
    pixel_update u_upd (
      .old_word (rd_r[q]),
      .sample   (samp_r[q]),
      .new_word (nw[q]),
      .cds_full (cds_full[q]),
      .cds      (cds[q]),
      .hit      (hit[q])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rstate     <= R_ISSUE;
      ph         <= '0;
      pix        <= '0;
      ends_seen  <= '0;
      rst_cnt    <= '0;
      ff_word    <= '0;
      frame_cnt  <= '0;
      sram_addr  <= '0;
      sram_cs_n  <= '1;
      sram_we_n  <= 1'b1;
      sram_dq_oe <= 1'b0;
      upd_valid  <= 1'b0;
      upd_pix    <= '0;
      upd_hit    <= '0;
      ff_wr      <= 1'b0;
      ff_data    <= '0;
      ff_done    <= 1'b0;
      for (int q = 0; q < NQUAD; q++) begin
        samp_r[q]    <= '0;
        rd_r[q]      <= '0;
        sram_dq_o[q] <= '0;
        upd_info[q]  <= '0;
      end
    end else begin
      // defaults: SRAM idle, no reports
      sram_cs_n  <= '1;
      sram_we_n  <= 1'b1;
      sram_dq_oe <= 1'b0;
      upd_valid  <= 1'b0;
      ff_wr      <= 1'b0;
      ff_done    <= 1'b0;

      unique case (state)
        S_IDLE: begin
          ph  <= '0;
          pix <= '0;
          if (cfg_wr) begin
            // one quadrant's SRAM selected by its own chip select; the
            // sample fields are cleared
            sram_addr  <= cfg_pix;
            sram_cs_n  <= ~(NQUAD'(1) << cfg_quad);
            sram_we_n  <= 1'b0;
            sram_dq_oe <= 1'b1;
            sram_dq_o[cfg_quad] <= {36'h0, cfg_ped, cfg_noise};
          end else if (run) begin
            state     <= S_ACQ;
            sram_addr <= '0;       // phase 0 of pixel 0: read
            sram_cs_n <= '0;
          end
        end

        S_ACQ, S_FF_WAIT: begin
          ph <= (ph == PH_LAST) ? '0 : ph + 1'b1;
          if (ph == '0)
            for (int q = 0; q < NQUAD; q++) samp_r[q] <= adc_data[q];
          if (ph == 1)
            for (int q = 0; q < NQUAD; q++) rd_r[q] <= sram_dq_i[q];
          if (ph == PH_CALC) begin
            // set up the write-back and report the update for phase DIV-1
            sram_addr  <= pix;
            sram_cs_n  <= '0;
            sram_we_n  <= 1'b0;
            sram_dq_oe <= 1'b1;
            upd_valid  <= 1'b1;
            upd_pix    <= pix;
            upd_hit    <= hit;
            for (int q = 0; q < NQUAD; q++) begin
              sram_dq_o[q]       <= nw[q];
              upd_info[q].samp_new <= samp_r[q];
              upd_info[q].samp_old <= rd_r[q].c;
              upd_info[q].ped    <= rd_r[q].ped;
              upd_info[q].noise  <= rd_r[q].noise;
              upd_info[q].cds    <= cds[q];
              upd_info[q].pix    <= PIX_W'(pix);
            end
          end
          if (ph == PH_LAST) begin
            pix <= last_pix ? '0 : pix + 1'b1;
            if (last_pix) frame_cnt <= frame_cnt + 1'b1;
            if (state == S_FF_WAIT && last_pix && ends_seen == 2'd1) begin
              // triggered frame and following frame complete: stop recording
              state   <= S_FF_READ;
              rstate  <= R_ISSUE;
              pix     <= '0;
            end else begin
              if (state == S_FF_WAIT && last_pix) ends_seen <= ends_seen + 1'b1;
              sram_addr <= last_pix ? '0 : pix + 1'b1;   // next pixel's read
              sram_cs_n <= '0;
            end
          end
          if (!run && ph == PH_LAST && state == S_ACQ) state <= S_IDLE;
          if (ff_start && state == S_ACQ) begin
            state     <= S_FF_WAIT;
            ends_seen <= '0;
          end
        end

        S_FF_READ: begin
          unique case (rstate)
            R_ISSUE: if (out_ready) begin
              sram_addr <= pix;
              sram_cs_n <= '0;
              rstate    <= R_WAIT;
            end
            R_WAIT: rstate <= R_CAP;
            R_CAP: begin
              for (int q = 0; q < NQUAD; q++) rd_r[q] <= sram_dq_i[q];
              ff_word <= '0;
              rstate  <= R_OUT;
            end
            R_OUT: begin
              ff_wr <= 1'b1;
              for (int q = 0; q < NQUAD; q++)
                unique case (ff_word)
                  2'd0:    ff_data[16*q +: 16] <= {4'h0, rd_r[q].e};  // frame N-1
                  2'd1:    ff_data[16*q +: 16] <= {4'h0, rd_r[q].d};  // frame N
                  default: ff_data[16*q +: 16] <= {4'h0, rd_r[q].c};  // frame N+1
                endcase
              if (ff_word == 2'd2) begin
                rstate <= R_ISSUE;
                if (last_pix) begin
                  state   <= S_RESTART;
                  rst_cnt <= '0;
                  pix     <= '0;
                end else begin
                  pix <= pix + 1'b1;
                end
              end else begin
                ff_word <= ff_word + 1'b1;
              end
            end
            default: rstate <= R_ISSUE;
          endcase
        end

        S_RESTART: begin
          ph <= '0;
          if (rst_cnt == ($clog2(RST_LEN+1))'(RST_LEN)) begin
            ff_done <= 1'b1;
            if (run) begin
              state     <= S_ACQ;
              sram_addr <= '0;
              sram_cs_n <= '0;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            rst_cnt <= rst_cnt + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DIV >= 4) else $error("acq_ctrl needs at least four clocks per A/D sample");

endmodule
