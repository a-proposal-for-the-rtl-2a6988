// maps_daq_top: FPGA logic of the MAPS-DAQ VME card for a four-output MAPS.
//
// The card samples the four quadrant outputs of a 1 Mpixel sensor at 20 MHz
// and keeps, for every pixel, a 48-bit word in one of four external 256k x 48
// synchronous SRAMs that share one address bus: the last three samples, a CDS
// pedestal and a noise threshold. acq_ctrl walks through the frame and does a
// read-modify-write of each pixel's word per A/D period; pixel_update forms
// the pedestal-subtracted correlated double sample on the way.
//
// Zero-suppressed mode (CSR bit 1 = 0): a trigger from the trigger bus
// (trigger_if) starts one of NPROC trigger processors (trigger_proc). During
// the following NPIX pixel updates it stores every hit (CDS above threshold)
// of each quadrant in its own hit FIFO, without stopping acquisition. From
// the trigger on, packet_builder turns that processor's hits into a header,
// compact or extended data words and, once the scan is over, a trailer, and
// writes them to the output FIFO; packets leave in trigger order.
//
// Full-frame mode (CSR bit 1 = 1): a trigger makes acq_ctrl
// finish the triggered and the next frame, stop recording, and send the three
// stored frames of all pixels to the output FIFO before restarting the
// detectors. The VME64x slave (vme_slave) gives access to the CSR, the status
// words and the output FIFO, with MBLT for the data.
//
// Status word 0: bit 0 BUSY, bit 1 XOFF, bit 2 full-frame readout running,
// bits 15..8 frame counter, bits 31..16 output FIFO occupancy.
// Status word 1: bits 15..0 triggers refused, bits 31..16 hits lost to full
// hit FIFOs. Status word 2: triggers accepted. While run is off, pedestals
// and thresholds are written pixel by pixel into the SRAMs through the VME
// pixel-load registers. The tap_* outputs present every pixel update's new
// samples, for the on-board processor that computes pedestals and noise.
//
// The register map, the FIFO sizes, NPROC and the 4-clock A/D period are
// this design's choices; the data formats, the CDS rule and the trigger
// handshake follow the card's specification. CSR mode bits should be
// changed only while BUSY is low.
//
// External parts (SRAMs, A/D daughter cards, trigger bus, VME transceivers)
// connect through the ports; bidirectional buses are split into in, out and
// output-enable.
module maps_daq_top
  import maps_daq_pkg::*;
#(
  parameter int unsigned NQUAD     = 4,
  parameter int unsigned NPIX      = 262144,
  parameter int unsigned DIV       = 4,
  parameter int unsigned NPROC     = 2,
  parameter int unsigned HIT_DEPTH = 1024,
  parameter int unsigned OUT_DEPTH = 2048,
  localparam int unsigned PW       = $clog2(NPIX),
  localparam int unsigned OAW      = $clog2(OUT_DEPTH),
  localparam int unsigned HAW      = $clog2(HIT_DEPTH),
  localparam int unsigned SPW      = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic                 clk,          // system clock, DIV x A/D rate
  input  logic                 rst_n,
  // daughter cards and detector control
  input  logic [SAMPLE_W-1:0]  adc_data [NQUAD],
  output logic                 adc_clk,
  output logic                 det_clk,
  output logic                 det_sof,
  output logic                 det_reset,
  // pixel SRAMs
  output logic [PW-1:0]        sram_addr,
  output logic [NQUAD-1:0]     sram_cs_n,
  output logic                 sram_we_n,
  output logic                 sram_dq_oe,
  output logic [WORD_W-1:0]    sram_dq_o [NQUAD],
  input  logic [WORD_W-1:0]    sram_dq_i [NQUAD],
  // trigger bus
  input  logic                 trig_strobe,
  input  logic [15:0]          trig_num,
  output logic                 trig_busy,
  output logic                 trig_xoff,
  // VME bus
  input  logic [7:0]           base_addr,
  input  logic                 vme_as_n,
  input  logic [1:0]           vme_ds_n,
  input  logic                 vme_write_n,
  input  logic [5:0]           vme_am,
  input  logic [31:1]          vme_a_i,
  input  logic                 vme_lword_n_i,
  input  logic [31:0]          vme_d_i,
  output logic [31:0]          vme_d_o,
  output logic                 vme_d_oe,
  output logic [31:1]          vme_a_o,
  output logic                 vme_lword_n_o,
  output logic                 vme_a_oe,
  output logic                 vme_dtack_n,
  output logic                 vme_berr_n,
  // sample tap for the on-board processor's pedestal and noise calculation
  output logic                 tap_valid,
  output logic [PW-1:0]        tap_pix,
  output logic [SAMPLE_W-1:0]  tap_sample [NQUAD]
);

  // ---------------- control ----------------
  logic [31:0] csr, status0, status1, status2, load_addr;
  logic [11:0] load_data;
  logic        load_wr;
  logic        run, full_mode, extended;
  assign run       = csr[0];
  assign full_mode = csr[1];
  assign extended  = csr[2];

  // ---------------- acquisition ----------------
  logic             upd_valid;
  logic [PW-1:0]    upd_pix, cur_pix;
  logic [NQUAD-1:0] upd_hit;
  hit_t             upd_info [NQUAD];
  logic [7:0]       frame_cnt;
  logic             ff_start, ff_wr, ff_busy, ff_done;
  logic [63:0]      ff_data;
  logic             out_ready;

  acq_ctrl #(.NQUAD(NQUAD), .NPIX(NPIX), .DIV(DIV)) u_acq (
    .clk, .rst_n, .run, .ff_start,
    .cfg_wr(load_wr), .cfg_quad(load_addr[24 +: $clog2(NQUAD)]), .cfg_pix(load_addr[PW-1:0]),
    .cfg_ped(load_data[11:6]), .cfg_noise(load_data[5:0]),
    .adc_data, .adc_clk, .det_clk, .det_sof, .det_reset,
    .sram_addr, .sram_cs_n, .sram_we_n, .sram_dq_oe, .sram_dq_o, .sram_dq_i,
    .upd_valid, .upd_pix, .upd_hit, .upd_info, .frame_cnt, .cur_pix,
    .out_ready, .ff_wr, .ff_data, .ff_busy, .ff_done
  );

  // ---------------- trigger ----------------
  logic [NPROC-1:0] proc_busy, proc_start, proc_ready, proc_store, pkt_done;
  logic [15:0]      event_no, lost_trig;
  logic [31:0]      trig_count;
  logic [15:0]      p_event [NPROC];
  logic [7:0]       p_frame [NPROC];
  logic [PW-1:0]    p_pix   [NPROC];

  trigger_if #(.NPROC(NPROC)) u_trig (
    .clk, .rst_n, .run, .full_mode,
    .trig_strobe, .trig_num, .trig_busy, .trig_xoff,
    .proc_busy, .proc_start, .event_no,
    .ff_busy, .ff_start, .trig_count, .lost_count(lost_trig)
  );

  // ---------------- trigger processors and hit FIFOs ----------------
  logic [NQUAD-1:0] h_empty [NPROC];
  logic [NQUAD-1:0] h_full  [NPROC];
  logic [NQUAD-1:0] h_rd    [NPROC];
  hit_t             h_data  [NPROC][NQUAD];
  logic [15:0]      lost_hits;
  logic [$clog2(NPROC*NQUAD+1)-1:0] n_lost;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    trigger_proc #(.NPIX(NPIX)) u_proc (
      .clk, .rst_n,
      .start(proc_start[p]), .event_in(event_no), .frame_in(frame_cnt),
      .upd_valid, .upd_pix, .pkt_done(pkt_done[p]),
      .busy(proc_busy[p]), .store(proc_store[p]), .ready(proc_ready[p]),
      .event_no(p_event[p]), .frame_no(p_frame[p]), .pix_trig(p_pix[p])
    );
    for (genvar q = 0; q < NQUAD; q++) begin : g_quad
      logic [HAW:0] cnt;
      sync_fifo #(.WIDTH(HIT_W), .DEPTH(HIT_DEPTH)) u_hits (
        .clk, .rst_n, .clear(1'b0),
        .wr_en(proc_store[p] && upd_hit[q]), .wr_data(upd_info[q]),
        .rd_en(h_rd[p][q]), .rd_data(h_data[p][q]),
        .empty(h_empty[p][q]), .full(h_full[p][q]), .count(cnt)
      );
    end
  end

  always_comb begin
    n_lost = '0;
    for (int p = 0; p < NPROC; p++)
      for (int q = 0; q < NQUAD; q++)
        n_lost += ($clog2(NPROC*NQUAD+1))'(proc_store[p] && upd_hit[q] && h_full[p][q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lost_hits <= '0;
    else        lost_hits <= lost_hits + 16'(n_lost);
  end

  // ---------------- packet building, in trigger order ----------------
  logic [SPW-1:0]   srv;
  logic             pb_start, pb_busy, pb_done, pb_wr;
  logic [63:0]      pb_data;
  logic [NQUAD-1:0] pb_rd;
  hit_t             pb_hit [NQUAD];

  assign pb_start = proc_busy[srv] && !pb_busy && !pb_done;

  always_comb begin
    pkt_done = '0;
    pkt_done[srv] = pb_done;
    for (int p = 0; p < NPROC; p++) h_rd[p] = (SPW'(p) == srv) ? pb_rd : '0;
  end
  assign pb_hit = h_data[srv];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       srv <= '0;
    else if (pb_done) srv <= (srv == SPW'(NPROC-1)) ? '0 : srv + 1'b1;
  end

  packet_builder #(.NQUAD(NQUAD)) u_pb (
    .clk, .rst_n, .start(pb_start), .scan_done(proc_ready[srv]), .extended,
    .event_no(p_event[srv]), .frame_no(p_frame[srv]),
    .hit_empty(h_empty[srv]), .hit_data(pb_hit), .hit_rd(pb_rd),
    .out_ready, .out_wr(pb_wr), .out_data(pb_data), .busy(pb_busy), .done(pb_done)
  );

  // ---------------- output FIFO ----------------
  logic          of_empty, of_full, of_rd;
  logic [63:0]   of_data;
  logic [OAW:0]  of_count;

  assign out_ready = ((OAW+1)'(OUT_DEPTH) - of_count) >= (OAW+1)'(8);

  sync_fifo #(.WIDTH(64), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(pb_wr || ff_wr), .wr_data(ff_wr ? ff_data : pb_data),
    .rd_en(of_rd), .rd_data(of_data),
    .empty(of_empty), .full(of_full), .count(of_count)
  );

  // ---------------- VME ----------------
  assign status0 = {16'(of_count),
                    frame_cnt, 5'd0, ff_busy, trig_xoff, trig_busy};
  assign status1 = {lost_hits, lost_trig};
  assign status2 = trig_count;

  // every pixel update is offered to the processor with its new samples
  assign tap_valid = upd_valid;
  assign tap_pix   = upd_pix;
  for (genvar q = 0; q < NQUAD; q++) begin : g_tap
    assign tap_sample[q] = upd_info[q].samp_new;
  end

  vme_slave u_vme (
    .clk, .rst_n, .base_addr,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_a_i, .vme_lword_n_i, .vme_d_i,
    .vme_d_o, .vme_d_oe, .vme_a_o, .vme_lword_n_o, .vme_a_oe, .vme_dtack_n, .vme_berr_n,
    .csr, .status0, .status1, .status2, .load_addr, .load_data, .load_wr,
    .fifo_empty(of_empty), .fifo_data(of_data), .fifo_rd(of_rd)
  );

  // packet and full-frame words never collide in the output FIFO
  assert property (@(posedge clk) disable iff (!rst_n) !(pb_wr && ff_wr));
  assert property (@(posedge clk) disable iff (!rst_n) !((pb_wr || ff_wr) && of_full));

endmodule
