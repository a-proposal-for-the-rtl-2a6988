// maps_daq_pkg: types and constants shared by the MAPS-DAQ FPGA logic.
//
// The sensor is a 1 Mpixel MAPS read out as four quadrants of 262144 pixels,
// each sampled by a 12-bit A/D converter at 20 MHz. Every pixel owns one
// 48-bit word in its quadrant's external synchronous SRAM; the word layout
// (fields A..E) and the 64-bit packet formats come from the card's
// specification. The exact bit boundaries of fields C, D and E are this
// design's reading: three 12-bit samples packed on 12-bit boundaries above
// the 6-bit pedestal and noise fields.
package maps_daq_pkg;

  localparam int unsigned SAMPLE_W = 12;   // A/D converter resolution
  localparam int unsigned PIX_W    = 18;   // pixel index inside a quadrant
  localparam int unsigned ADDR_W   = 20;   // pixel address in a packet: quadrant & index
  localparam int unsigned PED_W    = 6;
  localparam int unsigned NOISE_W  = 6;
  localparam int unsigned WORD_W   = 48;   // SRAM word
  localparam int unsigned CDS_W    = 14;   // signed CDS result before clamping

  // One SRAM location: E = sample N-3, D = N-2, C = N-1, B = CDS pedestal,
  // A = noise (or threshold). Packed MSB first, so field A sits in bits 5..0.
  typedef struct packed {
    logic [SAMPLE_W-1:0] e;      // 47..36
    logic [SAMPLE_W-1:0] d;      // 35..24
    logic [SAMPLE_W-1:0] c;      // 23..12
    logic [PED_W-1:0]    ped;    // 11..6  field B, two's complement
    logic [NOISE_W-1:0]  noise;  // 5..0   field A, unsigned threshold
  } pix_word_t;

  // One hit as held in a trigger's hit FIFO.
  typedef struct packed {
    logic [SAMPLE_W-1:0] samp_new;  // sample N
    logic [SAMPLE_W-1:0] samp_old; // sample N-1 (field C)
    logic [PED_W-1:0]    ped;
    logic [NOISE_W-1:0]  noise;
    logic [SAMPLE_W-1:0] cds;    // clamped pedestal-subtracted CDS
    logic [PIX_W-1:0]    pix;
  } hit_t;
  localparam int unsigned HIT_W = $bits(hit_t);

  // Packet markers in bits 63..56 (ASCII 'H' and 'T').
  localparam logic [7:0] HDR_MARK = 8'h48;
  localparam logic [7:0] TRL_MARK = 8'h54;

  function automatic logic [63:0] pkt_header(input logic [7:0] frame, input logic [15:0] event_no);
    return {HDR_MARK, 32'h0, frame, event_no};
  endfunction

  function automatic logic [63:0] pkt_trailer(input logic [31:0] hits, input logic [7:0] frame,
                                              input logic [15:0] event_no);
    return {TRL_MARK, hits, frame, event_no};
  endfunction

  // Compact mode: two hits per word. Low slot: data 31..20, address 19..0.
  // High slot: data 61..50, pixel index 49..32, quadrant number in 63..62.
  function automatic logic [31:0] compact_lo(input logic [1:0] quad, input hit_t h);
    return {h.cds, quad, h.pix};
  endfunction
  function automatic logic [31:0] compact_hi(input logic [1:0] quad, input hit_t h);
    return {quad, h.cds, h.pix};
  endfunction

  // Extended mode: one hit per word with both raw samples.
  function automatic logic [63:0] extended_word(input logic [1:0] quad, input hit_t h);
    return {8'h00, h.samp_new, h.samp_old, h.ped, h.noise, quad, h.pix};
  endfunction

endpackage
