// pixel_update: the per-quadrant CDS unit of the revolving pixel buffer.
//
// Each pixel's 48-bit SRAM word keeps its last three samples (fields C, D, E),
// its CDS pedestal (field B) and its noise/threshold (field A). When the A/D
// converter delivers sample N of a pixel, the word read from the SRAM is
// updated by shifting the samples one place (C -> D -> E) and storing the new
// sample in C; B and A are kept. At the same time the pedestal-subtracted
// correlated double sample is formed,
//     cds = sample_N - field C (sample N-1) - field B (pedestal),
// and the pixel is a hit when cds is above the value in field A. This
// follows the card's specification. This design's own choices: samples are
// unsigned, the pedestal is a two's-complement number, field A is compared
// directly as an unsigned threshold (strictly greater), and the reported
// 12-bit CDS is clamped to 0..4095.
//
// Purely combinational; the sampling controller registers its inputs and
// outputs around it.
module pixel_update
  import maps_daq_pkg::*;
(
  input  pix_word_t             old_word,   // word read from SRAM[pix_ID]
  input  logic [SAMPLE_W-1:0]   sample,     // new A/D sample of the same pixel
  output pix_word_t             new_word,   // word to write back
  output logic signed [CDS_W-1:0] cds_full, // unclamped pedestal-subtracted CDS
  output logic [SAMPLE_W-1:0]   cds,        // clamped to 0..4095 for the packet
  output logic                  hit         // cds above threshold
);

  always_comb begin
    new_word       = old_word;
    new_word.e     = old_word.d;
    new_word.d     = old_word.c;
    new_word.c     = sample;

    cds_full = $signed({2'b00, sample}) - $signed({2'b00, old_word.c})
             - CDS_W'($signed(old_word.ped));
    hit      = cds_full > $signed({{(CDS_W-NOISE_W){1'b0}}, old_word.noise});

    if (cds_full < 0)
      cds = '0;
    else if (cds_full > $signed(CDS_W'(2**SAMPLE_W - 1)))
      cds = '1;
    else
      cds = cds_full[SAMPLE_W-1:0];
  end

endmodule
