// tb_pixel_update: checks the CDS unit on random SRAM words and samples.
// The expected word, CDS and hit flag are computed with plain integers.
module tb_pixel_update;
  import maps_daq_pkg::*;
  pix_word_t old_word, new_word;
  logic [11:0] sample, cds;
  logic signed [CDS_W-1:0] cds_full;
  logic hit;
  int checks = 0, failures = 0;
  int nhit = 0;

  pixel_update dut (.old_word, .sample, .new_word, .cds_full, .cds, .hit);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int e, d, c, ped, noise, s, exp_cds, exp_clamped;
      bit exp_hit;
      logic [47:0] exp_word;
      e = $urandom_range(0, 4095); d = $urandom_range(0, 4095);
      c = $urandom_range(0, 4095); s = $urandom_range(0, 4095);
      if (i % 3 == 0) s = (c + $urandom_range(0, 80)) % 4096;   // near threshold
      ped = $urandom_range(0, 63); noise = $urandom_range(0, 63);
      old_word = pix_word_t'({e[11:0], d[11:0], c[11:0], ped[5:0], noise[5:0]});
      sample = s[11:0];
      #1;
      exp_word = {d[11:0], c[11:0], s[11:0], ped[5:0], noise[5:0]};
      exp_cds  = s - c - ((ped >= 32) ? ped - 64 : ped);
      exp_hit  = exp_cds > noise;
      exp_clamped = (exp_cds < 0) ? 0 : (exp_cds > 4095) ? 4095 : exp_cds;
      checks += 4;
      if (new_word !== exp_word) begin failures++; $display("word %h exp %h", new_word, exp_word); end
      if (int'(cds_full) != exp_cds) begin failures++; $display("cds %0d exp %0d", cds_full, exp_cds); end
      if (hit !== exp_hit) begin failures++; $display("hit %0b exp %0b (cds %0d thr %0d)", hit, exp_hit, exp_cds, noise); end
      if (int'(cds) != exp_clamped) begin failures++; $display("clamped %0d exp %0d", cds, exp_clamped); end
      nhit += exp_hit;
    end
    // both outcomes must have been exercised
    checks++;
    if (nhit == 0 || nhit == 5000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
