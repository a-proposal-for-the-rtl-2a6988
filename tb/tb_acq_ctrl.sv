// tb_acq_ctrl: sampling controller with four behavioural pixel SRAMs and a
// model of the A/D daughter cards (NPIX = 8, DIV = 4). Every pixel update is
// compared with a reference built from the sample formula: the new and the
// previous sample, the CDS and the hit flag. It also checks the frame period
// (NPIX x DIV clocks), the frame counter, and a full-frame readout started in
// the middle of a frame: the three stored frames of every pixel, in order,
// under random back-pressure, then the detector reset and the restart.
module tb_acq_ctrl;
  import maps_daq_pkg::*;
  localparam int NQ = 4, NPIX = 8, DIV = 4;
  logic clk = 0, rst_n = 0, run = 0, ff_start = 0, out_ready = 1;
  logic cfg_wr = 0;
  logic [1:0] cfg_quad = 0;
  logic [2:0] cfg_pix = 0;
  logic [5:0] cfg_ped = 0, cfg_noise = 0;
  logic [11:0] adc_data [NQ];
  logic adc_clk, det_clk, det_sof, det_reset;
  logic [2:0] sram_addr, upd_pix, cur_pix;
  logic [NQ-1:0] sram_cs_n, upd_hit;
  logic sram_we_n, sram_dq_oe, upd_valid, ff_wr, ff_busy, ff_done;
  logic [47:0] sram_dq_o [NQ], sram_dq_i [NQ];
  hit_t upd_info [NQ];
  logic [7:0] frame_cnt;
  logic [63:0] ff_data;
  int checks = 0, failures = 0;

  acq_ctrl #(.NQUAD(NQ), .NPIX(NPIX), .DIV(DIV), .RST_LEN(4)) dut (.*);
  for (genvar q = 0; q < NQ; q++) begin : g_sram
    pixel_sram_model #(.AW(3), .DW(48)) u_sram (
      .clk, .addr(sram_addr), .cs_n(sram_cs_n[q]), .we_n(sram_we_n),
      .d(sram_dq_o[q]), .q(sram_dq_i[q]));
  end
  always #5 clk = ~clk;

  function automatic int samp(int f, int p, int q);
    if (f < 0) return 0;                      // SRAM starts cleared
    return (1000 + ((f * 37 + p * 11 + q * 5) % 64) + (((f + p + q) % 3 == 0) ? 200 : 0)) % 4096;
  endfunction
  function automatic int ped_of(int p, int q);   return (p + q) % 8 - 4; endfunction
  function automatic int noise_of(int p, int q); return 20 + (p * 3 + q) % 16; endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // A/D model: pixel index and frame follow the detector clock and StartOfFrame
  int pix_m = 0, frame_m = -1;
  always @(posedge adc_clk) begin
    if (det_sof) begin pix_m = 0; frame_m++; end else pix_m++;
    for (int q = 0; q < NQ; q++) adc_data[q] <= 12'(samp(frame_m, pix_m, q));
  end

  // reference for each pixel update
  int f_ref = 0, nupd = 0, nhit = 0, nstall = 0;
  int last_sof = -1, cyc = 0, nperiod = 0;
  logic sof_d = 0;
  always @(posedge clk) begin
    cyc++;
    sof_d <= det_sof;
    if (ff_busy) last_sof = -1;
    if (det_sof && !sof_d && !ff_busy) begin
      if (last_sof >= 0) begin
        chk(cyc - last_sof == NPIX * DIV, "frame period");
        nperiod++;
      end
      last_sof = cyc;
    end
    if (upd_valid) begin
      int p;
      p = int'(upd_pix);
      for (int q = 0; q < NQ; q++) begin
        int a, b, c;
        a = samp(f_ref, p, q); b = samp(f_ref - 1, p, q);
        c = a - b - ped_of(p, q);
        chk(int'(upd_info[q].samp_new) == a && int'(upd_info[q].samp_old) == b, "samples");
        chk(upd_hit[q] == (c > noise_of(p, q)), "hit flag");
        chk(int'(upd_info[q].cds) == ((c < 0) ? 0 : c), "cds");
        chk(int'(upd_info[q].pix) == p, "pixel");
        nhit += upd_hit[q];
      end
      nupd++;
      if (p == NPIX - 1) f_ref++;
    end
    if (ff_busy && !out_ready) nstall++;
    if (rst_n) out_ready <= ($urandom_range(0, 2) != 0);
  end

  // full-frame stream
  logic [63:0] ffw [$];
  always @(posedge clk) if (rst_n && ff_wr) ffw.push_back(ff_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int trig_frame;
    // garbage in the SRAMs, then pedestal and threshold loaded pixel by pixel
    for (int p = 0; p < NPIX; p++) begin
      g_sram[0].u_sram.mem[p] = {$urandom, $urandom};
      g_sram[1].u_sram.mem[p] = {$urandom, $urandom};
      g_sram[2].u_sram.mem[p] = {$urandom, $urandom};
      g_sram[3].u_sram.mem[p] = {$urandom, $urandom};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < NQ; q++)
      for (int p = 0; p < NPIX; p++) begin
        @(negedge clk);
        cfg_wr = 1; cfg_quad = 2'(q); cfg_pix = 3'(p);
        cfg_ped = 6'(ped_of(p, q)); cfg_noise = 6'(noise_of(p, q));
        @(negedge clk) cfg_wr = 0;
      end
    repeat (2) @(posedge clk);
    chk(g_sram[2].u_sram.mem[5] == {36'h0, 6'(ped_of(5, 2)), 6'(noise_of(5, 2))}, "pixel load");
    chk(g_sram[1].u_sram.mem[7] == {36'h0, 6'(ped_of(7, 1)), 6'(noise_of(7, 1))}, "pixel load");
    @(negedge clk) run = 1;
    chk(1, "start");
    // let three frames pass, then trigger a full-frame readout mid-frame
    wait (frame_cnt == 3);
    repeat (DIV * NPIX / 2) @(posedge clk);
    trig_frame = f_ref;
    @(negedge clk) ff_start = 1;
    @(negedge clk) ff_start = 0;
    chk(ff_busy, "full-frame busy");
    wait (ff_done);
    @(posedge clk);
    chk(ffw.size() == 3 * NPIX, $sformatf("full-frame words %0d", ffw.size()));
    for (int p = 0; p < NPIX && 3 * p + 2 < ffw.size(); p++)
      for (int k = 0; k < 3; k++)
        for (int q = 0; q < NQ; q++)
          chk(ffw[3 * p + k][16 * q +: 16] == 16'(samp(trig_frame - 1 + k, p, q)),
              $sformatf("full-frame pixel %0d frame %0d quadrant %0d", p, k, q));
    chk(nstall > 0, "readout back-pressure exercised");
    chk(f_ref == trig_frame + 2, "recording stopped after the following frame");
    // after the restart updates continue from pixel 0 against frame N+1
    wait (frame_cnt == 8'(trig_frame + 4));
    @(posedge clk);
    chk(nperiod >= 4, "frame periods measured");
    chk(nhit > 0 && nhit < nupd * NQ, "hits and non-hits seen");
    chk(!det_reset, "detector running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
