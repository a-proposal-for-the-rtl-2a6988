// Shared body of the end-to-end testbenches of maps_daq_top. The including
// module defines NPIX, HIT_DEPTH, OUT_DEPTH, HITMOD (one pixel in HITMOD
// carries a particle signal in a frame), BURST_MOD (the same for the burst
// frame used to overflow a hit FIFO) and instantiates the card as u_dut.
//
// Sensor model: sample(f, p, q) = 1000 + (11p + 5q) mod 64, plus 300 when
// pixel p of quadrant q is hit in frame f. Every pixel's SRAM word is
// preloaded with a pedestal in -4..3 and a threshold in 20..35, so the CDS is
// above threshold exactly when the pixel is hit in frame f and not in f-1.
// The testbench drives the card only through its ports: trigger bus, VME
// (CSR, status words, MBLT reads) and the A/D inputs. The expected hits of
// each packet are built here from the formulas and from the pixel at which
// the trigger's scan started (read from the processor). Hits stream out
// during the scan, so their order inside a packet is not fixed: each packet
// must carry each expected hit exactly once. Where a hit FIFO overflows,
// the hits missing from the packet must equal the lost-hit count.
import maps_daq_pkg::*;
localparam int NQ = 4;
localparam int PWT = $clog2(NPIX);
localparam logic [7:0] BASE = 8'h3C;
localparam int BURST_FRAME = 9;

logic clk = 0, rst_n = 0;
logic [11:0] adc_data [NQ];
logic adc_clk, det_clk, det_sof, det_reset;
logic [PWT-1:0] sram_addr;
logic [NQ-1:0] sram_cs_n;
logic sram_we_n, sram_dq_oe;
logic [47:0] sram_dq_o [NQ], sram_dq_i [NQ];
logic trig_strobe = 0, trig_busy, trig_xoff;
logic [15:0] trig_num = 0;
logic [7:0] base_addr = BASE;
logic vme_as_n = 1, vme_write_n = 1, vme_lword_n_i = 1;
logic [1:0] vme_ds_n = 2'b11;
logic [5:0] vme_am = 0;
logic [31:1] vme_a_i = 0, vme_a_o;
logic [31:0] vme_d_i = 0, vme_d_o;
logic vme_d_oe, vme_lword_n_o, vme_a_oe, vme_dtack_n, vme_berr_n;
logic tap_valid;
logic [PWT-1:0] tap_pix;
logic [11:0] tap_sample [NQ];
int checks = 0, failures = 0;

always #6.25 clk = ~clk;

for (genvar q = 0; q < NQ; q++) begin : g_sram
  pixel_sram_model #(.AW(PWT), .DW(48)) u_sram (
    .clk, .addr(sram_addr), .cs_n(sram_cs_n[q]), .we_n(sram_we_n),
    .d(sram_dq_o[q]), .q(sram_dq_i[q]));
end

task automatic chk(bit ok, string what);
  checks++;
  if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
endtask

`include "vme_master_tasks.svh"

// ---------------- sensor and A/D model ----------------
function automatic bit is_hit(int f, int p, int q);
  longint h;
  h = longint'(f) * 131 + longint'(p) * 31 + longint'(q) * 17 + (longint'(p) * p) % 97;
  if (f == BURST_FRAME) return (h % BURST_MOD) == 0;
  return (h % HITMOD) == 0;
endfunction
function automatic int samp(int f, int p, int q);
  if (f < 0) return 0;
  return 1000 + (p * 11 + q * 5) % 64 + (is_hit(f, p, q) ? 300 : 0);
endfunction
function automatic int ped_of(int p, int q);   return (p + 3 * q) % 8 - 4; endfunction
function automatic int noise_of(int p, int q); return 20 + (p * 7 + q) % 16; endfunction

int pix_m = 0, frame_m = -1;
always @(posedge adc_clk) begin
  if (det_sof) begin pix_m = 0; frame_m++; end else pix_m++;
  for (int q = 0; q < NQ; q++) adc_data[q] <= 12'(samp(frame_m, pix_m, q));
end

// ---------------- mechanism counters ----------------
int n_xoff = 0, n_stall = 0, n_ffwords = 0, n_compact = 0, n_extended = 0, n_odd = 0;
int n_berr = 0, n_lost_trig = 0, n_lost_hits = 0, n_ff = 0, n_trig = 0;
logic xoff_d = 0;
always @(posedge clk) begin
  xoff_d <= trig_xoff;
  if (trig_xoff && !xoff_d) n_xoff++;
  if (u_dut.ff_busy && !u_dut.out_ready) n_stall++;
end

// ---------------- sample tap ----------------
int n_tap = 0;
always @(posedge clk) if (rst_n && tap_valid) begin
  n_tap++;
  if (n_tap % 37 == 1)
    for (int q = 0; q < NQ; q++)
      chk(int'(tap_sample[q]) == samp(frame_m, int'(tap_pix), q), "tap sample");
end

// ---------------- expected packets ----------------
// A packet is described by its header fields and the set of hits it must
// carry (a 32-bit compact half or a 64-bit extended word per hit). Hits of
// one packet may come in any order; with may_lose set, hits lost to a full
// hit FIFO are allowed and counted.
int          pk_ev [$], pk_fr [$], pk_first [$], pk_n [$];
bit          pk_ext [$], pk_lose [$];
logic [63:0] pk_keys [$];
logic [63:0] got_words [$];
logic [63:0] ff_exp [$];
int          lost_seen = 0;

task automatic expect_packet(input int ev, input int frame_n, input int pix_trig,
                             input bit extended, input bit may_lose);
  pk_ev.push_back(ev); pk_fr.push_back(frame_n); pk_ext.push_back(extended);
  pk_lose.push_back(may_lose); pk_first.push_back(pk_keys.size());
  for (int q = 0; q < NQ; q++)
    for (int i = 0; i < NPIX; i++) begin
      int p, fa, a, b, c;
      p  = (pix_trig + i) % NPIX;
      fa = (p >= pix_trig) ? frame_n : frame_n + 1;
      a  = samp(fa, p, q); b = samp(fa - 1, p, q);
      c  = a - b - ped_of(p, q);
      if (c > noise_of(p, q)) begin
        if (extended)
          pk_keys.push_back({8'h00, 12'(a), 12'(b), 6'(ped_of(p, q)), 6'(noise_of(p, q)),
                             2'(q), 18'(p)});
        else
          pk_keys.push_back({32'h0, 12'(c > 4095 ? 4095 : c), 2'(q), 18'(p)});
      end
    end
  pk_n.push_back(pk_keys.size() - pk_first[pk_first.size() - 1]);
endtask

// Number of stream words the expected packets take when nothing is lost.
function automatic int expected_words();
  int w;
  w = 0;
  for (int k = 0; k < pk_ev.size(); k++)
    w += 2 + (pk_ext[k] ? pk_n[k] : (pk_n[k] + 1) / 2);
  return w;
endfunction

// Check the received stream packet by packet against the descriptions.
task automatic compare_packets(string what);
  int pos;
  pos = 0;
  for (int k = 0; k < pk_ev.size(); k++) begin
    int bag [logic [63:0]];
    int nrx, words, idx;
    bit found;
    logic [63:0] trl;
    for (int i = 0; i < pk_n[k]; i++) bag[pk_keys[pk_first[k] + i]] += 1;
    chk(pos < got_words.size() && got_words[pos] == {8'h48, 32'h0, 8'(pk_fr[k]), 16'(pk_ev[k])},
        $sformatf("%s packet %0d header", what, k));
    // find the trailer: it must sit where its own hit count puts it
    found = 0; nrx = 0;
    for (int n = pk_n[k]; n >= 0 && !found; n--) begin
      words = pk_ext[k] ? n : (n + 1) / 2;
      idx = pos + 1 + words;
      trl = {8'h54, 32'(n), 8'(pk_fr[k]), 16'(pk_ev[k])};
      if (idx < got_words.size() && got_words[idx] == trl) begin found = 1; nrx = n; end
      if (!pk_lose[k]) break;
    end
    chk(found, $sformatf("%s packet %0d trailer", what, k));
    if (!found) break;
    if (pk_ext[k]) begin
      for (int i = 0; i < nrx; i++) begin
        logic [63:0] w;
        w = got_words[pos + 1 + i];
        chk(bag.exists(w) && bag[w] > 0, $sformatf("%s packet %0d hit %h expected", what, k, w));
        if (bag.exists(w)) bag[w] -= 1;
      end
    end else begin
      for (int i = 0; i < nrx; i++) begin
        logic [63:0] w, key;
        w = got_words[pos + 1 + i / 2];
        key = (i % 2 == 0) ? {32'h0, w[31:0]} : {32'h0, w[61:50], w[63:62], w[49:32]};
        chk(bag.exists(key) && bag[key] > 0, $sformatf("%s packet %0d hit %h expected", what, k, key));
        if (bag.exists(key)) bag[key] -= 1;
      end
      if (nrx % 2 == 1) begin
        chk(got_words[pos + 1 + nrx / 2][63:32] == 32'h0, "odd hit count padded with zero");
        n_odd++;
      end
    end
    chk(pk_lose[k] || nrx == pk_n[k], $sformatf("%s packet %0d: %0d hits, expected %0d", what, k, nrx, pk_n[k]));
    lost_seen += pk_n[k] - nrx;
    pos = idx + 1;
  end
  chk(pos == got_words.size(), $sformatf("%s: %0d words left over", what, got_words.size() - pos));
  got_words.delete();
  pk_ev.delete(); pk_fr.delete(); pk_first.delete(); pk_n.delete();
  pk_ext.delete(); pk_lose.delete(); pk_keys.delete();
endtask

// Raise a trigger in the middle of a frame; returns the frame counter value
// and the scan's first pixel as seen by the processor that took it.
int last_slot = 0;
always @(posedge clk) begin
  if (u_dut.proc_start[0]) last_slot <= 0;
  if (u_dut.proc_start[NPROC - 1] && NPROC > 1) last_slot <= NPROC - 1;
end

task automatic fire(input int ev, output int frame_n, output int pix_trig);
  trig_num = 16'(ev);
  #3 trig_strobe = 1;
  frame_n = frame_m;
  repeat (12) @(posedge clk);
  #2 trig_strobe = 0;
  if (last_slot == 0) pix_trig = int'(u_dut.g_proc[0].u_proc.pix_trig);
  else                pix_trig = int'(u_dut.g_proc[NPROC - 1].u_proc.pix_trig);
  repeat (6) @(posedge clk);
  n_trig++;
endtask

task automatic wait_pixel(input int lo);
  while (!(pix_m >= lo && pix_m < lo + NPIX / 8)) @(posedge clk);
endtask

task automatic wait_frame(input int f);
  while (frame_m < f) @(posedge clk);
endtask

// Read words by MBLT until n have arrived; an empty FIFO ends a block with BERR.
task automatic drain(input int n);
  int clocks, guard;
  bit berr;
  guard = 0;
  while (got_words.size() < n && guard < 200000) begin
    vme_mblt({BASE, 24'h000100}, (n - got_words.size() > 256) ? 256 : n - got_words.size(),
             got_words, berr, clocks);
    if (berr) begin n_berr++; repeat (64) @(posedge clk); end
    guard++;
  end
endtask

// Read until the card is idle and its output FIFO is empty.
task automatic drain_all();
  int clocks;
  bit berr;
  logic [31:0] d;
  bit ack;
  forever begin
    vme_mblt({BASE, 24'h000100}, 256, got_words, berr, clocks);
    if (berr) begin
      n_berr++;
      vme_read32({BASE, 24'h4}, d, ack);
      if (!d[0] && d[31:16] == 0) break;
      repeat (64) @(posedge clk);
    end
  end
endtask

task automatic compare_ff(string what);
  chk(got_words.size() == ff_exp.size(),
      $sformatf("%s: %0d words, expected %0d", what, got_words.size(), ff_exp.size()));
  for (int i = 0; i < ff_exp.size() && i < got_words.size(); i++)
    chk(got_words[i] == ff_exp[i],
        $sformatf("%s word %0d: %h expected %h", what, i, got_words[i], ff_exp[i]));
  got_words.delete();
  ff_exp.delete();
endtask

initial begin
  repeat (WATCHDOG) @(posedge clk);
  failures++;
  $display("watchdog expired");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  int fa, pa, fb, pb, fc, pc;
  logic [31:0] d;
  bit ack;
  repeat (3) @(posedge clk);
  rst_n = 1;
  repeat (3) @(posedge clk);
  // pedestal and threshold of every pixel: loaded over VME at the small size,
  // written straight into the SRAM models at full size to save time
  if (LOAD_BY_VME) begin
    for (int q = 0; q < NQ; q++) begin
      vme_write32({BASE, 24'h14}, 32'(q) << 24, ack);
      for (int p = 0; p < NPIX; p++)
        vme_write32({BASE, 24'h18}, {20'h0, 6'(ped_of(p, q)), 6'(noise_of(p, q))}, ack);
    end
  end else begin
    for (int p = 0; p < NPIX; p++) begin
      g_sram[0].u_sram.mem[p] = {36'h0, 6'(ped_of(p, 0)), 6'(noise_of(p, 0))};
      g_sram[1].u_sram.mem[p] = {36'h0, 6'(ped_of(p, 1)), 6'(noise_of(p, 1))};
      g_sram[2].u_sram.mem[p] = {36'h0, 6'(ped_of(p, 2)), 6'(noise_of(p, 2))};
      g_sram[3].u_sram.mem[p] = {36'h0, 6'(ped_of(p, 3)), 6'(noise_of(p, 3))};
    end
  end

  // ---- zero-suppressed, compact packets, two overlapping triggers ----
  vme_write32({BASE, 24'h0}, 32'h1, ack);            // run, compact
  chk(ack, "CSR written");
  wait_frame(2);
  wait_pixel(NPIX / 8);
  fire(16'h0101, fa, pa);
  chk(trig_busy && !trig_xoff, "BUSY without XOFF after first trigger");
  expect_packet(16'h0101, fa, pa, 0, 0);
  wait_pixel(NPIX / 2);
  fire(16'h0102, fb, pb);
  chk(trig_busy && trig_xoff, "XOFF with two triggers in service");
  expect_packet(16'h0102, fb, pb, 0, 0);
  fire(16'h0103, fc, pc);                          // refused under XOFF
  n_compact += 2;
  drain_all();
  compare_packets("compact packets");
  vme_read32({BASE, 24'h10}, d, ack);
  chk(ack && d[15:0] == 16'd1, "one trigger refused");
  n_lost_trig = d[15:0];

  // ---- extended packets, including a burst frame that overflows a hit FIFO ----
  while (trig_busy) @(posedge clk);
  vme_write32({BASE, 24'h0}, 32'h5, ack);            // run, extended
  wait_frame(5);
  wait_pixel(NPIX / 4);
  fire(16'h0201, fa, pa);
  expect_packet(16'h0201, fa, pa, 1, 0);
  n_extended++;
  drain_all();
  compare_packets("extended packet");
  wait_frame(BURST_FRAME);
  wait_pixel(NPIX / 2);
  fire(16'h0202, fa, pa);
  expect_packet(16'h0202, fa, pa, 1, 1);
  n_extended++;
  // nothing is read during this scan, so the hit FIFOs overflow
  while (trig_busy && !u_dut.proc_ready[last_slot]) @(posedge clk);
  drain_all();
  compare_packets("burst packet");
  vme_read32({BASE, 24'h10}, d, ack);
  chk(ack && int'(d[31:16]) == lost_seen, $sformatf("lost hits %0d, missing from packets %0d", d[31:16], lost_seen));
  n_lost_hits = d[31:16];

  // ---- full-frame readout ----
  while (trig_busy) @(posedge clk);
  vme_write32({BASE, 24'h0}, 32'h3, ack);            // run, full frame
  wait_frame(BURST_FRAME + 2);
  wait_pixel(NPIX / 2);
  fire(16'h0301, fa, pa);
  chk(trig_busy && trig_xoff, "full-frame: BUSY and XOFF");
  for (int p = 0; p < NPIX; p++)
    for (int k = 0; k < 3; k++)
      ff_exp.push_back({4'h0, 12'(samp(fa - 1 + k, p, 3)), 4'h0, 12'(samp(fa - 1 + k, p, 2)),
                           4'h0, 12'(samp(fa - 1 + k, p, 1)), 4'h0, 12'(samp(fa - 1 + k, p, 0))});
  drain(ff_exp.size());
  n_ffwords = got_words.size();
  compare_ff("full frame");
  while (trig_busy) @(posedge clk);
  chk(!det_reset, "detectors restarted");
  n_ff++;

  // ---- back to zero suppression after the restart ----
  vme_write32({BASE, 24'h0}, 32'h1, ack);
  wait_frame(fa + 3);
  wait_pixel(NPIX / 4);
  fire(16'h0401, fb, pb);
  expect_packet(16'h0401, fb, pb, 0, 0);
  n_compact++;
  drain_all();
  compare_packets("packet after restart");
  vme_read32({BASE, 24'h4}, d, ack);
  chk(ack && d[2:0] == 3'b000, "status idle at the end");
  vme_read32({BASE, 24'h1C}, d, ack);
  chk(ack && d == 32'd6, $sformatf("accepted triggers %0d", d));
  chk(n_tap > 0, "sample tap");

  $display("mechanisms: compact=%0d extended=%0d odd_pad=%0d xoff=%0d lost_trig=%0d lost_hits=%0d full_frame=%0d ff_words=%0d ff_stall=%0d berr=%0d",
           n_compact, n_extended, n_odd, n_xoff, n_lost_trig, n_lost_hits, n_ff, n_ffwords, n_stall, n_berr);
  chk(n_compact > 0, "compact mode used");
  chk(n_extended > 0, "extended mode used");
  chk(n_odd > 0, "odd hit count padded");
  chk(n_xoff > 0, "XOFF raised");
  chk(n_lost_trig > 0, "trigger refused under XOFF");
  chk(n_lost_hits > 0, "hit FIFO overflow");
  chk(n_ff > 0, "full-frame readout");
  chk(n_stall > 0, "output FIFO back-pressure");
  chk(n_berr > 0, "MBLT ended by BERR");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
