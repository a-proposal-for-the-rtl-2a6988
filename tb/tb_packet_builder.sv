// tb_packet_builder: hits trickle into four quadrant FIFOs while a scan is
// "running"; the builder must write the header at once, stream the hits, and
// close with the trailer only after scan_done. Compact and extended mode,
// random back-pressure. Every hit must leave exactly once; the expected words
// are assembled here bit by bit from the packet tables, in the order the
// builder popped the hits, and the hit count and padding are checked.
module tb_packet_builder;
  import maps_daq_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, scan_done = 0, extended = 0, out_ready = 1;
  logic [15:0] event_no = 0;
  logic [7:0] frame_no = 0;
  logic [3:0] hit_empty, hit_rd;
  hit_t hit_data [4];
  logic out_wr, busy, done;
  logic [63:0] out_data;
  hit_t fifo [4][$];
  hit_t popped [$];
  int popped_q [$];
  logic [63:0] got [$];
  int checks = 0, failures = 0, stalls = 0, early = 0;

  packet_builder #(.NQUAD(4)) dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int q = 0; q < 4; q++) begin
      hit_empty[q] = (fifo[q].size() == 0);
      hit_data[q]  = (fifo[q].size() == 0) ? '0 : fifo[q][0];
    end

  always @(posedge clk) if (rst_n) begin
    chk($countones(hit_rd) <= 1, "one pop per clock");
    for (int q = 0; q < 4; q++) if (hit_rd[q]) begin
      for (int k = 0; k < q; k++) chk(fifo[k].size() == 0, "lowest quadrant first");
      popped.push_back(fifo[q].pop_front());
      popped_q.push_back(q);
    end
    if (out_wr) got.push_back(out_data);
    if (out_wr && !scan_done && got.size() > 1) early++;
    out_ready <= ($urandom_range(0, 4) != 0);
    if (!out_ready && busy) stalls++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [63:0] exp [$];
      int n;
      n = 0;
      exp.delete();
      popped.delete();
      popped_q.delete();
      got.delete();
      extended = t[0];
      event_no = 16'($urandom);
      frame_no = 8'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // the scan: hits arrive over 200 clocks
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        if (t % 5 != 4 && $urandom_range(0, 9) == 0)
          for (int q = 0; q < 4; q++)
            if ($urandom_range(0, 1)) begin
              fifo[q].push_back(hit_t'({$urandom, $urandom, $urandom}));
              n++;
            end
      end
      @(negedge clk) scan_done = 1;
      wait (done);
      @(posedge clk); #1;
      scan_done = 0;
      chk(popped.size() == n, $sformatf("packet %0d: %0d of %0d hits sent", t, popped.size(), n));
      exp.push_back({8'h48, 32'h0, frame_no, event_no});
      for (int i = 0; i < popped.size(); i++) begin
        hit_t h;
        h = popped[i];
        if (extended)
          exp.push_back({8'h00, h.samp_new, h.samp_old, h.ped, h.noise, 2'(popped_q[i]), h.pix});
        else if (i % 2 == 1)
          exp.push_back({2'(popped_q[i]), h.cds, h.pix, popped[i-1].cds, 2'(popped_q[i-1]), popped[i-1].pix});
      end
      if (!extended && popped.size() % 2 == 1)
        exp.push_back({32'h0, popped[popped.size()-1].cds, 2'(popped_q[popped.size()-1]),
                       popped[popped.size()-1].pix});
      exp.push_back({8'h54, 32'(n), frame_no, event_no});
      chk(got.size() == exp.size(), $sformatf("packet %0d length %0d exp %0d", t, got.size(), exp.size()));
      for (int i = 0; i < exp.size() && i < got.size(); i++)
        chk(got[i] == exp[i], $sformatf("packet %0d word %0d %h exp %h", t, i, got[i], exp[i]));
      for (int q = 0; q < 4; q++) chk(fifo[q].size() == 0, "fifos drained");
    end
    chk(stalls > 0, "back-pressure exercised");
    chk(early > 0, "hits written before the scan ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
