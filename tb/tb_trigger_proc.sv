// tb_trigger_proc: one trigger processor against a stream of pixel updates
// (NPIX = 16, one update every 4 clocks). Checks that after a trigger exactly
// NPIX updates are stored, starting with the next update and ending with the
// pixel before it, that the frame/event are latched, and that the processor
// stays busy until its packet is reported done.
module tb_trigger_proc;
  localparam int NPIX = 16;
  logic clk = 0, rst_n = 0, start = 0, upd_valid = 0, pkt_done = 0;
  logic [15:0] event_in = 0, event_no;
  logic [7:0] frame_in = 0, frame_no;
  logic [3:0] upd_pix = 0, pix_trig;
  logic busy, store, ready;
  int checks = 0, failures = 0;
  int stored [$];
  int cyc = 0, start_cyc, ready_cyc;

  trigger_proc #(.NPIX(NPIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // update stream: pixel p reported in the 4th clock of its period
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      upd_valid <= (cyc % 4 == 2);
      if (upd_valid) begin
        upd_pix <= upd_pix + 1;
        if (upd_pix == 4'hF) frame_in <= frame_in + 1;
      end
    end
    if (store) stored.push_back(int'(upd_pix));
    if (ready && ready_cyc == 0) ready_cyc <= cyc;
  end

  initial begin
    ready_cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4 * 5 + 1) @(posedge clk);     // a few updates pass before the trigger
    for (int t = 0; t < 3; t++) begin
      int first;
      stored.delete();
      ready_cyc = 0;
      @(negedge clk) begin start = 1; event_in = 16'(100 + t); end
      @(negedge clk) start = 0;
      start_cyc = cyc;
      chk(busy && !ready, "busy after start");
      wait (ready);
      @(posedge clk); #1;
      chk(stored.size() == NPIX, $sformatf("stored %0d updates", stored.size()));
      first = stored[0];
      chk(int'(pix_trig) == first, "pix_trig is first stored pixel");
      for (int i = 0; i < stored.size(); i++)
        chk(stored[i] == (first + i) % NPIX, "scan order wraps round the frame");
      chk(event_no == 16'(100 + t), "event latched");
      chk(ready_cyc - start_cyc <= 4 * NPIX + 4, "scan lasts one frame");
      repeat (7) @(posedge clk);
      chk(busy && ready && stored.size() == NPIX, "holds until packet done");
      @(negedge clk) pkt_done = 1;
      @(negedge clk) pkt_done = 0;
      chk(!busy, "idle after packet done");
      repeat (4 * (3 + t) + t) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
