// tb_trigger_if: trigger bus handshake. The testbench plays two trigger
// processors and the full-frame readout; it checks which processor each
// trigger starts, the latched trigger number, BUSY and XOFF, and that a
// trigger arriving under XOFF is refused and counted.
module tb_trigger_if;
  logic clk = 0, rst_n = 0, run = 0, full_mode = 0;
  logic trig_strobe = 0;
  logic [15:0] trig_num = 0, event_no, lost_count;
  logic trig_busy, trig_xoff, ff_busy = 0, ff_start;
  logic [1:0] proc_busy = 0, proc_start;
  logic [31:0] trig_count;
  int checks = 0, failures = 0;
  int starts [2] = '{0, 0};
  int ffstarts = 0;

  trigger_if #(.NPROC(2)) dut (.*);
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

  // the test plays the processors: a started one stays busy until released
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++) if (proc_start[p]) begin proc_busy[p] <= 1; starts[p]++; end
    if (ff_start) begin ff_busy <= 1; ffstarts++; end
  end

  // asynchronous strobe, 3 cycles long, at an odd time
  task automatic trigger(input logic [15:0] n);
    #3 trig_num = n; trig_strobe = 1;
    repeat (3) @(posedge clk);
    #2 trig_strobe = 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1; run = 1;
    @(posedge clk);
    chk(!trig_busy && !trig_xoff, "idle");
    trigger(16'h1234);
    chk(starts[0] == 1 && starts[1] == 0, "first trigger to processor 0");
    chk(event_no == 16'h1234, "event number latched");
    chk(trig_busy && !trig_xoff, "BUSY without XOFF after first trigger");
    trigger(16'h1235);
    chk(starts[1] == 1, "second trigger to processor 1");
    chk(event_no == 16'h1235, "second event number");
    chk(trig_busy && trig_xoff, "XOFF with two triggers in service");
    trigger(16'h1236);
    chk(starts[0] == 1 && starts[1] == 1 && lost_count == 1, "trigger under XOFF refused");
    chk(trig_count == 2, "accepted count");
    @(negedge clk) proc_busy[0] = 0;     // processor 0 finished
    @(posedge clk); #1;
    chk(trig_busy && !trig_xoff, "XOFF released when next processor free");
    trigger(16'h2000);
    chk(starts[0] == 2 && event_no == 16'h2000, "third accepted trigger to processor 0");
    @(negedge clk) proc_busy = 0;
    @(posedge clk); #1;
    chk(!trig_busy && !trig_xoff, "idle again");
    // full-frame mode: one trigger, XOFF until readout done
    full_mode = 1;
    trigger(16'h3000);
    chk(ffstarts == 1 && trig_busy && trig_xoff, "full-frame start, BUSY and XOFF");
    trigger(16'h3001);
    chk(ffstarts == 1 && lost_count == 2, "full-frame second trigger refused");
    @(negedge clk) ff_busy = 0;
    @(posedge clk); #1;
    chk(!trig_busy && !trig_xoff, "full-frame done");
    // no trigger accepted while not running
    run = 0;
    trigger(16'h4000);
    chk(ffstarts == 1 && trig_count == 4, "ignored when not running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
