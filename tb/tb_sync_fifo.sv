// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/count, ignored writes when full and a flush.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic empty, full;
  logic [3:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, nfull = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      chk(int'(count) == model.size(), "count");
      if (model.size() > 0) chk(rd_data == model[0], "data");
      if (full) nfull++;
      wr_en   = (i % 1000 < 500) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en   = (i % 1000 < 500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      wr_data = W'($urandom);
      clear   = (i == 3333);
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && model.size() < D;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    chk(nfull > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
