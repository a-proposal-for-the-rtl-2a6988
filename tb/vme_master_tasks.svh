// Bus-functional VME master used by the testbenches. Expects in scope: clk,
// the vme_* signals of the card and the chk() task. Strobes are moved a
// fraction of a clock after an edge, as an asynchronous master would.
localparam logic [5:0] AM_A32_D32  = 6'h09;
localparam logic [5:0] AM_A32_MBLT = 6'h08;

task automatic vme_wait(input logic want_low_dtack_or_berr, output bit ok);
  int n;
  n = 0;
  ok = 1;
  if (want_low_dtack_or_berr) begin
    while (vme_dtack_n && vme_berr_n) begin
      @(posedge clk); n++;
      if (n > 64) begin ok = 0; break; end
    end
  end else begin
    while (!vme_dtack_n || !vme_berr_n) begin
      @(posedge clk); n++;
      if (n > 64) begin ok = 0; break; end
    end
  end
  #3;
endtask

task automatic vme_write32(input logic [31:0] a, input logic [31:0] d, output bit acked);
  bit ok;
  vme_am = AM_A32_D32; vme_a_i = a[31:1]; vme_lword_n_i = 1'b0;
  vme_write_n = 1'b0; vme_d_i = d;
  #4 vme_as_n = 1'b0;
  #4 vme_ds_n = 2'b00;
  vme_wait(1, acked);
  vme_ds_n = 2'b11; vme_as_n = 1'b1;
  vme_wait(0, ok);
  vme_write_n = 1'b1;
endtask

task automatic vme_read32(input logic [31:0] a, output logic [31:0] d, output bit acked);
  bit ok;
  vme_am = AM_A32_D32; vme_a_i = a[31:1]; vme_lword_n_i = 1'b0;
  vme_write_n = 1'b1;
  #4 vme_as_n = 1'b0;
  #4 vme_ds_n = 2'b00;
  vme_wait(1, acked);
  d = vme_d_o;
  acked = acked && vme_d_oe;
  vme_ds_n = 2'b11; vme_as_n = 1'b1;
  vme_wait(0, ok);
endtask

// MBLT block read of up to n words; stops early on BERR*.
task automatic vme_mblt(input logic [31:0] a, input int n, ref logic [63:0] words [$],
                        output bit berr, output int clocks);
  bit ok;
  int t0;
  berr = 0;
  vme_am = AM_A32_MBLT; vme_a_i = a[31:1]; vme_lword_n_i = 1'b0; vme_write_n = 1'b1;
  #4 vme_as_n = 1'b0;
  #4 vme_ds_n = 2'b00;                      // address acknowledge cycle
  vme_wait(1, ok);
  chk(ok, "MBLT address acknowledged");
  vme_ds_n = 2'b11;
  vme_wait(0, ok);
  t0 = $time;
  for (int i = 0; i < n; i++) begin
    vme_ds_n = 2'b00;
    vme_wait(1, ok);
    if (!ok) begin chk(0, "MBLT beat answered"); break; end
    if (!vme_berr_n) begin berr = 1; vme_ds_n = 2'b11; vme_wait(0, ok); break; end
    words.push_back({vme_a_o, vme_lword_n_o, vme_d_o});
    vme_ds_n = 2'b11;
    vme_wait(0, ok);
  end
  clocks = ($time - t0);
  vme_as_n = 1'b1;
  repeat (3) @(posedge clk);
endtask
