// tb_vme_slave: VME64x slave against a bus-functional master and a queue
// standing for the output FIFO. Checks CSR write and read-back, the status
// words, D32 access to the FIFO head with pop, MBLT block reads with the
// 64-bit word split over address and data lines, BERR* on an empty FIFO, no
// answer to another base address or an unsupported address modifier, and the
// time per MBLT beat.
`timescale 1ns/1ps
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  logic [7:0] base_addr = 8'hA5;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n_i = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = 0;
  logic [31:1] vme_a_i = 0, vme_a_o;
  logic [31:0] vme_d_i = 0, vme_d_o, csr;
  logic vme_d_oe, vme_lword_n_o, vme_a_oe, vme_dtack_n, vme_berr_n;
  logic [31:0] status0 = 32'hCAFE_0001, status1 = 32'h1234_5678, status2 = 32'h0000_0042;
  logic [31:0] load_addr;
  logic [11:0] load_data;
  logic load_wr;
  int nload = 0;
  logic [31:0] load_seen [$];
  always @(posedge clk) if (rst_n && load_wr) begin nload++; load_seen.push_back({load_addr[25:0], 6'(0)} | 32'(load_data)); end
  logic fifo_empty, fifo_rd;
  logic [63:0] fifo_data;
  logic [63:0] fifo [$];
  int checks = 0, failures = 0;

  vme_slave dut (.*);
  always #6.25 clk = ~clk;     // 80 MHz

  assign fifo_empty = (fifo.size() == 0);
  assign fifo_data  = fifo_empty ? 64'h0 : fifo[0];
  always @(posedge clk) if (rst_n && fifo_rd) void'(fifo.pop_front());

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  `include "vme_master_tasks.svh"

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [63:0] exp [$];
    logic [63:0] got [$];
    bit ack, berr;
    int clocks;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    vme_write32(32'hA500_0000, 32'h0000_0005, ack);
    chk(ack && csr == 32'h5, "CSR write");
    vme_read32(32'hA500_0000, d, ack);
    chk(ack && d == 32'h5, "CSR read back");
    vme_read32(32'hA500_0004, d, ack);
    chk(ack && d == status0, "status word 0");
    vme_read32(32'hA500_0010, d, ack);
    chk(ack && d == status1, "status word 1");
    vme_read32(32'hA500_001C, d, ack);
    chk(ack && d == status2, "status word 2");
    // pixel-load registers: address, two data writes, auto-increment
    vme_write32(32'hA500_0014, 32'h0200_0010, ack);
    vme_read32(32'hA500_0014, d, ack);
    chk(ack && d == 32'h0200_0010, "load address");
    vme_write32(32'hA500_0018, 32'h0000_0ABC, ack);
    vme_write32(32'hA500_0018, 32'h0000_0123, ack);
    chk(nload == 2 && load_data == 12'h123, "load data pulses");
    vme_read32(32'hA500_0014, d, ack);
    chk(ack && d == 32'h0200_0012, "load address advanced");
    // wrong board and wrong address modifier: no answer
    vme_read32(32'h5A00_0000, d, ack);
    chk(!ack, "other base address ignored");
    vme_am = 6'h3D;
    begin
      bit ok;
      vme_a_i = 31'h5280_0000; vme_write_n = 1;
      #4 vme_as_n = 0; #4 vme_ds_n = 0;
      vme_wait(1, ok);
      chk(!ok, "A24 modifier ignored");
      vme_ds_n = 2'b11; vme_as_n = 1;
      repeat (4) @(posedge clk);
    end
    // D32 FIFO access
    for (int i = 0; i < 20; i++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      fifo.push_back(w); exp.push_back(w);
    end
    vme_read32(32'hA500_0008, d, ack);
    chk(ack && d == exp[0][31:0], "FIFO low word");
    vme_read32(32'hA500_000C, d, ack);
    chk(ack && d == exp[0][63:32], "FIFO high word");
    chk(fifo.size() == 19, "high word read pops");
    void'(exp.pop_front());
    // MBLT: 10 words, then the rest with BERR at the end
    vme_mblt(32'hA500_0100, 10, got, berr, clocks);
    chk(!berr && got.size() == 10, "MBLT 10 words");
    $display("MBLT beat: %0d ns per 64-bit word (%0d MB/s)", clocks / 10, 8000 / (clocks / 10));
    // slave: 4 clocks strobe-to-DTACK, 3 clocks release; master model adds ~1 clock
    chk(clocks / 10 <= 9 * 12.5, "MBLT beat within 9 clocks");
    vme_mblt(32'hA500_0100, 50, got, berr, clocks);
    chk(berr && got.size() == 19, "MBLT ends with BERR on empty FIFO");
    for (int i = 0; i < 19 && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("MBLT word %0d", i));
    chk(vme_dtack_n && vme_berr_n && !vme_d_oe && !vme_a_oe, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
