// pixel_sram_model: behavioural model of one external synchronous pixel SRAM
// (256k x 48 on the card), used only by the testbenches.
//
// Single-port, pipelined read with one clock of latency: the address and
// controls are sampled on a rising edge; with cs_n low and we_n high the word
// appears on q after that edge and stays until the next access; with we_n low
// the word d is written. The memory starts cleared and the testbench may
// preload it through the mem array.
module pixel_sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 48
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          cs_n,
  input  logic          we_n,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    q = '0;
  end

  always @(posedge clk) begin
    if (!cs_n) begin
      if (!we_n) mem[addr] <= d;
      else       q <= mem[addr];
    end
  end
endmodule
