// tb_maps_daq_full: the end-to-end scenario of tb_maps_daq_top with the card
// at its full size (four 262144-pixel quadrants, 1024-entry hit FIFOs, 2048-word
// output FIFO, two trigger processors). One pixel in 1024 is hit per frame,
// and the burst frame hits one in 64, which overflows the hit FIFOs. The
// full-frame readout moves 3 x 262144 words (6 MB) over MBLT.
`timescale 1ns/1ps
module tb_maps_daq_full;
  localparam int NPIX = 262144, HIT_DEPTH = 1024, OUT_DEPTH = 2048, NPROC = 2;
  localparam int HITMOD = 1024, BURST_MOD = 64, LOAD_BY_VME = 0, WATCHDOG = 60000000;
  `include "maps_daq_tb_body.svh"
  maps_daq_top u_dut (.*);
endmodule
