// tb_maps_daq_top: end-to-end test of the card at reduced size (64-pixel
// quadrants, 8-entry hit FIFOs, 32-word output FIFO). It runs compact and
// extended zero-suppressed packets, two overlapping triggers with XOFF and a
// refused trigger, a hit-FIFO overflow, a full-frame readout with output
// back-pressure and the restart after it, all read out over VME by MBLT.
`timescale 1ns/1ps
module tb_maps_daq_top;
  localparam int NPIX = 64, HIT_DEPTH = 8, OUT_DEPTH = 32, NPROC = 2;
  localparam int HITMOD = 16, BURST_MOD = 2, LOAD_BY_VME = 1, WATCHDOG = 2000000;
  `include "maps_daq_tb_body.svh"
  maps_daq_top #(.NPIX(NPIX), .HIT_DEPTH(HIT_DEPTH), .OUT_DEPTH(OUT_DEPTH), .NPROC(NPROC)) u_dut (.*);
endmodule
