// trigger_proc: one dead-time-less trigger processor of zero-suppressed mode.
//
// On a trigger the processor remembers the event number and the frame
// counter, and takes the next pixel update as pix_ID_Trig. From then on it
// enables the storing of hits for exactly NPIX consecutive pixel updates:
// pix_ID_Trig up to the last pixel of the frame being acquired, and, after the
// index wraps, pixel 0 up to pix_ID_Trig - 1 of the next frame. Up to the wrap
// the CDS is sample N minus sample N-1; after it, sample N+1 minus sample N,
// which is what the SRAM holds at that point, so every pixel is evaluated
// once and acquisition never stops. This is the specification's rule. The
// processor then reports ready and stays busy until the packet builder has
// sent its packet (pkt_done), which is this design's choice: it keeps the
// processor's hit FIFOs from being reused before they are empty.
//
// Timing: the scan lasts NPIX A/D periods (1M/4 periods for the full sensor)
// from the first update after the trigger.
module trigger_proc #(
  parameter int unsigned NPIX = 262144,
  localparam int unsigned PW  = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // trigger assigned to this processor
  input  logic [15:0]   event_in,
  input  logic [7:0]    frame_in,
  input  logic          upd_valid,   // a pixel update is reported this cycle
  input  logic [PW-1:0] upd_pix,
  input  logic          pkt_done,    // packet of this processor sent
  output logic          busy,
  output logic          store,       // store hits of this cycle's update
  output logic          ready,       // scan complete, packet may be built
  output logic [15:0]   event_no,
  output logic [7:0]    frame_no,
  output logic [PW-1:0] pix_trig
);

  typedef enum logic [1:0] {P_IDLE, P_ARM, P_SCAN, P_READY} pstate_t;
  pstate_t     state;
  logic [PW:0] remaining;

  assign busy  = (state != P_IDLE);
  assign ready = (state == P_READY);
  assign store = upd_valid && ((state == P_ARM) || (state == P_SCAN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      remaining <= '0;
      event_no  <= '0;
      frame_no  <= '0;
      pix_trig  <= '0;
    end else begin
      unique case (state)
        P_IDLE: if (start) begin
          state    <= P_ARM;
          event_no <= event_in;
          frame_no <= frame_in;
        end
        P_ARM: if (upd_valid) begin
          pix_trig  <= upd_pix;
          remaining <= (PW+1)'(NPIX - 1);
          state     <= (NPIX == 1) ? P_READY : P_SCAN;
        end
        P_SCAN: if (upd_valid) begin
          remaining <= remaining - 1'b1;
          if (remaining == 1) state <= P_READY;
        end
        P_READY: if (pkt_done) state <= P_IDLE;
        default: state <= P_IDLE;
      endcase
    end
  end

  // the last stored update is the pixel just before pix_ID_Trig
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == P_SCAN && upd_valid && remaining == 1)
                   |-> (upd_pix == ((pix_trig == 0) ? PW'(NPIX-1) : pix_trig - 1'b1)));

endmodule
