// trigger_if: interface to the crate's trigger bus.
//
// The trigger bus brings a trigger strobe and a 16-bit trigger number (the
// event counter of the crate's trigger scaler); the card answers with BUSY
// (a trigger is being processed but another can still be taken) and XOFF (no
// further trigger can be taken). The strobe is asynchronous: it is passed
// through a two-flop synchroniser and its rising edge is the trigger. The
// trigger number is sampled in that same cycle, so it must be stable while the
// strobe is high (this design's assumption about the bus timing).
//
// Zero-suppressed mode: NPROC trigger processors are used in strict rotation,
// so that packets leave in trigger order. A trigger starts the processor next
// in turn; XOFF is raised while that processor is still busy. With NPROC = 2
// the first trigger raises BUSY only, and a second trigger arriving while the
// first is serviced raises XOFF, as the specification describes; with
// NPROC = 1 XOFF follows the first trigger, the specification's fallback.
// Full-frame mode: the trigger starts the full-frame readout and BUSY and
// XOFF stay high until it and the detector restart are over.
// A trigger that arrives while XOFF is high is not served and is counted in
// lost_count.
module trigger_if #(
  parameter int unsigned NPROC = 2,
  localparam int unsigned PIW  = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              full_mode,
  // trigger bus
  input  logic              trig_strobe,
  input  logic [15:0]       trig_num,
  output logic              trig_busy,
  output logic              trig_xoff,
  // trigger processors
  input  logic [NPROC-1:0]  proc_busy,
  output logic [NPROC-1:0]  proc_start,
  output logic [15:0]       event_no,     // number of the last accepted trigger
  // full-frame readout
  input  logic              ff_busy,
  output logic              ff_start,
  // counters
  output logic [31:0]       trig_count,
  output logic [15:0]       lost_count
);

  logic [2:0]     sync;
  logic           trig_evt;
  logic [PIW-1:0] nxt;

  assign trig_evt  = sync[1] && !sync[2];
  assign trig_busy = (|proc_busy) || ff_busy;
  assign trig_xoff = full_mode ? ff_busy : proc_busy[nxt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= '0;
      nxt        <= '0;
      proc_start <= '0;
      ff_start   <= 1'b0;
      event_no   <= '0;
      trig_count <= '0;
      lost_count <= '0;
    end else begin
      sync       <= {sync[1:0], trig_strobe};
      proc_start <= '0;
      ff_start   <= 1'b0;
      if (trig_evt && run) begin
        if (trig_xoff || (full_mode && ff_start) || (!full_mode && proc_start[nxt])) begin
          lost_count <= lost_count + 1'b1;
        end else begin
          event_no   <= trig_num;
          trig_count <= trig_count + 1'b1;
          if (full_mode) begin
            ff_start <= 1'b1;
          end else begin
            proc_start[nxt] <= 1'b1;
            nxt <= (nxt == PIW'(NPROC-1)) ? '0 : nxt + 1'b1;
          end
        end
      end
    end
  end

endmodule
