// packet_builder: formats one trigger's hits into 64-bit VME words.
//
// Started as soon as a trigger processor takes a trigger, it writes the
// header, then moves hits out of that processor's hit FIFOs while the scan is
// still running, one hit per clock, always from the lowest-numbered quadrant
// FIFO that holds one. When the processor reports its scan done and all its
// FIFOs are empty, the trailer follows. Hits therefore leave close to the
// order in which they were found, quadrants interleaved, and the FIFOs only
// have to absorb the difference between the hit rate and the output rate.
// It writes:
//   header  : 'H' in 63..56, zero in 55..24, frame counter in 23..16,
//             event counter (trigger number) in 15..0
//   compact : two hits per word, first hit in the low half
//             low  : CDS 31..20, pixel address 19..0 (quadrant in 19..18)
//             high : CDS 61..50, pixel index 49..32, quadrant in 63..62;
//             with an odd hit count the last high half is zero
//   extended: one hit per word: 63..56 zero, sample N 55..44, sample N-1
//             43..32, pedestal 31..26, noise 25..20, pixel address 19..0
//   trailer : 'T' in 63..56, 32-bit hit count in 55..24, frame counter and
//             event counter as in the header.
// These layouts are the specification's, as is starting the packet at the
// trigger; the zero padding, the hit order and placing the quadrant bits of
// the high compact half in 63..62 are this design's choices. One word is written per clock while out_ready (room
// for a few more words in the output FIFO) is high; out_wr and out_data are
// registered. done pulses for one clock after the trailer.
module packet_builder
  import maps_daq_pkg::*;
#(
  parameter int unsigned NQUAD = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              scan_done,    // no more hits will be stored
  input  logic              extended,     // 1: extended mode, 0: compact
  input  logic [15:0]       event_no,
  input  logic [7:0]        frame_no,
  // hit FIFOs of the selected processor
  input  logic [NQUAD-1:0]  hit_empty,
  input  hit_t              hit_data [NQUAD],
  output logic [NQUAD-1:0]  hit_rd,
  // output FIFO
  input  logic              out_ready,
  output logic              out_wr,
  output logic [63:0]       out_data,
  output logic              busy,
  output logic              done
);

  typedef enum logic [2:0] {B_IDLE, B_HDR, B_DATA, B_LAST, B_TRL} bstate_t;
  bstate_t                     state;
  logic [$clog2(NQUAD)-1:0]    q;          // quadrant picked this cycle
  logic                        any;
  logic [31:0]                 nhits;
  logic                        have_lo;
  logic [31:0]                 lo;
  logic                        ext_r;
  logic [15:0]                 ev_r;
  logic [7:0]                  fr_r;
  hit_t                        cur;
  logic [1:0]                  qn;

  assign busy = (state != B_IDLE);
  assign cur  = hit_data[q];
  assign qn   = 2'(q);

  // lowest-numbered quadrant FIFO holding a hit
  always_comb begin
    any = 1'b0;
    q   = '0;
    for (int i = NQUAD - 1; i >= 0; i--)
      if (!hit_empty[i]) begin
        any = 1'b1;
        q   = ($clog2(NQUAD))'(i);
      end
    hit_rd = '0;
    if (state == B_DATA && out_ready && any) hit_rd[q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= B_IDLE;
      nhits    <= '0;
      have_lo  <= 1'b0;
      lo       <= '0;
      ext_r    <= 1'b0;
      ev_r     <= '0;
      fr_r     <= '0;
      out_wr   <= 1'b0;
      out_data <= '0;
      done     <= 1'b0;
    end else begin
      out_wr <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          state   <= B_HDR;
          ext_r   <= extended;
          ev_r    <= event_no;
          fr_r    <= frame_no;
          nhits   <= '0;
          have_lo <= 1'b0;
        end
        B_HDR: if (out_ready) begin
          out_wr   <= 1'b1;
          out_data <= pkt_header(fr_r, ev_r);
          state    <= B_DATA;
        end
        B_DATA: if (out_ready) begin
          if (!any) begin
            if (scan_done) state <= B_LAST;
          end else begin
            nhits <= nhits + 1'b1;
            if (ext_r) begin
              out_wr   <= 1'b1;
              out_data <= extended_word(qn, cur);
            end else if (!have_lo) begin
              lo      <= compact_lo(qn, cur);
              have_lo <= 1'b1;
            end else begin
              out_wr   <= 1'b1;
              out_data <= {compact_hi(qn, cur), lo};
              have_lo  <= 1'b0;
            end
          end
        end
        B_LAST: if (out_ready) begin
          if (have_lo) begin   // odd hit count in compact mode
            out_wr   <= 1'b1;
            out_data <= {32'h0, lo};
            have_lo  <= 1'b0;
          end
          state <= B_TRL;
        end
        B_TRL: if (out_ready) begin
          out_wr   <= 1'b1;
          out_data <= pkt_trailer(nhits, fr_r, ev_r);
          state    <= B_IDLE;
          done     <= 1'b1;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
