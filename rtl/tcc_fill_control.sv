// tcc_fill_control: miss status holding register and refill receiver.
//
// Holds the one outstanding L1 load miss (the processor is single-issue and
// blocks on a miss). It collects the two 16-byte refill-bus beats addressed to
// this processor for the pending line. While the miss is pending it also
// watches the commit bus: words of the pending line that another processor
// commits are recorded as stale, because the refill may carry their old
// values; the cache then leaves them invalid when it merges the fill, and a
// load of such a word misses again. (The document says only that pending
// accesses in the MSHRs must be checked on a commit; re-fetching instead of
// raising a violation is this design's choice, since the load has not yet
// returned a value.)
//
// Interface: start/start_laddr opens the MSHR; fill_valid with fill_data and
// stale is presented once both beats have arrived and is held until fill_ack.
// Timing: one clock per beat; fill_valid rises the clock after the last beat.
module tcc_fill_control
  import tcc_pkg::*;
#(
  parameter int unsigned MY_ID = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  laddr_t     start_laddr,
  input  cbus_beat_t cb,
  input  rbus_beat_t rb,
  input  logic       fill_ack,
  output logic       pending,
  output laddr_t     mshr_laddr,
  output logic       fill_valid,
  output line_t      fill_data,
  output wmask_t     stale
);
  logic [REFILL_BEATS-1:0] got_q;
  logic   pend_q;
  laddr_t laddr_q;
  line_t  data_q;
  wmask_t stale_q;

  assign pending    = pend_q;
  assign mshr_laddr = laddr_q;
  assign fill_valid = pend_q && (&got_q);
  assign fill_data  = data_q;
  assign stale      = stale_q;

  logic snoop_hit, rb_hit;
  assign snoop_hit = pend_q && cb.valid && cb.first && cb.kind == CB_COMMIT &&
                     cb.src != CPU_ID_W'(MY_ID) && cb.laddr == laddr_q;
  assign rb_hit    = pend_q && rb.valid && rb.dst == CPU_ID_W'(MY_ID) && rb.laddr == laddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0; got_q <= '0; laddr_q <= '0; data_q <= '0; stale_q <= '0;
    end else if (start) begin
      pend_q <= 1'b1; got_q <= '0; laddr_q <= start_laddr; stale_q <= '0;
    end else begin
      if (fill_ack) pend_q <= 1'b0;
      if (snoop_hit) stale_q <= stale_q | cb.mask;
      if (rb_hit) begin
        got_q[rb.beat] <= 1'b1;
        for (int w = 0; w < BEAT_WORDS; w++)
          data_q[int'(rb.beat) * BEAT_WORDS + w] <= rb.data[w];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !pend_q || fill_ack);
endmodule
