// tcc_l2_cache: shared on-chip L2 seen from the two buses.
//
// It listens to the commit bus. A committed line (address, SM mask, modified
// words packed four per beat) is written word by word into the array, so the
// L2 always holds the committed memory state in commit order. A refill
// request (address-only beat) is answered after the access latency with two
// 16-byte beats on the refill bus, addressed to the requesting processor.
// Requests are served in the order they appear on the commit bus, and the
// data is read when the reply is sent, so a reply never misses a commit that
// came before the request.
//
// The document gives the L2 as 8 MB, 8-way, with a 16-cycle hit time that
// includes arbitration and bus transfer. Here the array holds 8 MB of lines
// and every access hits: tags, ways and the path to main memory are not
// modelled (the address is taken modulo the capacity). The array latency is
// derived so that a refill request reaches the processor HIT_LAT cycles after
// it was raised: 1 (request seen) + ARB_LAT + XFER_LAT (commit bus) +
// ACCESS_LAT + 1 (reply queue) + XFER_LAT (refill bus), so ACCESS_LAT is 5.
//
// Interface: cb is the broadcast commit bus, rb_out drives the refill bus.
// Timing: at most one request is accepted per cycle, one beat sent per cycle.
module tcc_l2_cache
  import tcc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8 * 1024 * 1024,
  parameter int unsigned HIT_LAT    = 16,
  parameter int unsigned ARB_LAT    = 3,
  parameter int unsigned XFER_LAT   = 3,
  parameter int unsigned QDEPTH     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cbus_beat_t  cb,
  output rbus_beat_t  rb_out,
  output logic [31:0] reads,
  output logic [31:0] words_written
);
  localparam int unsigned LINES      = SIZE_BYTES / (LINE_BITS / 8);
  localparam int unsigned IDX_W      = $clog2(LINES);
  localparam int unsigned ACCESS_LAT = HIT_LAT - ARB_LAT - 2 * XFER_LAT - 2;
  localparam int unsigned QW         = $clog2(QDEPTH);

  typedef struct packed {
    logic                valid;
    logic [CPU_ID_W-1:0] src;
    laddr_t              laddr;
  } l2req_t;

  line_t  mem [LINES];
  l2req_t dly_q [ACCESS_LAT];
  l2req_t q_q [QDEPTH];
  logic [QW-1:0] qh_q, qt_q;
  logic [QW:0]   qn_q;
  logic          beat_q;
  logic [31:0]   reads_q, ww_q;

  // Commit writes.
  always_ff @(posedge clk) begin
    if (cb.valid && cb.kind == CB_COMMIT)
      for (int unsigned w = 0; w < LINE_WORDS; w++) begin
        automatic int unsigned k = rank_below(cb.mask, w);
        if (cb.mask[w] && (k / BEAT_WORDS) == int'(cb.beat))
          mem[cb.laddr[IDX_W-1:0]][w] <= cb.data[k % BEAT_WORDS];
      end
  end

  l2req_t head;
  line_t  rd_line;
  logic   send;
  assign head    = q_q[qh_q];
  assign send    = (qn_q != 0);
  assign rd_line = mem[head.laddr[IDX_W-1:0]];

  always_comb begin
    rb_out = '0;
    if (send) begin
      rb_out.valid = 1'b1;
      rb_out.dst   = head.src;
      rb_out.laddr = head.laddr;
      rb_out.beat  = beat_q;
      for (int w = 0; w < BEAT_WORDS; w++)
        rb_out.data[w] = rd_line[int'(beat_q) * BEAT_WORDS + w];
    end
  end

  assign reads         = reads_q;
  assign words_written = ww_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < ACCESS_LAT; s++) dly_q[s] <= '0;
      for (int s = 0; s < QDEPTH; s++) q_q[s] <= '0;
      qh_q <= '0; qt_q <= '0; qn_q <= '0; beat_q <= 1'b0; reads_q <= '0; ww_q <= '0;
    end else begin
      dly_q[0] <= '{valid: cb.valid && cb.kind == CB_READ, src: cb.src, laddr: cb.laddr};
      for (int s = 1; s < ACCESS_LAT; s++) dly_q[s] <= dly_q[s-1];
      if (cb.valid && cb.kind == CB_COMMIT && cb.first) ww_q <= ww_q + popcount(cb.mask);
      if (dly_q[ACCESS_LAT-1].valid) begin
        q_q[qt_q] <= dly_q[ACCESS_LAT-1];
        qt_q <= qt_q + 1'b1;
      end
      beat_q <= send ? ~beat_q : 1'b0;
      if (send && beat_q) begin
        qh_q <= qh_q + 1'b1;
        reads_q <= reads_q + 1;
      end
      qn_q <= qn_q + (QW+1)'(dly_q[ACCESS_LAT-1].valid) - (QW+1)'(send && beat_q);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) qn_q <= (QW+1)'(QDEPTH));
endmodule
