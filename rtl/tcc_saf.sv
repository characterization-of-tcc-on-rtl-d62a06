// tcc_saf: store address FIFO.
//
// A tagless, non-associative, single-ported list of pointers to the L1 lines
// a transaction has speculatively modified. A pointer is pushed by the first
// speculative store to a line (all SM bits of the line were 0). At commit the
// pointers are read back one by one in push order, and the FIFO is emptied
// when the write-set has been committed or the transaction is violated.
// The depth (1024) and pointer width (10 bits = set index + way of a 32-KB,
// 4-way, 32-byte-line cache) are those of the document.
//
// Interface: push/push_ptr; pop returns rd_ptr for the current head (valid
// while !empty), pop advances it; clear empties it. One operation per cycle
// (single port): clear has priority, then push, then pop. full is raised when
// no more pointers fit; the owner treats that as a capacity overflow.
// Timing: rd_ptr is combinational from the head; updates take one clock.
module tcc_saf #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned PTR_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [PTR_W-1:0] push_ptr,
  input  logic             pop,
  input  logic             clear,
  output logic [PTR_W-1:0] rd_ptr,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [PTR_W-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_q, rd_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  assign empty  = (cnt_q == 0);
  assign full   = (cnt_q == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count  = cnt_q;
  assign rd_ptr = mem[rd_q];

  always_ff @(posedge clk) begin
    if (push && !clear && !full) mem[wr_q] <= push_ptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0; rd_q <= '0; cnt_q <= '0;
    end else if (clear) begin
      wr_q <= '0; rd_q <= '0; cnt_q <= '0;
    end else if (push && !full) begin
      wr_q  <= (wr_q == AW'(DEPTH-1)) ? '0 : wr_q + 1'b1;
      cnt_q <= cnt_q + 1'b1;
    end else if (pop && !empty) begin
      rd_q  <= (rd_q == AW'(DEPTH-1)) ? '0 : rd_q + 1'b1;
      cnt_q <= cnt_q - 1'b1;
    end
  end

  // Single port: the owner never pushes and pops in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
