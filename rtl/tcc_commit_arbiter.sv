// tcc_commit_arbiter: system-wide arbiter for the commit bus and keeper of the
// commit permission.
//
// Processors request the commit bus either for a refill request (one
// address-only beat) or for a commit (a whole write-set). Because a granted
// processor keeps the bus until the last beat of its tenure, every processor
// sees all commits, each as one unit, in the same order. A commit made early
// because of an overflow is flagged with hold: the processor then keeps the
// commit permission, and commit requests of all other processors are not
// granted until the holder's next commit without hold (its regular commit).
// Refill requests are still granted meanwhile. All transactions are treated
// as unordered, which is how the evaluated applications use them.
//
// Arbitration takes ARB_LAT cycles (3, as in the document) from the choice of
// a winner to its grant; choice among requesters is round-robin (this design's
// choice). It is not overlapped with the previous tenure; instead one idle
// cycle plus ARB_LAT separates two tenures, which is at least the transfer
// latency plus one, so a violation raised by one commit reaches a waiting
// committer before that committer is granted.
//
// Interface: req/commit/hold per processor; last = the bus carries the last
// beat of the owner's tenure; gnt is one-hot. A grant is also withdrawn when
// the owner drops req.
module tcc_commit_arbiter #(
  parameter int unsigned N       = 8,
  parameter int unsigned ARB_LAT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] commit,
  input  logic [N-1:0] hold,
  input  logic         last,
  output logic [N-1:0] gnt,
  output logic         token_held,
  output logic [$clog2(N)-1:0] token_owner,
  output logic [31:0]  tenures,
  output logic [31:0]  busy_cycles
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [1:0] {A_IDLE, A_ARB, A_GRANT} ast_e;

  ast_e        st_q;
  logic [IW-1:0] win_q, rr_q, tok_q;
  logic        tok_v_q;
  logic [7:0]  cnt_q;
  logic [31:0] ten_q, busy_q;
  logic [N-1:0] elig;
  logic        found;
  logic [IW-1:0] pick;

  always_comb begin
    for (int i = 0; i < N; i++)
      elig[i] = req[i] && !(commit[i] && tok_v_q && tok_q != IW'(i));
    found = 1'b0; pick = '0;
    for (int k = 0; k < N; k++) begin
      automatic logic [IW-1:0] i = IW'((int'(rr_q) + k) % N);
      if (elig[i] && !found) begin found = 1'b1; pick = i; end
    end
    gnt = '0;
    if (st_q == A_GRANT) gnt[win_q] = 1'b1;
  end

  assign token_held  = tok_v_q;
  assign token_owner = tok_q;
  assign tenures     = ten_q;
  assign busy_cycles = busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= A_IDLE; win_q <= '0; rr_q <= '0; tok_q <= '0; tok_v_q <= 1'b0;
      cnt_q <= '0; ten_q <= '0; busy_q <= '0;
    end else begin
      unique case (st_q)
        A_IDLE: if (found) begin
          st_q <= A_ARB; win_q <= pick; cnt_q <= 8'(ARB_LAT - 1);
        end
        A_ARB: begin
          if (!elig[win_q])      st_q <= A_IDLE;
          else if (cnt_q == 0) begin st_q <= A_GRANT; ten_q <= ten_q + 1; end
          else                   cnt_q <= cnt_q - 1'b1;
        end
        A_GRANT: begin
          busy_q <= busy_q + 1;
          if (!req[win_q] || last) begin
            st_q <= A_IDLE;
            rr_q <= IW'((int'(win_q) + 1) % N);
            if (req[win_q] && commit[win_q]) begin
              if (hold[win_q]) begin tok_v_q <= 1'b1; tok_q <= win_q; end
              else if (tok_q == win_q) tok_v_q <= 1'b0;
            end
          end
        end
        default: st_q <= A_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
