// tcc_overflow_control: replacement choice and overflow handling for the
// transactional L1.
//
// The L1 must keep every line a running transaction has read or written
// speculatively. When a new line needs a way of a set:
//   * an empty way is used if there is one;
//   * otherwise a way without speculative state is evicted (such lines are
//     clean, since committed data has already gone to the L2);
//   * otherwise, if the victim cache has a free entry, a speculative way is
//     moved there;
//   * otherwise this is an associativity overflow.
// A store that needs a new store-address-FIFO pointer while the FIFO is full
// is a capacity overflow. On overflow the transaction commits its current
// write-set early and keeps commit permission, so no other processor can
// commit until this transaction reaches its regular commit point. The choice
// among several candidate ways is round-robin (this design's choice; the
// document does not give a replacement policy).
//
// Interface: way state in (tv, spec), decision out (alloc_kind, alloc_way);
// overflow is combinational; holding is the registered "commit permission
// kept" state, set by early_done and cleared by regular_done or violate.
module tcc_overflow_control #(
  parameter int unsigned WAYS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            need_alloc,
  input  logic [WAYS-1:0] way_tv,
  input  logic [WAYS-1:0] way_spec,
  input  logic            vc_has_free,
  input  logic            saf_overflow,
  input  logic            alloc_fire,
  input  logic            early_done,
  input  logic            regular_done,
  input  logic            violate,
  output logic [1:0]      alloc_kind,   // 0 empty way, 1 evict clean, 2 move to victim cache
  output logic [$clog2(WAYS)-1:0] alloc_way,
  output logic            overflow,
  output logic            holding,
  output logic [31:0]     overflow_count
);
  localparam int unsigned WW = $clog2(WAYS);
  localparam logic [1:0] K_EMPTY = 2'd0, K_EVICT = 2'd1, K_TO_VC = 2'd2;

  logic [WW-1:0] rr_q;
  logic          hold_q;
  logic [31:0]   cnt_q;
  logic          f_empty, f_clean;
  logic [WW-1:0] w_empty, w_clean;

  always_comb begin
    f_empty = 1'b0; f_clean = 1'b0; w_empty = '0; w_clean = '0;
    for (int k = 0; k < WAYS; k++) begin
      automatic logic [WW-1:0] w = WW'(rr_q + WW'(k));
      if (!way_tv[w] && !f_empty) begin f_empty = 1'b1; w_empty = w; end
      if (way_tv[w] && !way_spec[w] && !f_clean) begin f_clean = 1'b1; w_clean = w; end
    end
    if (f_empty)      begin alloc_kind = K_EMPTY; alloc_way = w_empty; end
    else if (f_clean) begin alloc_kind = K_EVICT; alloc_way = w_clean; end
    else              begin alloc_kind = K_TO_VC; alloc_way = rr_q;    end
    overflow = saf_overflow ||
               (need_alloc && !f_empty && !f_clean && !vc_has_free);
  end

  assign holding        = hold_q;
  assign overflow_count = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; hold_q <= 1'b0; cnt_q <= '0;
    end else begin
      if (alloc_fire) rr_q <= rr_q + 1'b1;
      if (early_done) begin
        hold_q <= 1'b1;
        cnt_q  <= cnt_q + 1;
      end else if (regular_done || violate) begin
        hold_q <= 1'b0;
      end
    end
  end
endmodule
