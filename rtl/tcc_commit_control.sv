// tcc_commit_control: transaction commit engine of one processor.
//
// On a commit request (end of transaction, or an early commit forced by an
// overflow) it asks the commit arbiter for the commit bus. Once granted, it
// reads the store address FIFO one pointer at a time; for each pointed line
// that still has SM bits it sends the line address and SM mask on the address
// lines and the modified words, packed four to a 16-byte beat, on the data
// lines, then clears the line's SM bits (so a repeated pointer is skipped).
// Then it sends the speculatively modified lines held in the victim cache,
// which have no pointer of their own, and an END beat that closes the bus
// tenure. Finally it flash-clears all SR/SM bits and empties the FIFO.
// The SAF walk and the per-line format follow the document; the victim-cache
// walk, the END beat and one examine cycle per pointer are this design's own.
//
// Interface: start/early request a commit; a violation while still waiting
// for the bus abandons it. bus_req/bus_hold/grant talk to the arbiter; beat is
// this processor's commit-bus driver. line_ptr/line reads the L1 line named by
// the FIFO head (combinational). done pulses at the end (early_done for an
// early commit). Timing: per line 1 + ceil(modified words / 4) cycles.
module tcc_commit_control
  import tcc_pkg::*;
#(
  parameter int unsigned MY_ID      = 0,
  parameter int unsigned PTR_W      = 10,
  parameter int unsigned VC_ENTRIES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       early,
  input  logic       violate,
  output logic       busy,
  output logic       bus_req,
  output logic       bus_hold,
  input  logic       grant,
  output cbus_beat_t beat,
  input  logic       saf_empty,
  input  logic [PTR_W-1:0] saf_ptr,
  output logic       saf_pop,
  output logic [PTR_W-1:0] line_ptr,
  input  cline_t     line,
  output logic       line_clr_sm,
  input  cline_t [VC_ENTRIES-1:0] vc_lines,
  output logic       vc_clr_sm,
  output logic [$clog2(VC_ENTRIES)-1:0] vc_idx,
  output logic       flash_commit,
  output logic       done,
  output logic       early_done,
  output logic [31:0] lines_sent,
  output logic [31:0] words_sent
);
  typedef enum logic [2:0] {S_IDLE, S_REQ, S_LINE, S_SEND, S_VC, S_SEND_VC, S_END, S_DONE} st_e;
  localparam int unsigned VW = $clog2(VC_ENTRIES);

  st_e    st_q;
  logic   early_q;
  laddr_t cur_laddr_q;
  wmask_t cur_mask_q;
  line_t  cur_data_q;
  logic [1:0] beat_q, nbeats_q;
  logic [VW-1:0] vc_q;
  logic [31:0] lines_q, words_q;

  assign busy       = (st_q != S_IDLE);
  assign bus_req    = (st_q != S_IDLE) && (st_q != S_DONE);
  assign bus_hold   = early_q;
  assign line_ptr   = saf_ptr;
  assign vc_idx     = vc_q;
  assign lines_sent = lines_q;
  assign words_sent = words_q;

  // Pack the modified words of beat b, in word order.
  function automatic beat_data_t pack(line_t d, wmask_t m, logic [1:0] b);
    beat_data_t r = '0;
    for (int unsigned w = 0; w < LINE_WORDS; w++) begin
      automatic int unsigned k = rank_below(m, w);
      if (m[w] && (k / BEAT_WORDS) == int'(b)) r[k % BEAT_WORDS] = d[w];
    end
    return r;
  endfunction

  always_comb begin
    beat = '0;
    beat.src = CPU_ID_W'(MY_ID);
    if (st_q == S_SEND || st_q == S_SEND_VC) begin
      beat.valid = 1'b1;
      beat.kind  = CB_COMMIT;
      beat.first = (beat_q == 2'd0);
      beat.beat  = beat_q;
      beat.laddr = cur_laddr_q;
      beat.mask  = cur_mask_q;
      beat.data  = pack(cur_data_q, cur_mask_q, beat_q);
    end else if (st_q == S_END) begin
      beat.valid = 1'b1;
      beat.kind  = CB_END;
      beat.first = 1'b1;
      beat.last  = 1'b1;
    end
  end

  logic line_live, vc_live;
  assign line_live = line.tv && (line.sm != '0);
  assign vc_live   = vc_lines[vc_q].tv && (vc_lines[vc_q].sm != '0);

  always_comb begin
    saf_pop      = (st_q == S_LINE && !saf_empty && !line_live) ||
                   (st_q == S_SEND && beat_q == nbeats_q - 2'd1);
    line_clr_sm  = (st_q == S_SEND && beat_q == nbeats_q - 2'd1);
    vc_clr_sm    = (st_q == S_SEND_VC && beat_q == nbeats_q - 2'd1);
    flash_commit = (st_q == S_DONE);
    done         = (st_q == S_DONE) && !early_q;
    early_done   = (st_q == S_DONE) &&  early_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; early_q <= 1'b0; cur_laddr_q <= '0; cur_mask_q <= '0;
      cur_data_q <= '0; beat_q <= '0; nbeats_q <= '0; vc_q <= '0;
      lines_q <= '0; words_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (start || early) begin
          st_q <= S_REQ; early_q <= early && !start;
        end
        S_REQ: begin
          if (violate)    st_q <= S_IDLE;
          else if (grant) st_q <= S_LINE;
        end
        S_LINE: begin
          if (saf_empty) begin
            st_q <= S_VC; vc_q <= '0;
          end else if (line_live) begin
            st_q <= S_SEND; beat_q <= '0;
            cur_laddr_q <= line.laddr; cur_mask_q <= line.sm; cur_data_q <= line.data;
            nbeats_q <= 2'(commit_beats(line.sm));
          end
        end
        S_SEND: begin
          beat_q <= beat_q + 2'd1;
          if (beat_q == nbeats_q - 2'd1) begin
            st_q <= S_LINE;
            lines_q <= lines_q + 1;
            words_q <= words_q + popcount(cur_mask_q);
          end
        end
        S_VC: begin
          if (vc_live) begin
            st_q <= S_SEND_VC; beat_q <= '0;
            cur_laddr_q <= vc_lines[vc_q].laddr; cur_mask_q <= vc_lines[vc_q].sm;
            cur_data_q  <= vc_lines[vc_q].data;
            nbeats_q <= 2'(commit_beats(vc_lines[vc_q].sm));
          end else if (vc_q == VW'(VC_ENTRIES - 1)) begin
            st_q <= S_END;
          end else begin
            vc_q <= vc_q + 1'b1;
          end
        end
        S_SEND_VC: begin
          beat_q <= beat_q + 2'd1;
          if (beat_q == nbeats_q - 2'd1) begin
            lines_q <= lines_q + 1;
            words_q <= words_q + popcount(cur_mask_q);
            if (vc_q == VW'(VC_ENTRIES - 1)) st_q <= S_END;
            else begin st_q <= S_VC; vc_q <= vc_q + 1'b1; end
          end
        end
        S_END:  st_q <= S_DONE;
        S_DONE: begin st_q <= S_IDLE; early_q <= 1'b0; end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // Once granted, the commit owns the bus: no foreign commit can violate it.
  assert property (@(posedge clk) disable iff (!rst_n)
    (st_q inside {S_LINE, S_SEND, S_VC, S_SEND_VC, S_END}) |-> grant);
endmodule
