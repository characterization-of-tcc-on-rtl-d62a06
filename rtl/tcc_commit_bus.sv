// tcc_commit_bus: the logical commit bus.
//
// A broadcast medium with serialization: the beat of the processor that holds
// the grant is selected and delivered to every processor's snoop port and to
// the L2 after XFER_LAT pipelined cycles (3 in the document's configuration);
// a new beat can enter every cycle. Physically this stands for the star of
// point-to-point links the document describes; here it is a multiplexer
// followed by a pipeline. It also counts the beats carried, by kind, for bus
// utilization figures.
//
// Interface: beats_in from each processor, gnt one-hot from the arbiter;
// last is the undelayed last flag of the owner's beat (for the arbiter);
// bus_out is the broadcast beat.
module tcc_commit_bus
  import tcc_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned XFER_LAT = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cbus_beat_t [N-1:0]   beats_in,
  input  logic       [N-1:0]   gnt,
  output logic                 last,
  output cbus_beat_t           bus_out,
  output logic [31:0]          commit_beats,
  output logic [31:0]          read_beats
);
  cbus_beat_t sel;
  cbus_beat_t pipe_q [XFER_LAT];
  logic [31:0] cb_q, rd_q;

  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++)
      if (gnt[i] && beats_in[i].valid) sel = beats_in[i];
    last = sel.valid && sel.last;
  end

  assign bus_out      = pipe_q[XFER_LAT-1];
  assign commit_beats = cb_q;
  assign read_beats   = rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < XFER_LAT; s++) pipe_q[s] <= '0;
      cb_q <= '0; rd_q <= '0;
    end else begin
      pipe_q[0] <= sel;
      for (int s = 1; s < XFER_LAT; s++) pipe_q[s] <= pipe_q[s-1];
      if (sel.valid && sel.kind == CB_COMMIT) cb_q <= cb_q + 1;
      if (sel.valid && sel.kind == CB_READ)   rd_q <= rd_q + 1;
    end
  end
endmodule
