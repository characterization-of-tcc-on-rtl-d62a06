// tcc_refill_bus: the logical refill bus (data only, L2 to processors).
//
// The L2 is its only driver, so it needs no arbitration; each 16-byte beat is
// tagged with the destination processor and line address and is delivered to
// all processors after XFER_LAT pipelined cycles (3 in the document's
// configuration). Each processor's fill control keeps the beats addressed to
// it. It counts the beats carried.
module tcc_refill_bus
  import tcc_pkg::*;
#(
  parameter int unsigned XFER_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rbus_beat_t  beat_in,
  output rbus_beat_t  bus_out,
  output logic [31:0] beats
);
  rbus_beat_t pipe_q [XFER_LAT];
  logic [31:0] n_q;

  assign bus_out = pipe_q[XFER_LAT-1];
  assign beats   = n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < XFER_LAT; s++) pipe_q[s] <= '0;
      n_q <= '0;
    end else begin
      pipe_q[0] <= beat_in;
      for (int s = 1; s < XFER_LAT; s++) pipe_q[s] <= pipe_q[s-1];
      if (beat_in.valid) n_q <= n_q + 1;
    end
  end
endmodule
