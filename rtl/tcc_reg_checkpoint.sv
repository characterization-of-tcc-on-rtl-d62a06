// tcc_reg_checkpoint: architectural register checkpoint for transactions.
//
// At the start of each transaction the processor's architectural registers
// are copied here; when the transaction is violated they are handed back so
// the transaction can re-execute from its start. One checkpoint is kept
// (single buffering, the document's main configuration). The register count
// and width are those of a 32-bit core with 32 general registers, which the
// document does not give.
//
// Interface: take copies regs_in at the clock edge; restore is a request
// answered in the same cycle by restore_valid and ckpt (the stored copy);
// if take and restore coincide, restore sees the old copy.
module tcc_reg_checkpoint #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned XLEN   = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       take,
  input  logic [NREGS-1:0][XLEN-1:0] regs_in,
  input  logic                       restore,
  output logic                       restore_valid,
  output logic [NREGS-1:0][XLEN-1:0] ckpt,
  output logic [31:0]                restores
);
  logic [NREGS-1:0][XLEN-1:0] ck_q;
  logic [31:0] n_q;

  assign ckpt          = ck_q;
  assign restore_valid = restore;
  assign restores      = n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ck_q <= '0; n_q <= '0;
    end else begin
      if (take) ck_q <= regs_in;
      if (restore) n_q <= n_q + 1;
    end
  end
endmodule
