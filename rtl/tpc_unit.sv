// tpc_unit: target program counter (TPC) and program counter (PC).
//
// The TPC addresses the RSB stage and walks one instruction ahead of the PC,
// which addresses the fetch (IF) stage: each cycle the PC takes the address
// the TPC held in the previous cycle, so the instruction fetched is the one
// whose RSB entry was read the cycle before, and the TPC moves on to the
// predicted successor of its own address (tpc_pred, from the branch
// predictor). When a branch outcome contradicts the prediction (redirect),
// the PC is corrected first and the TPC is restored from the corrected
// address with the help of the branch predictor (redirect_tpc = predicted
// successor of redirect_pc). The RSB result that reaches IF together with
// the corrected PC was therefore read with a stale TPC (the "bad TPC"
// case), which the pipeline detects later. Because the TPC always holds the
// predicted successor of the PC, the pipeline can use it as the PC's
// predicted next address.
//
// Timing: one register each for TPC and PC; pc_valid is low only in the
// first cycle after reset, before the PC has received a TPC. stall holds both
// registers; redirect overrides stall. The relation PC <- TPC follows the
// design description; the reset value is this design's choice.
module tpc_unit
  import tl_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  word_t tpc_pred,      // predicted successor of tpc
  input  logic  redirect,
  input  word_t redirect_pc,
  input  word_t redirect_tpc,  // predicted successor of redirect_pc
  output word_t tpc,
  output word_t pc,
  output logic  pc_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpc      <= RESET_PC;
      pc       <= RESET_PC;
      pc_valid <= 1'b0;
    end else if (redirect) begin
      pc       <= redirect_pc;
      tpc      <= redirect_tpc;
      pc_valid <= 1'b1;
    end else if (!stall) begin
      pc       <= tpc;
      tpc      <= tpc_pred;
      pc_valid <= 1'b1;
    end
  end

endmodule
