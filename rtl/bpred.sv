// bpred: gshare branch predictor with a direct-mapped branch target buffer.
//
// It predicts the address that follows an instruction address. The TPC uses
// it to walk ahead of the PC (port 0), and so does the TPC restore after a
// misprediction, which predicts the successor of the corrected PC (port 1).
// A prediction is "taken" when the BTB holds the address (tag match) and the
// 2-bit counter selected by gshare indexing (address bits XOR global history)
// is 2 or 3. The target then comes from the BTB; otherwise the prediction is
// address + 4. Both read ports are combinational.
//
// Update (upd_en, one per resolved conditional branch, from the execute
// stage): the counter at the gshare index formed with the current history
// moves toward the outcome, the history shifts the outcome in, and a taken
// branch writes its target into the BTB. The sizes are those of the
// evaluated processor (1024-entry direct-mapped BTB, 12-bit history,
// 4096-entry pattern table). Updating at resolution time rather than
// speculatively, and the counter reset value (1, weakly not taken), are this
// design's choices.
module bpred
  import tl_pkg::*;
#(
  parameter int BTB_ENTRIES = 1024,
  parameter int PHT_ENTRIES = 4096,
  parameter int BHR_BITS    = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  // prediction ports
  input  word_t q0_pc,
  output word_t q0_next,
  input  word_t q1_pc,
  output word_t q1_next,
  // update from a resolved branch
  input  logic  upd_en,
  input  word_t upd_pc,
  input  logic  upd_taken,
  input  word_t upd_target
);

  localparam int BTB_AW = $clog2(BTB_ENTRIES);
  localparam int PHT_AW = $clog2(PHT_ENTRIES);
  localparam int TAG_W  = XLEN - BTB_AW - 2;

  logic [TAG_W-1:0]  btb_tag    [BTB_ENTRIES];
  word_t             btb_target [BTB_ENTRIES];
  logic [BTB_ENTRIES-1:0] btb_v;
  logic [1:0]        pht [PHT_ENTRIES];
  logic [BHR_BITS-1:0] bhr;

  function automatic logic [PHT_AW-1:0] pht_idx(word_t a, logic [BHR_BITS-1:0] h);
    return a[PHT_AW+1:2] ^ PHT_AW'(h);
  endfunction

  function automatic logic [BTB_AW-1:0] btb_idx(word_t a);
    return a[BTB_AW+1:2];
  endfunction

  function automatic logic [TAG_W-1:0] btb_tg(word_t a);
    return a[XLEN-1:BTB_AW+2];
  endfunction

  always_comb begin
    logic [BTB_AW-1:0] b0, b1;
    b0 = btb_idx(q0_pc);
    b1 = btb_idx(q1_pc);
    if (btb_v[b0] && btb_tag[b0] == btb_tg(q0_pc) && pht[pht_idx(q0_pc, bhr)][1])
      q0_next = btb_target[b0];
    else
      q0_next = q0_pc + word_t'(4);
    if (btb_v[b1] && btb_tag[b1] == btb_tg(q1_pc) && pht[pht_idx(q1_pc, bhr)][1])
      q1_next = btb_target[b1];
    else
      q1_next = q1_pc + word_t'(4);
  end

  logic [PHT_AW-1:0] u_idx;
  logic [BTB_AW-1:0] u_b;
  assign u_idx = pht_idx(upd_pc, bhr);
  assign u_b   = btb_idx(upd_pc);

  // counters, history and BTB valid bits (reset)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PHT_ENTRIES; i++) pht[i] <= 2'd1;
      bhr   <= '0;
      btb_v <= '0;
    end else if (upd_en) begin
      if (upd_taken && pht[u_idx] != 2'd3)       pht[u_idx] <= pht[u_idx] + 2'd1;
      else if (!upd_taken && pht[u_idx] != 2'd0) pht[u_idx] <= pht[u_idx] - 2'd1;
      bhr <= {bhr[BHR_BITS-2:0], upd_taken};
      if (upd_taken) btb_v[u_b] <= 1'b1;
    end
  end

  // BTB tag and target arrays (no reset: qualified by btb_v)
  always_ff @(posedge clk) begin
    if (upd_en && upd_taken) begin
      btb_tag[u_b]    <= btb_tg(upd_pc);
      btb_target[u_b] <= upd_target;
    end
  end

endmodule
