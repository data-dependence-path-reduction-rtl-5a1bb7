// tb_bpred: self-checking test of the gshare predictor and BTB.
//
// A reference model with its own counter table, history register and BTB
// receives the same updates; both prediction ports are compared with it
// every cycle for random addresses. A loop branch trained repeatedly must
// end up predicted taken with its target, and a branch that aliases in the
// BTB (same index, different tag) must not use the other branch's target.
module tb_bpred;
  import tl_pkg::*;

  localparam int BTB_N = 1024, PHT_N = 4096, H = 12;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t q0_pc, q0_next, q1_pc, q1_next, upd_pc, upd_target;
  logic  upd_en, upd_taken;

  bpred #(.BTB_ENTRIES(BTB_N), .PHT_ENTRIES(PHT_N), .BHR_BITS(H)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          m_pht [PHT_N];
  logic [H-1:0] m_bhr;
  logic        m_v   [BTB_N];
  word_t       m_tag [BTB_N];
  word_t       m_tgt [BTB_N];

  function automatic word_t m_pred(word_t a);
    int b = int'(a[11:2]);
    int p = int'(a[13:2] ^ m_bhr);
    if (m_v[b] && m_tag[b] == (a >> 12) && m_pht[p] >= 2) return m_tgt[b];
    return a + 4;
  endfunction

  function automatic void m_update(word_t a, logic t, word_t tgt);
    int b = int'(a[11:2]);
    int p = int'(a[13:2] ^ m_bhr);
    if (t && m_pht[p] < 3) m_pht[p]++;
    if (!t && m_pht[p] > 0) m_pht[p]--;
    m_bhr = {m_bhr[H-2:0], t};
    if (t) begin m_v[b] = 1; m_tag[b] = a >> 12; m_tgt[b] = tgt; end
  endfunction

  task automatic compare(string what);
    checks++;
    if (q0_next !== m_pred(q0_pc) || q1_next !== m_pred(q1_pc)) begin
      failures++;
      if (failures < 10) $display("%s: %h->%h %h->%h, expected %h %h", what, q0_pc, q0_next,
                                  q1_pc, q1_next, m_pred(q0_pc), m_pred(q1_pc));
    end
  endtask

  task automatic step(logic en, word_t a, logic t, word_t tgt);
    @(negedge clk);
    upd_en = en; upd_pc = a; upd_taken = t; upd_target = tgt;
    @(posedge clk);
    if (en) m_update(a, t, tgt);
    #1 upd_en = 0;
  endtask

  initial begin
    word_t br_pcs [8];
    upd_en = 0; upd_pc = 0; upd_taken = 0; upd_target = 0; q0_pc = 0; q1_pc = 0;
    for (int i = 0; i < PHT_N; i++) m_pht[i] = 1;
    for (int i = 0; i < BTB_N; i++) m_v[i] = 0;
    m_bhr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // loop branch: taken many times
    for (int n = 0; n < 20; n++) step(1, 32'h0000_0120, 1, 32'h0000_0100);
    q0_pc = 32'h120; q1_pc = 32'h4120;   // same BTB index, other tag
    #1 compare("trained loop");
    checks++;
    if (q0_next !== 32'h100) begin failures++; $display("loop branch not predicted taken"); end
    checks++;
    if (q1_next !== 32'h4124) begin failures++; $display("aliasing branch used a foreign target"); end
    // random traffic over a few branches and random lookups
    foreach (br_pcs[i]) br_pcs[i] = {$urandom} & 32'h0000_fffc;
    for (int n = 0; n < 5000; n++) begin
      int k;
      k = $urandom_range(0, 7);
      step($urandom_range(0, 1), br_pcs[k], ($urandom_range(0, 3) != 0), {$urandom} & ~32'h3);
      q0_pc = ($urandom_range(0, 1) == 0) ? br_pcs[$urandom_range(0, 7)] : ({$urandom} & ~32'h3);
      q1_pc = br_pcs[$urandom_range(0, 7)];
      #1 compare($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
