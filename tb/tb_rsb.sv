// tb_rsb: self-checking test of the register specifier buffer.
//
// A small associative reference model (tag -> base/index with an LRU list
// kept as a queue) is driven with the same lookups and writes as the RSB.
// Checked: the default stack-pointer/zero pair on a miss, hits after a
// write, rewriting an existing address without a second entry, filling
// invalid entries first, replacing the least recently used entry once the
// table is full (and that a lookup hit refreshes an entry), and the evict
// flag. Runs at the default 64 entries with a random phase of mixed traffic.
module tb_rsb;
  import tl_pkg::*;

  localparam int N = 64;

  logic      clk = 1'b0, rst_n = 1'b0;
  word_t     lookup_addr, wr_addr;
  logic      lookup_touch, wr_en, evict;
  rsb_out_t  rsb_out;
  reg_spec_t wr_base, wr_index;

  rsb #(.ENTRIES(N), .TAG_W(32)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: queue of tags, index 0 = most recently used
  word_t     m_tag [$];
  reg_spec_t m_base [word_t];
  reg_spec_t m_index [word_t];

  function automatic int m_find(word_t a);
    foreach (m_tag[i]) if (m_tag[i] == a) return i;
    return -1;
  endfunction

  function automatic void m_touch(int i);
    word_t t = m_tag[i];
    m_tag.delete(i);
    m_tag.push_front(t);
  endfunction

  // model step for one clock: returns the expected evict flag
  function automatic logic m_step(logic we, word_t wa, reg_spec_t wb, reg_spec_t wi,
                                  logic lt, word_t la);
    int i;
    logic ev = 1'b0;
    if (we) begin
      i = m_find(wa);
      if (i >= 0) m_touch(i);
      else begin
        if (m_tag.size() == N) begin
          word_t old = m_tag.pop_back();
          m_base.delete(old); m_index.delete(old);
          ev = 1'b1;
        end
        m_tag.push_front(wa);
      end
      m_base[wa] = wb; m_index[wa] = wi;
    end else if (lt) begin
      i = m_find(la);
      if (i >= 0) m_touch(i);
    end
    return ev;
  endfunction

  task automatic check_lookup(word_t a);
    int i;
    lookup_addr = a;
    #1;
    i = m_find(a);
    checks++;
    if (i >= 0) begin
      if (!rsb_out.hit || rsb_out.base != m_base[a] || rsb_out.index != m_index[a]) begin
        failures++;
        if (failures < 10) $display("lookup %h: got hit=%0d %0d/%0d, expected hit %0d/%0d",
                                    a, rsb_out.hit, rsb_out.base, rsb_out.index, m_base[a], m_index[a]);
      end
    end else if (rsb_out.hit || rsb_out.base != SP_REG || rsb_out.index != ZERO_REG) begin
      failures++;
      if (failures < 10) $display("lookup %h: expected miss with sp/zero, got hit=%0d %0d/%0d",
                                  a, rsb_out.hit, rsb_out.base, rsb_out.index);
    end
  endtask

  // one clock with optional write and optional touching lookup
  task automatic cycle_op(logic we, word_t wa, reg_spec_t wb, reg_spec_t wi, logic lt, word_t la);
    logic exp_ev;
    @(negedge clk);
    wr_en = we; wr_addr = wa; wr_base = wb; wr_index = wi;
    lookup_touch = lt; lookup_addr = la;
    #1;
    exp_ev = m_step(we, wa, wb, wi, lt, la);
    checks++;
    if (evict !== exp_ev) begin
      failures++;
      if (failures < 10) $display("evict flag %0d, expected %0d (write %h)", evict, exp_ev, wa);
    end
    @(posedge clk);
    #1;
    wr_en = 1'b0; lookup_touch = 1'b0;
  endtask

  initial begin
    wr_en = 0; lookup_touch = 0; lookup_addr = 0; wr_addr = 0; wr_base = 0; wr_index = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // empty table: default specifiers
    check_lookup(32'h100);
    // fill all entries
    for (int i = 0; i < N; i++) cycle_op(1, 32'h1000 + 4 * i, 5'(i), 5'(31 - i), 0, 0);
    for (int i = 0; i < N; i++) check_lookup(32'h1000 + 4 * i);
    // rewrite an existing address: no eviction, new specifiers
    cycle_op(1, 32'h1000 + 4 * 5, 5'd7, 5'd9, 0, 0);
    check_lookup(32'h1000 + 4 * 5);
    // refresh entry 0 by a lookup, then insert: the oldest untouched one (entry 1) goes
    cycle_op(0, 0, 0, 0, 1, 32'h1000);
    cycle_op(1, 32'h9000, 5'd3, 5'd4, 0, 0);
    check_lookup(32'h1000);
    check_lookup(32'h1004);
    check_lookup(32'h9000);
    // random traffic over a tag space larger than the table
    for (int n = 0; n < 3000; n++) begin
      word_t a;
      a = 32'h2000 + 4 * $urandom_range(0, 2 * N);
      if ($urandom_range(0, 2) == 0)
        cycle_op(1, a, 5'($urandom), 5'($urandom), 1, a);
      else
        cycle_op(0, 0, 0, 0, 1, a);
      check_lookup(32'h2000 + 4 * $urandom_range(0, 2 * N));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
