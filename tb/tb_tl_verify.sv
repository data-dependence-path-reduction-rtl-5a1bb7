// tb_tl_verify: self-checking test of the tunneling verification logic.
//
// Walks through named cases (a stack-relative load on an RSB miss, a hit
// with matching specifiers, a base modified just before, a mismatching
// default pair, a stale-TPC lookup, a register + register load, a non-load)
// and then random inputs, comparing every output with rules written out
// independently in the testbench.
module tb_tl_verify;
  import tl_pkg::*;

  logic      valid, is_load, rr_mode, base_busy, index_busy, opnd_late;
  word_t     pc, lookup_addr;
  rsb_out_t  rsb;
  reg_spec_t dec_base, dec_index;
  logic      tl_go, spec_mismatch, agen_miss, primary_miss, bad_tpc, rsb_wr;

  tl_verify dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs packed as {go, mismatch, agen, primary, bad, wr}
  function automatic logic [5:0] expect_out();
    logic ld, match, busy, same;
    reg_spec_t idx;
    ld    = valid && is_load;
    idx   = rr_mode ? dec_index : 5'd0;
    match = (rsb.base == dec_base) && (rsb.index == idx);
    busy  = base_busy || index_busy || opnd_late;
    same  = (pc == lookup_addr);
    return {ld && match && !busy, ld && !match, ld && match && busy,
            ld && same && !rsb.hit, ld && !same, ld && !(same && rsb.hit)};
  endfunction

  task automatic apply(string name);
    logic [5:0] e;
    #1;
    e = expect_out();
    checks++;
    if ({tl_go, spec_mismatch, agen_miss, primary_miss, bad_tpc, rsb_wr} !== e) begin
      failures++;
      if (failures < 10) $display("%s: got %b expected %b", name,
                                  {tl_go, spec_mismatch, agen_miss, primary_miss, bad_tpc, rsb_wr}, e);
    end
  endtask

  task automatic set_case(logic ld, logic rr, reg_spec_t rb, reg_spec_t ri, logic hit,
                          reg_spec_t db, reg_spec_t di, logic bb, logic ib, word_t la);
    valid = 1; is_load = ld; rr_mode = rr;
    rsb = '{hit: hit, base: rb, index: ri};
    dec_base = db; dec_index = di; base_busy = bb; index_busy = ib; opnd_late = 0;
    pc = 32'h100; lookup_addr = la;
  endtask

  initial begin
    // stack-relative load, RSB miss: default pair matches, tunnels, inserted
    set_case(1, 0, SP_REG, ZERO_REG, 0, SP_REG, 5'd7, 0, 0, 32'h100);
    apply("sp default");
    if (!(tl_go && primary_miss && rsb_wr)) begin failures++; $display("sp default not tunneled"); end
    // hit with matching specifiers
    set_case(1, 0, 5'd4, ZERO_REG, 1, 5'd4, 5'd9, 0, 0, 32'h100);
    apply("hit");
    if (!tl_go || rsb_wr) begin failures++; $display("hit case wrong"); end
    // base modified just before
    set_case(1, 0, 5'd4, ZERO_REG, 1, 5'd4, 5'd9, 1, 0, 32'h100);
    apply("busy base");
    if (tl_go || !agen_miss) begin failures++; $display("busy base tunneled"); end
    // primary miss with wrong default
    set_case(1, 0, SP_REG, ZERO_REG, 0, 5'd6, 5'd0, 0, 0, 32'h100);
    apply("wrong default");
    if (tl_go || !spec_mismatch) begin failures++; $display("wrong default tunneled"); end
    // stale TPC lookup with matching specifiers: tunneling is still correct
    set_case(1, 0, 5'd4, ZERO_REG, 1, 5'd4, 5'd0, 0, 0, 32'h200);
    apply("bad tpc");
    if (!tl_go || !bad_tpc || !rsb_wr) begin failures++; $display("bad tpc wrong"); end
    // register + register
    set_case(1, 1, 5'd4, 5'd5, 1, 5'd4, 5'd5, 0, 0, 32'h100);
    apply("rr");
    set_case(1, 1, 5'd4, 5'd5, 1, 5'd4, 5'd6, 0, 0, 32'h100);
    apply("rr mismatch");
    // not a load
    set_case(0, 0, 5'd4, ZERO_REG, 1, 5'd4, 5'd0, 0, 0, 32'h100);
    apply("not load");
    checks += 5;
    for (int n = 0; n < 5000; n++) begin
      valid = 1'($urandom); is_load = ($urandom_range(0, 3) != 0); rr_mode = 1'($urandom);
      rsb = '{hit: 1'($urandom), base: 5'($urandom_range(0, 3)), index: 5'($urandom_range(0, 3))};
      dec_base = 5'($urandom_range(0, 3)); dec_index = 5'($urandom_range(0, 3));
      base_busy = ($urandom_range(0, 3) == 0); index_busy = ($urandom_range(0, 3) == 0);
      opnd_late = ($urandom_range(0, 5) == 0);
      pc = 32'($urandom_range(0, 3)) * 4; lookup_addr = 32'($urandom_range(0, 3)) * 4;
      apply($sformatf("random %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
