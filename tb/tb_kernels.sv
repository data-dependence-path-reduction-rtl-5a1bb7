// tb_kernels: small integer kernels run on two copies of the pipeline, one
// with tunneling loads and one without (TUNNEL_EN = 0), from the same
// instruction memory.
//
// Each kernel first fills an array with stores, then works on it, and
// finally stores its result to a fixed word; the testbench computes the
// expected result itself and checks it in both copies. It also checks the
// cycle counts: tunneling may never make a kernel slower, and it must make
// the kernels whose loads feed the very next instruction faster. The
// instructions per cycle of both copies are printed, as a small-scale
// counterpart of the IPC comparison the tunneling-load proposal reports for
// full benchmark programs.
//   sum     : array sum, each loaded element used by the next instruction
//   stack   : spill and reload of values on the stack, used immediately
//   rr      : register + register (LWX) indexed reads of a table
//   chase   : pointer chasing, where each load's base comes from the load
//             just before it, which tunneling cannot help
module tb_kernels;
  import tl_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int RESULT_W   = 'h3F00 / 4;   // result word address 0x3F00

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  word_t imem [IMEM_WORDS];

  // two copies: [0] with tunneling, [1] without
  word_t      imem_addr [2], imem_rdata [2];
  logic       wb_valid [2], wb_we [2], st_valid [2];
  word_t      wb_pc [2], wb_data [2], st_addr [2], st_data [2];
  reg_spec_t  wb_dst [2];
  tl_events_t events [2];

  tl_core #(.TUNNEL_EN(1'b1)) dut_tl (
    .clk, .rst_n, .imem_addr(imem_addr[0]), .imem_rdata(imem_rdata[0]),
    .wb_valid(wb_valid[0]), .wb_pc(wb_pc[0]), .wb_we(wb_we[0]), .wb_dst(wb_dst[0]), .wb_data(wb_data[0]),
    .st_valid(st_valid[0]), .st_addr(st_addr[0]), .st_data(st_data[0]), .events(events[0]));

  tl_core #(.TUNNEL_EN(1'b0)) dut_base (
    .clk, .rst_n, .imem_addr(imem_addr[1]), .imem_rdata(imem_rdata[1]),
    .wb_valid(wb_valid[1]), .wb_pc(wb_pc[1]), .wb_we(wb_we[1]), .wb_dst(wb_dst[1]), .wb_data(wb_data[1]),
    .st_valid(st_valid[1]), .st_addr(st_addr[1]), .st_data(st_data[1]), .events(events[1]));

  assign imem_rdata[0] = imem[imem_addr[0][11:2]];
  assign imem_rdata[1] = imem[imem_addr[1][11:2]];

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- encoders ----------------
  function automatic word_t r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t addiu(int rt, int rs, int imm); return i_op(OP_ADDIU, rt, rs, imm); endfunction
  function automatic word_t lw(int rt, int imm, int rs);    return i_op(OP_LW, rt, rs, imm);    endfunction
  function automatic word_t sw(int rt, int imm, int rs);    return i_op(OP_SW, rt, rs, imm);    endfunction
  function automatic word_t lwx(int rd, int rs, int rt);    return r_op(F_LWX, rd, rs, rt);     endfunction
  function automatic word_t addu(int rd, int rs, int rt);   return r_op(F_ADDU, rd, rs, rt);    endfunction
  function automatic word_t xor_(int rd, int rs, int rt);   return r_op(F_XOR, rd, rs, rt);     endfunction
  function automatic word_t beq(int rs, int rt, int off);   return i_op(OP_BEQ, rt, rs, off);   endfunction
  function automatic word_t bne(int rs, int rt, int off);   return i_op(OP_BNE, rt, rs, off);   endfunction
  localparam word_t NOP = 32'h0000_0025;

  int pc_w;
  function automatic void emit(word_t w); imem[pc_w] = w; pc_w++; endfunction
  function automatic int here(); return pc_w; endfunction
  // branch offset from the instruction about to be emitted to word index t
  function automatic int off_to(int t); return t - pc_w - 1; endfunction

  // ---------------- runner ----------------
  // runs the program in both copies until each retires the halt branch;
  // returns the cycle counts and retired-instruction counts
  task automatic run_both(input int halt_w, output int cyc [2], output int ret [2]);
    bit done [2];
    int c;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    done = '{0, 0}; cyc = '{0, 0}; ret = '{0, 0}; c = 0;
    while (!(done[0] && done[1]) && c < 100000) begin
      @(posedge clk);
      c++;
      for (int k = 0; k < 2; k++) if (!done[k] && wb_valid[k]) begin
        ret[k]++;
        if (wb_pc[k] == word_t'(halt_w * 4)) begin done[k] = 1; cyc[k] = c; end
      end
    end
    checks++;
    if (!(done[0] && done[1])) begin failures++; $display("a kernel did not finish"); end
  endtask

  task automatic finish_kernel(input string name, input word_t expect_v, input bit must_gain);
    int cyc [2], ret [2];
    word_t got [2];
    int halt_w;
    halt_w = here();
    emit(beq(0, 0, -1));
    run_both(halt_w, cyc, ret);
    got[0] = dut_tl.u_dc.mem[RESULT_W];
    got[1] = dut_base.u_dc.mem[RESULT_W];
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (got[k] !== expect_v) begin
        failures++;
        $display("%s: copy %0d result %h, expected %h", name, k, got[k], expect_v);
      end
    end
    checks++;
    if (cyc[0] > cyc[1]) begin
      failures++;
      $display("%s: tunneling slower (%0d > %0d cycles)", name, cyc[0], cyc[1]);
    end
    checks++;
    if (must_gain && cyc[0] >= cyc[1]) begin
      failures++;
      $display("%s: tunneling gave no gain (%0d vs %0d cycles)", name, cyc[0], cyc[1]);
    end
    $display("%-6s: tunneling %0d cycles IPC %0.3f | without %0d cycles IPC %0.3f | gain %0.1f%%",
             name, cyc[0], real'(ret[0]) / cyc[0], cyc[1], real'(ret[1]) / cyc[1],
             100.0 * (real'(cyc[1]) / cyc[0] - 1.0));
  endtask

  function automatic void start();
    for (int i = 0; i < IMEM_WORDS; i++) imem[i] = NOP;
    pc_w = 0;
  endfunction

  // fill N words at byte address base with a[i] = 3*i + 1 (r20 = base, r30 = count)
  function automatic void emit_fill(int base, int n);
    int lp;
    emit(addiu(20, 0, base));
    emit(addiu(30, 0, n));
    emit(addiu(5, 0, 1));
    lp = here();
    emit(sw(5, 0, 20));
    emit(addiu(5, 5, 3));
    emit(addiu(20, 20, 4));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
  endfunction

  initial begin
    int lp;
    word_t e;

    // ---- sum ----
    start();
    emit_fill('h1000, 64);
    emit(addiu(20, 0, 'h1000));
    emit(addiu(30, 0, 64));
    emit(addiu(2, 0, 0));
    lp = here();
    emit(lw(1, 0, 20));
    emit(addu(2, 2, 1));
    emit(addiu(20, 20, 4));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
    emit(sw(2, 'h3F00, 0));
    e = 0;
    for (int i = 0; i < 64; i++) e += word_t'(3 * i + 1);
    finish_kernel("sum", e, 1);

    // ---- stack ----
    start();
    emit(addiu(29, 0, 'h2000));
    emit(addiu(30, 0, 40));
    emit(addiu(2, 0, 0));
    emit(addiu(3, 0, 7));
    lp = here();
    emit(sw(3, 8, 29));
    emit(addiu(3, 3, 5));
    emit(sw(2, 12, 29));
    emit(lw(4, 8, 29));
    emit(addu(2, 4, 3));
    emit(lw(6, 12, 29));
    emit(xor_(2, 2, 6));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
    emit(sw(2, 'h3F00, 0));
    begin
      word_t r2, r3, m8, m12;
      r2 = 0; r3 = 7;
      for (int i = 0; i < 40; i++) begin
        m8 = r3; r3 = r3 + 5; m12 = r2;
        r2 = m8 + r3; r2 = r2 ^ m12;
      end
      e = r2;
    end
    finish_kernel("stack", e, 1);

    // ---- rr ----
    start();
    emit_fill('h1800, 32);
    emit(addiu(21, 0, 'h1800));
    emit(addiu(22, 0, 0));
    emit(addiu(30, 0, 32));
    emit(addiu(2, 0, 0));
    lp = here();
    emit(lwx(1, 21, 22));
    emit(addu(2, 2, 1));
    emit(addiu(22, 22, 4));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
    emit(sw(2, 'h3F00, 0));
    e = 0;
    for (int i = 0; i < 32; i++) e += word_t'(3 * i + 1);
    finish_kernel("rr", e, 1);

    // ---- chase ----
    // node i at 0x2400 + 8*i holds {next pointer, value}
    start();
    emit(addiu(20, 0, 'h2400));
    emit(addiu(30, 0, 32));
    lp = here();
    emit(addiu(6, 20, 8));
    emit(sw(6, 0, 20));
    emit(sw(30, 4, 20));
    emit(addiu(20, 20, 8));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
    emit(addiu(20, 0, 'h2400));
    emit(addiu(30, 0, 32));
    emit(addiu(2, 0, 0));
    lp = here();
    emit(lw(7, 4, 20));
    emit(lw(20, 0, 20));
    emit(addu(2, 2, 7));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, off_to(lp)));
    emit(sw(2, 'h3F00, 0));
    e = 0;
    for (int i = 1; i <= 32; i++) e += word_t'(i);
    finish_kernel("chase", e, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
