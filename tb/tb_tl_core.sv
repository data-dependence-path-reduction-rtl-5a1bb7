// tb_tl_core: end-to-end test of the tunneling-load pipeline at its default
// size (64-entry RSB, 16 KB data memory).
//
// The testbench holds the instruction memory and a reference instruction-set
// model with its own registers and data memory. At every retirement the
// model executes the next instruction and the program counter, destination
// register and result of the pipeline are compared with it; at the end of
// each program the whole data memory is compared. Programs:
//   1. a latency program: a load that tunnels must feed the next instruction
//      without a stall (results one cycle apart), a load that cannot tunnel
//      costs exactly one stall cycle (two cycles apart);
//   2. a directed loop that provokes each miss category, a store-to-load
//      bypass on the second data port and branch mispredictions, and whose
//      loop branch the predictor must learn;
//   3. several random looping programs with more distinct loads than RSB
//      entries, so that entries are replaced.
// Every mechanism the pipeline reports on its events port is counted and
// must have occurred at least once.
module tb_tl_core;
  import tl_pkg::*;

  localparam int IMEM_WORDS = 1024;
  localparam int DWORDS     = 16384 / 4;
  localparam int WATCHDOG   = 200000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  word_t      imem_addr, imem_rdata;
  logic       wb_valid, wb_we, st_valid;
  word_t      wb_pc, wb_data, st_addr, st_data;
  reg_spec_t  wb_dst;
  tl_events_t events;

  tl_core dut (
    .clk, .rst_n, .imem_addr, .imem_rdata,
    .wb_valid, .wb_pc, .wb_we, .wb_dst, .wb_data,
    .st_valid, .st_addr, .st_data, .events
  );

  always #5 clk = ~clk;

  word_t imem [IMEM_WORDS];
  assign imem_rdata = imem[imem_addr[11:2]];

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int n_tl, n_agen, n_prim, n_bad, n_mis, n_ins, n_evict, n_stall, n_redir, n_norm, n_byp;
  always @(posedge clk) if (rst_n) begin
    n_tl    += int'(events.tl_success);
    n_agen  += int'(events.agen_miss);
    n_prim  += int'(events.primary_miss);
    n_bad   += int'(events.bad_tpc);
    n_mis   += int'(events.spec_mismatch);
    n_ins   += int'(events.rsb_insert);
    n_evict += int'(events.rsb_evict);
    n_stall += int'(events.load_use_stall);
    n_redir += int'(events.redirect);
    n_norm  += int'(events.normal_load);
    n_byp   += int'(events.store_bypass);
  end

  // ---------------- instruction encoders ----------------
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
  function automatic word_t beq(int rs, int rt, int off);   return i_op(OP_BEQ, rt, rs, off);   endfunction
  function automatic word_t bne(int rs, int rt, int off);   return i_op(OP_BNE, rt, rs, off);   endfunction
  localparam word_t NOP = 32'h0000_0025;   // or r0, r0, r0

  int pc_w;   // program assembly pointer (word index)
  function automatic void emit(word_t w);
    imem[pc_w] = w;
    pc_w++;
  endfunction
  function automatic int here_b(); return pc_w * 4; endfunction

  // ---------------- reference model ----------------
  word_t rf [32];
  word_t dm [DWORDS];
  word_t ipc;

  function automatic int didx(word_t a); return int'(a[13:2]); endfunction

  // executes one instruction; reports the write it makes
  function automatic void iss_step(output word_t pc_o, output logic we_o,
                                   output int dst_o, output word_t val_o);
    word_t ins, a, b, imm, nxt;
    logic [5:0] opc, fn;
    int rs, rt, rd;
    ins = imem[ipc[11:2]];
    opc = ins[31:26]; fn = ins[5:0];
    rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a = rf[rs]; b = rf[rt];
    imm = {{16{ins[15]}}, ins[15:0]};
    pc_o = ipc; we_o = 1'b0; dst_o = 0; val_o = '0;
    nxt = ipc + 4;
    case (opc)
      OP_RTYPE: begin
        we_o = 1'b1; dst_o = rd;
        case (fn)
          F_ADDU: val_o = a + b;
          F_SUBU: val_o = a - b;
          F_AND:  val_o = a & b;
          F_OR:   val_o = a | b;
          F_XOR:  val_o = a ^ b;
          F_SLT:  val_o = ($signed(a) < $signed(b)) ? 1 : 0;
          F_LWX:  val_o = dm[didx(a + b)];
          default: we_o = 1'b0;
        endcase
      end
      OP_ADDIU: begin we_o = 1'b1; dst_o = rt; val_o = a + imm; end
      OP_LW:    begin we_o = 1'b1; dst_o = rt; val_o = dm[didx(a + imm)]; end
      OP_SW:    dm[didx(a + imm)] = b;
      OP_BEQ:   if (a == b) nxt = ipc + 4 + (imm << 2);
      OP_BNE:   if (a != b) nxt = ipc + 4 + (imm << 2);
      default: ;
    endcase
    if (dst_o == 0) we_o = 1'b0;
    if (we_o) rf[dst_o] = val_o;
    ipc = nxt;
  endfunction

  // ---------------- run one program ----------------
  int retire_cycle [word_t];

  task automatic run_program(input string name, input word_t halt_pc);
    word_t p, v;
    logic  w;
    int    d, n_ret, start;
    bit    done;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    // the data memory powers up with arbitrary contents: mirror them
    for (int i = 0; i < DWORDS; i++) dm[i] = dut.u_dc.mem[i];
    for (int i = 0; i < 32; i++) rf[i] = '0;
    ipc = '0;
    retire_cycle.delete();
    @(negedge clk);
    rst_n = 1'b1;
    done = 0; n_ret = 0; start = cycle;
    while (!done) begin
      @(posedge clk);
      if (wb_valid) begin
        iss_step(p, w, d, v);
        n_ret++;
        retire_cycle[wb_pc] = cycle;
        checks++;
        if (wb_pc !== p || wb_we !== w || (w && (int'(wb_dst) != d || wb_data !== v))) begin
          failures++;
          if (failures < 10)
            $display("%s: mismatch at retirement %0d: dut pc=%h we=%0d r%0d=%h, model pc=%h we=%0d r%0d=%h",
                     name, n_ret, wb_pc, wb_we, wb_dst, wb_data, p, w, d, v);
        end
        if (p == halt_pc) done = 1;
      end
      if (cycle - start > 50000) begin
        failures++;
        $display("%s: did not reach its end", name);
        done = 1;
      end
    end
    for (int i = 0; i < DWORDS; i++) begin
      if (dut.u_dc.mem[i] !== dm[i]) begin
        failures++;
        if (failures < 10) $display("%s: data word %0d differs", name, i);
      end
    end
    checks++;
    $display("%s: %0d instructions in %0d cycles", name, n_ret, cycle - start);
  endtask

  function automatic void clear_imem();
    for (int i = 0; i < IMEM_WORDS; i++) imem[i] = NOP;
    pc_w = 0;
  endfunction

  // ---------------- programs ----------------
  word_t halt;
  int    ld_t, use_t, ld_n, use_n;

  task automatic prog_latency();
    clear_imem();
    emit(addiu(29, 0, 'h100));
    emit(addiu(6, 0, 'h300));
    emit(NOP); emit(NOP); emit(NOP);
    ld_t = here_b();  emit(lw(1, 4, 29));        // stack-relative: tunnels
    use_t = here_b(); emit(addu(2, 1, 1));
    ld_n = here_b();  emit(lw(3, 8, 6));         // not in RSB, base is not sp
    use_n = here_b(); emit(addu(4, 3, 3));
    halt = here_b();  emit(beq(0, 0, -1));
    run_program("latency", halt);
    checks++;
    if (retire_cycle[word_t'(use_t)] - retire_cycle[word_t'(ld_t)] != 1) begin
      failures++;
      $display("latency: tunneled load -> use took %0d cycles, expected 1",
               retire_cycle[word_t'(use_t)] - retire_cycle[word_t'(ld_t)]);
    end
    checks++;
    if (retire_cycle[word_t'(use_n)] - retire_cycle[word_t'(ld_n)] != 2) begin
      failures++;
      $display("latency: normal load -> use took %0d cycles, expected 2",
               retire_cycle[word_t'(use_n)] - retire_cycle[word_t'(ld_n)]);
    end
  endtask

  task automatic prog_directed();
    int loop_b, r0;
    clear_imem();
    emit(addiu(29, 0, 'h400));
    emit(addiu(20, 0, 'h800));
    emit(addiu(21, 0, 8));
    emit(addiu(30, 0, 30));
    emit(addiu(10, 0, 'h55));
    loop_b = here_b();
    emit(lw(1, 0, 20));           // loop head: reached after a redirect (bad TPC)
    emit(lwx(2, 20, 21));         // register + register
    emit(addu(3, 1, 2));
    emit(sw(3, 12, 29));
    emit(lw(4, 12, 29));          // tunnels while the store is in MEM
    emit(addiu(22, 20, 16));
    emit(lw(25, 0, 22));          // base written just before: address-generation miss
    emit(addu(9, 10, 10));
    emit(lw(26, 0, 25));          // base still being loaded by a normal load
    emit(addu(11, 26, 9));        // load-use stall
    emit(sw(11, 0, 20));
    emit(addiu(20, 20, 4));
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, (loop_b - here_b() - 4) / 4));
    halt = here_b(); emit(beq(0, 0, -1));
    r0 = n_redir;
    run_program("directed", halt);
    // the loop branch must be learnt: beyond the warm-up of the 12-bit
    // history only the loop exit (and the halt loop) may mispredict
    checks++;
    if (n_redir - r0 > 16) begin
      failures++;
      $display("directed: %0d mispredictions in a 30-iteration loop", n_redir - r0);
    end
  endtask

  task automatic prog_random(input int seed_n, input int body_len, input int iters);
    int pool [14] = '{1, 2, 3, 4, 5, 6, 7, 8, 20, 21, 22, 23, 29, 0};
    int loop_b, k, left;
    clear_imem();
    emit(addiu(29, 0, int'($urandom_range(0, 'h3ffc)) & 'hfffc));
    for (int r = 20; r <= 23; r++) emit(addiu(r, 0, int'($urandom_range(0, 'h3ffc))));
    emit(addiu(30, 0, iters));
    loop_b = here_b();
    for (int i = 0; i < body_len; i++) begin
      int rs, rt, rd;
      k  = int'($urandom_range(0, 99));
      rs = pool[$urandom_range(0, 13)];
      rt = pool[$urandom_range(0, 13)];
      rd = pool[$urandom_range(0, 12)];
      left = body_len - i - 1;
      if (k < 22)      emit(lw(rd, int'($urandom_range(0, 63)) * 4 - 64,
                           ($urandom_range(0, 2) == 0) ? 29 : rs));
      else if (k < 32) emit(lwx(rd, rs, rt));
      else if (k < 42) emit(sw(rt, int'($urandom_range(0, 31)) * 4, ($urandom_range(0, 1) == 0) ? 29 : rs));
      else if (k < 50 && left > 0)
        emit(($urandom_range(0, 1) == 0 ? beq(rs, rt, int'($urandom_range(0, (left < 3) ? left : 3)))
                                        : bne(rs, rt, int'($urandom_range(0, (left < 3) ? left : 3)))));
      else if (k < 75) emit(addiu(rd, rs, int'($urandom_range(0, 255)) - 128));
      else begin
        logic [5:0] fns [6] = '{F_ADDU, F_SUBU, F_AND, F_OR, F_XOR, F_SLT};
        emit(r_op(fns[$urandom_range(0, 5)], rd, rs, rt));
      end
    end
    emit(addiu(30, 30, -1));
    emit(bne(30, 0, (loop_b - here_b() - 4) / 4));
    halt = here_b(); emit(beq(0, 0, -1));
    run_program($sformatf("random%0d", seed_n), halt);
  endtask

  // ---------------- main ----------------
  initial begin
    n_tl = 0; n_agen = 0; n_prim = 0; n_bad = 0; n_mis = 0; n_ins = 0;
    n_evict = 0; n_stall = 0; n_redir = 0; n_norm = 0; n_byp = 0;
    prog_latency();
    prog_directed();
    for (int s = 0; s < 6; s++) prog_random(s, (s < 3) ? 150 : 300, 4);

    $display("events: tunneled=%0d agen_miss=%0d primary_miss=%0d bad_tpc=%0d mismatch=%0d",
             n_tl, n_agen, n_prim, n_bad, n_mis);
    $display("        rsb_insert=%0d rsb_evict=%0d load_use_stall=%0d redirect=%0d normal_load=%0d store_bypass=%0d",
             n_ins, n_evict, n_stall, n_redir, n_norm, n_byp);
    checks += 11;
    if (n_tl == 0)    begin failures++; $display("no tunneling load succeeded"); end
    if (n_agen == 0)  begin failures++; $display("no address-generation miss"); end
    if (n_prim == 0)  begin failures++; $display("no primary miss"); end
    if (n_bad == 0)   begin failures++; $display("no bad-TPC miss"); end
    if (n_mis == 0)   begin failures++; $display("no specifier mismatch"); end
    if (n_ins == 0)   begin failures++; $display("no RSB insertion"); end
    if (n_evict == 0) begin failures++; $display("no RSB replacement"); end
    if (n_stall == 0) begin failures++; $display("no load-use stall"); end
    if (n_redir == 0) begin failures++; $display("no branch redirect"); end
    if (n_norm == 0)  begin failures++; $display("no normal load"); end
    if (n_byp == 0)   begin failures++; $display("no store-to-load bypass on port A"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
