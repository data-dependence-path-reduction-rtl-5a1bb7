// tl_core: scalar in-order 6-stage pipeline with tunneling loads.
//
// Stages: RSB (register specifier buffer read with the TPC), IF (fetch at the
// PC), ID (decode and register fetch), EX (execute and effective address
// generation), MEM (data cache access) and WB (write back). The tunneling
// load lets a load read the data cache one stage early, in EX, so that the
// instruction right after it can use the loaded value without a load-use
// stall:
//   RSB: the RSB gives the base and index register specifiers of the
//        instruction the TPC points at (stack pointer and zero register when
//        the address is not in the RSB).
//   IF:  the instruction is fetched; two extra register file ports read the
//        base and index values named by the RSB. Results of older
//        instructions in EX and MEM are forwarded into this read; a value
//        that only a not-yet-finished normal load in EX will produce marks the
//        read as late.
//   ID:  the extra adder forms the tunneling address (base + index or
//        base + immediate). The comparators check the RSB specifiers against
//        the decoded ones, the scoreboard tells whether the instruction that
//        left ID just before writes the base or index register. If the load
//        passes, it carries the address into EX as a tunneling load.
//        A load whose address is not in the RSB is written into it.
//   EX:  a tunneling load reads data cache port A; its result is forwarded
//        like an ALU result. Other loads compute their address normally.
//   MEM: normal loads and stores use data cache port B. A failed tunneling
//        load simply takes this path, so a failure costs no extra cycle
//        compared with a pipeline without tunneling.
// No data cache access is ever made with an unverified address.
//
// What follows the design description: the stage order, the RSB/TPC/
// scoreboard/comparator/adder structure, the two extra register ports, the
// dual-ported data cache, 64 RSB entries and the squash rules. This design's
// own choices: a single-issue pipeline (the description's processor issues
// 1 to 8 instructions per cycle), a MIPS-like instruction subset, forwarding
// into both register reads, branches resolved in EX (which gives the
// two-cycle misprediction penalty of the evaluated processor),
// and the "late operand" squash for a base or index still being loaded by a
// normal load two instructions ahead.
//
// Parameters: RSB_ENTRIES, DCACHE_BYTES, BTB_ENTRIES, PHT_ENTRIES and
// BHR_BITS default to the sizes of the evaluated processor; TUNNEL_EN = 0
// gives the same pipeline without tunneling, for comparison.
//
// Interface: instruction memory is outside (imem_addr -> imem_rdata,
// combinational, standing in for the instruction cache). Retirement and the
// MEM-stage store are reported on the wb_* and st_* ports, and every
// mechanism raises a one-cycle pulse on events.
module tl_core
  import tl_pkg::*;
#(
  parameter int               RSB_ENTRIES  = 64,
  parameter int               DCACHE_BYTES = 16384,
  parameter int               BTB_ENTRIES  = 1024,
  parameter int               PHT_ENTRIES  = 4096,
  parameter int               BHR_BITS     = 12,
  parameter logic [XLEN-1:0]  RESET_PC     = '0,
  // 0 turns tunneling off (no load tunnels, the RSB is never written): the
  // same pipeline without the mechanism, for comparisons
  parameter bit               TUNNEL_EN    = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  // instruction fetch
  output word_t      imem_addr,
  input  word_t      imem_rdata,
  // retirement trace (WB stage)
  output logic       wb_valid,
  output word_t      wb_pc,
  output logic       wb_we,
  output reg_spec_t  wb_dst,
  output word_t      wb_data,
  // store trace (MEM stage)
  output logic       st_valid,
  output word_t      st_addr,
  output word_t      st_data,
  // mechanism pulses
  output tl_events_t events
);

  // ------------------------------------------------------------------
  // pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    word_t    lookup_addr;    // TPC used for the RSB read
    rsb_out_t rsb;
  } rif_t;

  typedef struct packed {
    logic     valid;
    word_t    pc;
    word_t    pred_next;      // predicted successor (the TPC of that cycle)
    word_t    instr;
    word_t    lookup_addr;
    rsb_out_t rsb;
    word_t    t_base;         // tunneling base value
    word_t    t_index;        // tunneling index value
    logic     t_late;         // a tunneling operand was not available
  } fd_t;

  typedef struct packed {
    dec_t     dec;
    word_t    pc;
    word_t    pred_next;
    word_t    a;              // rs value
    word_t    b;              // rt value
    logic     tl;             // tunneling load
    word_t    tl_addr;
  } dx_t;

  typedef struct packed {
    dec_t     dec;
    word_t    pc;
    word_t    res;            // ALU result or tunneled load data
    word_t    addr;
    word_t    sdata;
    logic     tl;
  } xm_t;

  typedef struct packed {
    logic      valid;
    word_t     pc;
    logic      we;
    reg_spec_t dst;
    word_t     res;
  } mw_t;

  rif_t rif;
  fd_t  fd;
  dx_t  dx;
  xm_t  xm;
  mw_t  mw;

  logic  stall, redirect;
  word_t redirect_pc, redirect_tpc;

  // ------------------------------------------------------------------
  // RSB stage
  // ------------------------------------------------------------------
  word_t    tpc, pc;
  logic     pc_valid;
  rsb_out_t rsb_q;

  word_t    tpc_pred;
  logic     bp_upd;
  word_t    br_target;
  logic     br_taken;

  tpc_unit #(.RESET_PC(RESET_PC)) u_tpc (
    .clk, .rst_n, .stall, .tpc_pred, .redirect, .redirect_pc, .redirect_tpc,
    .tpc, .pc, .pc_valid
  );

  bpred #(.BTB_ENTRIES(BTB_ENTRIES), .PHT_ENTRIES(PHT_ENTRIES), .BHR_BITS(BHR_BITS)) u_bp (
    .clk, .rst_n,
    .q0_pc      (tpc),
    .q0_next    (tpc_pred),
    .q1_pc      (redirect_pc),
    .q1_next    (redirect_tpc),
    .upd_en     (bp_upd),
    .upd_pc     (dx.pc),
    .upd_taken  (br_taken),
    .upd_target (br_target)
  );

  // ID-stage insertion request (driven below)
  logic      rsb_wr, rsb_evict;
  reg_spec_t ld_base, ld_index;

  rsb #(.ENTRIES(RSB_ENTRIES), .TAG_W(XLEN)) u_rsb (
    .clk, .rst_n,
    .lookup_addr  (tpc),
    .lookup_touch (!stall && !redirect),
    .rsb_out      (rsb_q),
    .wr_en        (rsb_wr),
    .wr_addr      (fd.pc),
    .wr_base      (ld_base),
    .wr_index     (ld_index),
    .evict        (rsb_evict)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rif.lookup_addr <= RESET_PC;
      rif.rsb         <= '{hit: 1'b0, base: SP_REG, index: ZERO_REG};
    end else if (!stall || redirect) begin
      rif.lookup_addr <= tpc;
      rif.rsb         <= rsb_q;
    end
  end

  // ------------------------------------------------------------------
  // register file (ports 0/1: ID operands, ports 2/3: tunneling operands)
  // ------------------------------------------------------------------
  logic [3:0][SPEC_W-1:0] rf_raddr;
  word_t [3:0]            rf_rdata;

  regfile #(.N_REGS(NREGS), .N_READ(4)) u_rf (
    .clk, .rst_n,
    .raddr (rf_raddr),
    .rdata (rf_rdata),
    .we    (mw.valid && mw.we),
    .waddr (mw.dst),
    .wdata (mw.res)
  );

  // ------------------------------------------------------------------
  // forwarding sources: EX and MEM results
  // ------------------------------------------------------------------
  logic  ex_we, ex_ready, mem_we;
  word_t ex_res, mem_res;

  // value of register r as seen by a reader in IF or ID; late = the value
  // is still being loaded by a normal load in EX
  function automatic void fwd(input reg_spec_t r, input word_t rf_val,
                              output word_t val, output logic late);
    late = 1'b0;
    val  = rf_val;
    if (r == ZERO_REG) begin
      val = '0;
    end else if (ex_we && dx.dec.dst == r) begin
      val  = ex_res;
      late = !ex_ready;
    end else if (mem_we && xm.dec.dst == r) begin
      val = mem_res;
    end
  endfunction

  // ------------------------------------------------------------------
  // IF stage
  // ------------------------------------------------------------------
  word_t t_base_v, t_index_v;
  logic  t_base_late, t_index_late;

  assign imem_addr = pc;

  always_comb begin
    rf_raddr[2] = rif.rsb.base;
    rf_raddr[3] = rif.rsb.index;
    fwd(rif.rsb.base,  rf_rdata[2], t_base_v,  t_base_late);
    fwd(rif.rsb.index, rf_rdata[3], t_index_v, t_index_late);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fd <= '0;
    end else if (redirect) begin
      fd.valid <= 1'b0;
    end else if (!stall) begin
      fd.valid       <= pc_valid;
      fd.pc          <= pc;
      fd.pred_next   <= tpc;
      fd.instr       <= imem_rdata;
      fd.lookup_addr <= rif.lookup_addr;
      fd.rsb         <= rif.rsb;
      fd.t_base      <= t_base_v;
      fd.t_index     <= t_index_v;
      fd.t_late      <= t_base_late || t_index_late;
    end
  end

  // ------------------------------------------------------------------
  // ID stage
  // ------------------------------------------------------------------
  dec_t  dec;
  word_t id_a, id_b, tl_addr;
  logic  id_a_late, id_b_late;
  logic  base_busy, index_busy;
  logic  v_go, v_mismatch, v_agen, v_primary, v_badtpc, v_wr;

  tl_decoder u_dec (
    .valid    (fd.valid),
    .instr    (fd.instr),
    .dec      (dec),
    .ld_base  (ld_base),
    .ld_index (ld_index)
  );

  always_comb begin
    rf_raddr[0] = dec.rs;
    rf_raddr[1] = dec.rt;
    fwd(dec.rs, rf_rdata[0], id_a, id_a_late);
    fwd(dec.rt, rf_rdata[1], id_b, id_b_late);
    stall = (dec.use_rs && id_a_late) || (dec.use_rt && id_b_late);
  end

  scoreboard #(.N_REGS(NREGS), .N_SET(1)) u_sb (
    .clk, .rst_n,
    .hold       (stall && !redirect),
    .set_en     (fd.valid && dec.we && !redirect),
    .set_reg    (dec.dst),
    .chk_base   (fd.rsb.base),
    .chk_index  (fd.rsb.index),
    .base_busy  (base_busy),
    .index_busy (index_busy),
    .bits       ()
  );

  agen_adder u_agen (
    .base_val  (fd.t_base),
    .index_val (fd.t_index),
    .imm       (dec.imm),
    .rr_mode   (dec.rr_mode),
    .addr      (tl_addr)
  );

  tl_verify u_verify (
    .valid         (fd.valid),
    .is_load       (dec.is_load),
    .rr_mode       (dec.rr_mode),
    .pc            (fd.pc),
    .lookup_addr   (fd.lookup_addr),
    .rsb           (fd.rsb),
    .dec_base      (ld_base),
    .dec_index     (ld_index),
    .base_busy     (base_busy),
    .index_busy    (index_busy),
    .opnd_late     (fd.t_late),
    .tl_go         (v_go),
    .spec_mismatch (v_mismatch),
    .agen_miss     (v_agen),
    .primary_miss  (v_primary),
    .bad_tpc       (v_badtpc),
    .rsb_wr        (v_wr)
  );

  logic id_move;   // the ID instruction enters EX this cycle
  assign id_move = fd.valid && !stall && !redirect;
  assign rsb_wr  = TUNNEL_EN && v_wr && id_move;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dx <= '0;
    end else if (!id_move) begin
      dx.dec.valid     <= 1'b0;
      dx.dec.we        <= 1'b0;
      dx.dec.is_load   <= 1'b0;
      dx.dec.is_store  <= 1'b0;
      dx.dec.is_branch <= 1'b0;
      dx.tl            <= 1'b0;
    end else begin
      dx.dec     <= dec;
      dx.pc      <= fd.pc;
      dx.pred_next <= fd.pred_next;
      dx.a       <= id_a;
      dx.b       <= id_b;
      dx.tl      <= TUNNEL_EN && v_go;
      dx.tl_addr <= tl_addr;
    end
  end

  // ------------------------------------------------------------------
  // EX stage
  // ------------------------------------------------------------------
  word_t alu_b, alu_res, ex_addr, a_rdata, b_rdata, ex_next;
  logic  a_bypass;

  always_comb begin
    alu_b = dx.dec.use_imm ? dx.dec.imm : dx.b;
    unique case (dx.dec.alu_op)
      ALU_ADD: alu_res = dx.a + alu_b;
      ALU_SUB: alu_res = dx.a - alu_b;
      ALU_AND: alu_res = dx.a & alu_b;
      ALU_OR:  alu_res = dx.a | alu_b;
      ALU_XOR: alu_res = dx.a ^ alu_b;
      ALU_SLT: alu_res = word_t'($signed(dx.a) < $signed(alu_b));
      default: alu_res = '0;
    endcase
    ex_addr     = dx.a + (dx.dec.rr_mode ? dx.b : dx.dec.imm);
    br_taken    = dx.dec.is_branch && ((dx.a == dx.b) != dx.dec.br_ne);
    br_target   = dx.pc + word_t'(4) + {dx.dec.imm[XLEN-3:0], 2'b00};
    ex_next     = br_taken ? br_target : dx.pc + word_t'(4);
    bp_upd      = dx.dec.is_branch;
    // every instruction checks the successor it was fetched with
    redirect    = dx.dec.valid && (dx.pred_next != ex_next);
    redirect_pc = ex_next;
    ex_we       = dx.dec.we;
    ex_ready    = !dx.dec.is_load || dx.tl;
    ex_res      = dx.tl ? a_rdata : alu_res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xm <= '0;
    end else begin
      xm.dec   <= dx.dec;
      xm.pc    <= dx.pc;
      xm.res   <= ex_res;
      xm.addr  <= ex_addr;
      xm.sdata <= dx.b;
      xm.tl    <= dx.tl;
    end
  end

  // ------------------------------------------------------------------
  // MEM stage and data cache
  // ------------------------------------------------------------------
  logic mem_port_b;
  assign mem_port_b = (xm.dec.is_load && !xm.tl) || xm.dec.is_store;

  dcache #(.SIZE_BYTES(DCACHE_BYTES)) u_dc (
    .clk,
    .a_en     (dx.tl),
    .a_addr   (dx.tl_addr),
    .a_rdata  (a_rdata),
    .a_bypass (a_bypass),
    .b_en     (mem_port_b),
    .b_we     (xm.dec.is_store),
    .b_addr   (xm.addr),
    .b_wdata  (xm.sdata),
    .b_rdata  (b_rdata)
  );

  always_comb begin
    mem_we  = xm.dec.we;
    mem_res = (xm.dec.is_load && !xm.tl) ? b_rdata : xm.res;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mw <= '0;
    end else begin
      mw.valid <= xm.dec.valid;
      mw.pc    <= xm.pc;
      mw.we    <= xm.dec.we;
      mw.dst   <= xm.dec.dst;
      mw.res   <= mem_res;
    end
  end

  // ------------------------------------------------------------------
  // traces and events
  // ------------------------------------------------------------------
  assign wb_valid = mw.valid;
  assign wb_pc    = mw.pc;
  assign wb_we    = mw.we;
  assign wb_dst   = mw.dst;
  assign wb_data  = mw.res;
  assign st_valid = xm.dec.is_store;
  assign st_addr  = xm.addr;
  assign st_data  = xm.sdata;

  always_comb begin
    events                = '0;
    events.tl_success     = dx.tl;
    events.agen_miss      = v_agen && id_move;
    events.primary_miss   = v_primary && id_move;
    events.bad_tpc        = v_badtpc && id_move;
    events.spec_mismatch  = v_mismatch && id_move;
    events.rsb_insert     = rsb_wr;
    events.rsb_evict      = rsb_evict;
    events.load_use_stall = stall && !redirect;
    events.redirect       = redirect;
    events.normal_load    = xm.dec.is_load && !xm.tl;
    events.store_bypass   = a_bypass;
  end

  // A tunneling load must have exactly the address the normal path computes.
  a_tl_addr : assert property (@(posedge clk) disable iff (!rst_n)
                               dx.tl |-> (dx.tl_addr == ex_addr))
    else $error("tunneling address differs from effective address at pc %h", dx.pc);

endmodule
