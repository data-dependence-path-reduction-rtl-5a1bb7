// tb_tpc_unit: self-checking test of the TPC/PC pair.
//
// Checks that the PC is invalid only in the first cycle after reset, that
// each cycle the PC takes the previous TPC while the TPC moves to its
// predicted successor, that a stall holds both, and that a redirect loads
// the PC with the corrected address and the TPC with the prediction made
// for that address, even during a stall. The predictions are driven as
// either address + 4 or a random taken target.
// A cycle-by-cycle model of the expected values runs alongside.
module tb_tpc_unit;
  import tl_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  stall, redirect, pc_valid;
  word_t redirect_pc, redirect_tpc, tpc_pred, tpc, pc;

  tpc_unit #(.RESET_PC(32'h40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m_tpc, m_pc;
  logic  m_v;

  task automatic check(string what);
    checks++;
    if (tpc !== m_tpc || pc !== m_pc || pc_valid !== m_v) begin
      failures++;
      if (failures < 10) $display("%s: tpc=%h pc=%h v=%0d, expected tpc=%h pc=%h v=%0d",
                                  what, tpc, pc, pc_valid, m_tpc, m_pc, m_v);
    end
  endtask

  initial begin
    stall = 0; redirect = 0; redirect_pc = 0; redirect_tpc = 0; tpc_pred = 32'h44;
    repeat (2) @(posedge clk);
    m_tpc = 32'h40; m_pc = 32'h40; m_v = 0;
    #1 check("reset");
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      stall       = ($urandom_range(0, 3) == 0);
      redirect    = ($urandom_range(0, 7) == 0);
      redirect_pc = {$urandom} & ~32'h3;
      redirect_tpc = ($urandom_range(0, 1) == 0) ? redirect_pc + 4 : ({$urandom} & ~32'h3);
      tpc_pred     = ($urandom_range(0, 2) != 0) ? tpc + 4 : ({$urandom} & ~32'h3);
      @(posedge clk);
      if (redirect) begin
        m_pc = redirect_pc; m_tpc = redirect_tpc; m_v = 1;
      end else if (!stall) begin
        m_pc = m_tpc; m_tpc = tpc_pred; m_v = 1;
      end
      #1 check($sformatf("cycle %0d", n));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
