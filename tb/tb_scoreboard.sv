// tb_scoreboard: self-checking test of the one-cycle scoreboard.
//
// Each cycle a random destination register is (or is not) announced from
// ID; in the next cycle exactly that register must read busy and every
// other register free, register 0 never busy, and the bits must stay
// unchanged while hold is high. Both check ports are swept over all 32
// registers.
module tb_scoreboard;
  import tl_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  hold;
  logic      [0:0]       set_en;
  reg_spec_t [0:0]       set_reg;
  reg_spec_t             chk_base, chk_index;
  logic                  base_busy, index_busy;
  logic      [NREGS-1:0] bits;

  scoreboard #(.N_REGS(NREGS), .N_SET(1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NREGS-1:0] m_bits;

  initial begin
    hold = 0; set_en = 0; set_reg = '0; chk_base = 0; chk_index = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    m_bits = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      hold       = ($urandom_range(0, 4) == 0);
      set_en[0]  = ($urandom_range(0, 3) != 0);
      set_reg[0] = 5'($urandom);
      @(posedge clk);
      if (!hold) begin
        m_bits = '0;
        if (set_en[0] && set_reg[0] != 0) m_bits[set_reg[0]] = 1'b1;
      end
      #1;
      for (int r = 0; r < NREGS; r++) begin
        chk_base  = 5'(r);
        chk_index = 5'(NREGS - 1 - r);
        #1;
        checks++;
        if (base_busy !== m_bits[r] || index_busy !== m_bits[NREGS - 1 - r]) begin
          failures++;
          if (failures < 10) $display("cycle %0d reg %0d: busy %0d/%0d expected %0d/%0d",
                                      n, r, base_busy, index_busy, m_bits[r], m_bits[NREGS-1-r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
