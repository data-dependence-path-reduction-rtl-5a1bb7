// tb_regfile: self-checking test of the four-read-port register file.
//
// Random writes and reads on all four ports against an array model:
// register 0 reads zero even after a write to it, a read of the register
// being written returns the new value in the same cycle, and other reads
// return the stored value.
module tb_regfile;
  import tl_pkg::*;

  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [3:0][SPEC_W-1:0] raddr;
  word_t [3:0]            rdata;
  logic                   we;
  reg_spec_t              waddr;
  word_t                  wdata;

  regfile #(.N_REGS(32), .N_READ(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m [32];

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = '0;
    for (int i = 0; i < 32; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) != 0);
      waddr = 5'($urandom);
      wdata = $urandom;
      for (int p = 0; p < 4; p++)
        raddr[p] = ($urandom_range(0, 3) == 0) ? waddr : 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        word_t exp;
        exp = (raddr[p] == 0) ? '0 : ((we && raddr[p] == waddr) ? wdata : m[raddr[p]]);
        checks++;
        if (rdata[p] !== exp) begin
          failures++;
          if (failures < 10) $display("port %0d r%0d = %h, expected %h", p, raddr[p], rdata[p], exp);
        end
      end
      @(posedge clk);
      if (we && waddr != 0) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
