// tb_agen_adder: self-checking test of the tunneling address adder:
// base + index in register + register mode, base + immediate otherwise,
// with random and corner-case (wrap-around) values.
module tb_agen_adder;
  import tl_pkg::*;

  word_t base_val, index_val, imm, addr;
  logic  rr_mode;

  agen_adder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(word_t b, word_t i, word_t m, logic rr);
    longint unsigned exp;
    base_val = b; index_val = i; imm = m; rr_mode = rr;
    #1;
    exp = (longint'(b) + longint'(rr ? i : m)) & 64'hffff_ffff;
    checks++;
    if (addr !== word_t'(exp)) begin
      failures++;
      if (failures < 10) $display("%h + %s %h = %h, expected %h", b, rr ? "index" : "imm",
                                  rr ? i : m, addr, word_t'(exp));
    end
  endtask

  initial begin
    try(32'hffff_fffc, 32'h8, 32'h0, 1'b1);
    try(32'h1000, 32'h8, 32'hffff_fffc, 1'b0);
    for (int n = 0; n < 2000; n++) try($urandom, $urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
