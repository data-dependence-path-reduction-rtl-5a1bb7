// tb_dcache: self-checking test of the dual-ported data memory.
//
// Port B stores and loads at random addresses across the full 16 KB while
// port A reads in the same cycles; both are compared with an array model.
// When port A reads the word port B writes in that cycle, port A must return
// the new data and raise a_bypass; otherwise a_bypass must stay low.
module tb_dcache;
  import tl_pkg::*;

  localparam int WORDS = 4096;

  logic  clk = 1'b0;
  logic  a_en, a_bypass, b_en, b_we;
  word_t a_addr, a_rdata, b_addr, b_wdata, b_rdata;

  dcache #(.SIZE_BYTES(16384)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t m [WORDS];
  int    n_byp = 0;

  initial begin
    a_en = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = word_t'(i * 4); b_wdata = $urandom;
      m[i] = b_wdata;
    end
    for (int n = 0; n < 6000; n++) begin
      int ai, bi;
      logic exp_byp;
      word_t exp_a;
      @(negedge clk);
      bi = $urandom_range(0, 63);            // a small region for frequent collisions
      ai = ($urandom_range(0, 3) == 0) ? bi : $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1) == 0) bi = $urandom_range(0, WORDS - 1);
      b_en = ($urandom_range(0, 3) != 0); b_we = 1'($urandom);
      b_addr = word_t'(bi * 4) | 32'($urandom_range(0, 3)) | 32'h1_0000;   // low and high bits ignored
      b_wdata = $urandom;
      a_en = ($urandom_range(0, 3) != 0);
      a_addr = word_t'(ai * 4);
      #1;
      exp_byp = a_en && b_en && b_we && (ai == bi);
      exp_a   = exp_byp ? b_wdata : m[ai];
      n_byp  += int'(exp_byp);
      checks++;
      if (a_en && (a_rdata !== exp_a || a_bypass !== exp_byp)) begin
        failures++;
        if (failures < 10) $display("port A word %0d: %h byp=%0d, expected %h byp=%0d",
                                    ai, a_rdata, a_bypass, exp_a, exp_byp);
      end
      checks++;
      if (b_en && !b_we && b_rdata !== m[bi]) begin
        failures++;
        if (failures < 10) $display("port B word %0d: %h, expected %h", bi, b_rdata, m[bi]);
      end
      @(posedge clk);
      if (b_en && b_we) m[bi] = b_wdata;
    end
    checks++;
    if (n_byp == 0) begin failures++; $display("no bypass case was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
