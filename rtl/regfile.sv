// regfile: integer register file with extra read ports for tunneling loads.
//
// 32 registers of 32 bits (the integer register file of the evaluated
// processor). Register 0 always reads as zero. The normal decode-stage
// operand read uses two ports; the tunneling load needs two more, to read
// the base and index registers named by the RSB one cycle before decode, so
// the default is four read ports and one write port. Reads are
// combinational; a read of the register being written in the same cycle
// returns the new value (write-through), so write-back and a read in the
// same cycle need no further forwarding. The write port count and the
// write-through behaviour are this design's choices.
module regfile
  import tl_pkg::*;
#(
  parameter int N_REGS = NREGS,
  parameter int N_READ = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_READ-1:0][SPEC_W-1:0]   raddr,
  output word_t [N_READ-1:0]              rdata,
  input  logic                            we,
  input  reg_spec_t                       waddr,
  input  word_t                           wdata
);

  word_t regs [N_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (we && waddr != ZERO_REG) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < N_READ; p++) begin
      if (raddr[p] == ZERO_REG)
        rdata[p] = '0;
      else if (we && raddr[p] == waddr)
        rdata[p] = wdata;
      else
        rdata[p] = regs[raddr[p]];
    end
  end

endmodule
