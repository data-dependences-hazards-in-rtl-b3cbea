// regfile: integer register file, 32 x XLEN, two read ports, one write port.
//
// x0 always reads zero and ignores writes. The document's pipeline uses a
// latch-based register file, whose write data overwrite the old contents at
// once, so an instruction reading a register in stage 2 sees the value that
// the instruction three ahead is writing in stage 5 in the same cycle. That
// behaviour is kept here with edge-triggered storage plus a write-through
// path: a read whose address equals the write address in a cycle with the
// write enable set returns the write data. This replaces the latches by
// flip-flops, this design's choice. Writes take effect at the rising clock
// edge; reads are combinational. The storage has no reset, as the register
// contents after reset are not defined by the program model.
module regfile
  import pipe_pkg::*;
#(
  parameter int unsigned XLEN  = 64,
  parameter int unsigned NREGS = 32
) (
  input  logic            clk,
  input  reg_idx_t        ra1,
  output logic [XLEN-1:0] rd1,
  input  reg_idx_t        ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  reg_idx_t        wa,
  input  logic [XLEN-1:0] wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  function automatic logic [XLEN-1:0] rd_port(reg_idx_t ra, logic [XLEN-1:0] stored);
    if (ra == '0)                 return '0;
    else if (we && wa == ra)      return wd;
    else                          return stored;
  endfunction

  assign rd1 = rd_port(ra1, regs[ra1]);
  assign rd2 = rd_port(ra2, regs[ra2]);

endmodule
