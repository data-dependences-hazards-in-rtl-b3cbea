// alu: integer ALU of the execute stage (stage 3).
//
// Combinational. Computes y = a <op> b for the operations of pipe_pkg::alu_op_t:
// add, sub, shifts (amount from the low log2(XLEN) bits of b), signed and
// unsigned set-less-than, the bitwise operations, and pass-b (used by lui).
// The datapath figures show the ALU only as a box fed by the forwarded A
// operand and by the B/immediate mux; the operation set is this design's
// choice, the RV64I integer operations that need no extra stage.
module alu
  import pipe_pkg::*;
#(
  parameter int unsigned XLEN = 64
) (
  input  alu_op_t           op,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  output logic [XLEN-1:0]   y
);

  localparam int unsigned SHW = $clog2(XLEN);

  logic [SHW-1:0] shamt;
  assign shamt = b[SHW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_SLL:   y = a << shamt;
      ALU_SLT:   y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {{(XLEN-1){1'b0}}, a < b};
      ALU_XOR:   y = a ^ b;
      ALU_SRL:   y = a >> shamt;
      ALU_SRA:   y = XLEN'($signed(a) >>> shamt);
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end

endmodule
