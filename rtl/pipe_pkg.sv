// pipe_pkg: types and constants shared by the blocks of the five-stage
// forwarding pipeline.
//
// The pipeline executes a small RV64I integer subset: register-register and
// register-immediate ALU operations, lui, and the doubleword load and store
// (ld, sd). The opcode values are those of the RISC-V base ISA. The control
// word carried down the pipeline holds the bits named in the stage-3/4/5
// pipeline registers of the datapath: rwe (register write enable), mrd
// (memory read, i.e. a load), mwe (memory write, i.e. a store), plus the ALU
// operation and the ALU B-input select. The forwarding select has three
// values: no forwarding, forward from stage 4 (the ALU result register), and
// forward from stage 5 (the write-back value).
package pipe_pkg;

  // RISC-V major opcodes used by this pipeline
  localparam logic [6:0] OP_LOAD  = 7'b0000011;
  localparam logic [6:0] OP_IMM   = 7'b0010011;
  localparam logic [6:0] OP_STORE = 7'b0100011;
  localparam logic [6:0] OP_REG   = 7'b0110011;
  localparam logic [6:0] OP_LUI   = 7'b0110111;

  // funct3 of the doubleword load/store
  localparam logic [2:0] F3_D = 3'b011;

  // canonical no-op: addi x0, x0, 0
  localparam logic [31:0] INSN_NOP = 32'h0000_0013;

  typedef logic [4:0] reg_idx_t;

  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_SLL,
    ALU_SLT,
    ALU_SLTU,
    ALU_XOR,
    ALU_SRL,
    ALU_SRA,
    ALU_OR,
    ALU_AND,
    ALU_PASSB   // result = B operand (lui)
  } alu_op_t;

  typedef enum logic [1:0] {
    IMM_I,
    IMM_S,
    IMM_U
  } imm_fmt_t;

  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,   // operand from the A/B register (register file read)
    FWD_S4   = 2'd1,   // operand from the stage-4 ALU result register
    FWD_S5   = 2'd2    // operand from the stage-5 write-back mux
  } fwd_sel_t;

  // decoded control of one instruction
  typedef struct packed {
    logic     rwe;       // writes register rd
    logic     mrd;       // reads data memory (load)
    logic     mwe;       // writes data memory (store)
    alu_op_t  alu_op;
    logic     b_imm;     // ALU B input: 1 = immediate, 0 = register rs2
    imm_fmt_t imm_fmt;
    logic     need_rs1;  // the instruction reads rs1
    logic     need_rs2;  // the instruction reads rs2
  } ctrl_t;

endpackage
