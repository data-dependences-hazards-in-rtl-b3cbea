// op_decoder: operation decoder of stage 2 ("Control" / "Op. Dec." in the
// datapath figures).
//
// Combinational. From the opcode, funct3 and funct7 fields of the IR it
// produces the control word that travels down the pipeline (pipe_pkg::ctrl_t):
// rwe, mrd and mwe (the bits held in the rwe3/mrd3/mwe3 pipeline registers),
// the ALU operation, the ALU B-input select (immediate or rs2), the immediate
// format, and need_rs1/need_rs2, which tell the hazard detector whether the
// rs1 and rs2 fields name registers the instruction really reads.
//
// Following the document, U-format instructions (lui) need neither source
// and I-format instructions (addi, loads) do not need rs2. The supported set
// is this design's choice: the RV64I register-register and register-immediate
// ALU operations, lui, ld and sd. Any other encoding decodes as a no-op with
// all write enables clear.
module op_decoder
  import pipe_pkg::*;
(
  input  logic [6:0] op,
  input  logic [2:0] f3,
  input  logic [6:0] f7,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{rwe: 1'b0, mrd: 1'b0, mwe: 1'b0, alu_op: ALU_ADD, b_imm: 1'b0,
             imm_fmt: IMM_I, need_rs1: 1'b0, need_rs2: 1'b0};
    unique case (op)
      OP_REG: begin
        ctrl.need_rs1 = 1'b1;
        ctrl.need_rs2 = 1'b1;
        ctrl.rwe      = 1'b1;
        unique case ({f7, f3})
          {7'b0000000, 3'b000}: ctrl.alu_op = ALU_ADD;
          {7'b0100000, 3'b000}: ctrl.alu_op = ALU_SUB;
          {7'b0000000, 3'b001}: ctrl.alu_op = ALU_SLL;
          {7'b0000000, 3'b010}: ctrl.alu_op = ALU_SLT;
          {7'b0000000, 3'b011}: ctrl.alu_op = ALU_SLTU;
          {7'b0000000, 3'b100}: ctrl.alu_op = ALU_XOR;
          {7'b0000000, 3'b101}: ctrl.alu_op = ALU_SRL;
          {7'b0100000, 3'b101}: ctrl.alu_op = ALU_SRA;
          {7'b0000000, 3'b110}: ctrl.alu_op = ALU_OR;
          {7'b0000000, 3'b111}: ctrl.alu_op = ALU_AND;
          default: begin
            ctrl.rwe      = 1'b0;
            ctrl.need_rs1 = 1'b0;
            ctrl.need_rs2 = 1'b0;
          end
        endcase
      end
      OP_IMM: begin
        ctrl.need_rs1 = 1'b1;
        ctrl.b_imm    = 1'b1;
        ctrl.imm_fmt  = IMM_I;
        ctrl.rwe      = 1'b1;
        unique case (f3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b010: ctrl.alu_op = ALU_SLT;
          3'b011: ctrl.alu_op = ALU_SLTU;
          3'b100: ctrl.alu_op = ALU_XOR;
          3'b110: ctrl.alu_op = ALU_OR;
          3'b111: ctrl.alu_op = ALU_AND;
          // RV64 shift immediates: funct7[0] is shamt[5]
          3'b001: begin
            ctrl.alu_op = ALU_SLL;
            if (f7[6:1] != 6'b000000) ctrl.rwe = 1'b0;
          end
          default: begin  // 3'b101
            if (f7[6:1] == 6'b000000)      ctrl.alu_op = ALU_SRL;
            else if (f7[6:1] == 6'b010000) ctrl.alu_op = ALU_SRA;
            else                           ctrl.rwe    = 1'b0;
          end
        endcase
        if (!ctrl.rwe) ctrl.need_rs1 = 1'b0;
      end
      OP_LOAD: begin
        if (f3 == F3_D) begin
          ctrl.rwe      = 1'b1;
          ctrl.mrd      = 1'b1;
          ctrl.b_imm    = 1'b1;
          ctrl.imm_fmt  = IMM_I;
          ctrl.need_rs1 = 1'b1;
        end
      end
      OP_STORE: begin
        if (f3 == F3_D) begin
          ctrl.mwe      = 1'b1;
          ctrl.b_imm    = 1'b1;
          ctrl.imm_fmt  = IMM_S;
          ctrl.need_rs1 = 1'b1;
          ctrl.need_rs2 = 1'b1;
        end
      end
      OP_LUI: begin
        ctrl.rwe     = 1'b1;
        ctrl.b_imm   = 1'b1;
        ctrl.imm_fmt = IMM_U;
        ctrl.alu_op  = ALU_PASSB;
      end
      default: ;
    endcase
  end

endmodule
