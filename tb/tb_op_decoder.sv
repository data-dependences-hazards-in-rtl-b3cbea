// tb_op_decoder: feeds the decoder the opcode, funct3 and funct7 of every
// supported instruction and of unsupported encodings, and checks the control
// word: write enables, ALU operation, B select, immediate format and the
// need_rs1/need_rs2 flags (lui needs neither source, addi and ld do not need
// rs2, sd needs both).
module tb_op_decoder;
  import pipe_pkg::*;

  logic [6:0] op, f7;
  logic [2:0] f3;
  ctrl_t ctrl;

  op_decoder dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(string nm, logic [6:0] o, logic [2:0] f, logic [6:0] s,
                   logic rwe, logic mrd, logic mwe, alu_op_t aop, logic bimm,
                   imm_fmt_t ifmt, logic n1, logic n2);
    op = o; f3 = f; f7 = s;
    #1;
    checks++;
    if (ctrl.rwe !== rwe || ctrl.mrd !== mrd || ctrl.mwe !== mwe ||
        ctrl.need_rs1 !== n1 || ctrl.need_rs2 !== n2 ||
        (rwe && ctrl.alu_op !== aop) || ((rwe || mwe) && ctrl.b_imm !== bimm) ||
        ((rwe || mwe) && bimm && ctrl.imm_fmt !== ifmt)) begin
      failures++;
      $display("FAIL %s: got %p", nm, ctrl);
    end
  endtask

  initial begin
    t("add",  OP_REG, 3'd0, 7'h00, 1, 0, 0, ALU_ADD,  0, IMM_I, 1, 1);
    t("sub",  OP_REG, 3'd0, 7'h20, 1, 0, 0, ALU_SUB,  0, IMM_I, 1, 1);
    t("sll",  OP_REG, 3'd1, 7'h00, 1, 0, 0, ALU_SLL,  0, IMM_I, 1, 1);
    t("slt",  OP_REG, 3'd2, 7'h00, 1, 0, 0, ALU_SLT,  0, IMM_I, 1, 1);
    t("sltu", OP_REG, 3'd3, 7'h00, 1, 0, 0, ALU_SLTU, 0, IMM_I, 1, 1);
    t("xor",  OP_REG, 3'd4, 7'h00, 1, 0, 0, ALU_XOR,  0, IMM_I, 1, 1);
    t("srl",  OP_REG, 3'd5, 7'h00, 1, 0, 0, ALU_SRL,  0, IMM_I, 1, 1);
    t("sra",  OP_REG, 3'd5, 7'h20, 1, 0, 0, ALU_SRA,  0, IMM_I, 1, 1);
    t("or",   OP_REG, 3'd6, 7'h00, 1, 0, 0, ALU_OR,   0, IMM_I, 1, 1);
    t("and",  OP_REG, 3'd7, 7'h00, 1, 0, 0, ALU_AND,  0, IMM_I, 1, 1);
    t("mul?", OP_REG, 3'd0, 7'h01, 0, 0, 0, ALU_ADD,  0, IMM_I, 0, 0);
    t("addi", OP_IMM, 3'd0, 7'h55, 1, 0, 0, ALU_ADD,  1, IMM_I, 1, 0);
    t("slti", OP_IMM, 3'd2, 7'h7f, 1, 0, 0, ALU_SLT,  1, IMM_I, 1, 0);
    t("sltiu",OP_IMM, 3'd3, 7'h00, 1, 0, 0, ALU_SLTU, 1, IMM_I, 1, 0);
    t("xori", OP_IMM, 3'd4, 7'h12, 1, 0, 0, ALU_XOR,  1, IMM_I, 1, 0);
    t("ori",  OP_IMM, 3'd6, 7'h12, 1, 0, 0, ALU_OR,   1, IMM_I, 1, 0);
    t("andi", OP_IMM, 3'd7, 7'h12, 1, 0, 0, ALU_AND,  1, IMM_I, 1, 0);
    t("slli", OP_IMM, 3'd1, 7'h01, 1, 0, 0, ALU_SLL,  1, IMM_I, 1, 0);
    t("srli", OP_IMM, 3'd5, 7'h01, 1, 0, 0, ALU_SRL,  1, IMM_I, 1, 0);
    t("srai", OP_IMM, 3'd5, 7'h21, 1, 0, 0, ALU_SRA,  1, IMM_I, 1, 0);
    t("bad-srli", OP_IMM, 3'd5, 7'h40, 0, 0, 0, ALU_ADD, 1, IMM_I, 0, 0);
    t("ld",   OP_LOAD, F3_D, 7'h00, 1, 1, 0, ALU_ADD, 1, IMM_I, 1, 0);
    t("lw?",  OP_LOAD, 3'd2, 7'h00, 0, 0, 0, ALU_ADD, 1, IMM_I, 0, 0);
    t("sd",   OP_STORE, F3_D, 7'h00, 0, 0, 1, ALU_ADD, 1, IMM_S, 1, 1);
    t("sw?",  OP_STORE, 3'd2, 7'h00, 0, 0, 0, ALU_ADD, 1, IMM_S, 0, 0);
    t("lui",  OP_LUI, 3'd5, 7'h33, 1, 0, 0, ALU_PASSB, 1, IMM_U, 0, 0);
    t("jal?", 7'b1101111, 3'd0, 7'h00, 0, 0, 0, ALU_ADD, 0, IMM_I, 0, 0);
    t("beq?", 7'b1100011, 3'd0, 7'h00, 0, 0, 0, ALU_ADD, 0, IMM_I, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
