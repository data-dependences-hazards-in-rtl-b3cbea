// tb_imm_gen: builds I, S and U instructions from random immediates with the
// RISC-V field layout and checks that the generated immediate is the
// sign-extended original value.
module tb_imm_gen;
  import pipe_pkg::*;

  logic [31:0] insn;
  imm_fmt_t fmt;
  logic [63:0] imm;

  imm_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] e, string what);
    #1;
    checks++;
    if (imm !== e) begin failures++; $display("FAIL %s insn=%h imm=%h exp=%h", what, insn, imm, e); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] r = $urandom;
      automatic int v12 = $urandom_range(0, 4095) - 2048;
      automatic int v20 = $urandom_range(0, 1048575);
      automatic logic [11:0] u12 = 12'(v12);
      // I-format (e.g. ld x10, 40(x1))
      insn = {u12, r[19:0]}; fmt = IMM_I;
      chk(64'(longint'(v12)), "I");
      // S-format (e.g. sd x13, 48(x11))
      insn = {u12[11:5], r[24:12], u12[4:0], r[6:0]}; fmt = IMM_S;
      chk(64'(longint'(v12)), "S");
      // U-format (lui)
      insn = {20'(v20), r[11:0]}; fmt = IMM_U;
      chk({{32{v20[19]}}, 20'(v20), 12'b0}, "U");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
