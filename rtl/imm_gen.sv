// imm_gen: immediate generator of stage 2 (the "Imm" block of the datapath).
//
// Combinational. Extracts the immediate of the instruction in the IR in the
// format chosen by op_decoder and sign-extends it to XLEN bits:
//   I-format: insn[31:20]                       (addi, ld, ...)
//   S-format: {insn[31:25], insn[11:7]}         (sd)
//   U-format: {insn[31:12], 12'b0}              (lui)
// The document shows the block and its op/f3/f7 inputs only; the field
// positions are those of the RISC-V base instruction formats.
module imm_gen
  import pipe_pkg::*;
#(
  parameter int unsigned XLEN = 64
) (
  input  logic [31:0]     insn,
  input  imm_fmt_t        fmt,
  output logic [XLEN-1:0] imm
);

  always_comb begin
    unique case (fmt)
      IMM_S:   imm = XLEN'($signed({insn[31:25], insn[11:7]}));
      IMM_U:   imm = XLEN'($signed({insn[31:12], 12'b0}));
      default: imm = XLEN'($signed(insn[31:20]));
    endcase
  end

endmodule
