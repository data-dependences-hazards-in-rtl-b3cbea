// fwd_mux: operand forwarding multiplexer in front of the ALU (stage 3).
//
// One instance feeds the ALU A input and one the B path (which also supplies
// the store data). It chooses between the value read from the register file
// in stage 2 (held in the A or B pipeline register), the result of the
// instruction one ahead (the stage-4 ALU result register) and the result of
// the instruction two ahead (the stage-5 write-back value, load data or ALU
// result). The select comes from the fwd.ctrl pipeline register, decided a
// cycle earlier by hazard_fwd_ctrl. Three inputs and their sources follow the
// datapath figures; the encoding of the select is this design's choice.
// Combinational.
module fwd_mux
  import pipe_pkg::*;
#(
  parameter int unsigned XLEN = 64
) (
  input  fwd_sel_t        sel,
  input  logic [XLEN-1:0] reg_val,   // from the A/B pipeline register
  input  logic [XLEN-1:0] s4_val,    // stage-4 ALU result register
  input  logic [XLEN-1:0] s5_val,    // stage-5 write-back value
  output logic [XLEN-1:0] y
);

  always_comb begin
    unique case (sel)
      FWD_S4:  y = s4_val;
      FWD_S5:  y = s5_val;
      default: y = reg_val;
    endcase
  end

endmodule
