// hazard_fwd_ctrl: hazard detection and forwarding control of stage 2.
//
// Combinational. It looks at the source registers of the instruction being
// decoded (stage 2, in the IR) and at the destination registers of the two
// instructions ahead of it: rrd3/rwe3/mrd3 belong to the instruction now in
// stage 3 (the ALU), rrd4/rwe4 to the one in stage 4 (data memory).
//
//   Match(rs, rd) = (rs == rd != x0) AND rd.writeEnable
//
// Forwarding is prepared one cycle before it is used: the select is loaded
// into the fwd.ctrl pipeline register and steers fwd_mux when this
// instruction reaches stage 3. A match against stage 3 selects the stage-4
// ALU result register (the producer will then be in stage 4); otherwise a
// match against stage 4 selects the stage-5 write-back value. The stage-3
// instruction is the more recent producer, so it has priority. A producer
// three instructions ahead writes the register file in the same cycle as
// the consumer reads it and needs no forwarding.
//
// Wait is raised when the instruction in stage 3 is a load (mrd3) and this
// instruction needs the register it will write: load data exist only at the
// end of stage 4, one cycle too late for forwarding into stage 3. The
// pipeline then holds PC and IR and sends a bubble down. need_rs1/need_rs2
// keep formats without an rs1 or rs2 field (lui, I-format for rs2) from
// causing false waits. All of this follows the document's equations; only
// the encoding of the select is this design's own.
module hazard_fwd_ctrl
  import pipe_pkg::*;
(
  input  reg_idx_t rs1,
  input  reg_idx_t rs2,
  input  logic     need_rs1,
  input  logic     need_rs2,
  input  reg_idx_t rrd3,
  input  logic     rwe3,
  input  logic     mrd3,
  input  reg_idx_t rrd4,
  input  logic     rwe4,
  output fwd_sel_t fwd_a,
  output fwd_sel_t fwd_b,
  output logic     wait_o
);

  function automatic logic match(reg_idx_t rs, reg_idx_t rd, logic we);
    return (rs == rd) && (rd != '0) && we;
  endfunction

  logic m_rs1_3, m_rs1_4, m_rs2_3, m_rs2_4;

  always_comb begin
    m_rs1_3 = match(rs1, rrd3, rwe3);
    m_rs1_4 = match(rs1, rrd4, rwe4);
    m_rs2_3 = match(rs2, rrd3, rwe3);
    m_rs2_4 = match(rs2, rrd4, rwe4);

    if (m_rs1_3)      fwd_a = FWD_S4;
    else if (m_rs1_4) fwd_a = FWD_S5;
    else              fwd_a = FWD_NONE;

    if (m_rs2_3)      fwd_b = FWD_S4;
    else if (m_rs2_4) fwd_b = FWD_S5;
    else              fwd_b = FWD_NONE;

    wait_o = (mrd3 && m_rs1_3 && need_rs1) || (mrd3 && m_rs2_3 && need_rs2);
  end

endmodule
