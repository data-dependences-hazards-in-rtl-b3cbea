// rv_pipeline_top: five-stage in-order pipeline with operand forwarding and
// load-use hazard detection.
//
// Stages: 1 instruction fetch (PC -> IM -> IR), 2 register read and decode
// (IR -> RF, Op. Dec., Imm -> A, B, Imm and control registers), 3 ALU,
// 4 data memory, 5 register write (write-back mux -> RF). Each instruction
// writes its result into the register file two to three cycles after it
// has been computed, so a later instruction would read a stale value.
// Instead of waiting, results are forwarded to where they are needed:
//
//   * distance 1 (producer one instruction ahead): the ALU result, held in
//     the stage-4 ALU result register, goes to the stage-3 operand muxes;
//   * distance 2: the write-back value of stage 5 (ALU result or load data)
//     goes to the same muxes;
//   * distance 3: the register file passes write data straight to its read
//     ports within the cycle (it behaves like a latch-based register file);
//   * a load followed at distance 1 by an instruction that needs the loaded
//     register cannot be served: the data leave memory only at the end of
//     stage 4. hazard_fwd_ctrl raises Wait; PC and IR keep their contents
//     (their load enables are the inverse of Wait) and the instruction
//     entering stage 3 is turned into a no-op by clearing rwe3, mrd3 and
//     mwe3. The dependent instruction repeats stage 2 one cycle later, when
//     the load has moved to stage 4 and distance-2 forwarding applies.
//
// The forwarding decision is taken in stage 2, one cycle before use, and
// kept in the fwd.ctrl pipeline register. The B-side forwarding mux also
// feeds the store-data register, so a store gets its data forwarded too.
// Stage names and the registers rrd3..rrd5, rwe3..rwe5, mrd3..mrd5, mwe3,
// mwe4 follow the document; the instruction subset (see op_decoder), the
// memory sizes, the program-load port and the reset values are this
// design's choices. The branch/jump input of the PC mux is not modelled: the
// PC always advances by 4.
//
// Interface: clk, active-low synchronous reset rst_n; imem_we/imem_widx/
// imem_wdata load the instruction memory (normally while rst_n is low).
// Observation outputs: pc (PC register), wait_o (stall this cycle),
// fwd_a3/fwd_b3 (forwarding selects used by stage 3 this cycle), the
// register-file write port (rf_we, rf_wa, rf_wd) and the data-memory write
// port (dm_we, dm_addr, dm_wdata).
//
// Timing: one instruction enters per cycle except in Wait cycles; an
// instruction fetched in cycle t writes the register file in cycle t+4 and
// memory in cycle t+3 (plus any Wait cycles that held it in stage 2).
module rv_pipeline_top
  import pipe_pkg::*;
#(
  parameter int unsigned XLEN     = 64,
  parameter int unsigned IM_WORDS = 1024,
  parameter int unsigned DM_BYTES = 4096
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        imem_we,
  input  logic [$clog2(IM_WORDS)-1:0] imem_widx,
  input  logic [31:0]                 imem_wdata,
  output logic [XLEN-1:0]             pc,
  output logic                        wait_o,
  output fwd_sel_t                    fwd_a3,
  output fwd_sel_t                    fwd_b3,
  output logic                        rf_we,
  output reg_idx_t                    rf_wa,
  output logic [XLEN-1:0]             rf_wd,
  output logic                        dm_we,
  output logic [XLEN-1:0]             dm_addr,
  output logic [XLEN-1:0]             dm_wdata
);

  // ---------------------------------------------------------------- stage 1
  logic [XLEN-1:0] pc_q, pc_plus4;
  logic [31:0]     insn1, ir;
  logic            ld_en;          // PC and IR load enable = NOT Wait
  logic            wait_s2;

  assign ld_en    = !wait_s2;
  assign pc_plus4 = pc_q + XLEN'(4);

  imem #(.WORDS(IM_WORDS), .AW(XLEN)) u_imem (
    .clk     (clk),
    .addr    (pc_q),
    .insn    (insn1),
    .wr_en   (imem_we),
    .wr_idx  (imem_widx),
    .wr_data (imem_wdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q <= '0;
      ir   <= INSN_NOP;
    end else if (ld_en) begin
      pc_q <= pc_plus4;
      ir   <= insn1;
    end
  end

  // ---------------------------------------------------------------- stage 2
  reg_idx_t        rs1, rs2, rd2;
  ctrl_t           ctrl2;
  logic [XLEN-1:0] rf_rd1, rf_rd2, imm2;
  fwd_sel_t        fwd_a2, fwd_b2;

  assign rs1 = ir[19:15];
  assign rs2 = ir[24:20];
  assign rd2 = ir[11:7];

  op_decoder u_dec (
    .op   (ir[6:0]),
    .f3   (ir[14:12]),
    .f7   (ir[31:25]),
    .ctrl (ctrl2)
  );

  imm_gen #(.XLEN(XLEN)) u_imm (
    .insn (ir),
    .fmt  (ctrl2.imm_fmt),
    .imm  (imm2)
  );

  // stage-3/4/5 pipeline registers
  reg_idx_t        rrd3, rrd4, rrd5;
  logic            rwe3, rwe4, rwe5;
  logic            mrd3, mrd4, mrd5;
  logic            mwe3, mwe4;
  alu_op_t         alu_op3;
  logic            b_imm3;
  fwd_sel_t        fwd_a3_q, fwd_b3_q;
  logic [XLEN-1:0] a3, b3, imm3;
  logic [XLEN-1:0] alu4, sdata4;
  logic [XLEN-1:0] alu5, dout5;
  logic [XLEN-1:0] wb5;

  regfile #(.XLEN(XLEN)) u_rf (
    .clk (clk),
    .ra1 (rs1),
    .rd1 (rf_rd1),
    .ra2 (rs2),
    .rd2 (rf_rd2),
    .we  (rwe5),
    .wa  (rrd5),
    .wd  (wb5)
  );

  hazard_fwd_ctrl u_hfc (
    .rs1      (rs1),
    .rs2      (rs2),
    .need_rs1 (ctrl2.need_rs1),
    .need_rs2 (ctrl2.need_rs2),
    .rrd3     (rrd3),
    .rwe3     (rwe3),
    .mrd3     (mrd3),
    .rrd4     (rrd4),
    .rwe4     (rwe4),
    .fwd_a    (fwd_a2),
    .fwd_b    (fwd_b2),
    .wait_o   (wait_s2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rrd3     <= '0;
      rwe3     <= 1'b0;
      mrd3     <= 1'b0;
      mwe3     <= 1'b0;
      alu_op3  <= ALU_ADD;
      b_imm3   <= 1'b0;
      fwd_a3_q <= FWD_NONE;
      fwd_b3_q <= FWD_NONE;
      a3       <= '0;
      b3       <= '0;
      imm3     <= '0;
    end else begin
      rrd3     <= rd2;
      // Wait turns the instruction entering stage 3 into a no-op
      rwe3     <= ctrl2.rwe && ld_en;
      mrd3     <= ctrl2.mrd && ld_en;
      mwe3     <= ctrl2.mwe && ld_en;
      alu_op3  <= ctrl2.alu_op;
      b_imm3   <= ctrl2.b_imm;
      fwd_a3_q <= fwd_a2;
      fwd_b3_q <= fwd_b2;
      a3       <= rf_rd1;
      b3       <= rf_rd2;
      imm3     <= imm2;
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [XLEN-1:0] opa3, opb3_reg, opb3, alu_y3;

  fwd_mux #(.XLEN(XLEN)) u_fwd_a (
    .sel     (fwd_a3_q),
    .reg_val (a3),
    .s4_val  (alu4),
    .s5_val  (wb5),
    .y       (opa3)
  );

  fwd_mux #(.XLEN(XLEN)) u_fwd_b (
    .sel     (fwd_b3_q),
    .reg_val (b3),
    .s4_val  (alu4),
    .s5_val  (wb5),
    .y       (opb3_reg)
  );

  assign opb3 = b_imm3 ? imm3 : opb3_reg;

  alu #(.XLEN(XLEN)) u_alu (
    .op (alu_op3),
    .a  (opa3),
    .b  (opb3),
    .y  (alu_y3)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rrd4   <= '0;
      rwe4   <= 1'b0;
      mrd4   <= 1'b0;
      mwe4   <= 1'b0;
      alu4   <= '0;
      sdata4 <= '0;
    end else begin
      rrd4   <= rrd3;
      rwe4   <= rwe3;
      mrd4   <= mrd3;
      mwe4   <= mwe3;
      alu4   <= alu_y3;
      sdata4 <= opb3_reg;
    end
  end

  // ---------------------------------------------------------------- stage 4
  logic [XLEN-1:0] dout4;

  dmem #(.XLEN(XLEN), .BYTES(DM_BYTES)) u_dmem (
    .clk  (clk),
    .we   (mwe4),
    .rd   (mrd4),
    .addr (alu4),
    .din  (sdata4),
    .dout (dout4)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rrd5  <= '0;
      rwe5  <= 1'b0;
      mrd5  <= 1'b0;
      alu5  <= '0;
      dout5 <= '0;
    end else begin
      rrd5  <= rrd4;
      rwe5  <= rwe4;
      mrd5  <= mrd4;
      alu5  <= alu4;
      dout5 <= dout4;
    end
  end

  // ---------------------------------------------------------------- stage 5
  assign wb5 = mrd5 ? dout5 : alu5;

  // ---------------------------------------------------------------- outputs
  assign pc       = pc_q;
  assign wait_o   = wait_s2;
  assign fwd_a3   = fwd_a3_q;
  assign fwd_b3   = fwd_b3_q;
  assign rf_we    = rwe5;
  assign rf_wa    = rrd5;
  assign rf_wd    = wb5;
  assign dm_we    = mwe4;
  assign dm_addr  = alu4;
  assign dm_wdata = sdata4;

  // only a load in stage 3 can make an instruction wait
  a_wait_after_load: assert property (@(posedge clk) disable iff (!rst_n)
    wait_s2 |-> mrd3);

  // a bubble never writes anything
  a_wait_bubble: assert property (@(posedge clk) disable iff (!rst_n)
    wait_s2 |=> !rwe3 && !mrd3 && !mwe3);

endmodule
