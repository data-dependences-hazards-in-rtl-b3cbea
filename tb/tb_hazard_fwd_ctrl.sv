// tb_hazard_fwd_ctrl: exhaustive-style random test of the hazard detection
// and forwarding control.
//
// Drives random source/destination register numbers (drawn from a small set
// so that matches are frequent), write enables, the stage-3 load flag and
// need_rs1/need_rs2, and compares fwd_a, fwd_b and wait_o with the
// Match(rs, rd) equations evaluated here. A few directed cases cover the
// document's examples: stage-3 priority over stage 4, x0 never matching, and
// the load followed by a dependent instruction. Purely combinational block:
// results are checked 1 time unit after the inputs change.
module tb_hazard_fwd_ctrl;
  import pipe_pkg::*;

  reg_idx_t rs1, rs2, rrd3, rrd4;
  logic need_rs1, need_rs2, rwe3, mrd3, rwe4;
  fwd_sel_t fwd_a, fwd_b;
  logic wait_o;

  hazard_fwd_ctrl dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_sel_t ref_fwd(reg_idx_t rs);
    if (rs != 0 && rs == rrd3 && rwe3) return FWD_S4;
    if (rs != 0 && rs == rrd4 && rwe4) return FWD_S5;
    return FWD_NONE;
  endfunction

  task automatic apply_and_check(string tag);
    logic exp_wait;
    #1;
    exp_wait = mrd3 && rwe3 && rrd3 != 0 &&
               ((need_rs1 && rs1 == rrd3) || (need_rs2 && rs2 == rrd3));
    checks++;
    if (fwd_a !== ref_fwd(rs1) || fwd_b !== ref_fwd(rs2) || wait_o !== exp_wait) begin
      failures++;
      $display("FAIL %s: rs1=%0d rs2=%0d rrd3=%0d rwe3=%0d mrd3=%0d rrd4=%0d rwe4=%0d -> a=%0d b=%0d w=%0d",
               tag, rs1, rs2, rrd3, rwe3, mrd3, rrd4, rwe4, fwd_a, fwd_b, wait_o);
    end
  endtask

  initial begin
    // stage 3 has priority: add t0,s1,s2 / add t0,t0,s3 / add t0,t0,s4
    rs1 = 5; rs2 = 20; need_rs1 = 1; need_rs2 = 1;
    rrd3 = 5; rwe3 = 1; mrd3 = 0; rrd4 = 5; rwe4 = 1;
    apply_and_check("priority");
    if (fwd_a !== FWD_S4) begin failures++; $display("FAIL: priority"); end
    // x0 is never forwarded
    rs1 = 0; rrd3 = 0; rrd4 = 0;
    apply_and_check("x0");
    if (fwd_a !== FWD_NONE) begin failures++; $display("FAIL: x0"); end
    // ld x10 / sub x11, x10, x3 -> wait
    rs1 = 10; rs2 = 3; rrd3 = 10; rwe3 = 1; mrd3 = 1; rrd4 = 1; rwe4 = 1;
    apply_and_check("load-use");
    if (wait_o !== 1'b1) begin failures++; $display("FAIL: load-use wait"); end
    // addi does not need rs2: no wait on a matching rs2 field
    rs1 = 2; rs2 = 10; need_rs2 = 0;
    apply_and_check("no-rs2");
    if (wait_o !== 1'b0) begin failures++; $display("FAIL: no-rs2 wait"); end
    // random
    for (int i = 0; i < 20000; i++) begin
      rs1 = 5'($urandom_range(0, 5)); rs2 = 5'($urandom_range(0, 5));
      rrd3 = 5'($urandom_range(0, 5)); rrd4 = 5'($urandom_range(0, 5));
      {need_rs1, need_rs2, rwe3, mrd3, rwe4} = 5'($urandom);
      apply_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
