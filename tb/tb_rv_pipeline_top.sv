// tb_rv_pipeline_top: end-to-end test of the five-stage forwarding pipeline
// at its default parameters.
//
// Every program is loaded into the instruction memory while reset is held,
// then run. The testbench records, in order, every register-file write to a
// register other than x0 and every data-memory write, and compares them with
// the trace of a sequential instruction-set model written here, which
// decodes the same instruction words without pipelining. The programs are:
//   1. the worked examples of the forwarding discussion (ld/sub/add/sd/add
//      with x1=100, x2=200, x3=32, x4=400, x13=130, M[140]=14), with the
//      printed results checked directly (x10=14, x11=168, 414, ...);
//   2. the instruction-scheduling example (a = b + c; e = b - f) in its
//      naive order, which must lose exactly 2 cycles to load-use waits, and
//      in its rescheduled order, which must lose none; the cycle in which the
//      last store reaches memory is checked;
//      a variant where a store is followed by a load of the same element
//      checks that memory accesses stay in program order;
//   3. random straight-line programs dense in register dependences.
// Mechanism counters: waits, forwarding from stage 4 and from stage 5 on
// each operand, forwarding of store data, and register-file write-through
// (distance 3). A mechanism that never occurs counts as a failure.
module tb_rv_pipeline_top;
  import pipe_pkg::*;

  localparam int unsigned XLEN     = 64;
  localparam int unsigned IM_WORDS = 1024;
  localparam int unsigned DM_BYTES = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic imem_we = 1'b0;
  logic [$clog2(IM_WORDS)-1:0] imem_widx = '0;
  logic [31:0] imem_wdata = '0;
  logic [XLEN-1:0] pc;
  logic wait_o;
  fwd_sel_t fwd_a3, fwd_b3;
  logic rf_we;
  reg_idx_t rf_wa;
  logic [XLEN-1:0] rf_wd;
  logic dm_we;
  logic [XLEN-1:0] dm_addr, dm_wdata;

  rv_pipeline_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wait = 0, n_fa4 = 0, n_fa5 = 0, n_fb4 = 0, n_fb5 = 0, n_fst = 0, n_wt = 0;
  int cycle = 0;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] enc_r(logic [6:0] f7, int rs2, int rs1, logic [2:0] f3, int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), OP_REG};
  endfunction
  function automatic logic [31:0] enc_i(logic [6:0] op, int imm, int rs1, logic [2:0] f3, int rd);
    logic [11:0] i12 = 12'(imm);
    return {i12, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1);
    logic [11:0] i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), F3_D, i12[4:0], OP_STORE};
  endfunction
  function automatic logic [31:0] ADD (int rd, int a, int b); return enc_r(7'h00, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return enc_r(7'h20, b, a, 3'd0, rd); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int imm); return enc_i(OP_IMM, imm, a, 3'd0, rd); endfunction
  function automatic logic [31:0] LD  (int rd, int imm, int a); return enc_i(OP_LOAD, imm, a, F3_D, rd); endfunction
  function automatic logic [31:0] SD  (int rs2, int imm, int a); return enc_s(imm, rs2, a); endfunction
  function automatic logic [31:0] LUI (int rd, int imm20); return {20'(imm20), 5'(rd), OP_LUI}; endfunction

  // ------------------------------------------------------------ reference model
  typedef struct { int rd; logic [XLEN-1:0] v; int idx; } rw_t;
  typedef struct { logic [XLEN-1:0] a; logic [XLEN-1:0] v; } mw_t;

  logic [XLEN-1:0] iss_x [32];
  logic [7:0]      iss_m [DM_BYTES];

  function automatic logic [XLEN-1:0] sext12(logic [11:0] v);
    return {{(XLEN-12){v[11]}}, v};
  endfunction

  // Runs prog sequentially. Also counts the load-use pairs: an instruction
  // that reads the destination of the load just before it costs one cycle.
  int iss_waits;
  task automatic iss_run(input logic [31:0] prog[$], ref rw_t rq[$], ref mw_t mq[$]);
    int prev_ld_rd = 0;
    iss_x[0] = '0;
    iss_waits = 0;
    foreach (prog[k]) begin
      logic [31:0] w = prog[k];
      logic [6:0] op = w[6:0];
      logic [2:0] f3 = w[14:12];
      logic [6:0] f7 = w[31:25];
      int rd = int'(w[11:7]), r1 = int'(w[19:15]), r2 = int'(w[24:20]);
      logic [XLEN-1:0] a = iss_x[r1], b = iss_x[r2], res = '0;
      logic [XLEN-1:0] ii = sext12(w[31:20]);
      logic [5:0] sh;
      bit wr = 0;
      if (op == OP_REG) begin
        sh = b[5:0]; wr = 1;
        case ({f7, f3})
          {7'h00, 3'd0}: res = a + b;
          {7'h20, 3'd0}: res = a - b;
          {7'h00, 3'd1}: res = a << sh;
          {7'h00, 3'd2}: res = ($signed(a) < $signed(b)) ? 1 : 0;
          {7'h00, 3'd3}: res = (a < b) ? 1 : 0;
          {7'h00, 3'd4}: res = a ^ b;
          {7'h00, 3'd5}: res = a >> sh;
          {7'h20, 3'd5}: res = $signed(a) >>> sh;
          {7'h00, 3'd6}: res = a | b;
          {7'h00, 3'd7}: res = a & b;
          default: wr = 0;
        endcase
      end else if (op == OP_IMM) begin
        sh = w[25:20]; wr = 1;
        case (f3)
          3'd0: res = a + ii;
          3'd2: res = ($signed(a) < $signed(ii)) ? 1 : 0;
          3'd3: res = (a < ii) ? 1 : 0;
          3'd4: res = a ^ ii;
          3'd6: res = a | ii;
          3'd7: res = a & ii;
          3'd1: res = a << sh;
          3'd5: if (w[30]) res = $signed(a) >>> sh; else res = a >> sh;
        endcase
      end else if (op == OP_LUI) begin
        wr = 1; res = {{(XLEN-32){w[31]}}, w[31:12], 12'b0};
      end else if (op == OP_LOAD) begin
        logic [XLEN-1:0] ad = a + ii;
        wr = 1;
        for (int i = 0; i < 8; i++) res[8*i +: 8] = iss_m[(int'(ad[11:0]) + i) % DM_BYTES];
      end else if (op == OP_STORE) begin
        logic [XLEN-1:0] ad = a + sext12({w[31:25], w[11:7]});
        for (int i = 0; i < 8; i++) iss_m[(int'(ad[11:0]) + i) % DM_BYTES] = b[8*i +: 8];
        mq.push_back('{a: ad, v: b});
      end
      begin
        automatic bit uses1 = (op == OP_STORE) || ((op == OP_REG || op == OP_IMM || op == OP_LOAD) && wr);
        automatic bit uses2 = (op == OP_STORE) || (op == OP_REG && wr);
        if (prev_ld_rd != 0 && ((uses1 && r1 == prev_ld_rd) || (uses2 && r2 == prev_ld_rd)))
          iss_waits++;
        prev_ld_rd = (op == OP_LOAD && wr) ? rd : 0;
      end
      if (wr && rd != 0) begin
        iss_x[rd] = res;
        rq.push_back('{rd: rd, v: res, idx: k});
      end
    end
  endtask

  // ------------------------------------------------------------ pipeline run
  rw_t rf_trace[$];
  mw_t dm_trace[$];
  int  dm_cycle[$];
  int  waits_this_run;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (rf_we && rf_wa != 0) rf_trace.push_back('{rd: int'(rf_wa), v: rf_wd, idx: 0});
      if (dm_we) begin
        dm_trace.push_back('{a: dm_addr, v: dm_wdata});
        dm_cycle.push_back(cycle);
      end
      if (wait_o) begin n_wait++; waits_this_run++; end
      if (fwd_a3 == FWD_S4) n_fa4++;
      if (fwd_a3 == FWD_S5) n_fa5++;
      if (fwd_b3 == FWD_S4) n_fb4++;
      if (fwd_b3 == FWD_S5) n_fb5++;
      if (dut.mwe3 && fwd_b3 != FWD_NONE) n_fst++;
      // distance-3: stage 2 reads a register written in stage 5 this cycle
      if (rf_we && rf_wa != 0 &&
          ((dut.ctrl2.need_rs1 && dut.rs1 == rf_wa) || (dut.ctrl2.need_rs2 && dut.rs2 == rf_wa)))
        n_wt++;
    end
  end

  // loads prog, runs it, compares traces with the reference model
  task automatic run_prog(input string name, input logic [31:0] prog[$]);
    rw_t eq[$];
    mw_t mq[$];
    int ncyc;
    rst_n = 1'b0;
    @(negedge clk);
    for (int i = 0; i < IM_WORDS; i++) begin
      imem_we    = 1'b1;
      imem_widx  = i[$clog2(IM_WORDS)-1:0];
      imem_wdata = (i < prog.size()) ? prog[i] : INSN_NOP;
      @(negedge clk);
    end
    imem_we = 1'b0;
    rf_trace.delete();
    dm_trace.delete();
    dm_cycle.delete();
    waits_this_run = 0;
    cycle = 0;
    @(negedge clk);
    rst_n = 1'b1;
    ncyc = 2 * prog.size() + 10;
    repeat (ncyc) @(negedge clk);
    iss_run(prog, eq, mq);
    check(rf_trace.size() == eq.size(),
          $sformatf("%s: %0d register writes, expected %0d", name, rf_trace.size(), eq.size()));
    for (int i = 0; i < eq.size() && i < rf_trace.size(); i++)
      check(rf_trace[i].rd == eq[i].rd && rf_trace[i].v == eq[i].v,
            $sformatf("%s: write %0d x%0d=%0d, expected x%0d=%0d (insn %0d: %h)", name, i,
                      rf_trace[i].rd, rf_trace[i].v, eq[i].rd, eq[i].v, eq[i].idx, prog[eq[i].idx]));
    check(waits_this_run == iss_waits,
          $sformatf("%s: %0d wait cycles, expected %0d", name, waits_this_run, iss_waits));
    check(dm_trace.size() == mq.size(),
          $sformatf("%s: %0d stores, expected %0d", name, dm_trace.size(), mq.size()));
    for (int i = 0; i < mq.size() && i < dm_trace.size(); i++)
      check(dm_trace[i].a == mq[i].a && dm_trace[i].v == mq[i].v,
            $sformatf("%s: store %0d M[%0d]=%0d, expected M[%0d]=%0d", name, i,
                      dm_trace[i].a, dm_trace[i].v, mq[i].a, mq[i].v));
  endtask

  // value of the last write to register r in the pipeline trace
  function automatic logic [XLEN-1:0] last_write(int r);
    logic [XLEN-1:0] v = '1;
    foreach (rf_trace[i]) if (rf_trace[i].rd == r) v = rf_trace[i].v;
    return v;
  endfunction

  // clears all registers, then sets the example's register values and M[140]=14
  task automatic example_prologue(ref logic [31:0] p[$]);
    for (int r = 1; r < 32; r++) p.push_back(ADDI(r, 0, 0));
    p.push_back(ADDI(5, 0, 14));
    p.push_back(SD(5, 140, 0));
    p.push_back(ADDI(1, 0, 100));
    p.push_back(ADDI(2, 0, 200));
    p.push_back(ADDI(3, 0, 32));
    p.push_back(ADDI(4, 0, 400));
    p.push_back(ADDI(10, 0, 10));
    p.push_back(ADDI(11, 0, 110));
    p.push_back(ADDI(12, 0, 120));
    p.push_back(ADDI(13, 0, 130));
    p.push_back(ADDI(5, 0, 500));
    p.push_back(ADDI(6, 0, 600));
  endtask

  initial begin
    logic [31:0] p[$];
    int pro, w0;

    // ---- 1a. distance-2 forwarding from an ALU op into a store address
    p.delete(); example_prologue(p);
    p.push_back(LD(10, 40, 1));
    p.push_back(SUB(11, 2, 3));
    p.push_back(ADD(12, 3, 4));
    p.push_back(SD(13, 48, 11));
    p.push_back(ADD(14, 5, 6));
    run_prog("ex-dist2-alu", p);
    check(last_write(10) == 14,  "ex-dist2-alu: x10 != 14");
    check(last_write(11) == 168, "ex-dist2-alu: x11 != 168");
    check(dm_trace.size() == 2 && dm_trace[1].a == 216 && dm_trace[1].v == 130,
          "ex-dist2-alu: sd x13, 48(x11) did not write 130 to 216");
    check(waits_this_run == 0, "ex-dist2-alu: unexpected wait");

    // ---- 1b. distance-1 forwarding from an ALU op
    p.delete(); example_prologue(p);
    p.push_back(LD(10, 40, 1));
    p.push_back(SUB(11, 2, 3));
    p.push_back(ADD(12, 11, 4));
    p.push_back(SD(13, 48, 1));
    p.push_back(ADD(14, 5, 6));
    run_prog("ex-dist1-alu", p);
    check(last_write(12) == 568, "ex-dist1-alu: x12 != 168+400");
    check(waits_this_run == 0, "ex-dist1-alu: unexpected wait");

    // ---- 1c. distance-2 forwarding from a load
    p.delete(); example_prologue(p);
    p.push_back(LD(10, 40, 1));
    p.push_back(SUB(11, 2, 3));
    p.push_back(ADD(12, 10, 4));
    p.push_back(SD(13, 48, 1));
    p.push_back(ADD(14, 5, 6));
    run_prog("ex-dist2-load", p);
    check(last_write(12) == 414, "ex-dist2-load: x12 != 414");
    check(waits_this_run == 0, "ex-dist2-load: unexpected wait");

    // ---- 1d. distance-1 dependence on a load: one wait
    p.delete(); example_prologue(p);
    pro = p.size();
    p.push_back(LD(10, 40, 1));
    p.push_back(SUB(11, 10, 3));
    p.push_back(ADD(12, 3, 4));
    p.push_back(SD(13, 48, 1));
    p.push_back(ADD(14, 5, 6));
    run_prog("ex-dist1-load", p);
    check(last_write(11) == 64'(-18), "ex-dist1-load: x11 != 14-32");
    check(waits_this_run == 1, $sformatf("ex-dist1-load: %0d waits, expected 1", waits_this_run));
    // sd at index pro+3 reaches memory in cycle pro+3+3, plus one wait
    check(dm_cycle.size() == 2 && dm_cycle[1] == pro + 3 + 3 + 1,
          "ex-dist1-load: store not delayed by exactly one cycle");

    // ---- 1e. store data forwarded (sd right after the producer of its data)
    p.delete(); example_prologue(p);
    p.push_back(ADD(13, 2, 4));
    p.push_back(SD(13, 8, 1));
    p.push_back(LD(7, 40, 1));
    p.push_back(SD(7, 16, 1));
    run_prog("ex-store-data", p);
    check(dm_trace.size() == 3 && dm_trace[1].v == 600 && dm_trace[2].v == 14,
          "ex-store-data: forwarded store data wrong");

    // ---- 1f. distance-3 and x0 never forwarded
    p.delete(); example_prologue(p);
    p.push_back(ADD(0, 2, 4));
    p.push_back(ADD(20, 0, 3));
    p.push_back(ADD(21, 2, 2));
    p.push_back(ADDI(0, 0, 0));
    p.push_back(ADDI(0, 0, 0));
    p.push_back(ADD(22, 21, 0));
    run_prog("ex-dist3-x0", p);
    check(last_write(20) == 32,  "ex-dist3-x0: x0 was forwarded");
    check(last_write(22) == 400, "ex-dist3-x0: distance-3 read wrong");

    // ---- 2. instruction scheduling: a = b + c; e = b - f  (gp = x3)
    begin
      logic [31:0] pre[$];
      for (int r = 1; r < 32; r++) pre.push_back(ADDI(r, 0, 0));
      pre.push_back(ADDI(3, 0, 512));
      pre.push_back(ADDI(5, 0, 11));  pre.push_back(SD(5, 8, 3));    // b
      pre.push_back(ADDI(5, 0, 22));  pre.push_back(SD(5, 16, 3));   // c
      pre.push_back(ADDI(5, 0, 7));   pre.push_back(SD(5, 32, 3));   // f
      pre.push_back(ADDI(0, 0, 0));
      pro = pre.size();

      p = pre;
      p.push_back(LD(5, 8, 3));
      p.push_back(LD(6, 16, 3));
      p.push_back(ADD(6, 5, 6));
      p.push_back(SD(6, 0, 3));
      p.push_back(LD(6, 32, 3));
      p.push_back(SUB(6, 5, 6));
      p.push_back(SD(6, 24, 3));
      run_prog("sched-naive", p);
      check(waits_this_run == 2, $sformatf("sched-naive: %0d waits, expected 2", waits_this_run));
      w0 = dm_cycle.size();
      check(w0 == 5 && dm_cycle[4] == pro + 6 + 3 + 2,
            $sformatf("sched-naive: last store in cycle %0d, expected %0d",
                      (w0 > 0) ? dm_cycle[w0-1] : -1, pro + 11));
      check(w0 == 5 && dm_trace[3].a == 512 && dm_trace[3].v == 33 &&
            dm_trace[4].a == 536 && dm_trace[4].v == 4, "sched-naive: a or e wrong");

      p = pre;
      p.push_back(LD(5, 8, 3));
      p.push_back(LD(6, 16, 3));
      p.push_back(LD(7, 32, 3));
      p.push_back(ADD(6, 5, 6));
      p.push_back(SD(6, 0, 3));
      p.push_back(SUB(6, 5, 7));
      p.push_back(SD(6, 24, 3));
      run_prog("sched-reordered", p);
      check(waits_this_run == 0, $sformatf("sched-reordered: %0d waits, expected 0", waits_this_run));
      w0 = dm_cycle.size();
      check(w0 == 5 && dm_cycle[4] == pro + 6 + 3,
            $sformatf("sched-reordered: last store in cycle %0d, expected %0d",
                      (w0 > 0) ? dm_cycle[w0-1] : -1, pro + 9));
      check(w0 == 5 && dm_trace[3].v == 33 && dm_trace[4].v == 4, "sched-reordered: a or e wrong");

      // a[i] = b + c; e = b - a[j] with i == j: the load must see the store
      // just before it (memory accesses stay in program order)
      p = pre;
      p.push_back(ADDI(28, 3, 40));   // &a[i]
      p.push_back(ADDI(29, 3, 40));   // &a[j], same element
      p.push_back(LD(5, 8, 3));
      p.push_back(LD(6, 16, 3));
      p.push_back(ADD(6, 5, 6));
      p.push_back(SD(6, 0, 28));
      p.push_back(LD(6, 0, 29));
      p.push_back(SUB(6, 5, 6));
      p.push_back(SD(6, 24, 3));
      run_prog("sched-aliased", p);
      w0 = dm_trace.size();
      check(w0 == 5 && dm_trace[3].a == 552 && dm_trace[3].v == 33 &&
            dm_trace[4].a == 536 && dm_trace[4].v == 64'(-22), "sched-aliased: a[i] or e wrong");
    end

    // ---- 3. random programs
    for (int seed = 0; seed < 6; seed++) begin
      p.delete();
      for (int r = 1; r < 32; r++) p.push_back(ADDI(r, 0, 0));
      p.push_back(ADDI(8, 0, 256));
      p.push_back(ADDI(9, 8, 0));
      for (int r = 1; r < 8; r++) begin
        p.push_back(LUI(r, $urandom()));
        p.push_back(ADDI(r, r, $urandom_range(0, 4095)));
      end
      for (int i = 0; i < 18; i++) p.push_back(SD(1 + i % 7, 8 * i, 8));
      for (int i = 0; i < 400; i++) begin
        automatic int k = $urandom_range(0, 99);
        automatic int rd = $urandom_range(1, 7), a = $urandom_range(0, 7), b = $urandom_range(0, 7);
        if (k < 20)      p.push_back(LD(rd, $urandom_range(0, 63), $urandom_range(8, 9)));
        else if (k < 33) p.push_back(SD(b, $urandom_range(0, 63), $urandom_range(8, 9)));
        else if (k < 40) p.push_back(ADDI(9, 8, $urandom_range(0, 63)));
        else if (k < 70) begin
          automatic logic [9:0] sel [10] = '{{7'h00, 3'd0}, {7'h20, 3'd0}, {7'h00, 3'd1}, {7'h00, 3'd2},
                                   {7'h00, 3'd3}, {7'h00, 3'd4}, {7'h00, 3'd5}, {7'h20, 3'd5},
                                   {7'h00, 3'd6}, {7'h00, 3'd7}};
          automatic logic [9:0] s = sel[$urandom_range(0, 9)];
          p.push_back(enc_r(s[9:3], b, a, s[2:0], rd));
        end else if (k < 93) begin
          automatic logic [2:0] f3 = 3'($urandom_range(0, 7));
          automatic int imm = $urandom_range(0, 4095);
          if (f3 == 3'd1) imm = $urandom_range(0, 63);
          if (f3 == 3'd5) imm = $urandom_range(0, 63) + (($urandom_range(0, 1) == 1) ? 1024 : 0);
          p.push_back(enc_i(OP_IMM, imm, a, f3, rd));
        end else if (k < 97) p.push_back(LUI(rd, $urandom()));
        else              p.push_back(enc_r(7'h01, b, a, 3'd0, rd));  // unsupported: no-op
      end
      run_prog($sformatf("random-%0d", seed), p);
    end

    $display("mechanisms: wait=%0d fwdA4=%0d fwdA5=%0d fwdB4=%0d fwdB5=%0d fwd-store=%0d rf-write-through=%0d",
             n_wait, n_fa4, n_fa5, n_fb4, n_fb5, n_fst, n_wt);
    check(n_wait > 0, "no load-use wait happened");
    check(n_fa4 > 0,  "no forwarding stage4->A happened");
    check(n_fa5 > 0,  "no forwarding stage5->A happened");
    check(n_fb4 > 0,  "no forwarding stage4->B happened");
    check(n_fb5 > 0,  "no forwarding stage5->B happened");
    check(n_fst > 0,  "no store-data forwarding happened");
    check(n_wt > 0,   "no register-file write-through happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
