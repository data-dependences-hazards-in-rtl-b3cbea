// tb_regfile: random reads and writes against a model array. Checks that x0
// reads zero, that a written value is read back from the next cycle on, and
// that a read of the register being written in the same cycle returns the
// new value (write-through, so a consumer three instructions after the
// producer needs no forwarding).
module tb_regfile;
  import pipe_pkg::*;

  logic clk = 0;
  reg_idx_t ra1, ra2, wa;
  logic [63:0] rd1, rd2, wd;
  logic we;

  regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] model [32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] expect_rd(reg_idx_t ra);
    if (ra == 0) return 64'd0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  initial begin
    model[0] = '0;
    // initialise every register
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1; wa = 5'(r); wd = {$urandom, $urandom}; ra1 = 0; ra2 = 0;
      if (r != 0) model[r] = wd;
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 5'($urandom); wd = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== expect_rd(ra1) || rd2 !== expect_rd(ra2)) begin
        failures++;
        $display("FAIL ra1=%0d rd1=%h exp=%h ra2=%0d rd2=%h exp=%h", ra1, rd1, expect_rd(ra1),
                 ra2, rd2, expect_rd(ra2));
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
