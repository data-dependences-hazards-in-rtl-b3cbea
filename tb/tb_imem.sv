// tb_imem: loads random words through the program-load port, then reads
// them back through the fetch port at the byte addresses a PC would hold
// (multiples of 4), including the wrap-around of addresses beyond the size.
module tb_imem;
  logic clk = 0;
  logic [63:0] addr;
  logic [31:0] insn;
  logic wr_en;
  logic [9:0] wr_idx;
  logic [31:0] wr_data;

  imem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model [1024];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 10'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int w = $urandom_range(0, 2047);
      addr = 64'(w) * 4 + 64'($urandom_range(0, 3));
      #1;
      checks++;
      if (insn !== model[w % 1024]) begin
        failures++;
        $display("FAIL addr=%0d insn=%h exp=%h", addr, insn, model[w % 1024]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
