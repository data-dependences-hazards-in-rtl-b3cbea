// tb_dmem: random doubleword stores and loads at any byte address (aligned
// or not) against a byte-array model; checks little-endian byte order, the
// document's example (M[140] = 14 read back) and that a store takes effect
// at the clock edge, not before.
module tb_dmem;
  logic clk = 0;
  logic we, rd;
  logic [63:0] addr, din, dout;

  dmem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] model [4096];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mread(logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = model[(int'(a[11:0]) + i) % 4096];
    return v;
  endfunction

  task automatic store(logic [63:0] a, logic [63:0] d);
    @(negedge clk);
    we = 1; rd = 0; addr = a; din = d;
    @(posedge clk);
    for (int i = 0; i < 8; i++) model[(int'(a[11:0]) + i) % 4096] = d[8*i +: 8];
    @(negedge clk);
    we = 0;
  endtask

  task automatic load_check(logic [63:0] a);
    @(negedge clk);
    we = 0; rd = 1; addr = a;
    #1;
    checks++;
    if (dout !== mread(a)) begin
      failures++;
      $display("FAIL addr=%0d dout=%h exp=%h", a, dout, mread(a));
    end
  endtask

  initial begin
    we = 0; rd = 0; addr = 0; din = 0;
    // fill the whole memory
    for (int a = 0; a < 4096; a += 8) store(64'(a), {$urandom, $urandom});
    // the example: M[140] = 14
    store(64'd140, 64'd14);
    load_check(64'd140);
    checks++;
    if (dout !== 64'd14) begin failures++; $display("FAIL M[140]"); end
    // byte order
    store(64'd16, 64'h0807_0605_0403_0201);
    load_check(64'd17);
    checks++;
    if (dout[7:0] !== 8'h02 || dout[55:0] !== 56'h08_0706_0504_0302) begin
      failures++; $display("FAIL byte order %h", dout);
    end
    // write happens at the clock edge
    @(negedge clk);
    we = 1; addr = 64'd200; din = ~mread(64'd200);
    #1;
    checks++;
    if (dout !== mread(64'd200)) begin failures++; $display("FAIL early write"); end
    @(posedge clk);
    for (int i = 0; i < 8; i++) model[200 + i] = din[8*i +: 8];
    @(negedge clk);
    we = 0;
    // random
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 1) == 1) store(64'($urandom_range(0, 8191)), {$urandom, $urandom});
      load_check(64'($urandom_range(0, 8191)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
