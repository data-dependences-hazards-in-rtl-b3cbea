// tb_alu: compares every ALU operation with a reference computed here, for
// directed corner values (0, -1, the most negative number, the document's
// example operands) and random operands.
module tb_alu;
  import pipe_pkg::*;

  alu_op_t op;
  logic [63:0] a, b, y;

  alu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] model(alu_op_t o, logic [63:0] x, logic [63:0] z);
    logic signed [63:0] sx = x;
    int sh = int'(z[5:0]);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_SLL:   return x << sh;
      ALU_SLT:   return (sx < $signed(z)) ? 64'd1 : 64'd0;
      ALU_SLTU:  return (x < z) ? 64'd1 : 64'd0;
      ALU_XOR:   return x ^ z;
      ALU_SRL:   return x >> sh;
      ALU_SRA:   begin
        logic [63:0] r = x >> sh;
        if (x[63]) for (int k = 0; k < sh; k++) r[63-k] = 1'b1;
        return r;
      end
      ALU_OR:    return x | z;
      ALU_AND:   return x & z;
      ALU_PASSB: return z;
      default:   return 64'd0;
    endcase
  endfunction

  task automatic one(alu_op_t o, logic [63:0] x, logic [63:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    logic [63:0] corner [6] = '{64'd0, '1, 64'h8000_0000_0000_0000, 64'd100, 64'd40, 64'd200};
    // the document's examples: 100 + 40 = 140, 200 - 32 = 168
    one(ALU_ADD, 64'd100, 64'd40);
    one(ALU_SUB, 64'd200, 64'd32);
    for (int o = 0; o <= int'(ALU_PASSB); o++)
      foreach (corner[i]) foreach (corner[j]) one(alu_op_t'(o), corner[i], corner[j]);
    for (int i = 0; i < 20000; i++)
      one(alu_op_t'($urandom_range(0, int'(ALU_PASSB))), {$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
