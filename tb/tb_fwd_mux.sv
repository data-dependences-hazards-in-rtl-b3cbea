// tb_fwd_mux: checks that the forwarding mux passes the register value, the
// stage-4 value or the stage-5 value according to its select, for random data.
module tb_fwd_mux;
  import pipe_pkg::*;

  fwd_sel_t sel;
  logic [63:0] reg_val, s4_val, s5_val, y;

  fwd_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] e;
      reg_val = {$urandom, $urandom}; s4_val = {$urandom, $urandom}; s5_val = {$urandom, $urandom};
      case (i % 3)
        0: begin sel = FWD_NONE; e = reg_val; end
        1: begin sel = FWD_S4;   e = s4_val;  end
        default: begin sel = FWD_S5; e = s5_val; end
      endcase
      #1;
      checks++;
      if (y !== e) begin failures++; $display("FAIL sel=%0d y=%h exp=%h", sel, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
