// tb_ncl_subbytes: dual-rail test of ncl_subbytes (AES SubBytes).
//
// For each random state: all-NULL input must give an all-NULL output; DATA on all input
// bits but one must not give a complete DATA output; complete DATA must give the value of
// the Boolean reference model; NULL on all bits but one must leave some output bit DATA
// (no early return to NULL); all-NULL must bring the output back to NULL.
module tb_ncl_subbytes;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s1, s0, y1, y0;

  ncl_subbytes dut (.s1(s1), .s0(s0), .y1(y1), .y0(y0));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: y1=%h y0=%h", what, y1, y0); end
  endtask

  initial begin
    logic [127:0] v, e;
    int hole;
    s1 = '0; s0 = '0;
    for (int rep = 0; rep < 40; rep++) begin
      case (rep)
        0: v = 128'h00102030405060708090a0b0c0d0e0f0;
        1: v = 128'h0;
        default: v = rand128();
      endcase
      e = sub_bytes(v);
      hole = int'($urandom_range(127, 0));
      s1 = '0; s0 = '0;
      #1;
      chk(y1 == '0 && y0 == '0, "NULL in, NULL out");
      s1 = v; s0 = ~v;
      s1[hole] = 1'b0; s0[hole] = 1'b0;
      #1;
      chk((y1 ^ y0) != '1, "one input bit NULL: output not complete");
      s1 = v; s0 = ~v;
      #1;
      chk((y1 ^ y0) == '1 && y1 == e, $sformatf("DATA %h: expected %h", v, e));
      s1 = '0; s0 = '0;
      s1[hole] = v[hole]; s0[hole] = ~v[hole];
      #1;
      chk((y1 | y0) != '0, "one input bit DATA: output not all NULL");
      s1 = '0; s0 = '0;
      #1;
      chk(y1 == '0 && y0 == '0, "back to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
