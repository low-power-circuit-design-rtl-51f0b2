// tb_ncl_keyexp: dual-rail test of ncl_shiftrows (one AES-128 key-expansion step, rounds 1 and 10).
//
// For each random key (FIPS-197 A.1 key first): all-NULL input must give an all-NULL output; DATA on all input
// bits but one must not give a complete DATA output; complete DATA must give the value of
// the Boolean reference model; NULL on all bits but one must leave some output bit DATA
// (no early return to NULL); all-NULL must bring the output back to NULL.
module tb_ncl_keyexp;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s1, s0, y1, y0, z1, z0;
  logic [127:0] e10;

  ncl_keyexp #(.RND(1)) dut (.k1(s1), .k0(s0), .y1(y1), .y0(y0));
  ncl_keyexp #(.RND(10)) dut10 (.k1(s1), .k0(s0), .y1(z1), .y0(z0));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: y1=%h y0=%h", what, y1, y0); end
  endtask

  initial begin
    logic [127:0] v, e;
    int hole;
    s1 = '0; s0 = '0;
    for (int rep = 0; rep < 20; rep++) begin
      case (rep)
        0: v = 128'h2b7e151628aed2a6abf7158809cf4f3c;
        1: v = 128'h0;
        default: v = rand128();
      endcase
      e = next_key(v, 1); e10 = next_key(v, 10);
      if (rep == 0) chk(e == 128'ha0fafe1788542cb123a339392a6c7605, "reference: FIPS-197 A.1 round-1 key");
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
      chk((y1 ^ y0) == '1 && y1 == e && (z1 ^ z0) == '1 && z1 == e10, $sformatf("DATA %h: expected %h", v, e));
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
