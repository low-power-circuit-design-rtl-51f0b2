// tb_ncl_round_init: dual-rail test of ncl_round_init (initial AES round).
//
// For each random state/key pair: all-NULL inputs must give all-NULL outputs; complete
// DATA except for one bit must not give complete DATA outputs; complete DATA must give the
// values of the Boolean reference model; NULL except for one bit must leave some output
// bit DATA; all-NULL must bring every output back to NULL.
module tb_ncl_round_init;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] s1, s0, k1, k0;
  logic [127:0] y1, y0, ky1, ky0;

  ncl_round_init dut (.p1(s1), .p0(s0), .k1(k1), .k0(k0), .s1(y1), .s0(y0), .ko1(ky1), .ko0(ky0));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [127:0] vs, vk;
    logic [127:0] es, ek;
    int hole;
    s1 = '0; s0 = '0; k1 = '0; k0 = '0;
    for (int rep = 0; rep < 40; rep++) begin
      case (rep)
        0: begin vs = 128'h00112233445566778899aabbccddeeff; vk = 128'h000102030405060708090a0b0c0d0e0f; end
        1: begin vs = 128'h0; vk = 128'h0; end
        default: begin vs = rand128(); vk = rand128(); end
      endcase
      es = vs ^ vk; ek = vk;
      hole = int'($urandom_range(255, 0));
      s1 = '0; s0 = '0; k1 = '0; k0 = '0;
      #1;
      chk((y1 | y0 | ky1 | ky0) == '0, "NULL in, NULL out");
      s1 = vs; s0 = ~vs; k1 = vk; k0 = ~vk;
      if (hole < 128) begin s1[hole] = 0; s0[hole] = 0; end
      else begin k1[hole-128] = 0; k0[hole-128] = 0; end
      #1;
      chk(!((y1 ^ y0) == '1 && (ky1 ^ ky0) == '1), $sformatf("input bit %0d NULL: outputs not complete", hole));
      s1 = vs; s0 = ~vs; k1 = vk; k0 = ~vk;
      #1;
      chk(((y1 ^ y0) == '1 && (ky1 ^ ky0) == '1) && (y1 == es && ky1 == ek), $sformatf("DATA s=%h k=%h", vs, vk));
      s1 = '0; s0 = '0; k1 = '0; k0 = '0;
      if (hole < 128) begin s1[hole] = vs[hole]; s0[hole] = ~vs[hole]; end
      else begin k1[hole-128] = vk[hole-128]; k0[hole-128] = ~vk[hole-128]; end
      #1;
      chk(!((y1 | y0 | ky1 | ky0) == '0), "one input bit DATA: outputs not all NULL");
      s1 = '0; s0 = '0; k1 = '0; k0 = '0;
      #1;
      chk((y1 | y0 | ky1 | ky0) == '0, "back to NULL");
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
