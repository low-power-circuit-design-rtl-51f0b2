// tb_ncl_reg: handshake test of the 128-bit NCL register with completion detection.
//
// The testbench is both the previous stage (it drives d) and the next stage (it drives ki).
// For random words it checks: after reset q is NULL and Ko = 1; with Ki = 0 a DATA word
// is held back; with Ki = 1 DATA arriving bit by bit in random order passes bit by bit, but
// Ko falls only when the last bit has arrived; the word is then held while d returns to
// NULL until Ki falls; NULL then passes bit by bit and Ko rises only with the last bit.
module tb_ncl_reg;
  localparam int W = 128;
  int checks = 0, failures = 0;
  logic [W-1:0] d1, d0, q1, q0;
  logic ki, rst, ko;
  int order [W];

  ncl_reg #(.WIDTH(W)) dut (.*);

  task automatic shuffle();
    for (int i = 0; i < W; i++) order[i] = i;
    for (int i = W - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q1=%h q0=%h ko=%b)", what, q1, q0, ko); end
  endtask

  initial begin
    logic [W-1:0] v;
    rst = 1; ki = 1; d1 = '1; d0 = '0;
    #1;
    chk(q1 == '0 && q0 == '0 && ko == 1'b1, "reset: NULL and Ko=1");
    rst = 0; d1 = '0; d0 = '0;
    #1;
    for (int rep = 0; rep < 6; rep++) begin
      v = {$urandom(), $urandom(), $urandom(), $urandom()};
      ki = 0; d1 = v; d0 = ~v;
      #1;
      chk(q1 == '0 && q0 == '0 && ko == 1'b1, "DATA held back while Ki=0");
      d1 = '0; d0 = '0;
      ki = 1;
      #1;
      shuffle();
      for (int i = 0; i < W; i++) begin
        d1[order[i]] = v[order[i]];
        d0[order[i]] = ~v[order[i]];
        #1;
        chk(ko == (i == W - 1 ? 1'b0 : 1'b1), $sformatf("Ko during DATA arrival, bit %0d", i));
      end
      chk(q1 == v && q0 == ~v, "DATA word passed");
      d1 = '0; d0 = '0;
      #1;
      chk(q1 == v && q0 == ~v && ko == 1'b0, "DATA held while Ki=1");
      d1 = v; d0 = ~v;
      ki = 0;
      #1;
      shuffle();
      for (int i = 0; i < W; i++) begin
        d1[order[i]] = 1'b0;
        d0[order[i]] = 1'b0;
        #1;
        chk(ko == (i == W - 1 ? 1'b1 : 1'b0), $sformatf("Ko during NULL arrival, bit %0d", i));
      end
      chk(q1 == '0 && q0 == '0, "NULL passed");
      ki = 1;
      #1;
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
