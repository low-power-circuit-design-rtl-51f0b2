// tb_ncl_reg_first: test of the first NCL register (no completion detection), WIDTH = 256.
//
// Checks reset to NULL, that a DATA word passes only while Ki = 1 and is then held while
// the input returns to NULL, and that NULL passes only once Ki = 0.
module tb_ncl_reg_first;
  localparam int W = 256;
  int checks = 0, failures = 0;
  logic [W-1:0] d1, d0, q1, q0;
  logic ki, rst;

  ncl_reg_first #(.WIDTH(W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [W-1:0] v;
    rst = 1; ki = 1; d1 = '1; d0 = '0;
    #1;
    chk(q1 == '0 && q0 == '0, "reset loads NULL");
    rst = 0; d1 = '0; d0 = '0;
    #1;
    for (int rep = 0; rep < 10; rep++) begin
      for (int j = 0; j < W / 32; j++) v[32*j +: 32] = $urandom();
      ki = 0; d1 = v; d0 = ~v;
      #1;
      chk(q1 == '0 && q0 == '0, "DATA held back while Ki=0");
      ki = 1;
      #1;
      chk(q1 == v && q0 == ~v, "DATA passes with Ki=1");
      d1 = '0; d0 = '0;
      #1;
      chk(q1 == v && q0 == ~v, "DATA held until Ki=0");
      ki = 0;
      #1;
      chk(q1 == '0 && q0 == '0, "NULL passes with Ki=0");
    end
    d1 = '1; d0 = '0; ki = 1;
    #1;
    rst = 1;
    #1;
    chk(q1 == '0 && q0 == '0, "reset clears DATA");
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
