// tb_ncl_reg_bit: four-phase handshake test of one dual-rail NCL register bit.
//
// The testbench plays both neighbours. It checks reset to NULL (Ko = 1), that DATA passes
// only while Ki = 1, is held while Ki = 0 even when the input returns to NULL, that NULL
// passes only once Ki = 0, and that Ko is the NOR of the output rails.
module tb_ncl_reg_bit;
  int checks = 0, failures = 0;
  logic d1, d0, ki, rst, q1, q0, ko;

  ncl_reg_bit dut (.*);

  task automatic expect_q(input logic e1, input logic e0, input string what);
    #1;
    checks++;
    if (q1 !== e1 || q0 !== e0 || ko !== ~(e1 | e0)) begin
      failures++;
      $display("FAIL %s: q=%b%b ko=%b expected q=%b%b", what, q1, q0, ko, e1, e0);
    end
  endtask

  initial begin
    rst = 1; ki = 1; d1 = 1; d0 = 0;
    expect_q(0, 0, "reset holds NULL");
    rst = 0; d1 = 0; d0 = 0;
    expect_q(0, 0, "NULL after reset");
    for (int i = 0; i < 20; i++) begin
      logic v;
      v = 1'($urandom());
      ki = 0; d1 = v; d0 = ~v;
      expect_q(0, 0, "DATA blocked while Ki=0");
      ki = 1;
      expect_q(v, ~v, "DATA passes when Ki=1");
      d1 = 0; d0 = 0;
      expect_q(v, ~v, "DATA held: Ki still 1");
      ki = 0;
      expect_q(0, 0, "NULL passes when Ki=0");
      ki = 1;
    end
    d1 = 1; d0 = 0;
    expect_q(1, 0, "DATA1");
    rst = 1;
    expect_q(0, 0, "reset clears DATA");
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
