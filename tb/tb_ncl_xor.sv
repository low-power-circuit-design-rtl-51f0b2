// tb_ncl_xor: exhaustive dual-rail test of the NCL XOR gate (4-bit instance).
//
// Every bit is driven through random sequences of NULL, DATA0 and DATA1 on each operand,
// always passing through NULL between DATA values as an NCL circuit does (and sometimes
// with one operand changing before the other). A reference model computes the expected
// output: DATA(a xor b) once both operands are DATA, NULL once both are NULL, unchanged
// in between.
module tb_ncl_xor;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic [W-1:0] a1, a0, b1, b0, z1, z0;
  logic [W-1:0] e1, e0;
  int n_hold = 0;

  ncl_xor #(.W(W)) dut (.*);

  initial begin
    a1 = '0; a0 = '0; b1 = '0; b0 = '0;
    e1 = '0; e0 = '0;
    #1;
    for (int step = 0; step < 300; step++) begin
      for (int i = 0; i < W; i++) begin
        bit a_null, b_null;
        a_null = (a1[i] | a0[i]) == 1'b0;
        b_null = (b1[i] | b0[i]) == 1'b0;
        // move one operand one phase on: NULL -> DATA or DATA -> NULL
        if ($urandom_range(1, 0) == 0) begin
          if (a_null && (b_null || (e1[i] | e0[i]) == 1'b0)) begin
            a1[i] = 1'($urandom()); a0[i] = ~a1[i];
          end else if (!a_null && (!b_null || (e1[i] | e0[i]) == 1'b1)) begin
            a1[i] = 1'b0; a0[i] = 1'b0;
          end
        end else begin
          if (b_null && (a_null || (e1[i] | e0[i]) == 1'b0)) begin
            b1[i] = 1'($urandom()); b0[i] = ~b1[i];
          end else if (!b_null && (!a_null || (e1[i] | e0[i]) == 1'b1)) begin
            b1[i] = 1'b0; b0[i] = 1'b0;
          end
        end
        if ((a1[i] | a0[i]) && (b1[i] | b0[i])) begin
          e1[i] = a1[i] ^ b1[i]; e0[i] = ~(a1[i] ^ b1[i]);
        end else if (!(a1[i] | a0[i]) && !(b1[i] | b0[i])) begin
          e1[i] = 1'b0; e0[i] = 1'b0;
        end else if (e1[i] | e0[i]) begin
          n_hold++;
        end
      end
      #1;
      checks++;
      if (z1 !== e1 || z0 !== e0) begin
        failures++;
        $display("FAIL step %0d a=%b/%b b=%b/%b z=%b/%b exp=%b/%b", step, a1, a0, b1, b0, z1, z0, e1, e0);
      end
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL: hold state never reached"); end
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
