// tb_ncl_th: exhaustive test of the NCL threshold gate model.
//
// Three instances are checked against a behavioural reference computed here: a TH22 with
// reset-to-0 (the register gate), a TH44, and a weighted TH34w22 (weights 2,2,1,1). Random
// input sequences are applied; after each step the reference output is "set if the weighted
// count reaches the threshold, clear if all inputs are 0, hold otherwise".
module tb_ncl_th;
  int checks = 0, failures = 0;

  logic [1:0] a2;  logic [3:0] a4, aw;
  logic       rst, z22, z44, zw;
  logic       r22, r44, rw;

  ncl_th #(.N(2), .M(2), .RESET_VALUE(1'b0)) u22 (.a(a2), .rst(rst), .z(z22));
  ncl_th #(.N(4), .M(4))                      u44 (.a(a4), .rst(1'b0), .z(z44));
  ncl_th #(.N(4), .M(3), .WEIGHTS({4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd1, 4'd2, 4'd2}))
                                              uw (.a(aw), .rst(1'b0), .z(zw));

  function automatic logic next(input logic prev, input int cnt, input int thr, input bit none);
    if (cnt >= thr) return 1'b1;
    if (none)       return 1'b0;
    return prev;
  endfunction

  int set22 = 0, hold22 = 0;

  initial begin
    rst = 1'b1; a2 = 2'b11; a4 = '0; aw = '0;
    #1;
    if (z22 !== 1'b0) failures++;
    checks++;
    rst = 1'b0; a2 = '0;
    #1;
    r22 = 1'b0; r44 = 1'b0; rw = 1'b0;
    for (int i = 0; i < 400; i++) begin
      a2 = 2'($urandom()); a4 = 4'($urandom()); aw = 4'($urandom());
      #1;
      if (r22 == 1'b1 && a2 != 2'b11 && a2 != 2'b00) hold22++;
      r22 = next(r22, $countones(a2), 2, a2 == 0);
      r44 = next(r44, $countones(a4), 4, a4 == 0);
      rw  = next(rw, 2*aw[0] + 2*aw[1] + aw[2] + aw[3], 3, aw == 0);
      if (r22) set22++;
      checks += 3;
      if (z22 !== r22) begin failures++; $display("FAIL TH22 a=%b z=%b exp=%b", a2, z22, r22); end
      if (z44 !== r44) begin failures++; $display("FAIL TH44 a=%b z=%b exp=%b", a4, z44, r44); end
      if (zw  !== rw)  begin failures++; $display("FAIL TH34w22 a=%b z=%b exp=%b", aw, zw, rw); end
    end
    checks++;
    if (hold22 == 0 || set22 == 0) begin failures++; $display("FAIL: hysteresis never exercised"); end
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
