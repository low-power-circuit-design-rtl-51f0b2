// tb_ncl_completion: test of the TH44 completion tree at the default N = 128.
//
// Starting from all inputs 1 (register NULL), bits are lowered one at a time in random
// order: ko must stay 1 until the last bit falls, then fall. Then bits are raised one at
// a time: ko must stay 0 until the last one rises. The logic depth is also checked:
// 4 levels of TH44 gates for 128 inputs.
module tb_ncl_completion;
  localparam int N = 128;
  int checks = 0, failures = 0;
  logic [N-1:0] k;
  logic ko;
  int order [N];

  ncl_completion #(.N(N)) dut (.ki_bits(k), .ko(ko));

  task automatic shuffle();
    for (int i = 0; i < N; i++) order[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
  endtask

  initial begin
    k = '1;
    #1;
    checks++; if (ko !== 1'b1) begin failures++; $display("FAIL: all NULL, ko=%b", ko); end
    checks++; if (dut.LEVELS != 4) begin failures++; $display("FAIL: %0d levels", dut.LEVELS); end
    for (int rep = 0; rep < 4; rep++) begin
      shuffle();
      for (int i = 0; i < N; i++) begin
        k[order[i]] = 1'b0;
        #1;
        checks++;
        if (ko !== (i == N - 1 ? 1'b0 : 1'b1)) begin
          failures++; $display("FAIL falling step %0d ko=%b", i, ko);
        end
      end
      shuffle();
      for (int i = 0; i < N; i++) begin
        k[order[i]] = 1'b1;
        #1;
        checks++;
        if (ko !== (i == N - 1 ? 1'b1 : 1'b0)) begin
          failures++; $display("FAIL rising step %0d ko=%b", i, ko);
        end
      end
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
