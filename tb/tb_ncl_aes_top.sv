// tb_ncl_aes_top: end-to-end test of the NCL AES-128 encryption pipeline.
//
// A producer process applies plaintext/key pairs as dual-rail DATA while ki_in = 1 and NULL
// while ki_in = 0; a consumer process takes every ciphertext when ko_out falls and checks it
// against known answers (FIPS-197, the all-zero block and key, and the
// plaintext 00112233..eeff under key 00001111..7777 used to exercise this pipeline) and the Boolean reference model, and checks that the
// output is a clean NULL when ko_out rises. Mid-way, a reset is applied to a loaded
// pipeline, and afterwards operation must resume. Counted mechanisms: DATA wavefronts,
// NULL wavefronts, requests for NULL seen by the producer, key changes between blocks and
// reset back to NULL; each must occur at least once.
module tb_ncl_aes_top;
  import aes_ref_pkg::*;

  localparam int NBLK = 12;

  logic         rst;
  logic [127:0] pt1, pt0, key1, key0, ct1, ct0;
  logic         ki_in, ko_out;

  int checks = 0, failures = 0;
  int n_data = 0, n_null = 0, n_rfn = 0, n_keychg = 0, n_reset = 0;

  logic [127:0] pt_q [$];
  logic [127:0] key_q [$];
  logic [127:0] exp_q [$];

  ncl_aes_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic drive_null();
    pt1 = '0; pt0 = '0; key1 = '0; key0 = '0;
  endtask

  task automatic drive_data(input logic [127:0] p, input logic [127:0] k);
    pt1 = p; pt0 = ~p; key1 = k; key0 = ~k;
  endtask

  // Plaintext/key pairs: three FIPS-197 / known answers, then random ones.
  task automatic make_vectors();
    logic [127:0] p, k;
    for (int i = 0; i < NBLK; i++) begin
      case (i)
        0: begin p = 128'h00112233445566778899aabbccddeeff; k = 128'h000102030405060708090a0b0c0d0e0f; end
        1: begin p = 128'h3243f6a8885a308d313198a2e0370734; k = 128'h2b7e151628aed2a6abf7158809cf4f3c; end
        2: begin p = 128'h0;                                k = 128'h0; end
        3: begin p = 128'h00112233445566778899aabbccddeeff; k = 128'h00001111222233334444555566667777; end
        default: begin p = rand128(); k = (i % 3 == 0) ? k : rand128(); end
      endcase
      pt_q.push_back(p);
      key_q.push_back(k);
      exp_q.push_back(encrypt(p, k));
    end
  endtask

  int got = 0;

  initial begin
    drive_null();
    rst = 1'b1;
    make_vectors();
    // independent spot checks of the reference model itself
    check(exp_q[0] == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "reference FIPS-197 C.1");
    check(exp_q[1] == 128'h3925841d02dc09fbdc118597196a0b32, "reference FIPS-197 B");
    check(exp_q[2] == 128'h66e94bd4ef8a2c3b884cfa59ca342b2e, "reference zero key");
    check(exp_q[3] == 128'h9c7373ae2c03c97f085291f55707e47b, "reference: published pipeline run");
    #5;
    check(ki_in == 1'b1 && ko_out == 1'b1 && ct1 == '0 && ct0 == '0, "reset gives NULL, Ko=1");
    rst = 1'b0;
    #5;

    // First phase: a block is put in, then the pipeline is reset while it holds data.
    wait (ki_in == 1'b1);
    drive_data(128'h0123456789abcdef0123456789abcdef, 128'hfedcba9876543210fedcba9876543210);
    #1;
    check(ki_in == 1'b0, "stage 1 took the DATA wavefront");
    rst = 1'b1;
    drive_null();
    #2;
    check(ki_in == 1'b1 && ko_out == 1'b1 && ct1 == '0 && ct0 == '0, "reset empties a loaded pipe");
    n_reset++;
    rst = 1'b0;
    #2;

    fork
      begin : producer
        logic [127:0] last_k;
        last_k = '1;
        for (int i = 0; i < NBLK; i++) begin
          wait (ki_in == 1'b1);
          #1;
          drive_data(pt_q[i], key_q[i]);
          if (key_q[i] != last_k) n_keychg++;
          last_k = key_q[i];
          #1;
          if (ki_in == 1'b0) n_rfn++;
          wait (ki_in == 1'b0);
          #1;
          drive_null();
        end
      end
      begin : consumer
        for (int i = 0; i < NBLK; i++) begin
          wait (ko_out == 1'b0);
          check((ct1 ^ ct0) == '1, $sformatf("block %0d: ciphertext complete DATA", i));
          check(ct1 == exp_q[i], $sformatf("block %0d: ct %h expected %h", i, ct1, exp_q[i]));
          n_data++;
          wait (ko_out == 1'b1);
          check(ct1 == '0 && ct0 == '0, $sformatf("block %0d: output back to NULL", i));
          n_null++;
          got++;
        end
      end
    join

    check(got == NBLK, "all blocks came out");
    check(n_data  > 0, "mechanism: DATA wavefront");
    check(n_null  > 0, "mechanism: NULL wavefront");
    check(n_rfn   > 0, "mechanism: request for NULL after DATA");
    check(n_keychg > 1, "mechanism: key change between blocks");
    check(n_reset > 0, "mechanism: reset to NULL");
    $display("mechanisms: data=%0d null=%0d rfn=%0d keychg=%0d reset=%0d",
             n_data, n_null, n_rfn, n_keychg, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
