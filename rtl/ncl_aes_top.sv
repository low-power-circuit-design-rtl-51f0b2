// ncl_aes_top: clockless AES-128 encryption pipeline in Null Convention Logic (NCL).
//
// Eleven rounds (the initial AddRoundKey, rounds 1 to 9 and the final round) stand between
// twelve NCL register stages. Every signal is dual rail and the data move as alternating
// DATA and NULL wavefronts, with no clock: each register stage accepts a wavefront only
// when the stage after it asks for it through the Ko -> Ki handshake, so a new block can
// enter as soon as the previous one has moved one stage on, and up to about six blocks are
// in flight at once.
//
//   stage 0 : ncl_reg_first, plaintext + key, no completion detection
//   round 0 : ncl_round_init          stage 1..10: state register + key register
//   round r : ncl_round #(r), r=1..9  (two 128-bit ncl_reg, Ko merged by a TH22 gate)
//   round 10: ncl_round_final         stage 11: ciphertext register, its Ko is its own Ki
//
// The round key is expanded in each round beside the state and stored with it, so the
// stage registers 1 to 10 carry 256 dual-rail bits; the last carries the 128-bit result.
// The stage and round counts, the Ko -> Ki chaining, the first register without
// completion detection and the self-acknowledging last register follow the published
// NCL AES structure; storing the key in a second register per stage is this
// implementation's choice.
//
// Interface (four-phase, dual rail, rail 1 / rail 0 per bit):
//   rst          high: every register is loaded with NULL and all rounds empty to NULL.
//   pt1/pt0, key1/key0   plaintext and key; the producer applies DATA while ki_in = 1 and
//                NULL while ki_in = 0, and changes them only after ki_in has changed.
//   ki_in        the Ko of stage 1, which is the Ki of stage 0 (request for DATA / NULL).
//   ct1/ct0      ciphertext; complete DATA when ko_out falls to 0, NULL when it rises to 1.
//   ko_out       the Ko of stage 11.
// Timing: asynchronous. Latency is the sum of the register, round and completion delays
// of 11 stages; the cycle of one DATA plus one NULL wavefront is set by the slowest stage.
// The last stage has no consumer to wait for: its Ko drives its own Ki, so the consumer
// must take each ciphertext while ko_out is 0 and cannot hold the pipeline back.
//
// The Ko/Ki wires and the hysteresis gates form loops on purpose: the handshake is a loop
// between neighbouring stages, and each NCL gate holds its state; a simulator reports
// both as combinational loops and latches.
module ncl_aes_top (
  input  logic         rst,
  input  logic [127:0] pt1,
  input  logic [127:0] pt0,
  input  logic [127:0] key1,
  input  logic [127:0] key0,
  output logic         ki_in,
  output logic [127:0] ct1,
  output logic [127:0] ct0,
  output logic         ko_out
);

  localparam int unsigned NMID = 10;  // register stages 1..10 hold state and key

  // Register outputs (q) and round outputs (d) per stage; index = stage number.
  logic [NMID:0][127:0] qs1, qs0, qk1, qk0;   // stage 0..10 outputs: state, key
  logic [NMID:1][127:0] ds1, ds0, dk1, dk0;   // inputs of stages 1..10
  logic [NMID+1:1]      ko;                   // Ko of stages 1..11
  logic [NMID:1]        ko_s, ko_k;           // Ko of the state / key register of a stage
  logic [127:0]         dc1, dc0;             // ciphertext from the final round

  // Stage 0: plaintext and key, no completion detection; its Ki is the Ko of stage 1.
  ncl_reg_first #(.WIDTH(256)) u_reg0 (
    .d1 ({pt1, key1}), .d0({pt0, key0}),
    .ki (ko[1]),       .rst(rst),
    .q1 ({qs1[0], qk1[0]}), .q0({qs0[0], qk0[0]})
  );

  // Initial round.
  ncl_round_init u_round0 (
    .p1(qs1[0]), .p0(qs0[0]), .k1(qk1[0]), .k0(qk0[0]),
    .s1(ds1[1]), .s0(ds0[1]), .ko1(dk1[1]), .ko0(dk0[1])
  );

  for (genvar i = 1; i <= NMID; i++) begin : g_stage
    // Ki of stage i is the Ko of stage i+1.
    ncl_reg #(.WIDTH(128)) u_reg_s (
      .d1(ds1[i]), .d0(ds0[i]), .ki(ko[i+1]), .rst(rst),
      .q1(qs1[i]), .q0(qs0[i]), .ko(ko_s[i])
    );
    ncl_reg #(.WIDTH(128)) u_reg_k (
      .d1(dk1[i]), .d0(dk0[i]), .ki(ko[i+1]), .rst(rst),
      .q1(qk1[i]), .q0(qk0[i]), .ko(ko_k[i])
    );
    // Both halves complete before the stage acknowledges.
    ncl_th #(.N(2), .M(2)) u_ko (.a({ko_s[i], ko_k[i]}), .rst(1'b0), .z(ko[i]));

    if (i < NMID) begin : g_mid
      ncl_round #(.RND(i)) u_round (
        .s1(qs1[i]),   .s0(qs0[i]),   .k1(qk1[i]),   .k0(qk0[i]),
        .y1(ds1[i+1]), .y0(ds0[i+1]), .ky1(dk1[i+1]), .ky0(dk0[i+1])
      );
    end else begin : g_last
      ncl_round_final u_round (
        .s1(qs1[i]), .s0(qs0[i]), .k1(qk1[i]), .k0(qk0[i]),
        .y1(dc1),    .y0(dc0)
      );
    end
  end

  // Stage 11: the ciphertext register; with no stage after it, its Ko is its own Ki.
  ncl_reg #(.WIDTH(128)) u_reg_out (
    .d1(dc1), .d0(dc0), .ki(ko[NMID+1]), .rst(rst),
    .q1(ct1), .q0(ct0), .ko(ko[NMID+1])
  );

  assign ki_in  = ko[1];
  assign ko_out = ko[NMID+1];

endmodule
