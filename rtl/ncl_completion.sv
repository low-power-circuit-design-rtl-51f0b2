// ncl_completion: completion detection of an NCL register, a tree of TH44 gates.
//
// The N inputs are the per-bit Ko signals of a register (1 = bit is NULL, 0 = bit is DATA).
// Groups of four are combined by TH44 gates (4-input C-elements with hysteresis), level by
// level, until one signal remains: ko rises only after every bit has become NULL and falls
// only after every bit has become DATA, and holds in between. A group left with fewer than
// four signals uses a THkk gate of its own size. With 4-input gates the tree has
// ceil(log4(N)) levels: 4 for N = 128 (and for N = 256). No clock, no reset: the tree
// follows the register bits, which are reset to NULL. The TH44 tree and its four levels for
// 128 bits are the standard NCL completion structure; the THkk gates for short groups are
// this implementation's way of handling widths that are not powers of four.
module ncl_completion #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] ki_bits,
  output logic         ko
);

  function automatic int unsigned ceil4(input int unsigned n);
    return (n + 3) / 4;
  endfunction

  function automatic int unsigned levels(input int unsigned n);
    int unsigned l;
    int unsigned c;
    l = 0;
    c = n;
    while (c > 1) begin
      c = ceil4(c);
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned width_at(input int unsigned n, input int unsigned lvl);
    int unsigned c;
    c = n;
    for (int unsigned i = 0; i < lvl; i++) c = ceil4(c);
    return c;
  endfunction

  localparam int unsigned LEVELS = levels(N);

  // node[l] holds the width_at(N, l) signals of level l; level 0 is the input.
  logic [LEVELS:0][N-1:0] node;

  assign node[0] = ki_bits;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned WIN  = width_at(N, l);
    localparam int unsigned WOUT = width_at(N, l + 1);
    for (genvar g = 0; g < WOUT; g++) begin : g_gate
      localparam int unsigned K = ((WIN - 4*g) >= 4) ? 4 : (WIN - 4*g);
      ncl_th #(.N(K), .M(K)) u_th (
        .a  (node[l][4*g +: K]),
        .rst(1'b0),
        .z  (node[l+1][g])
      );
    end
    if (WOUT < N) begin : g_unused
      assign node[l+1][N-1:WOUT] = '0;
    end
  end

  if (LEVELS == 0) begin : g_single
    assign ko = ki_bits[0];
  end else begin : g_tree
    assign ko = node[LEVELS][0];
  end

endmodule
