// h2inv_xor_tree: second encoding step, p = H2^-1 * q over GF(2), for the four codes of one
// codeword length, followed by the code-rate multiplexer.
//
// H2 is the stair matrix shared by the whole code family (first block column P^1 / P^0 / P^1 in
// rows 0, mb/2 and mb-1, identities on the double diagonal). Adding all its block rows leaves
// P^1 + P^0 + P^1 = I, so the first parity block is the plain XOR of all mb blocks of q,
//   p_0 = q_0 ^ q_1 ^ ... ^ q_(mb-1),
// and every other block follows without a chain through p:
//   p_j = (q_0 ^ ... ^ q_(j-1)) ^ P^1 p_0 ^ (j > mb/2 ? p_0 : 0),   1 <= j < mb.
// The running XORs of q are the basic XOR subtrees shared by all four rates: the sum over the
// first 4 blocks is the rate-5/6 p_0, two more blocks give the rate-3/4 p_0, and so on up to the
// 12 blocks of rate 1/2. The same running XORs feed every p_j. Only the rate multiplexer differs
// between codes. This sharing follows the parity XOR tree the design method illustrates.
//
// Interface: q carries mb*Z bits of the selected code from bit 0 upward (higher bits ignored);
// p carries mb*Z parity bits from bit 0, higher bits zero. Purely combinational.
module h2inv_xor_tree
  import ldpc_pkg::*;
#(
  parameter int unsigned LEN_IDX = 2  // 0: n = 648, 1: n = 1296, 2: n = 1944
) (
  input  logic [MB_MAX*z_of(LEN_IDX)-1:0] q,
  input  code_rate_e                      rate,
  output logic [MB_MAX*z_of(LEN_IDX)-1:0] p
);

  localparam int unsigned Z = z_of(LEN_IDX);

  // y[t] = x[(t + 1) mod Z]: multiplication by the identity shifted by one.
  function automatic logic [Z-1:0] circ1(input logic [Z-1:0] x);
    return {x[0], x[Z-1:1]};
  endfunction

  // Running XORs of the q blocks: pre[i] = q_0 ^ ... ^ q_(i-1).
  logic [Z-1:0] pre [MB_MAX+1];

  always_comb begin
    pre[0] = '0;
    for (int unsigned i = 0; i < MB_MAX; i++) pre[i+1] = pre[i] ^ q[i*Z +: Z];
  end

  // Parity vector of each rate.
  logic [MB_MAX*Z-1:0] p_rate [4];

  for (genvar ri = 0; ri < 4; ri++) begin : g_rate
    localparam int unsigned MB = mb_of(ri);
    logic [Z-1:0] p0;
    assign p0 = pre[MB];
    always_comb begin
      p_rate[ri]        = '0;
      p_rate[ri][0 +: Z] = p0;
      for (int unsigned j = 1; j < MB; j++)
        p_rate[ri][j*Z +: Z] = pre[j] ^ circ1(p0) ^ ((j > MB / 2) ? p0 : '0);
    end
  end

  // Code-rate multiplexer.
  assign p = p_rate[rate];

endmodule
