// ldpc_ref_pkg: reference models used by the encoder testbenches.
//
// They work bit by bit from the definition of the parity-check matrix H = [H1 | H2] (block
// (r, c) with shift sigma connects check bit r*Z + t to variable bit c*Z + (t + sigma) mod Z),
// and share no code with the XOR-tree RTL:
//   ref_q        q = H1 s, one check bit at a time
//   ref_p        p from q by forward substitution through the stair matrix H2
//   syndrome_ok  every check equation of H holds for the codeword [s, p]
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  function automatic logic [M_MAX-1:0] ref_q(input int unsigned li, input int unsigned ri,
                                            input logic [K_MAX-1:0] s);
    logic [M_MAX-1:0] q;
    int unsigned z, mb, kb;
    int sh;
    z  = z_of(li);
    mb = mb_of(ri);
    kb = kb_of(ri);
    q  = '0;
    for (int unsigned r = 0; r < mb; r++)
      for (int unsigned j = 0; j < kb; j++) begin
        sh = h1_shift(li, ri, r, j);
        if (sh >= 0)
          for (int unsigned t = 0; t < z; t++)
            q[r*z + t] ^= s[j*z + (t + sh) % z];
      end
    return q;
  endfunction

  // Forward substitution: p_0 = sum of all q blocks, p_1 = q_0 + P^1 p_0,
  // p_(i+1) = q_i + p_i (+ p_0 in row mb/2).
  function automatic logic [M_MAX-1:0] ref_p(input int unsigned li, input int unsigned ri,
                                            input logic [M_MAX-1:0] q);
    logic [M_MAX-1:0] p;
    int unsigned z, mb;
    z  = z_of(li);
    mb = mb_of(ri);
    p  = '0;
    for (int unsigned t = 0; t < z; t++)
      for (int unsigned r = 0; r < mb; r++) p[t] ^= q[r*z + t];
    for (int unsigned t = 0; t < z; t++) p[z + t] = q[t] ^ p[(t + 1) % z];
    for (int unsigned i = 1; i + 1 < mb; i++)
      for (int unsigned t = 0; t < z; t++)
        p[(i+1)*z + t] = q[i*z + t] ^ p[i*z + t] ^ ((i == mb / 2) ? p[t] : 1'b0);
    return p;
  endfunction

  function automatic bit syndrome_ok(input int unsigned li, input int unsigned ri,
                                     input logic [K_MAX-1:0] s, input logic [M_MAX-1:0] p);
    int unsigned z, mb, kb;
    int sh;
    logic chk;
    z  = z_of(li);
    mb = mb_of(ri);
    kb = kb_of(ri);
    for (int unsigned r = 0; r < mb; r++)
      for (int unsigned t = 0; t < z; t++) begin
        chk = 1'b0;
        for (int unsigned j = 0; j < kb; j++) begin
          sh = h1_shift(li, ri, r, j);
          if (sh >= 0) chk ^= s[j*z + (t + sh) % z];
        end
        for (int unsigned c = 0; c < mb; c++) begin
          sh = h2_shift(mb, r, c);
          if (sh >= 0) chk ^= p[c*z + (t + sh) % z];
        end
        if (chk) return 1'b0;
      end
    return 1'b1;
  endfunction

  // Information vector of k = kb*Z random bits, zero above.
  function automatic logic [K_MAX-1:0] rand_info(input int unsigned li, input int unsigned ri);
    logic [K_MAX-1:0] s;
    s = '0;
    for (int unsigned i = 0; i < kb_of(ri) * z_of(li); i++) s[i] = 1'($urandom);
    return s;
  endfunction

endpackage
