// tb_h2inv_xor_tree: checks p = H2^-1 q for all twelve codes against forward substitution
// through H2, and checks H2 p = q from the definition of H2.
module tb_h2inv_xor_tree;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic             clk = 1'b0;
  logic [M_MAX-1:0] q;
  code_rate_e       rate;
  logic [12*27-1:0] p27;
  logic [12*54-1:0] p54;
  logic [12*81-1:0] p81;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  h2inv_xor_tree #(.LEN_IDX(0)) u0 (.q(q[0 +: 12*27]), .rate, .p(p27));
  h2inv_xor_tree #(.LEN_IDX(1)) u1 (.q(q[0 +: 12*54]), .rate, .p(p54));
  h2inv_xor_tree #(.LEN_IDX(2)) u2 (.q(q[0 +: 12*81]), .rate, .p(p81));

  // H2 p, from the definition of H2.
  function automatic logic [M_MAX-1:0] h2_times(input int unsigned li, input int unsigned ri,
                                               input logic [M_MAX-1:0] p);
    logic [M_MAX-1:0] y;
    int unsigned z, mb;
    int sh;
    z = z_of(li);
    mb = mb_of(ri);
    y = '0;
    for (int unsigned r = 0; r < mb; r++)
      for (int unsigned c = 0; c < mb; c++) begin
        sh = h2_shift(mb, r, c);
        if (sh >= 0)
          for (int unsigned t = 0; t < z; t++) y[r*z + t] ^= p[c*z + (t + sh) % z];
      end
    return y;
  endfunction

  initial begin
    logic [M_MAX-1:0] got, exp, mask;
    for (int n = 0; n < 40; n++)
      for (int ri = 0; ri < 4; ri++)
        for (int li = 0; li < 3; li++) begin
          rate = code_rate_e'(ri);
          mask = ~({M_MAX{1'b1}} << (mb_of(ri) * z_of(li)));
          for (int i = 0; i < M_MAX; i++) q[i] = 1'($urandom);
          q &= mask;
          // single-bit q vectors now and then: one column of H2^-1 at a time
          if (n % 4 == 3) begin
            q = '0;
            q[$urandom_range(mb_of(ri) * z_of(li) - 1)] = 1'b1;
          end
          #1;
          got = (li == 0) ? M_MAX'(p27) : (li == 1) ? M_MAX'(p54) : p81;
          exp = ref_p(li, ri, q);
          checks++;
          if (got !== exp) begin
            failures++;
            if (failures < 5) $display("FAIL p len %0d rate %0d", li, ri);
          end
          checks++;
          if (h2_times(li, ri, got) !== q) begin
            failures++;
            if (failures < 5) $display("FAIL H2*p len %0d rate %0d", li, ri);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
