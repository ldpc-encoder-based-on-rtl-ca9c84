// tb_h1_xor_tree: checks q = H1 s of all twelve codes (three instances, one per codeword length,
// four rates each) against a bit-by-bit reference, for random and single-bit information
// vectors. Single-bit vectors check every column of every H1 separately.
module tb_h1_xor_tree;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic             clk = 1'b0;
  logic [K_MAX-1:0] s;
  code_rate_e       rate;
  logic [12*27-1:0] q27;
  logic [12*54-1:0] q54;
  logic [12*81-1:0] q81;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  h1_xor_tree #(.LEN_IDX(0)) u0 (.s(s[0 +: 20*27]), .rate, .q(q27));
  h1_xor_tree #(.LEN_IDX(1)) u1 (.s(s[0 +: 20*54]), .rate, .q(q54));
  h1_xor_tree #(.LEN_IDX(2)) u2 (.s(s[0 +: 20*81]), .rate, .q(q81));

  task automatic check(input int unsigned li, input int unsigned ri);
    logic [M_MAX-1:0] got, exp;
    exp = ref_q(li, ri, s);
    got = (li == 0) ? M_MAX'(q27) : (li == 1) ? M_MAX'(q54) : q81;
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL len %0d rate %0d", li, ri);
    end
  endtask

  initial begin
    // random vectors
    for (int n = 0; n < 20; n++)
      for (int ri = 0; ri < 4; ri++) begin
        rate = code_rate_e'(ri);
        for (int li = 0; li < 3; li++) begin
          s = rand_info(li, ri);
          #1;
          check(li, ri);
        end
      end
    // one information block at a time, single bit set
    for (int ri = 0; ri < 4; ri++) begin
      rate = code_rate_e'(ri);
      for (int li = 0; li < 3; li++)
        for (int j = 0; j < kb_of(ri); j++) begin
          s = '0;
          s[j*z_of(li) + $urandom_range(z_of(li) - 1)] = 1'b1;
          #1;
          check(li, ri);
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
