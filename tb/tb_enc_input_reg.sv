// tb_enc_input_reg: checks reset, one-cycle load of a random vector and code selection, and
// that the register holds its contents while in_valid is low.
module tb_enc_input_reg;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [K_MAX-1:0] s_in, s, held_s;
  code_sel_t sel_in, sel, held_sel;
  logic valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_input_reg dut (.clk, .rst_n, .in_valid, .s_in, .sel_in, .valid, .s, .sel);

  task automatic expect_eq(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; s_in = '1; sel_in = '{len: LEN_1944, rate: RATE_5_6};
    repeat (2) @(posedge clk);
    #1;
    expect_eq(!valid && s == '0, "reset");
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      in_valid = 1'($urandom_range(1));
      for (int i = 0; i < K_MAX; i++) s_in[i] = 1'($urandom);
      sel_in = '{len: code_len_e'($urandom_range(2)), rate: code_rate_e'($urandom_range(3))};
      held_s = s; held_sel = sel;
      @(posedge clk);
      #1;
      expect_eq(valid == in_valid, "valid follows in_valid after one cycle");
      if (in_valid) expect_eq(s == s_in && sel == sel_in, "load");
      else          expect_eq(s == held_s && sel == held_sel, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
