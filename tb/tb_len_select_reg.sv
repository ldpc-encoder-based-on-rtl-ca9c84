// tb_len_select_reg: checks the code-length multiplexer (zero extension to 972 bits) in its
// combinational form and in its registered form, including the one-cycle latency and holding
// the registered value while in_valid is low.
module tb_len_select_reg;
  import ldpc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  code_sel_t in_sel;
  logic [12*27-1:0] v27;
  logic [12*54-1:0] v54;
  logic [12*81-1:0] v81;
  logic ov_c, ov_r;
  code_sel_t os_c, os_r;
  logic [M_MAX-1:0] o_c, o_r, exp, hold;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  len_select_reg #(.REG(1'b0)) u_c (.clk, .rst_n, .in_valid, .in_sel, .v27, .v54, .v81,
                                    .out_valid(ov_c), .out_sel(os_c), .out_vec(o_c));
  len_select_reg #(.REG(1'b1)) u_r (.clk, .rst_n, .in_valid, .in_sel, .v27, .v54, .v81,
                                    .out_valid(ov_r), .out_sel(os_r), .out_vec(o_r));

  task automatic expect_eq(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sel = '{len: LEN_648, rate: RATE_1_2};
    v27 = '0; v54 = '0; v81 = '0;
    repeat (2) @(posedge clk);
    #1;
    expect_eq(!ov_r && o_r == '0, "reset");
    rst_n = 1'b1;
    hold = '0;
    for (int n = 0; n < 300; n++) begin
      in_valid = 1'($urandom_range(3) != 0);
      in_sel = '{len: code_len_e'($urandom_range(2)), rate: code_rate_e'($urandom_range(3))};
      for (int i = 0; i < 12*27; i++) v27[i] = 1'($urandom);
      for (int i = 0; i < 12*54; i++) v54[i] = 1'($urandom);
      for (int i = 0; i < 12*81; i++) v81[i] = 1'($urandom);
      exp = '0;
      case (in_sel.len)
        LEN_648:  for (int i = 0; i < 12*27; i++) exp[i] = v27[i];
        LEN_1296: for (int i = 0; i < 12*54; i++) exp[i] = v54[i];
        default:  for (int i = 0; i < 12*81; i++) exp[i] = v81[i];
      endcase
      #1;
      expect_eq(o_c == exp && os_c == in_sel && ov_c == in_valid, "combinational mux");
      @(posedge clk);
      #1;
      expect_eq(ov_r == in_valid, "registered valid");
      if (in_valid) begin
        expect_eq(o_r == exp && os_r == in_sel, "registered vector");
        hold = exp;
      end else begin
        expect_eq(o_r == hold, "registered hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
