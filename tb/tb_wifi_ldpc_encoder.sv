// tb_wifi_ldpc_encoder: end-to-end check of the WiFi QC-LDPC encoder, with and without the
// pipeline stage. Random information words with a random code out of the twelve are offered,
// mostly back to back (one per cycle) with occasional idle cycles. For every output the
// testbench checks the code selection, that every parity-check equation of H holds for [s, p],
// that p equals the forward-substitution reference, and that it arrives exactly LATENCY cycles
// after its input (2 without, 3 with the pipeline stage). Every code must be used.
module tb_wifi_ldpc_encoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int unsigned NWORDS = 300;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic             in_valid;
  logic [K_MAX-1:0] s_in;
  code_sel_t        sel_in;

  logic             ov   [2];
  code_sel_t        osel [2];
  logic [M_MAX-1:0] op   [2];

  wifi_ldpc_encoder #(.PIPELINE(1'b0)) dut0 (
    .clk, .rst_n, .in_valid, .s_in, .sel_in,
    .out_valid(ov[0]), .out_sel(osel[0]), .p_out(op[0]));
  wifi_ldpc_encoder #(.PIPELINE(1'b1)) dut1 (
    .clk, .rst_n, .in_valid, .s_in, .sel_in,
    .out_valid(ov[1]), .out_sel(osel[1]), .p_out(op[1]));

  typedef struct {
    logic [K_MAX-1:0] s;
    code_sel_t        sel;
    int               cycle;
  } job_t;

  job_t jobs [$];
  int   head [2] = '{0, 0};
  int   cycle = 0;
  int   code_used [12];
  int   back_to_back = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker, one per instance.
  for (genvar d = 0; d < 2; d++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && ov[d]) begin
        job_t j;
        logic [M_MAX-1:0] exp;
        if (head[d] >= jobs.size()) begin
          failures++;
          $display("FAIL dut%0d: output without input", d);
        end else begin
          j = jobs[head[d]];
          head[d] = head[d] + 1;
          exp = ref_p(j.sel.len, j.sel.rate, ref_q(j.sel.len, j.sel.rate, j.s));
          checks += 4;
          if (osel[d] != j.sel) begin
            failures++;
            $display("FAIL dut%0d: code selection", d);
          end
          if (!syndrome_ok(j.sel.len, j.sel.rate, j.s, op[d])) begin
            failures++;
            $display("FAIL dut%0d: parity check violated, len %0d rate %0d", d, j.sel.len, j.sel.rate);
          end
          if (op[d] !== exp) begin
            failures++;
            $display("FAIL dut%0d: parity differs from reference", d);
          end
          if (cycle - j.cycle != 2 + d) begin
            failures++;
            $display("FAIL dut%0d: latency %0d", d, cycle - j.cycle);
          end
        end
      end
    end
  end

  initial begin
    bit prev;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    s_in     = '0;
    sel_in   = '{len: LEN_648, rate: RATE_1_2};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    prev = 1'b0;
    for (int n = 0; n < NWORDS; ) begin
      if ($urandom_range(9) == 0) begin
        in_valid <= 1'b0;
        prev = 1'b0;
      end else begin
        job_t j;
        int li, ri;
        li = (n < 12) ? n / 4 : $urandom_range(2);
        ri = (n < 12) ? n % 4 : $urandom_range(3);
        j.sel   = '{len: code_len_e'(li), rate: code_rate_e'(ri)};
        j.s     = rand_info(li, ri);
        j.cycle = cycle + 1;   // sampled on the coming edge
        jobs.push_back(j);
        code_used[li*4 + ri]++;
        if (prev) back_to_back++;
        prev = 1'b1;
        in_valid <= 1'b1;
        s_in     <= j.s;
        sel_in   <= j.sel;
        n++;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (head[d] != NWORDS) begin
        failures++;
        $display("FAIL dut%0d: %0d of %0d words came out", d, head[d], NWORDS);
      end
    end
    for (int c = 0; c < 12; c++) begin
      checks++;
      if (code_used[c] == 0) begin
        failures++;
        $display("FAIL code %0d never used", c);
      end
    end
    checks++;
    if (back_to_back == 0) failures++;
    $display("words %0d, back-to-back words %0d", NWORDS, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
