// tb_ldpc_encoder_top: end-to-end test of the top level at its default parameters.
//
// The WiFi encoder receives a stream of random information words, one per cycle with occasional
// idle cycles, the code changing freely between words; every parity vector is checked against
// the parity-check matrix and the reference, with its latency of 2 cycles. At the same time the
// CRC engine receives random messages of random length, checked against a bit-serial model.
// Counted mechanisms, each of which must occur: all twelve codes, back-to-back words, a change
// of codeword length and of rate between consecutive words, idle cycles, a short first CRC word,
// multi-word and single-word CRC messages.
module tb_ldpc_encoder_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int unsigned NWORDS = 240;
  localparam int unsigned NMSG   = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic             enc_in_valid;
  logic [K_MAX-1:0] enc_s;
  code_sel_t        enc_sel;
  logic             enc_out_valid;
  code_sel_t        enc_out_sel;
  logic [M_MAX-1:0] enc_p;
  logic             crc_in_valid, crc_in_first, crc_in_last;
  logic [5:0]       crc_in_nbytes;
  logic [255:0]     crc_in_data;
  logic             crc_valid;
  logic [23:0]      crc;

  ldpc_encoder_top dut (.*);

  task automatic expect_eq(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- encoder stream
  typedef struct {
    logic [K_MAX-1:0] s;
    code_sel_t        sel;
    int               cycle;
  } job_t;

  job_t jobs [$];
  int   head = 0;
  int   cycle = 0;
  int   code_used [12];
  int   n_back_to_back = 0, n_len_change = 0, n_rate_change = 0, n_idle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && enc_out_valid) begin
      job_t j;
      if (head >= jobs.size()) begin
        expect_eq(1'b0, "encoder output without input");
      end else begin
        j = jobs[head];
        head++;
        expect_eq(enc_out_sel == j.sel, "code selection");
        expect_eq(syndrome_ok(int'(j.sel.len), int'(j.sel.rate), j.s, enc_p), "parity checks of H");
        expect_eq(enc_p == ref_p(int'(j.sel.len), int'(j.sel.rate),
                                 ref_q(int'(j.sel.len), int'(j.sel.rate), j.s)), "parity reference");
        expect_eq(cycle - j.cycle == 2, "encoder latency of 2 cycles");
      end
    end
  end

  initial begin : enc_drive
    bit prev;
    code_sel_t last;
    wait (rst_n);
    @(posedge clk);
    prev = 1'b0;
    last = '{len: LEN_648, rate: RATE_1_2};
    for (int n = 0; n < NWORDS; ) begin
      if ($urandom_range(7) == 0) begin
        enc_in_valid <= 1'b0;
        n_idle++;
        prev = 1'b0;
      end else begin
        job_t j;
        int li, ri;
        li = (n < 12) ? n / 4 : $urandom_range(2);
        ri = (n < 12) ? n % 4 : $urandom_range(3);
        j.sel   = '{len: code_len_e'(li), rate: code_rate_e'(ri)};
        j.s     = rand_info(li, ri);
        j.cycle = cycle + 1;
        jobs.push_back(j);
        code_used[li*4 + ri]++;
        if (prev) begin
          n_back_to_back++;
          if (j.sel.len != last.len) n_len_change++;
          if (j.sel.rate != last.rate) n_rate_change++;
        end
        prev = 1'b1;
        last = j.sel;
        enc_in_valid <= 1'b1;
        enc_s        <= j.s;
        enc_sel      <= j.sel;
        n++;
      end
      @(posedge clk);
    end
    enc_in_valid <= 1'b0;
  end

  // ---------------------------------------------------------------- CRC messages
  int n_short_first = 0, n_multi = 0, n_single = 0, n_crc_done = 0;

  function automatic logic [23:0] serial_crc24(input byte unsigned msg[$]);
    logic [23:0] r;
    logic fb;
    r = '0;
    foreach (msg[i])
      for (int b = 7; b >= 0; b--) begin
        fb = r[23] ^ msg[i][b];
        r = r << 1;
        if (fb) r ^= 24'h864CFB;
      end
    return r;
  endfunction

  initial begin : crc_drive
    byte unsigned msg[$];
    wait (rst_n);
    @(posedge clk);
    #1;
    for (int m = 0; m < NMSG; m++) begin
      int len, first_n, nwords, pos;
      len = (m == 0) ? 64 : (m == 1) ? 5 : $urandom_range(160, 1);
      msg.delete();
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      first_n = (len % 32 == 0) ? 32 : len % 32;
      nwords  = (len + 31) / 32;
      if (first_n != 32) n_short_first++;
      if (nwords > 1) n_multi++; else n_single++;
      pos = 0;
      for (int w = 0; w < nwords; w++) begin
        int n;
        logic [255:0] d;
        n = (w == 0) ? first_n : 32;
        d = {256{1'b1}};
        for (int i = 0; i < n; i++) d[8*(n-1-i) +: 8] = msg[pos + i];
        pos += n;
        crc_in_valid  = 1'b1;
        crc_in_first  = (w == 0);
        crc_in_last   = (w == nwords - 1);
        crc_in_nbytes = 6'(n);
        crc_in_data   = d;
        @(posedge clk);
        #1;
      end
      crc_in_valid = 1'b0;
      expect_eq(crc_valid, "crc_valid one cycle after the last word");
      expect_eq(crc == serial_crc24(msg), "CRC value");
      n_crc_done++;
    end
  end

  // ---------------------------------------------------------------- sequence and summary
  initial begin
    rst_n = 1'b0;
    enc_in_valid = 1'b0; enc_s = '0; enc_sel = '{len: LEN_648, rate: RATE_1_2};
    crc_in_valid = 1'b0; crc_in_first = 1'b0; crc_in_last = 1'b0; crc_in_nbytes = '0; crc_in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (head == NWORDS && n_crc_done == NMSG);
    repeat (3) @(posedge clk);
    for (int c = 0; c < 12; c++) expect_eq(code_used[c] > 0, $sformatf("code %0d used", c));
    expect_eq(n_back_to_back > 0, "back-to-back words");
    expect_eq(n_len_change > 0, "length change between consecutive words");
    expect_eq(n_rate_change > 0, "rate change between consecutive words");
    expect_eq(n_idle > 0, "idle cycles");
    expect_eq(n_short_first > 0, "short first CRC word");
    expect_eq(n_multi > 0, "multi-word CRC message");
    expect_eq(n_single > 0, "single-word CRC message");
    $display("encoder: %0d words, %0d back to back, %0d length changes, %0d rate changes, %0d idle",
             NWORDS, n_back_to_back, n_len_change, n_rate_change, n_idle);
    $display("crc: %0d messages, %0d short first words, %0d multi-word, %0d single-word",
             NMSG, n_short_first, n_multi, n_single);
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
