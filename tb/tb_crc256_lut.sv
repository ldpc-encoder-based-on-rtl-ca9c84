// tb_crc256_lut: checks the 256-bit table-driven CRC engine against a bit-serial LFSR model,
// for the default CRC24A and for a 16-bit instance (polynomial 0x1021). Messages of random
// length are cut into 256-bit words, the first word short when the length is not a multiple of
// 256 bits, and sent back to back. Also checks the known answer for the ASCII string
// "123456789" (0xCDE703 for CRC24A, 0x31C3 for the 16-bit code) and that crc_valid comes exactly
// one cycle after the last word.
module tb_crc256_lut;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;
  int short_first = 0, multi_word = 0, single_word = 0;

  always #5 clk = ~clk;

  logic         in_valid, in_first, in_last;
  logic [5:0]   in_nbytes;
  logic [255:0] in_data;
  logic         v24, v16;
  logic [23:0]  c24;
  logic [15:0]  c16;

  crc256_lut dut24 (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_nbytes, .in_data,
                    .crc_valid(v24), .crc(c24));
  crc256_lut #(.CRC_W(16), .POLY(16'h1021)) dut16 (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .in_nbytes, .in_data,
    .crc_valid(v16), .crc(c16));

  // Bit-serial reference, message bytes msg[0] first, MSB of each byte first.
  function automatic logic [23:0] serial_crc(input byte unsigned msg[$], input int w,
                                             input logic [23:0] poly);
    logic [23:0] r;
    logic fb;
    r = '0;
    foreach (msg[i])
      for (int b = 7; b >= 0; b--) begin
        fb = r[w-1] ^ msg[i][b];
        r = (r << 1) & ((24'd1 << w) - 1);
        if (fb) r ^= poly;
      end
    return r;
  endfunction

  task automatic expect_eq(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Send one message; returns after the cycle in which crc_valid must be high.
  task automatic send(input byte unsigned msg[$]);
    int nb, first_n, pos, nwords;
    logic [23:0] e24, e16;
    nb = msg.size();
    first_n = (nb % 32 == 0) ? 32 : nb % 32;
    nwords = (nb + 31) / 32;
    if (first_n != 32) short_first++;
    if (nwords > 1) multi_word++; else single_word++;
    pos = 0;
    for (int w = 0; w < nwords; w++) begin
      int n;
      n = (w == 0) ? first_n : 32;
      in_data = {256{1'b1}};  // junk above a short word must be ignored
      for (int i = 0; i < n; i++) in_data[8*(n-1-i) +: 8] = msg[pos + i];
      pos += n;
      in_valid = 1'b1;
      in_first = (w == 0);
      in_last  = (w == nwords - 1);
      in_nbytes = 6'(n);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    e24 = serial_crc(msg, 24, 24'h864CFB);
    e16 = serial_crc(msg, 16, 24'h1021);
    expect_eq(v24 && v16, "crc_valid one cycle after the last word");
    expect_eq(c24 == e24, $sformatf("crc24 %h expected %h (%0d bytes)", c24, e24, nb));
    expect_eq(c16 == e16[15:0], $sformatf("crc16 %h expected %h (%0d bytes)", c16, e16[15:0], nb));
  endtask

  initial begin
    byte unsigned msg[$];
    rst_n = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_nbytes = '0; in_data = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    // known answer
    msg = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    send(msg);
    expect_eq(c24 == 24'hCDE703, "CRC24A check value");
    expect_eq(c16 == 16'h31C3, "CRC16 check value");
    // random messages
    for (int m = 0; m < 60; m++) begin
      int len;
      len = (m < 4) ? 32 * (m + 1) : $urandom_range(200, 1);
      msg.delete();
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      send(msg);
    end
    expect_eq(short_first > 0 && multi_word > 0 && single_word > 0, "all message shapes seen");
    $display("short first words %0d, multi-word %0d, single-word %0d", short_first, multi_word, single_word);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
