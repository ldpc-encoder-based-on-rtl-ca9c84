// crc256_lut: table-driven CRC engine that absorbs 256 message bits (32 bytes) per clock.
//
// A serial LFSR would need 256 cycles per word; here the CRC of a whole word is the XOR of 32
// table look-ups, one per byte, because the CRC is linear in the message. Byte b of the word
// (b = 0 is the least significant, i.e. last transmitted, byte) indexes its own 256-entry table
// holding (v(x) * x^(8b + W)) mod g(x) for every byte value v, with W the CRC width. The running
// CRC is folded into the most significant bits of the next word before the look-up; a
// multiplexer picks the initial value instead of the running CRC on the first word of a message.
// The 32 tables are grouped in eight lanes of four bytes, as in the architecture drawing; an XOR
// tree adds all 32 outputs. The tables are computed at elaboration time from the polynomial.
//
// The polynomial (default CRC24A of 5G NR, g = 0x864CFB), the MSB-first bit order and the
// handling of short words are this design's choices. A message whose length is not a multiple
// of 256 bits is sent with its first word short: in_nbytes gives the number of valid bytes of
// that word, right-aligned, and the unused high bytes are cleared. Leading zeros leave the CRC
// unchanged when INIT = 0, so no correction is needed; a nonzero INIT is applied at the top of
// the 256-bit word and then assumes the message starts on a word boundary.
//
// Interface: in_valid / in_first / in_last / in_nbytes / in_data are sampled on a rising edge,
// one word per cycle, first word first. crc_valid pulses one cycle after the last word, with the
// CRC of the message on crc. Synchronous active-low reset.
module crc256_lut #(
  parameter int unsigned        CRC_W = 24,
  parameter logic [CRC_W-1:0]   POLY  = 24'h864CFB,  // g(x) without its x^CRC_W term
  parameter logic [CRC_W-1:0]   INIT  = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_last,
  input  logic [5:0]       in_nbytes,   // valid bytes of a first word, 1..32 (32 for a full word)
  input  logic [255:0]     in_data,     // bit 255 is transmitted first
  output logic             crc_valid,
  output logic [CRC_W-1:0] crc
);

  localparam int unsigned NBYTES = 32;

  typedef logic [CRC_W-1:0] crc_t;

  // basis[n] = x^(n + CRC_W) mod g(x), n = 0 .. 255: the contribution of message bit n.
  function automatic crc_t [255:0] make_basis();
    crc_t [255:0] b;
    crc_t         r;
    r = crc_t'(1);
    // r = x^0; multiply by x CRC_W times to reach x^CRC_W mod g.
    for (int unsigned i = 0; i < CRC_W; i++) r = r[CRC_W-1] ? ((r << 1) ^ POLY) : (r << 1);
    for (int unsigned n = 0; n < 256; n++) begin
      b[n] = r;
      r = r[CRC_W-1] ? ((r << 1) ^ POLY) : (r << 1);
    end
    return b;
  endfunction

  localparam crc_t [255:0] BASIS = make_basis();

  // Table of byte position bb, entry v.
  function automatic crc_t lut_entry(input int unsigned bb, input int unsigned v);
    crc_t e;
    e = '0;
    for (int unsigned i = 0; i < 8; i++)
      if (v[i]) e ^= BASIS[8*bb + i];
    return e;
  endfunction

  // Word to be looked up: data with unused high bytes cleared and the running CRC folded in.
  logic [255:0] word_mask;
  logic [255:0] word;
  crc_t         state;
  crc_t         fold;

  always_comb begin
    word_mask = '1;
    if (in_first && in_nbytes < 6'(NBYTES))
      word_mask = ~({256{1'b1}} << (8 * in_nbytes));
    // Multiplexer: initial value on the first word, running CRC otherwise.
    fold = in_first ? INIT : state;
    word = (in_data & word_mask) ^ {fold, {(256-CRC_W){1'b0}}};
  end

  // Eight lanes of four byte tables each, then the XOR tree.
  crc_t lut_out [NBYTES];

  for (genvar bb = 0; bb < NBYTES; bb++) begin : g_lut
    crc_t rom [256];
    for (genvar v = 0; v < 256; v++) begin : g_init
      assign rom[v] = lut_entry(bb, v);
    end
    assign lut_out[bb] = rom[word[8*bb +: 8]];
  end

  crc_t next_crc;

  always_comb begin
    next_crc = '0;
    for (int unsigned bb = 0; bb < NBYTES; bb++) next_crc ^= lut_out[bb];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= INIT;
      crc_valid <= 1'b0;
    end else begin
      crc_valid <= in_valid && in_last;
      if (in_valid) state <= next_crc;
    end
  end

  assign crc = state;

endmodule
