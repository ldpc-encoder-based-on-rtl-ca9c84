// ldpc_encoder_top: the two encoder-side units of this design, side by side.
//
//  * wifi_ldpc_encoder: full-parallel two-step QC-LDPC encoder for the twelve IEEE 802.11n/ac/ax
//    codes, one codeword per clock, selectable code length and rate per codeword.
//  * crc256_lut: 256-bit-per-clock table-driven CRC engine (CRC24A of 5G NR by default).
//
// The two do not feed each other: the WiFi code family uses no transport-block CRC, and the
// LDPC encoder that would follow the CRC in a 5G chain is not part of this design. Their ports
// are brought out unchanged; see the two modules for interface and timing.
module ldpc_encoder_top
  import ldpc_pkg::*;
#(
  parameter bit PIPELINE = 1'b0   // pipeline register between the two encoder steps
) (
  input  logic             clk,
  input  logic             rst_n,
  // WiFi QC-LDPC encoder
  input  logic             enc_in_valid,
  input  logic [K_MAX-1:0] enc_s,
  input  code_sel_t        enc_sel,
  output logic             enc_out_valid,
  output code_sel_t        enc_out_sel,
  output logic [M_MAX-1:0] enc_p,
  // CRC engine
  input  logic             crc_in_valid,
  input  logic             crc_in_first,
  input  logic             crc_in_last,
  input  logic [5:0]       crc_in_nbytes,
  input  logic [255:0]     crc_in_data,
  output logic             crc_valid,
  output logic [23:0]      crc
);

  wifi_ldpc_encoder #(.PIPELINE(PIPELINE)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .s_in(enc_s), .sel_in(enc_sel),
    .out_valid(enc_out_valid), .out_sel(enc_out_sel), .p_out(enc_p)
  );

  crc256_lut u_crc (
    .clk, .rst_n,
    .in_valid(crc_in_valid), .in_first(crc_in_first), .in_last(crc_in_last),
    .in_nbytes(crc_in_nbytes), .in_data(crc_in_data),
    .crc_valid, .crc
  );

endmodule
