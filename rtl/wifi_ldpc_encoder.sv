// wifi_ldpc_encoder: full-parallel two-step encoder for the twelve IEEE 802.11n/ac/ax QC-LDPC
// codes (lengths 648, 1296, 1944; rates 1/2, 2/3, 3/4, 5/6).
//
// With H = [H1 | H2] the parity vector p of an information vector s satisfies H1 s + H2 p = 0,
// so it is computed in two constant matrix-vector products over GF(2):
//   q = H1 s          (h1_xor_tree, one per codeword length, rate multiplexer inside)
//   p = H2^-1 q       (h2inv_xor_tree, one per codeword length, rate multiplexer inside)
// Between and after the two steps a code-length multiplexer picks the vector of the selected
// length. All twelve codes are present as fixed XOR trees at once; the multiplexers alone decide
// which one is used, so a different code can be chosen for every codeword.
//
// Dataflow: input register (1620 bits) -> H1 trees -> length mux [-> pipeline register if
// PIPELINE] -> H2^-1 trees -> length mux -> output register (972 bits).
//
// Interface: in_valid, s_in (bit 0 is the first information bit; the first k bits of the code are
// used) and sel_in are taken on a rising edge. out_valid marks p_out (bit 0 is the first parity
// bit, m valid bits, the rest zero) and out_sel the code it was encoded with. A new codeword can
// be taken every cycle. Latency from in_valid to out_valid: 2 cycles, 3 with PIPELINE = 1.
// The codeword is c = [s, p] in the bit order of the code's parity-check matrix.
//
// The two-step method, the register sizes, the optional pipeline stage and the rate and length
// multiplexers follow the published architecture. Parallel (not shifted) loading of the input
// and output registers, the valid/selection sideband, the reset and PIPELINE = 0 as default are
// choices of this design.
module wifi_ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter bit PIPELINE = 1'b0   // register between the two XOR-tree steps
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [K_MAX-1:0] s_in,
  input  code_sel_t        sel_in,
  output logic             out_valid,
  output code_sel_t        out_sel,
  output logic [M_MAX-1:0] p_out
);

  // Input register.
  logic             s_valid;
  logic [K_MAX-1:0] s;
  code_sel_t        s_sel;

  enc_input_reg u_in (
    .clk, .rst_n, .in_valid, .s_in, .sel_in,
    .valid(s_valid), .s, .sel(s_sel)
  );

  // Step 1: q = H1 s for each codeword length.
  logic [12*27-1:0] q27_full;
  logic [12*54-1:0] q54_full;
  logic [12*81-1:0] q81_full;

  h1_xor_tree #(.LEN_IDX(0)) u_h1_648  (.s(s[0 +: 20*27]), .rate(s_sel.rate), .q(q27_full));
  h1_xor_tree #(.LEN_IDX(1)) u_h1_1296 (.s(s[0 +: 20*54]), .rate(s_sel.rate), .q(q54_full));
  h1_xor_tree #(.LEN_IDX(2)) u_h1_1944 (.s(s[0 +: 20*81]), .rate(s_sel.rate), .q(q81_full));

  // Code-length multiplexer and optional pipeline stage.
  logic             q_valid;
  code_sel_t        q_sel;
  logic [M_MAX-1:0] q;

  len_select_reg #(.REG(PIPELINE)) u_qstage (
    .clk, .rst_n, .in_valid(s_valid), .in_sel(s_sel),
    .v27(q27_full), .v54(q54_full), .v81(q81_full),
    .out_valid(q_valid), .out_sel(q_sel), .out_vec(q)
  );

  // Step 2: p = H2^-1 q for each codeword length.
  logic [12*27-1:0] p27;
  logic [12*54-1:0] p54;
  logic [12*81-1:0] p81;

  h2inv_xor_tree #(.LEN_IDX(0)) u_h2_648  (.q(q[0 +: 12*27]), .rate(q_sel.rate), .p(p27));
  h2inv_xor_tree #(.LEN_IDX(1)) u_h2_1296 (.q(q[0 +: 12*54]), .rate(q_sel.rate), .p(p54));
  h2inv_xor_tree #(.LEN_IDX(2)) u_h2_1944 (.q(q[0 +: 12*81]), .rate(q_sel.rate), .p(p81));

  // Code-length multiplexer and output register.
  len_select_reg #(.REG(1'b1)) u_out (
    .clk, .rst_n, .in_valid(q_valid), .in_sel(q_sel),
    .v27(p27), .v54(p54), .v81(p81),
    .out_valid, .out_sel, .out_vec(p_out)
  );

endmodule
