// enc_input_reg: input register of the WiFi LDPC encoder.
//
// Holds the information vector s (up to 1620 bits, the largest information word of the code
// family, 1944 * 5/6) together with the code it is to be encoded with. A whole vector is loaded
// in one clock when in_valid is high, so the encoder can take a new codeword every cycle; the
// register is loaded in parallel rather than shifted bit by bit, which is this design's choice.
//
// Interface: in_valid / s_in / sel_in are sampled on the rising clock edge; valid, s and sel are
// the registered copies, available one cycle later. s_in bit 0 is the first information bit.
// An active-low synchronous reset clears the register and its valid flag.
module enc_input_reg
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [K_MAX-1:0] s_in,
  input  code_sel_t        sel_in,
  output logic             valid,
  output logic [K_MAX-1:0] s,
  output code_sel_t        sel
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      s     <= '0;
      sel   <= '{len: LEN_648, rate: RATE_1_2};
    end else begin
      valid <= in_valid;
      if (in_valid) begin
        s   <= s_in;
        sel <= sel_in;
      end
    end
  end

endmodule
