// len_select_reg: code-length multiplexer with an optional register behind it.
//
// The encoder computes every step for the three codeword lengths side by side (circulant size
// Z = 27, 54, 81, up to 12 blocks each); this block passes on the vector of the selected length,
// zero-extended to the 972-bit maximum. With REG = 1 the result, its valid flag and the code
// selection are registered: the encoder uses that as the optional pipeline stage between the two
// XOR-tree steps and as the output register. With REG = 0 the block is combinational.
// The length multiplexers in front of the pipeline stage and the output register follow the
// encoder architecture; sharing one module for both, and the zero extension, are choices of
// this design.
//
// Interface: v27 / v54 / v81 are the candidate vectors, bit 0 first; sel.len picks one.
// Latency: REG clock cycles. Synchronous active-low reset clears the registered outputs.
module len_select_reg
  import ldpc_pkg::*;
#(
  parameter bit REG = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  code_sel_t         in_sel,
  input  logic [12*27-1:0]  v27,
  input  logic [12*54-1:0]  v54,
  input  logic [12*81-1:0]  v81,
  output logic              out_valid,
  output code_sel_t         out_sel,
  output logic [M_MAX-1:0]  out_vec
);

  logic [M_MAX-1:0] muxed;

  always_comb begin
    case (in_sel.len)
      LEN_648:  muxed = M_MAX'(v27);
      LEN_1296: muxed = M_MAX'(v54);
      default:  muxed = v81;
    endcase
  end

  if (REG) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_sel   <= '{len: LEN_648, rate: RATE_1_2};
        out_vec   <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_sel <= in_sel;
          out_vec <= muxed;
        end
      end
    end
  end else begin : g_comb
    assign out_valid = in_valid;
    assign out_sel   = in_sel;
    assign out_vec   = muxed;
  end

endmodule
