// ldpc_pkg: shared types, sizes and code tables of the IEEE 802.11n/ac/ax QC-LDPC encoder.
//
// The code family has three codeword lengths (648, 1296, 1944 bits, circulant size Z = 27, 54, 81)
// and four rates (1/2, 2/3, 3/4, 5/6), twelve codes in all. Every parity-check matrix is split as
// H = [H1 | H2]: H1 (mb x kb circulant blocks) acts on the information bits, H2 (mb x mb blocks)
// on the parity bits, with mb + kb = 24. A base-matrix entry sigma >= 0 stands for the Z x Z
// identity cyclically shifted by sigma, -1 for the all-zero block.
//
// H2 is the same stair matrix in all twelve codes: its first block column holds shift 1 in the
// top and bottom rows and shift 0 in row mb/2, and the other columns form a double diagonal of
// identities. It is therefore not stored but built from this rule. The H1 base matrices are the
// ones the IEEE 802.11n standard defines (its Annex R); they are listed below row by row.
//
// Bit conventions used throughout: information bit s[j*Z + t] is bit t of block j, likewise for
// q and p. Multiplying a Z-bit block x by the shifted identity P^sigma gives y[t] = x[(t+sigma) mod Z].
package ldpc_pkg;

  // Register sizes of the encoder: largest information vector (1944 * 5/6) and largest parity
  // vector (1944 / 2).
  localparam int unsigned K_MAX  = 1620;
  localparam int unsigned M_MAX  = 972;
  localparam int unsigned NB     = 24;   // block columns of every base matrix
  localparam int unsigned MB_MAX = 12;   // block rows of the rate-1/2 base matrices

  typedef enum logic [1:0] {LEN_648 = 2'd0, LEN_1296 = 2'd1, LEN_1944 = 2'd2} code_len_e;
  typedef enum logic [1:0] {RATE_1_2 = 2'd0, RATE_2_3 = 2'd1, RATE_3_4 = 2'd2, RATE_5_6 = 2'd3} code_rate_e;

  typedef struct packed {
    code_len_e  len;
    code_rate_e rate;
  } code_sel_t;

  // Circulant size of a code length index (0, 1, 2).
  function automatic int unsigned z_of(input int unsigned len_idx);
    return (len_idx == 0) ? 27 : (len_idx == 1) ? 54 : 81;
  endfunction

  // Block rows (parity blocks) of a rate index (0..3).
  function automatic int unsigned mb_of(input int unsigned rate_idx);
    case (rate_idx)
      0:       return 12;
      1:       return 8;
      2:       return 6;
      default: return 4;
    endcase
  endfunction

  function automatic int unsigned kb_of(input int unsigned rate_idx);
    return NB - mb_of(rate_idx);
  endfunction

  // Shift of block (r, c) of H2 for a code with mb block rows; -1 for a zero block.
  function automatic int h2_shift(input int unsigned mb, input int unsigned r, input int unsigned c);
    if (c == 0) begin
      if (r == 0 || r == mb - 1) return 1;
      if (r == mb / 2)           return 0;
      return -1;
    end
    if (r == c || r + 1 == c) return 0;
    return -1;
  endfunction

  // H1 base matrices, row-major, kb entries per row.
  localparam shortint H1B_648_1_2 [144] = '{0,-1,-1,-1,0,0,-1,-1,0,-1,-1,0,22,0,-1,-1,17,-1,0,0,12,-1,-1,-1,6,-1,0,-1,10,-1,-1,-1,24,-1,0,-1,2,-1,-1,0,20,-1,-1,-1,25,0,-1,-1,23,-1,-1,-1,3,-1,-1,-1,0,-1,9,11,24,-1,23,1,17,-1,3,-1,10,-1,-1,-1,25,-1,-1,-1,8,-1,-1,-1,7,18,-1,-1,13,24,-1,-1,0,-1,8,-1,6,-1,-1,-1,7,20,-1,16,22,10,-1,-1,23,-1,-1,-1,11,-1,-1,-1,19,-1,-1,-1,13,-1,3,17,25,-1,8,-1,23,18,-1,14,9,-1,-1,-1,3,-1,-1,-1,16,-1,-1,2,25,5,-1,-1};
  localparam shortint H1B_648_2_3 [128] = '{25,26,14,-1,20,-1,2,-1,4,-1,-1,8,-1,16,-1,18,10,9,15,11,-1,0,-1,1,-1,-1,18,-1,8,-1,10,-1,16,2,20,26,21,-1,6,-1,1,26,-1,7,-1,-1,-1,-1,10,13,5,0,-1,3,-1,7,-1,-1,26,-1,-1,13,-1,16,23,14,24,-1,12,-1,19,-1,17,-1,-1,-1,20,-1,21,-1,6,22,9,20,-1,25,-1,17,-1,8,-1,14,-1,18,-1,-1,14,23,21,11,20,-1,24,-1,18,-1,19,-1,-1,-1,-1,22,17,11,11,20,-1,21,-1,26,-1,3,-1,-1,18,-1,26,-1};
  localparam shortint H1B_648_3_4 [108] = '{16,17,22,24,9,3,14,-1,4,2,7,-1,26,-1,2,-1,21,-1,25,12,12,3,3,26,6,21,-1,15,22,-1,15,-1,4,-1,-1,16,25,18,26,16,22,23,9,-1,0,-1,4,-1,4,-1,8,23,11,-1,9,7,0,1,17,-1,-1,7,3,-1,3,23,-1,16,-1,-1,21,-1,24,5,26,7,1,-1,-1,15,24,15,-1,8,-1,13,-1,13,-1,11,2,2,19,14,24,1,15,19,-1,21,-1,2,-1,24,-1,3,-1,2};
  localparam shortint H1B_648_5_6 [80] = '{17,13,8,21,9,3,18,12,10,0,4,15,19,2,5,10,26,19,13,13,3,12,11,14,11,25,5,18,0,9,2,26,26,10,24,7,14,20,4,2,22,16,4,3,10,21,12,5,21,14,19,5,-1,8,5,18,11,5,5,15,7,7,14,14,4,16,16,24,24,10,1,7,15,6,10,26,8,18,21,14};
  localparam shortint H1B_1296_1_2 [144] = '{40,-1,-1,-1,22,-1,49,23,43,-1,-1,-1,50,1,-1,-1,48,35,-1,-1,13,-1,30,-1,39,50,-1,-1,4,-1,2,-1,-1,-1,-1,49,33,-1,-1,38,37,-1,-1,4,1,-1,-1,-1,45,-1,-1,-1,0,22,-1,-1,20,42,-1,-1,51,-1,-1,48,35,-1,-1,-1,44,-1,18,-1,47,11,-1,-1,-1,17,-1,-1,51,-1,-1,-1,5,-1,25,-1,6,-1,45,-1,13,40,-1,-1,33,-1,-1,34,24,-1,-1,-1,23,-1,-1,46,1,-1,27,-1,1,-1,-1,-1,38,-1,44,-1,-1,18,-1,-1,23,-1,-1,8,0,35,-1,-1,49,-1,17,-1,30,-1,-1,-1,34,-1,-1,19};
  localparam shortint H1B_1296_2_3 [128] = '{39,31,22,43,-1,40,4,-1,11,-1,-1,50,-1,-1,-1,6,25,52,41,2,6,-1,14,-1,34,-1,-1,-1,24,-1,37,-1,43,31,29,0,21,-1,28,-1,-1,2,-1,-1,7,-1,17,-1,20,33,48,-1,4,13,-1,26,-1,-1,22,-1,-1,46,42,-1,45,7,18,51,12,25,-1,-1,-1,50,-1,-1,5,-1,-1,-1,35,40,32,16,5,-1,-1,18,-1,-1,43,51,-1,32,-1,-1,9,24,13,22,28,-1,-1,37,-1,-1,25,-1,-1,52,-1,13,32,22,4,21,16,-1,-1,-1,27,28,-1,38,-1,-1,-1,8};
  localparam shortint H1B_1296_3_4 [108] = '{39,40,51,41,3,29,8,36,-1,14,-1,6,-1,33,-1,11,-1,4,48,21,47,9,48,35,51,-1,38,-1,28,-1,34,-1,50,-1,50,-1,30,39,28,42,50,39,5,17,-1,6,-1,18,-1,20,-1,15,-1,40,29,0,1,43,36,30,47,-1,49,-1,47,-1,3,-1,35,-1,34,-1,1,32,11,23,10,44,12,7,-1,48,-1,4,-1,9,-1,17,-1,16,13,7,15,47,23,16,47,-1,43,-1,29,-1,52,-1,2,-1,53,-1};
  localparam shortint H1B_1296_5_6 [80] = '{48,29,37,52,2,16,6,14,53,31,34,5,18,42,53,31,45,-1,46,52,17,4,30,7,43,11,24,6,14,21,6,39,17,40,47,7,15,41,19,-1,7,2,51,31,46,23,16,11,53,40,10,7,46,53,33,35,-1,25,35,38,19,48,41,1,10,7,36,47,5,29,52,52,31,10,26,6,3,2,-1,51};
  localparam shortint H1B_1944_1_2 [144] = '{57,-1,-1,-1,50,-1,11,-1,50,-1,79,-1,3,-1,28,-1,0,-1,-1,-1,55,7,-1,-1,30,-1,-1,-1,24,37,-1,-1,56,14,-1,-1,62,53,-1,-1,53,-1,-1,3,35,-1,-1,-1,40,-1,-1,20,66,-1,-1,22,28,-1,-1,-1,0,-1,-1,-1,8,-1,42,-1,50,-1,-1,8,69,79,79,-1,-1,-1,56,-1,52,-1,-1,-1,65,-1,-1,-1,38,57,-1,-1,72,-1,27,-1,64,-1,-1,-1,14,52,-1,-1,30,-1,-1,32,-1,45,-1,70,0,-1,-1,-1,77,9,-1,-1,2,56,-1,57,35,-1,-1,-1,-1,-1,12,-1,24,-1,61,-1,60,-1,-1,27,51,-1,-1,16};
  localparam shortint H1B_1944_2_3 [128] = '{61,75,4,63,56,-1,-1,-1,-1,-1,-1,8,-1,2,17,25,56,74,77,20,-1,-1,-1,64,24,4,67,-1,7,-1,-1,-1,28,21,68,10,7,14,65,-1,-1,-1,23,-1,-1,-1,75,-1,48,38,43,78,76,-1,-1,-1,-1,5,36,-1,15,72,-1,-1,40,2,53,25,-1,52,62,-1,20,-1,-1,44,-1,-1,-1,-1,69,23,64,10,22,-1,21,-1,-1,-1,-1,-1,68,23,29,-1,12,0,68,20,55,61,-1,40,-1,-1,-1,52,-1,-1,-1,44,58,8,34,64,78,-1,-1,11,78,24,-1,-1,-1,-1,-1,58};
  localparam shortint H1B_1944_3_4 [108] = '{48,29,28,39,9,61,-1,-1,-1,63,45,80,-1,-1,-1,37,32,22,4,49,42,48,11,30,-1,-1,-1,49,17,41,37,15,-1,54,-1,-1,35,76,78,51,37,35,21,-1,17,64,-1,-1,-1,59,7,-1,-1,32,9,65,44,9,54,56,73,34,42,-1,-1,-1,35,-1,-1,-1,46,39,3,62,7,80,68,26,-1,80,55,-1,36,-1,26,-1,9,-1,72,-1,26,75,33,21,69,59,3,38,-1,-1,-1,35,-1,62,36,26,-1,-1};
  localparam shortint H1B_1944_5_6 [80] = '{13,48,80,66,4,74,7,30,76,52,37,60,-1,49,73,31,74,73,23,-1,69,63,74,56,64,77,57,65,6,16,51,-1,64,-1,68,9,48,62,54,27,51,15,0,80,24,25,42,54,44,71,71,9,67,35,-1,58,-1,29,-1,53,16,29,36,41,44,56,59,37,50,24,-1,65,4,65,52,-1,4,-1,73,52};

  // Shift of block (r, j) of H1 for code (len_idx, rate_idx); -1 for a zero block.
  function automatic int h1_shift(input int unsigned len_idx, input int unsigned rate_idx,
                                  input int unsigned r, input int unsigned j);
    int unsigned i;
    i = r * kb_of(rate_idx) + j;
    case ({len_idx[1:0], rate_idx[1:0]})
      4'b00_00: return int'(H1B_648_1_2[i]);
      4'b00_01: return int'(H1B_648_2_3[i]);
      4'b00_10: return int'(H1B_648_3_4[i]);
      4'b00_11: return int'(H1B_648_5_6[i]);
      4'b01_00: return int'(H1B_1296_1_2[i]);
      4'b01_01: return int'(H1B_1296_2_3[i]);
      4'b01_10: return int'(H1B_1296_3_4[i]);
      4'b01_11: return int'(H1B_1296_5_6[i]);
      4'b10_00: return int'(H1B_1944_1_2[i]);
      4'b10_01: return int'(H1B_1944_2_3[i]);
      4'b10_10: return int'(H1B_1944_3_4[i]);
      default:  return int'(H1B_1944_5_6[i]);
    endcase
  endfunction

endpackage
