// aes_f2_pkg: types, constants and combinational functions shared by the
// AES-128 encryptor datapath.
//
// The encryptor does all round arithmetic in a composite field F2 instead of
// the standard AES field F1 = GF(2)[x]/(x^8+x^4+x^3+x+1). F2 is
// GF(2^4)[x]/(x^2 + x + {8}), where GF(2^4) = GF(2)[y]/(y^4+y+1). A byte of F2
// is b*x + c with b the high and c the low nibble. A linear map PHI takes F1
// bytes to F2 bytes, PHI_INV takes them back; SubBytes, MixColumns and the
// round constants are re-expressed in F2 so that the mapping is done only
// once at the input and once at the output.
//
// Matrices are written row by row, top row first, each row literal reading
// left to right as input bits 0..7, the way the matrices are written on
// paper. Packed as logic [7:0][7:0], the top row lands in element [7] and
// the leftmost digit in bit [7]; mat_vec undoes this, so entry (i, j) of the
// written matrix is m[7-i][7-j]. PHI, the F2 affine
// transform and the F2 multipliers by {02} and {03} are the published
// ones. PHI_INV is the inverse of PHI. The GF(2^4) inverse is a 16-entry
// table.
//
// Block layout (FIPS-197): byte k of a 128-bit block is bits [127-8k -: 8];
// state byte s[r][c] is byte r+4c, so column c is bits [127-32c -: 32] with
// row 0 in its top byte.
//
// Linting a module that needs only part of the package (for example a
// plain register) reports the constants it does not use; that is expected.
package aes_f2_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [7:0][7:0] mat8_t;

  // F1 -> F2. Column j is the F2 image of x^j, i.e. {01,20,46,4c,3c,d5,34,e5}.
  localparam mat8_t PHI = {
    8'b10000101,
    8'b00100000,
    8'b00111111,
    8'b00011000,
    8'b00001110,
    8'b01001011,
    8'b00110101,
    8'b00000101
  };

  // F2 -> F1, the inverse of PHI.
  localparam mat8_t PHI_INV = {
    8'b10000001,
    8'b00001101,
    8'b01000000,
    8'b01000011,
    8'b01010011,
    8'b00101010,
    8'b01110001,
    8'b00101011
  };

  // SubBytes affine transform expressed in F2 (T_phi = PHI*T*PHI^-1) and its
  // constant PHI({63}) = {c0}.
  localparam mat8_t AFF_F2 = {
    8'b10110101,
    8'b10010110,
    8'b11110010,
    8'b01111000,
    8'b10100000,
    8'b01001011,
    8'b00100101,
    8'b00010111
  };
  localparam byte_t AFF_F2_C = 8'hc0;

  // Multiplication by {02} and {03} of F1, expressed in F2.
  localparam mat8_t MUL2_F2 = {
    8'b00001001,
    8'b00001101,
    8'b00000110,
    8'b00000011,
    8'b00010001,
    8'b10011001,
    8'b01000100,
    8'b00100010
  };
  localparam mat8_t MUL3_F2 = {
    8'b10001001,
    8'b01001101,
    8'b00100110,
    8'b00010011,
    8'b00011001,
    8'b10011101,
    8'b01000110,
    8'b00100011
  };

  // Round constants rcon[1..10] in F2 (PHI of 01,02,04,...,80,1b,36).
  localparam byte_t RCON_F2 [1:10] = '{
    8'h01, 8'h20, 8'h46, 8'h4c, 8'h3c, 8'hd5, 8'h34, 8'he5, 8'h51, 8'h8f
  };

  // y = M*v over GF(2): output bit i is the parity of written row i masked
  // by v.
  function automatic byte_t mat_vec(input mat8_t m, input byte_t v);
    byte_t y;
    for (int i = 0; i < 8; i++) begin
      y[i] = 1'b0;
      for (int j = 0; j < 8; j++) y[i] = y[i] ^ (m[7-i][7-j] & v[j]);
    end
    return y;
  endfunction

  function automatic byte_t phi_byte(input byte_t v);
    return mat_vec(PHI, v);
  endfunction

  function automatic byte_t phi_inv_byte(input byte_t v);
    return mat_vec(PHI_INV, v);
  endfunction

  // PHI_INV applied to all 16 bytes of a block.
  function automatic block_t phi_inv_block(input block_t v);
    block_t y;
    for (int k = 0; k < 16; k++) y[8*k +: 8] = phi_inv_byte(v[8*k +: 8]);
    return y;
  endfunction

  // GF(2^4) product modulo y^4 + y + 1.
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p = p ^ (7'(a) << i);
    for (int i = 6; i >= 4; i--) if (p[i]) p = p ^ (7'(5'b10011) << (i - 4));
    return p[3:0];
  endfunction

  // GF(2^4) multiplicative inverse, 16x4 table (0 maps to 0).
  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    case (a)
      4'h0: return 4'h0;  4'h1: return 4'h1;  4'h2: return 4'h9;  4'h3: return 4'he;
      4'h4: return 4'hd;  4'h5: return 4'hb;  4'h6: return 4'h7;  4'h7: return 4'h6;
      4'h8: return 4'hf;  4'h9: return 4'h2;  4'ha: return 4'hc;  4'hb: return 4'h5;
      4'hc: return 4'ha;  4'hd: return 4'h4;  4'he: return 4'h3;  default: return 4'h8;
    endcase
  endfunction

  // MixColumns of one column in F2. Column bits [31:24] hold row 0.
  function automatic word_t mix_column_f2(input word_t col);
    byte_t s [4];
    word_t y;
    for (int r = 0; r < 4; r++) s[r] = col[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      y[31-8*r -: 8] = mat_vec(MUL2_F2, s[r]) ^ mat_vec(MUL3_F2, s[(r+1)%4])
                     ^ s[(r+2)%4] ^ s[(r+3)%4];
    return y;
  endfunction

  // ShiftRows: s'[r][c] = s[r][(c+r) mod 4].
  function automatic block_t shift_rows(input block_t v);
    block_t y;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        y[127-8*(r+4*c) -: 8] = v[127-8*(r+4*((c+r)%4)) -: 8];
    return y;
  endfunction

endpackage
