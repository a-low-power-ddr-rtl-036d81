// ecs_pkg: types, constants and GF(2^4) arithmetic shared by the DDR edge-coded
// signaling (DDR-ECS) link with BCH(15,7) protection.
//
// The BCH code is built over GF(2^4) with primitive polynomial p(x) = x^4 + x + 1
// and generator g(x) = x^8 + x^7 + x^6 + x^4 + 1, correcting t = 2 errors in a
// 15-bit codeword. Both polynomials follow the design description. The packet
// and segment-code structs, the field ordering (phase 0 = global flag, 1 = segment
// flags, 2 = numbers of ones, 3 = indices) and the index numbering of nibbles
// holding two ones are this implementation's own choices.
package ecs_pkg;

  localparam int unsigned MSG_W  = 7;   // BCH message bits
  localparam int unsigned CW_W   = 15;  // BCH codeword bits
  localparam int unsigned WORD_W = 16;  // padded word
  localparam int unsigned NSEG   = 4;   // 4-bit segments per word

  localparam logic [8:0] BCH_G   = 9'h1D1;  // x^8+x^7+x^6+x^4+1
  localparam logic [4:0] GF_POLY = 5'h13;   // x^4+x+1

  typedef logic [3:0] gf16_t;

  // One segment after local inversion and index coding.
  typedef struct packed {
    logic [3:0] dout;        // nibble after local inversion (weight <= 2)
    logic       flag;        // segment flag: nibble was inverted
    logic [1:0] noi;         // number of ones in dout
    logic [2:0] index_ones;  // position of the single one (noi == 1)
    logic [2:0] index_twos;  // pair code of the two ones (noi == 2)
  } seg_code_t;

  // The fields of one frame, in transmission order GF, SF, NOI, Index.
  typedef struct packed {
    logic                  gflag;
    logic [NSEG-1:0]       sf;
    logic [NSEG-1:0][1:0]  noi;
    logic [NSEG-1:0][2:0]  idx;
  } ecs_packet_t;

  typedef enum logic [1:0] {PH_GF = 2'd0, PH_SF = 2'd1, PH_NOI = 2'd2, PH_IDX = 2'd3} phase_t;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_TRANSMIT, S_WAIT_ALPHA} tx_state_t;

  // ---------------- GF(2^4) arithmetic ----------------
  function automatic gf16_t gf_mul(gf16_t a, gf16_t b);
    logic [3:0] acc, x;
    acc = '0;
    x   = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) acc = acc ^ x;
      x = x[3] ? ((x << 1) ^ GF_POLY[3:0]) : (x << 1);
    end
    return acc;
  endfunction

  // alpha^e, e taken modulo 15
  function automatic gf16_t gf_alpha_pow(int unsigned e);
    gf16_t r;
    r = 4'h1;
    for (int i = 0; i < 14; i++) if (i < int'(e % 15)) r = gf_mul(r, 4'h2);
    return r;
  endfunction

  // discrete logarithm: a = alpha^gf_log(a); gf_log(0) returns 15 (undefined)
  function automatic logic [3:0] gf_log(gf16_t a);
    logic [3:0] l;
    l = 4'hF;
    for (int e = 0; e < 15; e++) if (gf_alpha_pow(e) == a) l = 4'(e);
    return l;
  endfunction

  // a^-1 = alpha^(15 - log a) (a != 0); returns 0 for a == 0
  function automatic gf16_t gf_inv(gf16_t a);
    return (a == 4'h0) ? 4'h0 : gf_alpha_pow(15 - int'(gf_log(a)));
  endfunction

  // ---------------- nibble helpers ----------------
  function automatic logic [2:0] popcount4(logic [3:0] v);
    return 3'(v[0]) + 3'(v[1]) + 3'(v[2]) + 3'(v[3]);
  endfunction

  // Pair code of a nibble with exactly two ones:
  // {0,1}=0 {0,2}=1 {0,3}=2 {1,2}=3 {1,3}=4 {2,3}=5
  function automatic logic [2:0] pair_code(logic [3:0] v);
    case (v)
      4'b0011: return 3'd0;
      4'b0101: return 3'd1;
      4'b1001: return 3'd2;
      4'b0110: return 3'd3;
      4'b1010: return 3'd4;
      4'b1100: return 3'd5;
      default: return 3'd0;
    endcase
  endfunction

  function automatic logic [3:0] pair_nibble(logic [2:0] c);
    case (c)
      3'd0: return 4'b0011;
      3'd1: return 4'b0101;
      3'd2: return 4'b1001;
      3'd3: return 4'b0110;
      3'd4: return 4'b1010;
      3'd5: return 4'b1100;
      default: return 4'b0000;
    endcase
  endfunction

endpackage
