// bch15_7_decoder: BCH(15,7) decoder correcting up to two bit errors.
//
// Three pipeline stages, so the latency is the same for every error pattern:
//   1. Syndromes S1 = r(alpha) and S3 = r(alpha^3) of the received word
//      (bit i is the coefficient of x^i), over GF(2^4), p(x) = x^4 + x + 1.
//   2. Error-locator polynomial Lambda(x) = 1 + L1 x + L2 x^2 from the closed
//      form of the key equation for t = 2: L1 = S1, L2 = (S3 + S1^3) / S1.
//      S1 = S3 = 0 means no error; S1 = 0 with S3 != 0 cannot be corrected.
//   3. Chien search: bit i is in error when Lambda(alpha^-i) = 0, evaluated for
//      all 15 positions in parallel; those bits are flipped (c_i = r_i ^ 1).
//      If the number of roots does not equal the degree of Lambda, the word
//      has more than two errors: it is passed on unchanged and uncorrectable
//      is set.
// For an error-free word (both syndromes zero) the locator registers are not
// loaded, so the key-equation result and the Chien search do not switch: the
// correction logic is inactive by default, as the description asks, and only
// the syndrome stage works on clean traffic.
// The syndrome, key-equation and Chien-search steps follow the design
// description; the split into exactly three registered stages and the
// handling of uncorrectable words are this implementation's choices.
//
// Timing: out_valid and all results appear 3 cycles after in_valid; a new
// word can be accepted every cycle.
module bch15_7_decoder
  import ecs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [CW_W-1:0]  rx_cw,
  output logic             out_valid,
  output logic [CW_W-1:0]  corrected_cw,
  output logic [MSG_W-1:0] msg,
  output logic [CW_W-1:0]  error_vector,
  output logic             err_detected,
  output logic             uncorrectable
);

  // ---------------- stage 1: syndromes ----------------
  gf16_t           s1_c, s3_c;
  logic            v1;
  logic [CW_W-1:0] cw1;
  gf16_t           s1, s3;

  always_comb begin
    s1_c = '0;
    s3_c = '0;
    for (int i = 0; i < CW_W; i++) begin
      if (rx_cw[i]) begin
        s1_c = s1_c ^ gf_alpha_pow(i);
        s3_c = s3_c ^ gf_alpha_pow(3 * i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; cw1 <= '0; s1 <= '0; s3 <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        cw1 <= rx_cw; s1 <= s1_c; s3 <= s3_c;
      end
    end
  end

  // ---------------- stage 2: key equation ----------------
  gf16_t           l1_c, l2_c;
  logic            v2;
  logic [CW_W-1:0] cw2;
  gf16_t           l1, l2;
  logic            det2, fail2;

  always_comb begin
    gf16_t s1_cubed;
    s1_cubed = gf_mul(gf_mul(s1, s1), s1);
    l1_c     = s1;
    l2_c     = gf_mul(s3 ^ s1_cubed, gf_inv(s1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; cw2 <= '0; l1 <= '0; l2 <= '0; det2 <= 1'b0; fail2 <= 1'b0;
    end else begin
      v2 <= v1;
      if (v1) begin
        cw2   <= cw1;
        det2  <= (s1 != 4'h0) || (s3 != 4'h0);
        // correction logic stays inactive (its inputs frozen) for clean words
        if ((s1 != 4'h0) || (s3 != 4'h0)) begin
          l1 <= l1_c;
          l2 <= l2_c;
        end
        fail2 <= (s1 == 4'h0) && (s3 != 4'h0);
      end
    end
  end

  // ---------------- stage 3: Chien search and correction ----------------
  logic [CW_W-1:0] roots;
  logic [2:0]      nroots;
  logic            fail3, fix3;
  logic [CW_W-1:0] fixed3;

  always_comb begin
    gf16_t xinv;
    roots  = '0;
    nroots = '0;
    for (int i = 0; i < CW_W; i++) begin
      xinv = gf_alpha_pow(15 - i);
      if ((4'h1 ^ gf_mul(l1, xinv) ^ gf_mul(l2, gf_mul(xinv, xinv))) == 4'h0) begin
        roots[i] = 1'b1;
        nroots   = nroots + 3'd1;
      end
    end
    fail3  = fail2 || (det2 && (nroots != ((l2 != 4'h0) ? 3'd2 : 3'd1)));
    fix3   = det2 && !fail3;
    fixed3 = fix3 ? (cw2 ^ roots) : cw2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      corrected_cw  <= '0;
      msg           <= '0;
      error_vector  <= '0;
      err_detected  <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        error_vector  <= fix3 ? roots : '0;
        corrected_cw  <= fixed3;
        msg           <= fixed3[CW_W-1:8];
        err_detected  <= det2;
        uncorrectable <= det2 && fail3;
      end
    end
  end

endmodule
