// Pipelined FP unit of the Simple Tomasulo core: 3-cycle single-precision
// multiply (mulf).
//
// The lecture's example machine has one 3-cycle pipelined FP unit shared by
// two reservation stations; an op issued in S spends X1..X3 here and
// broadcasts in W on the fourth cycle. That timing is the lecture's. The
// arithmetic is this design's choice: IEEE-754 binary32 multiplication with
// round-to-nearest-even, where
//   - subnormal inputs count as zero, and results below the smallest normal
//     number flush to a signed zero (no subnormals);
//   - a NaN input, or infinity times zero, gives the quiet NaN 0x7FC00000;
//   - infinity times a non-zero number, or an overflow, gives a signed
//     infinity.
// X1 unpacks the operands and forms the 48-bit significand product, X2
// normalises it and rounds, X3 packs the result and handles the special
// cases; the packed result is the register read in W.
//
// Handshake: req.valid with in_ready enters X1. The whole pipe advances when
// the result register is empty or its result is granted the CDB (out_ack);
// otherwise every stage holds, so results leave in order.
module fp_unit
  import tomasulo_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  fu_req_t req,
  output logic    in_ready,
  output cdb_t    out,
  input  logic    out_ack
);

  typedef enum logic [1:0] {K_NUM, K_ZERO, K_INF, K_NAN} kind_e;

  // ---------------------------------------------------------- X1: unpack
  logic       a_s, b_s;
  logic [7:0] a_e, b_e;
  kind_e      a_k, b_k, k1;

  function automatic kind_e classify(input logic [7:0] e, input logic [22:0] m);
    if (e == 8'hFF) return (m != '0) ? K_NAN : K_INF;
    if (e == 8'h00) return K_ZERO;              // zero or subnormal
    return K_NUM;
  endfunction

  always_comb begin
    a_s = req.a[31];  a_e = req.a[30:23];  a_k = classify(a_e, req.a[22:0]);
    b_s = req.b[31];  b_e = req.b[30:23];  b_k = classify(b_e, req.b[22:0]);
    if (a_k == K_NAN || b_k == K_NAN)                          k1 = K_NAN;
    else if ((a_k == K_INF && b_k == K_ZERO) ||
             (a_k == K_ZERO && b_k == K_INF))                  k1 = K_NAN;
    else if (a_k == K_INF || b_k == K_INF)                     k1 = K_INF;
    else if (a_k == K_ZERO || b_k == K_ZERO)                   k1 = K_ZERO;
    else                                                       k1 = K_NUM;
  end

  logic        s1_valid, s1_sign;
  tag_t        s1_tag;
  kind_e       s1_kind;
  logic [9:0]  s1_exp;    // biased exponent sum minus bias, signed 10 bits
  logic [47:0] s1_prod;

  // ------------------------------------------- X2: normalise and round
  logic [47:0] n_prod;
  logic [9:0]  n_exp;
  logic [23:0] n_mant;
  logic        guard, sticky, round_up;
  logic [24:0] r_mant;
  logic [9:0]  r_exp;

  always_comb begin
    // the product of two 1.x significands is in [1, 4)
    if (s1_prod[47]) begin
      n_prod = s1_prod;
      n_exp  = s1_exp + 10'd1;
    end else begin
      n_prod = s1_prod << 1;
      n_exp  = s1_exp;
    end
    n_mant   = n_prod[47:24];
    guard    = n_prod[23];
    sticky   = |n_prod[22:0];
    round_up = guard && (sticky || n_mant[0]);
    r_mant   = {1'b0, n_mant} + 25'(round_up);
    r_exp    = n_exp;
    if (r_mant[24]) begin               // rounding carried out: 10.000...
      r_mant = r_mant >> 1;
      r_exp  = n_exp + 10'd1;
    end
  end

  logic        s2_valid, s2_sign;
  tag_t        s2_tag;
  kind_e       s2_kind;
  logic [9:0]  s2_exp;
  logic [22:0] s2_frac;

  // ------------------------------------------------------- X3: pack
  word_t packed_res;

  always_comb begin
    unique case (s2_kind)
      K_NAN:  packed_res = 32'h7FC0_0000;
      K_INF:  packed_res = {s2_sign, 8'hFF, 23'd0};
      K_ZERO: packed_res = {s2_sign, 31'd0};
      default: begin
        if ($signed(s2_exp) >= 10'sd255)    packed_res = {s2_sign, 8'hFF, 23'd0};
        else if ($signed(s2_exp) <= 10'sd0) packed_res = {s2_sign, 31'd0};
        else                                packed_res = {s2_sign, s2_exp[7:0], s2_frac};
      end
    endcase
  end

  // ------------------------------------------------------- pipeline
  logic advance;
  assign advance  = !out.valid || out_ack;
  assign in_ready = advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;  s1_sign <= 1'b0;  s1_tag <= '0;  s1_kind <= K_ZERO;
      s1_exp   <= '0;    s1_prod <= '0;
      s2_valid <= 1'b0;  s2_sign <= 1'b0;  s2_tag <= '0;  s2_kind <= K_ZERO;
      s2_exp   <= '0;    s2_frac <= '0;
      out      <= '0;
    end else if (advance) begin
      s1_valid  <= req.valid;
      s1_tag    <= req.tag;
      s1_sign   <= a_s ^ b_s;
      s1_kind   <= k1;
      s1_exp    <= 10'(a_e) + 10'(b_e) - 10'd127;
      s1_prod   <= {1'b1, req.a[22:0]} * {1'b1, req.b[22:0]};
      s2_valid  <= s1_valid;
      s2_tag    <= s1_tag;
      s2_sign   <= s1_sign;
      s2_kind   <= s1_kind;
      s2_exp    <= r_exp;
      s2_frac   <= r_mant[22:0];
      out.valid <= s2_valid;
      out.tag   <= s2_tag;
      out.value <= packed_res;
    end
  end

endmodule
