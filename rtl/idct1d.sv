// idct1d: shared, four-stage pipelined 1-D inverse transform for the
// 2x2, 4x4 and 8x8 modes of H.264/AVC, VC-1, AVS and JPEG/MPEG-1/2/4.
//
// It implements T8^T = E8^T*D8^T*C8^T*B8^T*A8^T, the mirror image of the
// forward unit dct1d: the input permutation E8^T is wiring, then
//   stage 1  input mux for 4x4 data, 'a' scaling of the even pair,
//            pre-sums z2+z3 of B42^T and I0+I3, I1+I2 of the odd part
//   stage 2  input mux for 2x2 data, 2-point butterfly; products of B42^T
//            (f+g, f, f-g) and of the odd part B84^T (b+e, b-e, b, e,
//            c+d, c, c-d)
//   stage 3  final additions of B42^T and B84^T, 4-point butterfly
//   stage 4  A8^T butterfly
// For H.264/AVC 4x4 the coefficient g is 1/2; the products by 3/2 and 1/2
// are formed by arithmetic right shifts, so the second odd output is
// w1 + w3 - (w3 >>> 1), which differs by one from the H.264 reference
// w1 + (w3 >>> 1) when w3 is odd. This follows the B42^T factorisation of
// the design; it is not bit-exact with the H.264 decoder.
//
// Interface: w[0..7] with in_valid (4x4 data in w[0..3], 2x2 in w[0..1]),
// x[0..7] with out_valid in the same packing; results x_n = sum_k
// C[k][n] w_k, exact, DATA_W+GUARD_W bits.
// Timing: one vector per clock in every mode; latency 4 cycles for 8x8,
// 3 for 4x4 (output after stage 3) and 1 for 2x2 (data enters at stage 2
// and leaves from its register). Sel must be held while vectors are in
// flight. The stage split follows the design's flow graph; the valid
// pipeline and port packing are this implementation's choices.
module idct1d
  import mdct_pkg::*;
#(
  parameter int unsigned IN_W = DATA_W,
  parameter int unsigned W    = IN_W + GUARD_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sel_e                   sel,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] w [8],
  output logic                   out_valid,
  output logic signed [W-1:0]    x [8],
  output logic                   busy
);

  typedef logic signed [W-1:0] word_t;

  logic v1, v2, v3, v4;
  word_t wi [8];

  always_comb
    for (int i = 0; i < 8; i++) wi[i] = word_t'(w[i]);

  // ---------------- stage 1 ----------------
  // E8^T order: (w0, w4, w2, w6 | w7, w3, w5, w1); 4x4 order (w0, w2, w1, w3)
  word_t z0, z1, z2, z3;
  always_comb begin
    if (is_8x8(sel)) begin
      z0 = wi[0]; z1 = wi[4]; z2 = wi[2]; z3 = wi[6];
    end else begin
      z0 = wi[0]; z1 = wi[2]; z2 = wi[1]; z3 = wi[3];
    end
  end

  word_t pa0, pa1;
  coef_mul #(.W(W), .COEF(C_A), .INVERSE(1'b1)) u_a0 (.sel, .x(z0), .y(pa0));
  coef_mul #(.W(W), .COEF(C_A), .INVERSE(1'b1)) u_a1 (.sel, .x(z1), .y(pa1));

  word_t r_a0, r_a1, r_z2, r_z3, r_z23;
  word_t o0, o1, o2, o3, o03, o12;   // odd part inputs I0..I3 = w7, w3, w5, w1
  always_ff @(posedge clk) begin
    r_a0  <= pa0;
    r_a1  <= pa1;
    r_z2  <= z2;
    r_z3  <= z3;
    r_z23 <= z2 + z3;
    o0    <= wi[7];
    o1    <= wi[3];
    o2    <= wi[5];
    o3    <= wi[1];
    o03   <= wi[7] + wi[1];
    o12   <= wi[3] + wi[5];
  end

  // ---------------- stage 2 ----------------
  word_t m0, m1;
  always_comb begin
    m0 = is_2x2(sel) ? wi[0] : r_a0;
    m1 = is_2x2(sel) ? wi[1] : r_a1;
  end

  // B42^T products: q2 = (f+g)z2 - f(z2+z3), q3 = f(z2+z3) - (f-g)z3
  word_t p_fpg, p_f, p_fmg;
  coef_mul #(.W(W), .COEF(C_FPG), .INVERSE(1'b1)) u_fpg (.sel, .x(r_z2),  .y(p_fpg));
  coef_mul #(.W(W), .COEF(C_F),   .INVERSE(1'b1)) u_f   (.sel, .x(r_z23), .y(p_f));
  coef_mul #(.W(W), .COEF(C_FMG), .INVERSE(1'b1)) u_fmg (.sel, .x(r_z3),  .y(p_fmg));

  // B84^T products (transposed S1..S4 pieces)
  word_t p1_bpe, p1_e, p1_bme;   // (b+e)I0, e(I0+I3), (b-e)I3
  word_t p2_bpe, p2_b, p2_bme;   // (b+e)I2, b(I1+I2), (b-e)I1
  word_t p3_cpd, p3_c, p3_cmd;   // (c+d)I1, c(I1+I2), (c-d)I2
  word_t p4_cpd, p4_c, p4_cmd;   // (c+d)I0, c(I0+I3), (c-d)I3
  coef_mul #(.W(W), .COEF(C_BPE)) u1_bpe (.sel, .x(o0),  .y(p1_bpe));
  coef_mul #(.W(W), .COEF(C_E))   u1_e   (.sel, .x(o03), .y(p1_e));
  coef_mul #(.W(W), .COEF(C_BME)) u1_bme (.sel, .x(o3),  .y(p1_bme));
  coef_mul #(.W(W), .COEF(C_BPE)) u2_bpe (.sel, .x(o2),  .y(p2_bpe));
  coef_mul #(.W(W), .COEF(C_B))   u2_b   (.sel, .x(o12), .y(p2_b));
  coef_mul #(.W(W), .COEF(C_BME)) u2_bme (.sel, .x(o1),  .y(p2_bme));
  coef_mul #(.W(W), .COEF(C_CPD)) u3_cpd (.sel, .x(o1),  .y(p3_cpd));
  coef_mul #(.W(W), .COEF(C_C))   u3_c   (.sel, .x(o12), .y(p3_c));
  coef_mul #(.W(W), .COEF(C_CMD)) u3_cmd (.sel, .x(o2),  .y(p3_cmd));
  coef_mul #(.W(W), .COEF(C_CPD)) u4_cpd (.sel, .x(o0),  .y(p4_cpd));
  coef_mul #(.W(W), .COEF(C_C))   u4_c   (.sel, .x(o03), .y(p4_c));
  coef_mul #(.W(W), .COEF(C_CMD)) u4_cmd (.sel, .x(o3),  .y(p4_cmd));

  word_t r20, r21;
  word_t q_fpg, q_f, q_fmg;
  word_t q1_bpe, q1_e, q1_bme, q2_bpe, q2_b, q2_bme;
  word_t q3_cpd, q3_c, q3_cmd, q4_cpd, q4_c, q4_cmd;
  always_ff @(posedge clk) begin
    r20    <= m0 + m1;          // O20
    r21    <= m0 - m1;          // O21
    q_fpg  <= p_fpg;  q_f  <= p_f;  q_fmg  <= p_fmg;
    q1_bpe <= p1_bpe; q1_e <= p1_e; q1_bme <= p1_bme;
    q2_bpe <= p2_bpe; q2_b <= p2_b; q2_bme <= p2_bme;
    q3_cpd <= p3_cpd; q3_c <= p3_c; q3_cmd <= p3_cmd;
    q4_cpd <= p4_cpd; q4_c <= p4_c; q4_cmd <= p4_cmd;
  end

  // ---------------- stage 3 ----------------
  word_t q2, q3;
  always_comb begin
    q2 = q_fpg - q_f;
    q3 = q_f - q_fmg;
  end

  word_t t [8];
  always_ff @(posedge clk) begin
    t[0] <= r20 + q3;                             // O40
    t[1] <= r21 + q2;                             // O41
    t[2] <= r21 - q2;                             // O42
    t[3] <= r20 - q3;                             // O43
    t[4] <= (q1_e - q1_bpe) + (q3_c - q3_cpd);    // O0 = O10 + O30
    t[5] <= (q2_bpe - q2_b) + (q4_c - q4_cmd);    // O1 = O21 + O41
    t[6] <= (q2_bme - q2_b) + (q4_c - q4_cpd);    // O2 = O22 + O42
    t[7] <= (q1_bme + q1_e) + (q3_c - q3_cmd);    // O3 = O13 + O33
  end

  // ---------------- stage 4: A8^T ----------------
  word_t xo [8];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      xo[i]   <= t[i] + t[7-i];
      xo[7-i] <= t[i] - t[7-i];
    end
  end

  // ---------------- valid pipeline and output packing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else begin
      v1 <= in_valid && !is_2x2(sel);
      v2 <= is_2x2(sel) ? in_valid : v1;
      v3 <= v2 && !is_2x2(sel);
      v4 <= v3 && is_8x8(sel);
    end
  end

  assign busy = v1 | v2 | v3 | v4;

  always_comb begin
    if (is_2x2(sel))      out_valid = v2;
    else if (is_4x4(sel)) out_valid = v3;
    else                  out_valid = v4;
  end

  always_comb begin
    for (int i = 0; i < 8; i++) x[i] = xo[i];
    if (is_2x2(sel)) begin
      x[0] = r20;
      x[1] = r21;
    end else if (is_4x4(sel)) begin
      for (int i = 0; i < 4; i++) x[i] = t[i];
    end
  end

endmodule
