// dct1d: shared, four-stage pipelined 1-D forward transform for the
// 2x2, 4x4 and 8x8 modes of H.264/AVC, VC-1, AVS and JPEG/MPEG-1/2/4.
//
// The 8-point transform matrix of every standard has the same shape
// T8 = A8*B8*C8*D8*E8 with seven coefficients a..g, and the 4-point
// matrix T4 = A4*B4*C4*D4 is the upper half of it; the 2-point Hadamard is
// the first butterfly of T4. One data path therefore serves all modes:
//   stage 1  A8 butterfly (x0+x7 .. x0-x7)
//   stage 2  input mux for 4x4 data, 4-point butterfly (B8 upper half),
//            pre-sums I1+I2, I0+I3 of the odd part and u2+u3 of B42
//   stage 3  input mux for 2x2 data, 2-point butterfly; all coefficient
//            multiplications of B42 (f-g, f, f+g) and of the odd 4x4 part
//            B84 written as S1+S2+S3+S4 (b+e, b-e, b, e, c+d, c, c-d)
//   stage 4  'a' scaling of the even pair, final additions of B42 and B84
// so a product never shares a stage with a chain of other operators.
// Outputs leave in natural frequency order (the E8 and D4 permutations are
// wiring). Sel (mdct_pkg::sel_e) picks the mode and the coefficients.
//
// Interface: x[0..7] with in_valid; 4x4 data uses x[0..3], 2x2 data
// x[0..1]. y[0..7] with out_valid; 4x4 results in y[0..3], 2x2 results in
// y[0..1], unused lanes are don't-care. y is exact (DATA_W+GUARD_W bits);
// results are y_k = sum_n C[k][n] x_n.
// Timing: one vector per clock in every mode. Latency is 4 cycles for
// 8x8, 3 for 4x4 (data enters at stage 2) and 1 for 2x2 (enters at stage
// 3, leaves from the stage-3 register before the 'a' blocks, a = 1 there).
// Sel must be held while vectors are in flight. The stage split and the
// entry points follow the design's flow graph; the register placement
// inside a stage, the valid pipeline and the port packing are this
// implementation's choices.
module dct1d
  import mdct_pkg::*;
#(
  parameter int unsigned IN_W = DATA_W,
  parameter int unsigned W    = IN_W + GUARD_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sel_e                   sel,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x [8],
  output logic                   out_valid,
  output logic signed [W-1:0]    y [8],
  output logic                   busy
);

  typedef logic signed [W-1:0] word_t;

  logic v1, v2, v3, v4;
  word_t xi [8];

  always_comb
    for (int i = 0; i < 8; i++) xi[i] = word_t'(x[i]);

  // ---------------- stage 1: A8 ----------------
  word_t s1 [8];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      s1[i]   <= xi[i] + xi[7-i];
      s1[7-i] <= xi[i] - xi[7-i];
    end
  end

  // ---------------- stage 2 ----------------
  // Even half: mux between the 4x4 input and the A8 sums, then B4/B8 upper.
  word_t e [4];
  word_t d12, d03;
  always_comb begin
    for (int i = 0; i < 4; i++) e[i] = is_8x8(sel) ? s1[i] : xi[i];
    d12 = e[1] - e[2];
    d03 = e[0] - e[3];
  end

  word_t u0, u1, u2, u3, u23;   // u23 = u2+u3 for the B42 factorisation
  word_t o0, o1, o2, o3;        // odd inputs I0..I3 of B84
  word_t o03, o12;              // shared sums I0+I3, I1+I2
  always_ff @(posedge clk) begin
    u0  <= e[0] + e[3];
    u1  <= e[1] + e[2];
    u2  <= d12;
    u3  <= d03;
    u23 <= d12 + d03;
    o0  <= s1[4];
    o1  <= s1[5];
    o2  <= s1[6];
    o3  <= s1[7];
    o03 <= s1[4] + s1[7];
    o12 <= s1[5] + s1[6];
  end

  // ---------------- stage 3 ----------------
  word_t m0, m1;
  always_comb begin
    m0 = is_2x2(sel) ? xi[0] : u0;
    m1 = is_2x2(sel) ? xi[1] : u1;
  end

  // B42 products: v2 = f(u2+u3) - (f-g)u2, v3 = (f+g)u3 - f(u2+u3)
  word_t p_fmg, p_f, p_fpg;
  coef_mul #(.W(W), .COEF(C_FMG)) u_fmg (.sel, .x(u2),  .y(p_fmg));
  coef_mul #(.W(W), .COEF(C_F))   u_f   (.sel, .x(u23), .y(p_f));
  coef_mul #(.W(W), .COEF(C_FPG)) u_fpg (.sel, .x(u3),  .y(p_fpg));

  // B84 products (S1..S4)
  word_t p1_bpe, p1_e, p1_bme;   // S1: e(I0+I3), (b+e)I0, (b-e)I3
  word_t p2_bpe, p2_b, p2_bme;   // S2: b(I1+I2), (b+e)I1, (b-e)I2
  word_t p3_cpd, p3_c, p3_cmd;   // S3: c(I1+I2), (c+d)I2, (c-d)I1
  word_t p4_cpd, p4_c, p4_cmd;   // S4: c(I0+I3), (c+d)I0, (c-d)I3
  coef_mul #(.W(W), .COEF(C_BPE)) u1_bpe (.sel, .x(o0),  .y(p1_bpe));
  coef_mul #(.W(W), .COEF(C_E))   u1_e   (.sel, .x(o03), .y(p1_e));
  coef_mul #(.W(W), .COEF(C_BME)) u1_bme (.sel, .x(o3),  .y(p1_bme));
  coef_mul #(.W(W), .COEF(C_BPE)) u2_bpe (.sel, .x(o1),  .y(p2_bpe));
  coef_mul #(.W(W), .COEF(C_B))   u2_b   (.sel, .x(o12), .y(p2_b));
  coef_mul #(.W(W), .COEF(C_BME)) u2_bme (.sel, .x(o2),  .y(p2_bme));
  coef_mul #(.W(W), .COEF(C_CPD)) u3_cpd (.sel, .x(o2),  .y(p3_cpd));
  coef_mul #(.W(W), .COEF(C_C))   u3_c   (.sel, .x(o12), .y(p3_c));
  coef_mul #(.W(W), .COEF(C_CMD)) u3_cmd (.sel, .x(o1),  .y(p3_cmd));
  coef_mul #(.W(W), .COEF(C_CPD)) u4_cpd (.sel, .x(o0),  .y(p4_cpd));
  coef_mul #(.W(W), .COEF(C_C))   u4_c   (.sel, .x(o03), .y(p4_c));
  coef_mul #(.W(W), .COEF(C_CMD)) u4_cmd (.sel, .x(o3),  .y(p4_cmd));

  word_t r20, r21;
  word_t q_fmg, q_f, q_fpg;
  word_t q1_bpe, q1_e, q1_bme, q2_bpe, q2_b, q2_bme;
  word_t q3_cpd, q3_c, q3_cmd, q4_cpd, q4_c, q4_cmd;
  always_ff @(posedge clk) begin
    r20    <= m0 + m1;          // O20
    r21    <= m0 - m1;          // O21
    q_fmg  <= p_fmg;  q_f  <= p_f;  q_fpg  <= p_fpg;
    q1_bpe <= p1_bpe; q1_e <= p1_e; q1_bme <= p1_bme;
    q2_bpe <= p2_bpe; q2_b <= p2_b; q2_bme <= p2_bme;
    q3_cpd <= p3_cpd; q3_c <= p3_c; q3_cmd <= p3_cmd;
    q4_cpd <= p4_cpd; q4_c <= p4_c; q4_cmd <= p4_cmd;
  end

  // ---------------- stage 4 ----------------
  word_t a0, a1;
  coef_mul #(.W(W), .COEF(C_A)) u_a0 (.sel, .x(r20), .y(a0));
  coef_mul #(.W(W), .COEF(C_A)) u_a1 (.sel, .x(r21), .y(a1));

  word_t z [8];
  always_ff @(posedge clk) begin
    z[0] <= a0;                                   // O80 / O40
    z[4] <= a1;                                   // O84 / O42
    z[2] <= q_f - q_fmg;                          // O82 / O41
    z[6] <= q_fpg - q_f;                          // O86 / O43
    // B84 columns: O0 = O10+O30, O1 = O21+O41, O2 = O22+O42, O3 = O13+O33
    z[7] <= (q1_e - q1_bpe) + (q3_c - q3_cpd);    // O87
    z[3] <= (q2_bme - q2_b) + (q4_c - q4_cpd);    // O83
    z[5] <= (q2_bpe - q2_b) + (q4_c - q4_cmd);    // O85
    z[1] <= (q1_bme + q1_e) + (q3_c - q3_cmd);    // O81
  end

  // ---------------- valid pipeline and output packing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
    end else begin
      v1 <= in_valid && is_8x8(sel);
      v2 <= is_8x8(sel) ? v1 : (in_valid && is_4x4(sel));
      v3 <= is_2x2(sel) ? in_valid : v2;
      v4 <= v3 && !is_2x2(sel);
    end
  end

  assign busy      = v1 | v2 | v3 | v4;
  assign out_valid = is_2x2(sel) ? v3 : v4;

  always_comb begin
    for (int i = 0; i < 8; i++) y[i] = z[i];
    if (is_2x2(sel)) begin
      y[0] = r20;
      y[1] = r21;
    end else if (is_4x4(sel)) begin
      y[1] = z[2];
      y[2] = z[4];
      y[3] = z[6];
    end
  end

endmodule
