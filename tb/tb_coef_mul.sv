// tb_coef_mul: checks every coefficient multiplication block in every
// mode against x times the coefficient value derived from the a..g
// coefficient table of each standard (forward and inverse variants).
module tb_coef_mul;
  import mdct_pkg::*;

  localparam int W = DATA_W + GUARD_W;
  localparam int NC = 11;

  sel_e sel;
  logic signed [W-1:0] x;
  logic signed [W-1:0] yf [NC];
  logic signed [W-1:0] yi [3];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_f
    coef_mul #(.W(W), .COEF(coef_e'(c)), .INVERSE(1'b0)) u (.sel, .x, .y(yf[c]));
  end
  coef_mul #(.W(W), .COEF(C_FPG), .INVERSE(1'b1)) ui0 (.sel, .x, .y(yi[0]));
  coef_mul #(.W(W), .COEF(C_F),   .INVERSE(1'b1)) ui1 (.sel, .x, .y(yi[1]));
  coef_mul #(.W(W), .COEF(C_FMG), .INVERSE(1'b1)) ui2 (.sel, .x, .y(yi[2]));

  // a..g per mode (forward); 4x4 modes have no b..e.
  //                    a    b    c    d    e    f    g
  localparam int K [8][7] = '{
    '{  1,   0,   0,   0,   0,   1,   1},   // 2x2 Hadamard
    '{  1,   0,   0,   0,   0,   1,   1},   // 4x4 Hadamard
    '{  1,   0,   0,   0,   0,   2,   1},   // H.264 4x4
    '{ 17,   0,   0,   0,   0,  22,  10},   // VC-1 4x4
    '{  8,  12,  10,   6,   3,   8,   4},   // H.264 8x8
    '{  8,  10,   9,   6,   2,  10,   4},   // AVS 8x8
    '{ 12,  16,  15,   9,   4,  16,   6},   // VC-1 8x8
    '{362, 502, 426, 284, 100, 473, 196}};  // JPEG/MPEG 8x8

  function automatic longint expect_f(int m, int c, longint v);
    int a = K[m][0], b = K[m][1], cc = K[m][2], d = K[m][3], e = K[m][4];
    int f = K[m][5], g = K[m][6];
    case (c)
      0:  return a * v;
      1:  return (f + g) * v;
      2:  return f * v;
      3:  return (f - g) * v;
      4:  return (b + e) * v;
      5:  return e * v;
      6:  return (b - e) * v;
      7:  return (cc + d) * v;
      8:  return cc * v;
      9:  return (cc - d) * v;
      default: return b * v;
    endcase
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int t = 0; t < 400; t++) begin
      for (int m = 0; m < 8; m++) begin
        sel = sel_e'(m);
        case (t)
          0: v = 1;
          1: v = -1;
          2: v = 32767;
          3: v = -131072;
          default: v = longint'($signed($urandom_range(0, 262143))) - 131072;
        endcase
        x = W'(v);
        #1;
        for (int c = 0; c < NC; c++)
          check($sformatf("mode %0d coef %0d x=%0d", m, c, v), longint'(yf[c]), expect_f(m, c, v));
        // Inverse variants: H.264 4x4 uses f = 1, g = 1/2 (halvings truncate)
        if (m == 2) begin
          check("inv f+g", longint'(yi[0]), (3 * v) >>> 1);
          check("inv f",   longint'(yi[1]), v);
          check("inv f-g", longint'(yi[2]), v >>> 1);
        end else begin
          check("inv f+g", longint'(yi[0]), expect_f(m, 1, v));
          check("inv f",   longint'(yi[1]), expect_f(m, 2, v));
          check("inv f-g", longint'(yi[2]), expect_f(m, 3, v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
