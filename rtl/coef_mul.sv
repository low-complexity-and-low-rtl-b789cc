// coef_mul: multiplierless multiplication of a sample by one transform
// coefficient, for all eight operation modes.
//
// Each instance handles one coefficient of the generalised matrices
// (a, f+g, f, f-g, b+e, e, b-e, c+d, c, c-d, b), chosen by COEF. Rather
// than one constant multiplier per standard, the products for all
// standards are built from a shared set of shifted terms and partial sums,
// so that e.g. the VC-1 8x8 value is reused to form the JPEG/MPEG value,
// and a mux driven by Sel picks the product of the current mode. Every
// product is at most three additions deep. The factorisations follow the
// shared-factorisation tables of the design; where a printed decomposition
// did not evaluate to its coefficient, an equivalent one with the same
// number of additions is used (noted next to the term below). For the
// H.264/AVC 4x4 inverse transform (INVERSE = 1) g = 1/2, so f+g = 3/2 and
// f-g = 1/2 are formed with an arithmetic right shift, as integer H.264
// decoders do.
//
// Interface: x (signed, W bits) and sel in, y = coef(sel) * x out, same
// width; the caller provides enough headroom in W. Purely combinational.
// Coefficients that a mode does not use (b..e in the 4x4 modes) give 0.
module coef_mul
  import mdct_pkg::*;
#(
  parameter int unsigned W       = DATA_W + GUARD_W,
  parameter coef_e       COEF    = C_A,
  parameter bit          INVERSE = 1'b0
) (
  input  sel_e               sel,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  always_comb begin
    logic signed [W-1:0] t3, t6, t9, t10, t12, t15, t17, t20, t22, t24;
    logic signed [W-1:0] big;
    t3 = '0; t6 = '0; t9 = '0; t10 = '0; t12 = '0; t15 = '0; t17 = '0;
    t20 = '0; t22 = '0; t24 = '0; big = '0;
    y = '0;
    unique case (COEF)
      // a: 1 | 1 | 1 | 17 | 8 | 8 | 12 | 362   (4 additions)
      C_A: begin
        t6  = (x <<< 3) - (x <<< 1);
        t12 = t6 <<< 1;
        t17 = (x <<< 4) + x;
        big = (t12 <<< 5) - t6 - (x <<< 4);           // 384 - 6 - 16
        case (sel)
          M_VC1_4:        y = t17;
          M_AVC8, M_AVS8: y = x <<< 3;
          M_VC1_8:        y = t12;
          M_MPEG8:        y = big;
          default:        y = x;
        endcase
      end
      // f+g: 2 | 2 | 3 (3/2 inverse) | 32 | 12 | 14 | 22 | 669   (5 additions)
      C_FPG: begin
        t3  = x + (x <<< 1);
        t12 = t3 <<< 2;
        big = (t12 <<< 1) - (x <<< 1);                 // 22
        t22 = big;
        big = (t22 <<< 5) - ((x <<< 5) + t3);          // 704 - 35
        case (sel)
          M_HAD2, M_HAD4: y = x <<< 1;
          M_AVC4:         y = INVERSE ? (t3 >>> 1) : t3;
          M_VC1_4:        y = x <<< 5;
          M_AVC8:         y = t12;
          M_AVS8:         y = t12 + (x <<< 1);
          M_VC1_8:        y = t22;
          default:        y = big;
        endcase
      end
      // f: 1 | 1 | 2 (1 inverse) | 22 | 8 | 10 | 16 | 473   (4 additions)
      C_F: begin
        t10 = (x <<< 3) + (x <<< 1);
        t22 = (t10 <<< 1) + (x <<< 1);
        big = (x <<< 9) - (t10 <<< 2) + x;             // 512 - 40 + 1
        case (sel)
          M_AVC4:  y = INVERSE ? x : (x <<< 1);
          M_VC1_4: y = t22;
          M_AVC8:  y = x <<< 3;
          M_AVS8:  y = t10;
          M_VC1_8: y = x <<< 4;
          M_MPEG8: y = big;
          default: y = x;
        endcase
      end
      // f-g: 0 | 0 | 1 (1/2 inverse) | 12 | 4 | 6 | 10 | 277   (4 additions)
      C_FMG: begin
        t6  = (x <<< 2) + (x <<< 1);
        t10 = t6 + (x <<< 2);
        big = ((x <<< 8) + x) + (t10 <<< 1);           // 257 + 20
        case (sel)
          M_AVC4:  y = INVERSE ? (x >>> 1) : x;
          M_VC1_4: y = t6 <<< 1;
          M_AVC8:  y = x <<< 2;
          M_AVS8:  y = t6;
          M_VC1_8: y = t10;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // b+e: 15 | 12 | 20 | 602   (5 additions)
      C_BPE: begin
        t15 = (x <<< 4) - x;
        t20 = (x <<< 4) + (x <<< 2);
        big = (t20 <<< 5) - (t15 <<< 1) - (x <<< 3);   // 640 - 30 - 8
        case (sel)
          M_AVC8:  y = t15;
          M_AVS8:  y = (x <<< 3) + (x <<< 2);
          M_VC1_8: y = t20;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // e: 3 | 2 | 4 | 100   (2 additions)
      C_E: begin
        t3  = x + (x <<< 1);
        big = (t3 <<< 5) + (x <<< 2);                  // 96 + 4
        case (sel)
          M_AVC8:  y = t3;
          M_AVS8:  y = x <<< 1;
          M_VC1_8: y = x <<< 2;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // b-e: 9 | 8 | 12 | 402   (3 additions)
      C_BME: begin
        t9  = (x <<< 3) + x;
        t12 = (x <<< 3) + (x <<< 2);
        big = (t12 <<< 5) + (t9 <<< 1);                // 384 + 18
        case (sel)
          M_AVC8:  y = t9;
          M_AVS8:  y = x <<< 3;
          M_VC1_8: y = t12;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // c+d: 16 | 15 | 24 | 710   (4 additions)
      C_CPD: begin
        t15 = (x <<< 4) - x;
        t24 = (x <<< 4) + (x <<< 3);
        big = ((t24 <<< 5) - (t15 <<< 2)) + (x <<< 1); // 768 - 60 + 2
        case (sel)
          M_AVC8:  y = x <<< 4;
          M_AVS8:  y = t15;
          M_VC1_8: y = t24;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // c: 10 | 9 | 15 | 426   (5 additions)
      C_C: begin
        t9  = (x <<< 3) + x;
        t10 = t9 + x;
        t15 = (x <<< 4) - x;
        big = ((x <<< 7) + (t9 <<< 5)) + t10;          // 128 + 288 + 10
        case (sel)
          M_AVC8:  y = t10;
          M_AVS8:  y = t9;
          M_VC1_8: y = t15;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // c-d: 4 | 3 | 6 | 142   (3 additions)
      C_CMD: begin
        t3  = (x <<< 1) + x;
        big = (x <<< 7) + (x <<< 4) - (x <<< 1);       // 128 + 16 - 2
        case (sel)
          M_AVC8:  y = x <<< 2;
          M_AVS8:  y = t3;
          M_VC1_8: y = t3 <<< 1;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      // b: 12 | 10 | 16 | 502   (3 additions)
      C_B: begin
        t10 = (x <<< 3) + (x <<< 1);
        t12 = t10 + (x <<< 1);
        big = (x <<< 9) - t10;                         // 512 - 10
        case (sel)
          M_AVC8:  y = t12;
          M_AVS8:  y = t10;
          M_VC1_8: y = x <<< 4;
          M_MPEG8: y = big;
          default: y = '0;
        endcase
      end
      default: y = '0;
    endcase
  end

endmodule
