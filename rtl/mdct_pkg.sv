// mdct_pkg: types and constants shared by the multistandard DCT/IDCT blocks.
//
// The 3-bit operation-mode code Sel follows the mode table of the design
// (0: 2x2 Hadamard, 1: 4x4 Hadamard, 2: H.264/AVC 4x4, 3: VC-1 4x4,
// 4: H.264/AVC 8x8, 5: AVS 8x8, 6: VC-1 8x8, 7: JPEG/MPEG-1/2/4 8x8).
// The coefficient names are those of the generalised transform matrices
// T4 and T8. The per-mode output shift used to bring 1-D results back to
// 16 bits is this design's own choice (see mdct_scale).
package mdct_pkg;

  typedef enum logic [2:0] {
    M_HAD2   = 3'd0,
    M_HAD4   = 3'd1,
    M_AVC4   = 3'd2,
    M_VC1_4  = 3'd3,
    M_AVC8   = 3'd4,
    M_AVS8   = 3'd5,
    M_VC1_8  = 3'd6,
    M_MPEG8  = 3'd7
  } sel_e;

  // One coefficient multiplication block per value of this type.
  typedef enum logic [3:0] {
    C_A,     // a
    C_FPG,   // f+g
    C_F,     // f
    C_FMG,   // f-g
    C_BPE,   // b+e
    C_E,     // e
    C_BME,   // b-e
    C_CPD,   // c+d
    C_C,     // c
    C_CMD,   // c-d
    C_B      // b
  } coef_e;

  // Word width of the transform data path (16-bit arithmetic accuracy).
  localparam int unsigned DATA_W = 16;
  // Extra bits carried inside a 1-D unit so that no intermediate overflows.
  localparam int unsigned GUARD_W = 16;

  function automatic logic is_2x2(sel_e s);
    return s == M_HAD2;
  endfunction

  function automatic logic is_8x8(sel_e s);
    return s inside {M_AVC8, M_AVS8, M_VC1_8, M_MPEG8};
  endfunction

  function automatic logic is_4x4(sel_e s);
    return s inside {M_HAD4, M_AVC4, M_VC1_4};
  endfunction

  // Block size in samples: 2, 4 or 8.
  function automatic int unsigned block_n(sel_e s);
    return is_8x8(s) ? 8 : (is_2x2(s) ? 2 : 4);
  endfunction

  // Worst-case word growth, in bits, of one 1-D transform in each mode:
  // ceil(log2(largest absolute row sum of the transform matrix)).
  function automatic int unsigned growth_bits(sel_e s);
    case (s)
      M_HAD2:  return 1;   // 2
      M_HAD4:  return 2;   // 4
      M_AVC4:  return 3;   // 6
      M_VC1_4: return 7;   // 68
      M_AVC8:  return 6;   // 62
      M_AVS8:  return 6;   // 57
      M_VC1_8: return 7;   // 90
      default: return 12;  // 2896
    endcase
  endfunction

endpackage
