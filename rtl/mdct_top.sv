// mdct_top: the multistandard 2-D DCT and 2-D IDCT cores side by side.
//
// The forward core (prefix dct_) and the inverse core (prefix idct_) are
// two independent instances of dct2d, each built from two shared 1-D
// units and one 64-word transpose buffer, each with its own mode select.
// Both support JPEG/MPEG-1/2/4 8x8, H.264/AVC 2x2/4x4/8x8 (Hadamard and
// integer transforms), VC-1 4x4/8x8 and AVS 8x8 with 16-bit samples, and
// stream 2, 4 or 8 samples per clock in the 2x2, 4x4 and 8x8 modes. See
// dct2d for the block format, the handshake and the timing.
module mdct_top
  import mdct_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // forward 2-D transform
  input  sel_e                     dct_sel,
  input  logic                     dct_in_valid,
  output logic                     dct_in_ready,
  input  logic signed [DATA_W-1:0] dct_din [8],
  output logic                     dct_out_valid,
  output logic signed [DATA_W-1:0] dct_dout [8],
  output logic                     dct_idle,
  // inverse 2-D transform
  input  sel_e                     idct_sel,
  input  logic                     idct_in_valid,
  output logic                     idct_in_ready,
  input  logic signed [DATA_W-1:0] idct_din [8],
  output logic                     idct_out_valid,
  output logic signed [DATA_W-1:0] idct_dout [8],
  output logic                     idct_idle
);

  dct2d #(.INVERSE(1'b0)) u_dct (
    .clk, .rst_n, .sel(dct_sel), .in_valid(dct_in_valid), .in_ready(dct_in_ready),
    .din(dct_din), .out_valid(dct_out_valid), .dout(dct_dout), .idle(dct_idle)
  );

  dct2d #(.INVERSE(1'b1)) u_idct (
    .clk, .rst_n, .sel(idct_sel), .in_valid(idct_in_valid), .in_ready(idct_in_ready),
    .din(idct_din), .out_valid(idct_out_valid), .dout(idct_dout), .idle(idct_idle)
  );

endmodule
