// mdct_scale: brings the exact result of a 1-D transform back to the
// 16-bit word width of the data path.
//
// The design keeps 16-bit arithmetic accuracy between its stages but does
// not say how the growth of a transform is removed; this block is this
// implementation's choice. It shifts right by the worst-case growth of the
// active mode (mdct_pkg::growth_bits), rounding half up, and saturates to
// OUT_W bits. Purely combinational.
module mdct_scale
  import mdct_pkg::*;
#(
  parameter int unsigned IN_W  = DATA_W + GUARD_W,
  parameter int unsigned OUT_W = DATA_W
) (
  input  sel_e                    sel,
  input  logic signed [IN_W-1:0]  d,
  output logic signed [OUT_W-1:0] q
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(1 << (OUT_W - 1));

  always_comb begin
    logic signed [IN_W-1:0] r;
    int unsigned s;
    s = growth_bits(sel);
    r = (d + (IN_W'(1) <<< (s - 1))) >>> s;
    if (r > MAXV)      q = MAXV[OUT_W-1:0];
    else if (r < MINV) q = MINV[OUT_W-1:0];
    else               q = r[OUT_W-1:0];
  end

endmodule
