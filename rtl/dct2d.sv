// dct2d: multistandard 2-D forward (INVERSE = 0) or inverse (INVERSE = 1)
// transform by the row-column method.
//
// A 1-D row unit (dct1d or idct1d) transforms each incoming row vector,
// the result is rounded back to 16 bits (mdct_scale), the transpose buffer
// turns the rows of each block into columns, and a second, identical 1-D
// unit transforms the columns, followed by a second rounding to 16 bits.
// For a block X the forward core produces Y = C X C^T, the inverse core
// X' = C^T W C, each 1-D pass rounded as described in mdct_scale.
//
// Interface: sel selects one of the eight modes (mdct_pkg::sel_e). A block
// of n x n samples (n = 2, 4, 8) enters as n row vectors on din[0..n-1],
// one per cycle while in_valid && in_ready. It leaves as n column vectors
// on dout[0..n-1] with out_valid: the k-th output vector holds column k of
// the result block (dout[i] = element (i, k)).
// Timing: in a continuous stream the core takes and delivers one vector of
// n samples per clock (2, 4 or 8 samples per cycle). A block leaves while
// the next one enters the transpose buffer; after the last block the
// buffer drains by itself, during which in_ready is low. sel is sampled
// only when the core is empty: a change of sel holds in_ready low until
// every block in flight has left. The row-column structure, the shared
// Sel and the 16-bit word width follow the design; the rounding, the mode
// register and the handshake are this implementation's.
module dct2d
  import mdct_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned N       = 8,
  parameter int unsigned W       = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sel_e                sel,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] din [N],
  output logic                out_valid,
  output logic signed [W-1:0] dout [N],
  output logic                idle
);

  localparam int unsigned IW = W + GUARD_W;

  sel_e mode;
  logic accept;
  logic row_vo, row_busy, col_vo, col_busy;
  logic tb_vo, tb_draining, tb_busy;
  logic signed [W-1:0]  row_in  [8];
  logic signed [IW-1:0] row_out [8];
  logic signed [W-1:0]  row_sc  [8];
  logic signed [W-1:0]  tb_out  [N];
  logic signed [W-1:0]  col_in  [8];
  logic signed [IW-1:0] col_out [8];

  assign idle     = !row_busy && !tb_busy && !col_busy;
  assign in_ready = (sel == mode) && !tb_draining;
  assign accept   = in_valid && in_ready;

  // Mode register: follows sel whenever nothing is in flight.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    mode <= M_HAD2;
    else if (idle) mode <= sel;
  end

  always_comb
    for (int i = 0; i < 8; i++) row_in[i] = (i < N) ? din[i % N] : '0;

  if (INVERSE) begin : g_row
    idct1d #(.IN_W(W)) u_row (.clk, .rst_n, .sel(mode), .in_valid(accept),
      .w(row_in), .out_valid(row_vo), .x(row_out), .busy(row_busy));
  end else begin : g_row
    dct1d  #(.IN_W(W)) u_row (.clk, .rst_n, .sel(mode), .in_valid(accept),
      .x(row_in), .out_valid(row_vo), .y(row_out), .busy(row_busy));
  end

  for (genvar i = 0; i < 8; i++) begin : g_rsc
    mdct_scale #(.IN_W(IW), .OUT_W(W)) u_sc (.sel(mode), .d(row_out[i]), .q(row_sc[i]));
  end

  logic signed [W-1:0] tb_in [N];
  always_comb
    for (int i = 0; i < N; i++) tb_in[i] = row_sc[i];

  transpose_buffer #(.N(N), .W(W)) u_tbuf (
    .clk, .rst_n, .sel(mode), .in_valid(row_vo), .din(tb_in),
    .upstream_idle(!row_busy && !accept),
    .out_valid(tb_vo), .dout(tb_out), .draining(tb_draining), .busy(tb_busy)
  );

  always_comb
    for (int i = 0; i < 8; i++) col_in[i] = (i < N) ? tb_out[i % N] : '0;

  if (INVERSE) begin : g_col
    idct1d #(.IN_W(W)) u_col (.clk, .rst_n, .sel(mode), .in_valid(tb_vo),
      .w(col_in), .out_valid(col_vo), .x(col_out), .busy(col_busy));
  end else begin : g_col
    dct1d  #(.IN_W(W)) u_col (.clk, .rst_n, .sel(mode), .in_valid(tb_vo),
      .x(col_in), .out_valid(col_vo), .y(col_out), .busy(col_busy));
  end

  for (genvar i = 0; i < N; i++) begin : g_csc
    mdct_scale #(.IN_W(IW), .OUT_W(W)) u_sc (.sel(mode), .d(col_out[i]), .q(dout[i]));
  end

  assign out_valid = col_vo;

endmodule
