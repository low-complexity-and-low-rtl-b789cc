// transpose_buffer: low-area transpose memory between the row and the
// column 1-D units of the 2-D transform.
//
// One array of N x N words (64 words of 16 bits by default) holds one
// block. A demultiplexer steers each incoming vector either into the
// bottom row (vertical flow: every row moves up by one) or into the right
// column (horizontal flow: every column moves left by one); a multiplexer
// takes the outgoing vector from the top row or from the left column
// accordingly. The control unit (tbuf_ctrl) flips the direction every n
// vectors, so a block written as rows is read back as columns while the
// next block is written in the same direction. In 4x4 and 2x2 modes only
// the upper-left n x n corner is used. The array, demux, mux and control
// unit follow the design; the choice of edges is this implementation's.
//
// Interface: din[0..N-1]/in_valid from the row unit (n lanes used),
// dout[0..N-1]/out_valid to the column unit; lane c of input vector r of
// a block comes out as lane r of output vector c.
// Timing: output vectors of block b leave during the n shifts that bring
// block b+1 in; the last block leaves through a drain (see tbuf_ctrl).
module transpose_buffer
  import mdct_pkg::sel_e, mdct_pkg::block_n, mdct_pkg::DATA_W;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  sel_e                sel,
  input  logic                in_valid,
  input  logic signed [W-1:0] din [N],
  input  logic                upstream_idle,
  output logic                out_valid,
  output logic signed [W-1:0] dout [N],
  output logic                draining,
  output logic                busy
);

  logic       shift, dir_h, full;
  logic [2:0] cnt;
  int unsigned n;

  tbuf_ctrl u_ctrl (
    .clk, .rst_n, .sel, .in_valid, .upstream_idle,
    .shift, .dir_h, .out_valid, .draining, .full, .cnt
  );

  assign n    = block_n(sel);
  assign busy = full || (cnt != '0) || draining;

  logic signed [W-1:0] mem [N][N];

  // Memory: reset so that a drain never shifts uninitialised words out.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) mem[r][c] <= '0;
    end else if (shift) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++)
          if (r < n && c < n) begin
            if (!dir_h) mem[r][c] <= (r == n - 1) ? din[c] : mem[(r + 1) % N][c];
            else        mem[r][c] <= (c == n - 1) ? din[r] : mem[r][(c + 1) % N];
          end
    end
  end

  // Output multiplexer.
  always_comb
    for (int i = 0; i < N; i++) dout[i] = dir_h ? mem[i][0] : mem[0][i];

endmodule
