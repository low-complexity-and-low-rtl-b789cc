// tb_mdct_top: end-to-end test of the top with default parameters. The
// forward and the inverse 2-D cores are driven at the same time, each by
// mdct_stream_check, through every mode (JPEG/MPEG, H.264/AVC 2x2, 4x4,
// 8x8, VC-1 4x4, 8x8, AVS 8x8) and a random mode sequence. Besides the
// data it requires that each mechanism of the design happened: every
// mode, mode switches, transpose-buffer drains, direction changes of the
// transpose buffer in both directions, and unbroken output runs of one
// vector per clock.
module tb_mdct_top;
  import mdct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  sel_e dct_sel, idct_sel;
  logic dct_in_valid, dct_in_ready, dct_out_valid, dct_idle;
  logic idct_in_valid, idct_in_ready, idct_out_valid, idct_idle;
  logic signed [DATA_W-1:0] dct_din [8], dct_dout [8], idct_din [8], idct_dout [8];
  logic done0, done1;
  int ck0, ck1, fl0, fl1;
  int flips [2] = '{0, 0};
  logic dir_prev [2];

  mdct_top dut (.*);

  mdct_stream_check #(.INVERSE(1'b0)) chk_f (
    .clk, .rst_n, .sel(dct_sel), .in_valid(dct_in_valid), .in_ready(dct_in_ready),
    .din(dct_din), .out_valid(dct_out_valid), .dout(dct_dout), .idle(dct_idle),
    .done(done0), .checks(ck0), .failures(fl0));
  mdct_stream_check #(.INVERSE(1'b1)) chk_i (
    .clk, .rst_n, .sel(idct_sel), .in_valid(idct_in_valid), .in_ready(idct_in_ready),
    .din(idct_din), .out_valid(idct_out_valid), .dout(idct_dout), .idle(idct_idle),
    .done(done1), .checks(ck1), .failures(fl1));

  // transpose-buffer direction changes, seen through the hierarchy
  always @(posedge clk) begin
    if (rst_n && dut.u_dct.u_tbuf.dir_h != dir_prev[0]) flips[0]++;
    if (rst_n && dut.u_idct.u_tbuf.dir_h != dir_prev[1]) flips[1]++;
    dir_prev[0] <= dut.u_dct.u_tbuf.dir_h;
    dir_prev[1] <= dut.u_idct.u_tbuf.dir_h;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck0 + ck1, fl0 + fl1 + 1);
    $finish;
  end

  initial begin
    int extra;
    extra = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done0 && done1);
    $display("direction changes: forward %0d, inverse %0d", flips[0], flips[1]);
    if (flips[0] < 2 || flips[1] < 2) begin
      extra++;
      $display("FAIL transpose buffer direction never alternated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", ck0 + ck1 + 1, fl0 + fl1 + extra);
    $finish;
  end
endmodule
