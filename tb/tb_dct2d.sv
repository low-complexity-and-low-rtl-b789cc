// tb_dct2d: runs one forward and one inverse dct2d core side by side,
// each driven and checked by mdct_stream_check against the 2-D matrix
// reference, in all eight modes with bursts, pauses, gaps and mode
// switches.
module tb_dct2d;
  import mdct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  sel_e sel [2];
  logic in_valid [2], in_ready [2], out_valid [2], idle [2], done [2];
  logic signed [DATA_W-1:0] din [2][8];
  logic signed [DATA_W-1:0] dout [2][8];
  int ck [2], fl [2];

  for (genvar g = 0; g < 2; g++) begin : g_core
    dct2d #(.INVERSE(g == 1)) dut (
      .clk, .rst_n, .sel(sel[g]), .in_valid(in_valid[g]), .in_ready(in_ready[g]),
      .din(din[g]), .out_valid(out_valid[g]), .dout(dout[g]), .idle(idle[g]));
    mdct_stream_check #(.INVERSE(g == 1), .NSEQ(8)) chk (
      .clk, .rst_n, .sel(sel[g]), .in_valid(in_valid[g]), .in_ready(in_ready[g]),
      .din(din[g]), .out_valid(out_valid[g]), .dout(dout[g]), .idle(idle[g]),
      .done(done[g]), .checks(ck[g]), .failures(fl[g]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1], fl[0] + fl[1] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1], fl[0] + fl[1]);
    $finish;
  end
endmodule
