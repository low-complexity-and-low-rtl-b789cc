// tb_transpose_buffer: streams random blocks through the transpose buffer
// in every mode (2x2, 4x4 and 8x8 use n x n of the 8 x 8 array), back to
// back and with pauses between blocks, and checks that lane c of input
// vector r of a block comes out as lane r of output vector c, that a
// block leaves while the next one enters (output k of block b in the same
// cycle as input k of block b+1) and that the last block drains.
module tb_transpose_buffer;
  import mdct_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  sel_e sel = M_HAD2;
  logic in_valid = 1'b0, upstream_idle = 1'b1;
  logic signed [DATA_W-1:0] din [N];
  logic out_valid, draining, busy;
  logic signed [DATA_W-1:0] dout [N];
  int checks = 0, failures = 0;
  int n_out_same_cycle = 0;

  transpose_buffer #(.N(N)) dut (.*);

  always #5 clk = !clk;

  int expq [$];   // expected output words, lane by lane

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int n, e;
    n = block_n(sel);
    if (in_valid) n_out_same_cycle++;
    if (expq.size() < n) fail("unexpected output");
    else begin
      for (int i = 0; i < n; i++) begin
        e = expq.pop_front();
        checks++;
        if (int'(dout[i]) != e) fail($sformatf("mode %0d lane %0d got %0d expected %0d", sel, i, dout[i], e));
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [DATA_W-1:0] blk [N][N];
    int n, nblk;
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 8; m++) begin
      sel = sel_e'(m);
      n = block_n(sel);
      n_out_same_cycle = 0;
      for (int b = 0; b < 6; b++) begin
        for (int r = 0; r < n; r++)
          for (int c = 0; c < n; c++) blk[r][c] = DATA_W'($urandom);
        for (int c = 0; c < n; c++)
          for (int r = 0; r < n; r++) expq.push_back(int'(blk[r][c]));
        for (int r = 0; r < n; r++) begin
          while (draining) @(negedge clk);
          for (int c = 0; c < N; c++) din[c] = (c < n) ? blk[r][c] : '0;
          in_valid = 1'b1;
          upstream_idle = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b0;
        // blocks 0..2 back to back, then pauses that let the buffer drain
        if (b >= 3) begin
          upstream_idle = 1'b1;
          repeat ($urandom_range(0, 2 * n)) @(negedge clk);
        end
      end
      upstream_idle = 1'b1;
      repeat (2 * N + 2) @(negedge clk);
      checks++;
      if (expq.size() != 0) fail($sformatf("mode %0d: %0d vectors never left", m, expq.size()));
      expq.delete();
      checks++;
      // blocks 0,1,2 leave while the next block enters
      if (n_out_same_cycle < 3 * n) fail($sformatf("mode %0d: only %0d outputs overlapped input", m, n_out_same_cycle));
      checks++;
      if (busy) fail("busy after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
