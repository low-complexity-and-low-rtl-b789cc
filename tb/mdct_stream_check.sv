// mdct_stream_check: stimulus and checker for one 2-D transform core.
//
// Sends random 16-bit blocks in every mode, first all eight modes in turn
// and then a random mode sequence, and compares every output vector with
// mdct_ref_pkg::ref2d. The stream mixes bursts of back-to-back blocks,
// pauses between blocks (which make the transpose buffer drain) and gaps
// inside a block. It counts the events a full test must show: blocks per
// mode, mode switches with blocks still in flight, drains (in_ready low
// with an unchanged mode) and the longest unbroken run of output vectors,
// which must cover a burst of back-to-back blocks less the last one (one
// vector per clock).
module mdct_stream_check
  import mdct_pkg::*;
  import mdct_ref_pkg::*;
#(
  parameter bit INVERSE = 1'b0,
  parameter int NSEQ    = 24,       // random mode segments after the sweep
  parameter int BURST   = 4         // blocks per back-to-back burst
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output sel_e                     sel,
  output logic                     in_valid,
  input  logic                     in_ready,
  output logic signed [DATA_W-1:0] din [8],
  input  logic                     out_valid,
  input  logic signed [DATA_W-1:0] dout [8],
  input  logic                     idle,
  output logic                     done,
  output int                       checks,
  output int                       failures
);

  int expq [$];
  int nq [$];     // lanes of each expected vector
  int blocks_per_mode [8];
  int mode_switches = 0, drains = 0, run = 0, max_run = 0, n_out = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s core: %s", INVERSE ? "inverse" : "forward", msg);
  endtask

  // Output checker
  always @(posedge clk) if (rst_n) begin
    int n, e;
    if (out_valid) begin
      run++;
      if (run > max_run) max_run = run;
      n_out++;
      n = (nq.size() > 0) ? nq.pop_front() : 0;
      if (n == 0 || expq.size() < n) fail("unexpected output vector");
      else
        for (int i = 0; i < n; i++) begin
          e = expq.pop_front();
          checks++;
          if (int'(dout[i]) != e)
            fail($sformatf("mode %0d lane %0d got %0d expected %0d", sel, i, dout[i], e));
        end
    end else run = 0;
  end

  task automatic send_block(sel_e m, bit gaps);
    blk_t blk, res;
    int n = block_n(m);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        blk[r][c] = (r < n && c < n) ? longint'($signed(16'($urandom))) : 0;
    // a few extreme blocks to reach the rounding and saturation limits
    if ($urandom_range(0, 9) == 0)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) blk[r][c] = (((r + c) % 2) != 0) ? -32768 : 32767;
    res = ref2d(m, INVERSE, blk);
    for (int k = 0; k < n; k++) begin
      nq.push_back(n);
      for (int i = 0; i < n; i++) expq.push_back(int'(res[k][i]));
    end
    for (int r = 0; r < n; r++) begin
      if (sel != m) mode_switches++;
      sel = m;
      for (int c = 0; c < 8; c++) din[c] = DATA_W'(blk[r][c]);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) begin
        if (sel == m && !idle) drains++;
        @(posedge clk);
      end
      #1;
      in_valid = 1'b0;
      if (gaps && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
    end
    blocks_per_mode[m]++;
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    sel = M_HAD2;
    in_valid = 1'b0;
    for (int c = 0; c < 8; c++) din[c] = '0;
    for (int m = 0; m < 8; m++) blocks_per_mode[m] = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    #1;
    for (int s = 0; s < 8 + NSEQ; s++) begin
      sel_e m;
      int gapmax;
      m = (s < 8) ? sel_e'(s) : sel_e'($urandom_range(0, 7));
      gapmax = block_n(m) * 2;
      // a burst of back-to-back blocks, then single blocks with pauses
      for (int b = 0; b < BURST; b++) send_block(m, 1'b0);
      for (int b = 0; b < 2; b++) begin
        send_block(m, b == 1);
        repeat ($urandom_range(0, gapmax)) @(posedge clk);
        #1;
      end
    end
    // wait until everything has left
    while (!idle) @(posedge clk);
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) fail($sformatf("%0d output words never appeared", expq.size()));
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (blocks_per_mode[m] == 0) fail($sformatf("mode %0d never ran", m));
    end
    checks++;
    if (mode_switches == 0) fail("no mode switch happened");
    checks++;
    if (drains == 0) fail("the transpose buffer never drained");
    checks++;
    if (max_run < (BURST - 1) * 8) fail($sformatf("longest output run %0d < %0d", max_run, (BURST - 1) * 8));
    $display("%s core: blocks per mode %p, mode switches %0d, drain waits %0d, longest output run %0d vectors",
             INVERSE ? "inverse" : "forward", blocks_per_mode, mode_switches, drains, max_run);
    done = 1'b1;
  end

endmodule
