// tb_mdct_rate: throughput workload for the top. For every mode, the
// forward and the inverse cores each receive K blocks back to back, one
// row vector per clock, both cores at the same time. The test requires:
//   - every input vector is accepted at once (in_ready stays high, no
//     stall cycle inside the stream),
//   - the K*n output vectors leave as one unbroken run of K*n clocks,
//     i.e. n*n*K samples in K*n clocks = n samples per clock (2, 4 or 8),
//   - every output word equals the matrix-product reference,
//   - the first output vector appears 2*L + n clocks after the first
//     input vector, L being the 1-D latency (1, 3 or 4 clocks).
// It prints, per mode and core, that latency and the measured samples
// per clock.
module tb_mdct_rate;
  import mdct_pkg::*;
  import mdct_ref_pkg::*;

  localparam int K = 16;   // blocks per stream

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  sel_e dct_sel, idct_sel;
  logic dct_in_valid, dct_in_ready, dct_out_valid, dct_idle;
  logic idct_in_valid, idct_in_ready, idct_out_valid, idct_idle;
  logic signed [DATA_W-1:0] dct_din [8], dct_dout [8], idct_din [8], idct_dout [8];

  mdct_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int expq [2][$];          // expected words, per core
  int n_cur;
  longint first_in, first_out [2], last_out [2];
  int n_outv [2], stalls;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Output monitors
  always @(posedge clk) if (rst_n) begin
    int e;
    if (dct_out_valid) begin
      if (n_outv[0] == 0) first_out[0] = cycle;
      last_out[0] = cycle;
      n_outv[0]++;
      for (int i = 0; i < n_cur; i++) begin
        e = (expq[0].size() > 0) ? expq[0].pop_front() : 99999;
        checks++;
        if (int'(dct_dout[i]) != e)
          fail($sformatf("forward mode %0d lane %0d got %0d expected %0d", dct_sel, i, dct_dout[i], e));
      end
    end
    if (idct_out_valid) begin
      if (n_outv[1] == 0) first_out[1] = cycle;
      last_out[1] = cycle;
      n_outv[1]++;
      for (int i = 0; i < n_cur; i++) begin
        e = (expq[1].size() > 0) ? expq[1].pop_front() : 99999;
        checks++;
        if (int'(idct_dout[i]) != e)
          fail($sformatf("inverse mode %0d lane %0d got %0d expected %0d", idct_sel, i, idct_dout[i], e));
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    blk_t blks [K];
    blk_t res;
    sel_e m;
    int n, run0, run1, lat, exp_lat;
    dct_sel = M_HAD2; idct_sel = M_HAD2;
    dct_in_valid = 1'b0; idct_in_valid = 1'b0;
    for (int c = 0; c < 8; c++) begin dct_din[c] = '0; idct_din[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    for (int mi = 0; mi < 8; mi++) begin
      m = sel_e'(mi);
      n = block_n(m);
      n_cur = n;
      n_outv[0] = 0; n_outv[1] = 0; stalls = 0;
      dct_sel = m; idct_sel = m;
      for (int b = 0; b < K; b++) begin
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            blks[b][r][c] = (r < n && c < n) ? longint'($signed(16'($urandom))) : 0;
        res = ref2d(m, 1'b0, blks[b]);
        for (int k = 0; k < n; k++) for (int i = 0; i < n; i++) expq[0].push_back(int'(res[k][i]));
        res = ref2d(m, 1'b1, blks[b]);
        for (int k = 0; k < n; k++) for (int i = 0; i < n; i++) expq[1].push_back(int'(res[k][i]));
      end
      // the mode register takes the new sel once both cores are empty
      #1;
      while (!(dct_in_ready && idct_in_ready)) @(posedge clk);
      #1;
      first_in = cycle;
      for (int b = 0; b < K; b++)
        for (int r = 0; r < n; r++) begin
          for (int c = 0; c < 8; c++) begin
            dct_din[c]  = DATA_W'(blks[b][r][c]);
            idct_din[c] = DATA_W'(blks[b][r][c]);
          end
          dct_in_valid = 1'b1; idct_in_valid = 1'b1;
          @(posedge clk);
          while (!(dct_in_ready && idct_in_ready)) begin
            stalls++;
            @(posedge clk);
          end
          #1;
        end
      dct_in_valid = 1'b0; idct_in_valid = 1'b0;
      while (!(dct_idle && idct_idle)) @(posedge clk);
      repeat (2) @(posedge clk);
      #1;
      // throughput checks
      checks += 5;
      if (stalls != 0) fail($sformatf("mode %0d: %0d input stall cycles", m, stalls));
      if (n_outv[0] != K * n || n_outv[1] != K * n)
        fail($sformatf("mode %0d: %0d/%0d output vectors, expected %0d", m, n_outv[0], n_outv[1], K * n));
      run0 = int'(last_out[0] - first_out[0] + 1);
      run1 = int'(last_out[1] - first_out[1] + 1);
      if (run0 != K * n) fail($sformatf("mode %0d: forward output spread over %0d clocks, expected %0d", m, run0, K * n));
      if (run1 != K * n) fail($sformatf("mode %0d: inverse output spread over %0d clocks, expected %0d", m, run1, K * n));
      if (expq[0].size() != 0 || expq[1].size() != 0) fail($sformatf("mode %0d: outputs missing", m));
      // latency: row unit (1, 3 or 4 clocks), n vectors to fill the buffer,
      // column unit again
      lat = (n == 8) ? 4 : ((n == 4) ? 3 : 1);
      exp_lat = 2 * lat + n;
      checks += 2;
      if (int'(first_out[0] - first_in) != exp_lat)
        fail($sformatf("mode %0d: forward latency %0d, expected %0d", m, first_out[0] - first_in, 2 * lat + n));
      if (int'(first_out[1] - first_in) != exp_lat)
        fail($sformatf("mode %0d: inverse latency %0d, expected %0d", m, first_out[1] - first_in, 2 * lat + n));
      $display("mode %0d (%0dx%0d): %0d blocks, latency fwd %0d / inv %0d clocks, %0d samples in %0d / %0d clocks = %0d / %0d samples per clock",
               m, n, n, K, first_out[0] - first_in, first_out[1] - first_in, K * n * n, run0, run1,
               (K * n * n) / run0, (K * n * n) / run1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
