// tb_tbuf_ctrl: checks the transpose-buffer control unit on its own:
// the shift count wraps and the flow direction flips every n = 2, 4, 8
// vectors, out_valid is raised only for vectors of a complete block, and
// a drain of exactly n shifts starts when the input stops at a block
// boundary, after which the unit is empty.
module tb_tbuf_ctrl;
  import mdct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  sel_e sel = M_HAD2;
  logic in_valid = 1'b0, upstream_idle = 1'b1;
  logic shift, dir_h, out_valid, draining, full;
  logic [2:0] cnt;
  int checks = 0, failures = 0;

  tbuf_ctrl dut (.*);

  always #5 clk = !clk;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, outs, drains;
    logic d0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 8; m++) begin
      sel = sel_e'(m);
      n = block_n(sel);
      @(negedge clk);
      expect_eq("empty at start", full, 0);
      d0 = dir_h;
      outs = 0;
      // three blocks back to back
      upstream_idle = 1'b0;
      for (int k = 0; k < 3 * n; k++) begin
        in_valid = 1'b1;
        #1;
        expect_eq("shift follows input", shift, 1);
        expect_eq("out_valid only after the first block", out_valid, k >= n);
        expect_eq("direction", dir_h, d0 ^ ((k / n) % 2));
        expect_eq("count", cnt, k % n);
        if (out_valid) outs++;
        @(negedge clk);
      end
      // a gap in the middle of nothing: upstream still busy -> hold
      in_valid = 1'b0;
      #1;
      expect_eq("hold while upstream busy", shift, 0);
      @(negedge clk);
      upstream_idle = 1'b1;
      drains = 0;
      for (int k = 0; k < n + 3; k++) begin
        #1;
        if (shift) begin
          drains++;
          expect_eq("drain outputs", out_valid, 1);
          if (out_valid) outs++;
        end
        @(negedge clk);
      end
      expect_eq("drain length", drains, n);
      expect_eq("outputs per mode", outs, 3 * n);
      expect_eq("empty after drain", full, 0);
      expect_eq("not draining", draining, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
