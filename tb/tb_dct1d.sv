// tb_dct1d: streams random vectors through dct1d in all eight modes, back to
// back and with gaps, and compares every output with the matrix-product
// reference of mdct_ref_pkg. Also checks the latency of each mode (1, 3
// and 4 cycles for 2x2, 4x4 and 8x8) and the one-vector-per-clock rate.
module tb_dct1d;
  import mdct_pkg::*;
  import mdct_ref_pkg::*;

  localparam int W = DATA_W + GUARD_W;

  logic clk = 1'b0, rst_n = 1'b0;
  sel_e sel = M_HAD2;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] din [8];
  logic out_valid, busy;
  logic signed [W-1:0] dout [8];
  int checks = 0, failures = 0;
  longint cycle = 0;

  dct1d dut (.clk, .rst_n, .sel, .in_valid, .x(din), .out_valid, .y(dout), .busy);

  always #5 clk = !clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { vec_t v; longint t; } item_t;
  item_t q [$];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    item_t it;
    int n, lat;
    sel_e m;
    m = sel;
    n = block_n(m);
    lat = is_2x2(m) ? 1 : (is_4x4(m) ? 3 : 4);
    if (q.size() == 0) fail("unexpected output");
    else begin
      it = q.pop_front();
      checks++;
      if (cycle - it.t != lat) fail($sformatf("mode %0d latency %0d, expected %0d", m, cycle - it.t, lat));
      for (int i = 0; i < n; i++) begin
        checks++;
        if (longint'(dout[i]) != it.v[i])
          fail($sformatf("mode %0d lane %0d got %0d expected %0d", m, i, dout[i], it.v[i]));
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
    vec_t v;
    for (int i = 0; i < 8; i++) din[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 8; m++) begin
      @(negedge clk);
      sel = sel_e'(m);
      for (int k = 0; k < 60; k++) begin
        for (int i = 0; i < 8; i++) begin
          case (k)
            0: v[i] = 32767;
            1: v[i] = -32768;
            2: v[i] = (i % 2) ? 32767 : -32768;
            default: v[i] = longint'($signed(16'($urandom)));
          endcase
          din[i] = DATA_W'(v[i]);
        end
        in_valid = (k < 40) ? 1'b1 : 1'($urandom_range(0, 1));
        if (in_valid) q.push_back('{v: fwd1d(sel_e'(m), v), t: cycle});
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (8) @(negedge clk);
      checks++;
      if (q.size() != 0) fail($sformatf("mode %0d: %0d outputs missing", m, q.size()));
      q.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
