// tb_norm_pool_unit: random 32-bit inputs, scales and shifts; checks the
// int8 re-quantisation with saturation, max and average pooling over
// windows of 1, 2 and 4 vectors, and the two-cycle latency from the last
// vector of a window to out_valid.
module tb_norm_pool_unit;
  import mocca_pkg::*;

  localparam int N = 4;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear, in_valid, out_valid;
  logic [15:0] scale;
  logic [4:0]  shift;
  pool_mode_e pool_mode;
  logic [1:0] pool_log2;
  psum_t      in_data [N];
  act_t       out_data [N];
  int         checks = 0, failures = 0;
  int         sat_seen = 0;

  norm_pool_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_norm(int x, int s, int sh);
    longint p;
    p = longint'(x) * longint'(s);
    p = p >>> sh;
    if (p > 127)  return 127;
    if (p < -128) return -128;
    return int'(p);
  endfunction

  initial begin
    clear = 0; in_valid = 0; scale = 0; shift = 0; pool_mode = POOL_NONE; pool_log2 = 0;
    for (int c = 0; c < N; c++) in_data[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int trial = 0; trial < 300; trial++) begin
      int w, res [N], nv [N];
      pool_mode = pool_mode_e'($urandom_range(0, 2));
      pool_log2 = 2'($urandom_range(0, 2));
      scale     = 16'($urandom_range(0, 65535));
      shift     = 5'($urandom_range(4, 20));
      w = (pool_mode == POOL_NONE) ? 1 : (1 << pool_log2);
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      for (int i = 0; i < w; i++) begin
        in_valid = 1;
        for (int c = 0; c < N; c++) begin
          in_data[c] = psum_t'($urandom_range(0, 200000)) - 100000;
          nv[c] = ref_norm(in_data[c], int'(signed'(scale)), shift);
          if (nv[c] == 127 || nv[c] == -128) sat_seen++;
          if (i == 0) res[c] = nv[c];
          else if (pool_mode == POOL_AVG) res[c] += nv[c];
          else if (nv[c] > res[c]) res[c] = nv[c];
        end
        @(posedge clk); #1;
        in_valid = 0;
        // output only after the last vector of the window, two cycles late
        checks++;
        if (out_valid) failures++;
      end
      @(posedge clk); #1;
      checks++;
      if (!out_valid) failures++;
      for (int c = 0; c < N; c++) begin
        int e;
        e = (pool_mode == POOL_AVG) ? (res[c] >>> pool_log2) : res[c];
        checks++;
        if (int'(out_data[c]) != e) begin
          failures++;
          if (failures < 10) $display("mode %0d w %0d c %0d got %0d exp %0d",
                                      pool_mode, w, c, out_data[c], e);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid) failures++;
    end
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
