// tb_activation_unit: random vectors through ReLU and through the
// identity; checks values and the one-cycle latency of out_valid.
module tb_activation_unit;
  import mocca_pkg::*;

  localparam int N = 8;

  logic    clk = 1'b0, rst_n = 1'b0;
  act_fn_e fn;
  logic    in_valid, out_valid;
  psum_t   in_data [N], out_data [N];
  int      checks = 0, failures = 0;

  activation_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    psum_t exp [N];
    logic  v;
    fn = ACT_NONE; in_valid = 0;
    for (int c = 0; c < N; c++) in_data[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      fn       = ($urandom_range(0, 1) != 0) ? ACT_RELU : ACT_NONE;
      v        = ($urandom_range(0, 3) != 0);
      in_valid = v;
      for (int c = 0; c < N; c++) begin
        in_data[c] = psum_t'($urandom);
        exp[c] = (fn == ACT_RELU && in_data[c][PSUM_W-1]) ? '0 : in_data[c];
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v) failures++;
      if (v) for (int c = 0; c < N; c++) begin
        checks++;
        if (out_data[c] !== exp[c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
