// tb_mac_pe: checks one MAC unit against a reference computed in the
// testbench: weight load and hold, multiply-add of the partial sum from
// above, selection of the bypass partial sum when the row above is
// skipped, and the one-cycle pass-through of the activation.
module tb_mac_pe;
  import mocca_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  w_we, skip_above;
  act_t  w_i, x_i, x_o;
  psum_t psum_i, psum_byp_i, psum_o;
  int    checks = 0, failures = 0;

  mac_pe dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act_t  w_ref, x_exp;
    psum_t p_exp;
    w_we = 0; skip_above = 0; w_i = 0; x_i = 0; psum_i = 0; psum_byp_i = 0;
    w_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(posedge clk); #1;
      w_we       = ($urandom_range(0, 7) == 0);
      w_i        = act_t'($urandom);
      skip_above = $urandom_range(0, 1);
      x_i        = act_t'($urandom);
      psum_i     = psum_t'($urandom);
      psum_byp_i = psum_t'($urandom);
      // the product uses the weight held before this cycle's load
      p_exp = (skip_above ? psum_byp_i : psum_i) + psum_t'(int'(x_i) * int'(w_ref));
      x_exp = x_i;
      if (w_we) w_ref = w_i;
      @(posedge clk); #1;
      checks++;
      if (psum_o !== p_exp || x_o !== x_exp) begin
        failures++;
        if (failures < 10) $display("mismatch it=%0d psum %0d exp %0d x %0d exp %0d",
                                    it, psum_o, p_exp, x_o, x_exp);
      end
      w_we = 0;
      // second cycle with the same weight and no load
      x_i = act_t'($urandom); psum_i = psum_t'($urandom); skip_above = 0;
      p_exp = psum_i + psum_t'(int'(x_i) * int'(w_ref));
      @(posedge clk); #1;
      checks++;
      if (psum_o !== p_exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
