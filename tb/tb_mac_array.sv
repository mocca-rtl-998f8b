// tb_mac_array: loads random weights into an 8 x 8 array, marks random
// non-adjacent rows as outliers, and streams vectors with the skew the
// array expects (usable row k is fed k cycles after usable row 0). Every
// bottom output is compared with sum over usable rows of w[row][col] *
// x[k(row)], computed here; skipped rows hold random weights and receive
// random activations, which must not change the result. Also checks that
// column c of vector m appears exactly R + c cycles after it was fed.
module tb_mac_array;
  import mocca_pkg::*;

  localparam int N = 8;
  localparam int M = 20;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] skip, w_row_we;
  act_t         w_data [N], x_in [N];
  psum_t        psum_out [N];
  int           checks = 0, failures = 0;

  mac_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t w   [N][N];
  act_t vec [M][N];
  int   lidx [N];
  int   R;
  int   skipped_rows_seen = 0;

  task automatic run_trial(input logic [N-1:0] sk);
    int    t, m, k;
    psum_t exp;
    skip = sk;
    R = 0;
    for (int p = 0; p < N; p++) begin
      lidx[p] = R;
      if (!sk[p]) R++;
      else skipped_rows_seen++;
    end
    // load weights, one row per cycle
    for (int p = 0; p < N; p++) begin
      @(posedge clk); #1;
      w_row_we = '0;
      w_row_we[p] = 1'b1;
      for (int c = 0; c < N; c++) begin
        w[p][c] = act_t'($urandom);
        w_data[c] = w[p][c];
      end
    end
    for (int mm = 0; mm < M; mm++)
      for (int kk = 0; kk < N; kk++) vec[mm][kk] = act_t'($urandom);
    @(posedge clk); #1;
    w_row_we = '0;
    // stream: cycle t feeds vector t - k into usable row k
    for (t = 0; t < M + 2 * N + 2; t++) begin
      // outputs visible in this cycle
      for (int c = 0; c < N; c++) begin
        m = t - R - c;
        if (m >= 0 && m < M) begin
          exp = '0;
          for (int p = 0; p < N; p++)
            if (!sk[p]) exp += psum_t'(int'(w[p][c]) * int'(vec[m][lidx[p]]));
          checks++;
          if (psum_out[c] !== exp) begin
            failures++;
            if (failures < 10) $display("skip=%b t=%0d c=%0d m=%0d got %0d exp %0d",
                                        sk, t, c, m, psum_out[c], exp);
          end
        end
      end
      for (int p = 0; p < N; p++) begin
        k = lidx[p];
        m = t - k;
        if (sk[p])                x_in[p] = act_t'($urandom);
        else if (m >= 0 && m < M) x_in[p] = vec[m][k];
        else                      x_in[p] = '0;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    skip = '0; w_row_we = '0;
    for (int c = 0; c < N; c++) begin w_data[c] = '0; x_in[c] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_trial(8'b0000_0000);
    run_trial(8'b0000_0100);
    run_trial(8'b1000_0001);
    run_trial(8'b0101_0010);
    for (int i = 0; i < 6; i++) begin
      logic [N-1:0] sk;
      sk = N'($urandom);
      sk = sk & ~(sk << 1);   // no two adjacent skipped rows
      run_trial(sk);
    end
    if (skipped_rows_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
