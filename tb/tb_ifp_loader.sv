// tb_ifp_loader: presents random vectors (with random bubbles) to an 8-row
// loader under several outlier masks and checks every cycle that physical
// row p carries element k = (usable rows above p) of the vector presented
// k cycles earlier, zero for a bubble, and zero on skipped rows.
module tb_ifp_loader;
  import mocca_pkg::*;

  localparam int N = 8;
  localparam int T = 200;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] skip;
  logic         vec_valid;
  act_t         vec [N], x_row [N];
  int           checks = 0, failures = 0;

  ifp_loader #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  act_t hist [T][N];
  logic hv   [T];

  initial begin
    logic [N-1:0] masks [4];
    masks[0] = 8'b0000_0000; masks[1] = 8'b0010_0001;
    masks[2] = 8'b1010_1010; masks[3] = 8'b0100_0100;
    skip = '0; vec_valid = 0;
    for (int c = 0; c < N; c++) vec[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (masks[i]) begin
      int lidx [N];
      int r;
      skip = masks[i];
      r = 0;
      for (int p = 0; p < N; p++) begin lidx[p] = r; if (!skip[p]) r++; end
      for (int t = 0; t < T; t++) begin
        hv[t] = ($urandom_range(0, 3) != 0);
        for (int k = 0; k < N; k++) hist[t][k] = act_t'($urandom);
        vec_valid = hv[t];
        for (int k = 0; k < N; k++) vec[k] = hist[t][k];
        #1;
        for (int p = 0; p < N; p++) begin
          act_t exp;
          int   src;
          src = t - lidx[p];
          if (skip[p] || src < 0 || !hv[src]) exp = '0;
          else                                exp = hist[src][lidx[p]];
          if (t >= N) begin
            checks++;
            if (x_row[p] !== exp) begin
              failures++;
              if (failures < 10) $display("mask %b t=%0d p=%0d got %0d exp %0d",
                                          skip, t, p, x_row[p], exp);
            end
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
