// tb_ofp_accumulator: feeds skewed column results (column c arriving c
// cycles after its tag) with random overwrite/accumulate tags, including
// back-to-back updates of one entry, and reads every entry back; compares
// with a model and checks the N-1 cycle update latency.
module tb_ofp_accumulator;
  import mocca_pkg::*;

  localparam int N = 4;
  localparam int DEPTH = 16;
  localparam int T = 400;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, in_accum, rd_en, rd_valid;
  logic [3:0]  in_addr, rd_addr;
  psum_t       in_psum [N], rd_data [N];
  int          checks = 0, failures = 0;

  ofp_accumulator #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  psum_t model [DEPTH][N];
  psum_t vals  [T][N];
  logic  tv [T], ta [T];
  int    tadr [T];

  initial begin
    in_valid = 0; in_accum = 0; in_addr = 0; rd_en = 0; rd_addr = 0;
    for (int c = 0; c < N; c++) in_psum[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // first pass overwrites every entry, then random traffic
    for (int t = 0; t < T; t++) begin
      tv[t]   = (t < DEPTH) ? 1'b1 : ($urandom_range(0, 3) != 0);
      ta[t]   = (t < DEPTH) ? 1'b0 : ($urandom_range(0, 4) != 0);
      tadr[t] = (t < DEPTH) ? t : ((t % 7 == 0) ? tadr[t-1] : $urandom_range(0, DEPTH-1));
      for (int c = 0; c < N; c++) vals[t][c] = psum_t'($urandom_range(0, 2000)) - 1000;
    end
    for (int t = 0; t < T + N; t++) begin
      if (t < T) begin
        in_valid = tv[t]; in_accum = ta[t]; in_addr = tadr[t][3:0];
      end else begin
        in_valid = 0;
      end
      for (int c = 0; c < N; c++)
        in_psum[c] = (t - c >= 0 && t - c < T) ? vals[t-c][c] : psum_t'($urandom);
      @(posedge clk); #1;
    end
    for (int t = 0; t < T; t++)
      if (tv[t])
        for (int c = 0; c < N; c++)
          model[tadr[t]][c] = ta[t] ? model[tadr[t]][c] + vals[t][c] : vals[t][c];
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1; rd_addr = a[3:0];
      @(posedge clk); #1;
      rd_en = 0;
      checks++;
      if (!rd_valid) failures++;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (rd_data[c] !== model[a][c]) begin
          failures++;
          if (failures < 10) $display("entry %0d col %0d got %0d exp %0d", a, c, rd_data[c], model[a][c]);
        end
      end
    end
    // latency: a tag in cycle t is written at the end of cycle t+N-1
    in_valid = 1; in_accum = 0; in_addr = 4'd5;
    for (int c = 0; c < N; c++) in_psum[c] = psum_t'(0);
    in_psum[0] = psum_t'(777);
    @(posedge clk); #1;
    in_valid = 0;
    repeat (N - 2) @(posedge clk);
    #1 rd_en = 1; rd_addr = 4'd5;
    @(posedge clk); #1;   // read sampled before the write: old value
    checks++;
    if (rd_data[0] === psum_t'(777)) failures++;
    @(posedge clk); #1;   // write has happened
    checks++;
    if (rd_data[0] !== psum_t'(777)) failures++;
    rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
