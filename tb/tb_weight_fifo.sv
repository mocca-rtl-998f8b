// tb_weight_fifo: random pushes and pops against a queue model; checks
// the order and contents of every popped row, the count, that the FIFO
// refuses pushes only when full and that it fills up and empties.
module tb_weight_fifo;
  import mocca_pkg::*;

  localparam int N = 4;
  localparam int DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid, push_ready, pop_valid, pop_ready;
  act_t push_data [N], pop_data [N];
  logic [$clog2(DEPTH+1)-1:0] count;
  int   checks = 0, failures = 0;
  int   fulls = 0;

  weight_fifo #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef act_t row_t [N];
  act_t q [$][N];

  initial begin
    push_valid = 0; pop_ready = 0;
    for (int c = 0; c < N; c++) push_data[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int bias;
      bias = (t / 300) % 2;   // phases that fill and phases that drain
      push_valid = ($urandom_range(0, 3) < (bias ? 1 : 3));
      pop_ready  = ($urandom_range(0, 3) < (bias ? 3 : 1));
      for (int c = 0; c < N; c++) push_data[c] = act_t'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || push_ready != (q.size() < DEPTH) ||
          pop_valid != (q.size() > 0)) failures++;
      if (q.size() == DEPTH) fulls++;
      if (pop_valid && pop_ready) begin
        checks++;
        for (int c = 0; c < N; c++) if (pop_data[c] !== q[0][c]) begin
          failures++;
        end
      end
      @(posedge clk);
      if (pop_valid && pop_ready) q.pop_front();
      if (push_valid && push_ready) begin
        act_t r [N];
        for (int c = 0; c < N; c++) r[c] = push_data[c];
        q.push_back(r);
      end
      #1;
    end
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
