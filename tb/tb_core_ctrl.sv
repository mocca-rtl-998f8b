// tb_core_ctrl: runs whole tile commands on an 8 x 8 compute tile
// (mocca_core, sequenced by core_ctrl) against a bank modelled here with a
// settable access period. Rows 0 and 5 are outliers. Checks:
//  - overwrite pass with K below the usable rows, ReLU, scaling, no pooling;
//  - accumulate pass with K above the usable rows (clamped and flagged),
//    then max pooling over 2 vectors, with a slow bank (period 3);
//  - average pooling over 4 with no activation;
//  - the command latency 3N + M + 8 cycles for a command without writeback
//    at bank period 1, and that the weight load takes N cycles.
// Results are compared with W^T x computed here from the same data.
module tb_core_ctrl;
  import mocca_pkg::*;

  localparam int N     = 8;
  localparam int ACC_D = 64;
  localparam int MW    = 256;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              start, busy, done, k_clamped;
  tile_cmd_t         cmd;
  logic [N-1:0]      skip;
  logic              wf_push_valid, wf_push_ready;
  act_t              wf_push_data [N];
  logic              rq_valid, rq_ready, rq_we;
  logic [ADDR_W-1:0] rq_addr;
  logic [WORD_W-1:0] rq_wdata;
  logic              rs_valid;
  logic [WORD_W-1:0] rs_data;
  int                checks = 0, failures = 0;

  mocca_core #(.N(N), .ACC_D(ACC_D), .WF_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bank model: one access per `bper` cycles, read answer after bper
  logic [WORD_W-1:0] bmem [MW];
  int   bper = 1;
  int   bcnt = 0;
  logic bpend = 0;
  logic [WORD_W-1:0] bdata;
  assign rq_ready = (bcnt == 0);
  assign rs_valid = bpend && (bcnt == 0);
  assign rs_data  = bdata;
  always @(posedge clk) begin
    if (rq_valid && rq_ready) begin
      if (rq_we) bmem[rq_addr[7:0]] <= rq_wdata;
      else       bdata <= bmem[rq_addr[7:0]];
      bpend <= !rq_we;
      bcnt  <= bper - 1;
    end else begin
      if (bcnt != 0) bcnt <= bcnt - 1;
      if (rs_valid) bpend <= 1'b0;
    end
  end

  // ---- reference data
  act_t  W   [N][N];     // W[k][c], k = logical row
  act_t  X   [64][N];    // X[m][k]
  int    acc [ACC_D][N];

  function automatic int nrm(int x, int s, int sh);
    longint p;
    p = (longint'(x) * longint'(s)) >>> sh;
    return (p > 127) ? 127 : (p < -128) ? -128 : int'(p);
  endfunction

  task automatic push_weights(input int k);
    for (int r = 0; r < k; r++) begin
      for (int c = 0; c < N; c++) begin
        W[r][c] = act_t'($urandom_range(0, 255));
        wf_push_data[c] = W[r][c];
      end
      wf_push_valid = 1;
      @(posedge clk); #1;
      while (!wf_push_ready) begin @(posedge clk); #1; end
    end
    wf_push_valid = 0;
  endtask

  task automatic load_inputs(input int base, input int m);
    for (int i = 0; i < m; i++)
      for (int k = 0; k < N; k++) begin
        X[i][k] = act_t'($urandom_range(0, 255));
        bmem[base + i][k*8 +: 8] = X[i][k];
      end
  endtask

  task automatic run(input tile_cmd_t c, output int cycles);
    cmd = c;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (!done) begin @(posedge clk); #1; cycles++; end
  endtask

  task automatic model(input tile_cmd_t c, input int kuse);
    for (int i = 0; i < int'(c.num_vec); i++)
      for (int col = 0; col < N; col++) begin
        int s;
        s = 0;
        for (int k = 0; k < kuse; k++) s += int'(W[k][col]) * int'(X[i][k]);
        if (c.accumulate) acc[int'(c.acc_addr) + i][col] += s;
        else              acc[int'(c.acc_addr) + i][col] = s;
      end
  endtask

  task automatic check_out(input tile_cmd_t c);
    int w, nout;
    w = (c.pool_mode == POOL_NONE) ? 1 : (1 << c.pool_log2);
    nout = int'(c.num_vec) / w;
    for (int o = 0; o < nout; o++)
      for (int col = 0; col < N; col++) begin
        int e, v;
        for (int j = 0; j < w; j++) begin
          int a;
          a = acc[int'(c.acc_addr) + o * w + j][col];
          if (c.act_fn == ACT_RELU && a < 0) a = 0;
          v = nrm(a, int'(signed'(c.norm_scale)), int'(c.norm_shift));
          if (j == 0) e = v;
          else if (c.pool_mode == POOL_AVG) e += v;
          else if (v > e) e = v;
        end
        if (c.pool_mode == POOL_AVG) e = e >>> c.pool_log2;
        checks++;
        if (int'(signed'(bmem[int'(c.dst_addr) + o][col*8 +: 8])) != e) begin
          failures++;
          if (failures < 10) $display("out %0d col %0d got %0d exp %0d", o, col,
                                      signed'(bmem[int'(c.dst_addr) + o][col*8 +: 8]), e);
        end
      end
  endtask

  initial begin
    tile_cmd_t c;
    int cyc;
    start = 0; cmd = '0; wf_push_valid = 0;
    for (int i = 0; i < N; i++) wf_push_data[i] = '0;
    skip = 8'b0010_0001;        // R = 6 usable rows
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1: overwrite, K = 4, ReLU, no pooling, no writeback first (latency)
    push_weights(4);
    load_inputs(0, 12);
    c = '0;
    c.src_addr = 0; c.num_vec = 12; c.k_rows = 4; c.acc_addr = 3;
    c.accumulate = 0; c.writeback = 0;
    run(c, cyc);
    checks++;
    if (cyc != 3 * N + 12 + 8) begin
      failures++;
      $display("latency %0d exp %0d", cyc, 3 * N + 12 + 8);
    end
    checks++; if (k_clamped) failures++;
    model(c, 4);
    // same weights again: reload needed, push them once more
    for (int r = 0; r < 4; r++) begin
      for (int col = 0; col < N; col++) wf_push_data[col] = W[r][col];
      wf_push_valid = 1; @(posedge clk); #1;
    end
    wf_push_valid = 0;
    c.accumulate = 1; c.writeback = 1; c.act_fn = ACT_RELU;
    c.norm_scale = 16'd3; c.norm_shift = 5'd9; c.pool_mode = POOL_NONE;
    c.dst_addr = 100;
    run(c, cyc);
    model(c, 4);
    check_out(c);

    // 2: K = 8 > R = 6 is clamped; slow bank; max pool over 2
    bper = 3;
    push_weights(6);
    load_inputs(20, 16);
    c = '0;
    c.src_addr = 20; c.num_vec = 16; c.k_rows = 8; c.acc_addr = 30;
    c.accumulate = 0; c.writeback = 1; c.act_fn = ACT_RELU;
    c.norm_scale = 16'hfffd; c.norm_shift = 5'd8;
    c.pool_mode = POOL_MAX; c.pool_log2 = 1; c.dst_addr = 120;
    run(c, cyc);
    checks++; if (!k_clamped) failures++;
    model(c, 6);
    check_out(c);

    // 3: average pooling over 4, no activation, period 2
    bper = 2;
    push_weights(6);
    load_inputs(40, 8);
    c = '0;
    c.src_addr = 40; c.num_vec = 8; c.k_rows = 6; c.acc_addr = 0;
    c.writeback = 1; c.act_fn = ACT_NONE; c.norm_scale = 16'd1; c.norm_shift = 5'd7;
    c.pool_mode = POOL_AVG; c.pool_log2 = 2; c.dst_addr = 140;
    run(c, cyc);
    model(c, 6);
    check_out(c);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
