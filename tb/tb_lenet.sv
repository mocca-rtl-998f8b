// tb_lenet: runs the two convolution layers of LeNet-5 (8-bit) on one
// full-size compute tile (32 x 32 array, 512-entry accumulator), with two
// outlier rows switched out, against a bank modelled here (period 1).
//
// conv1: 28x28x1 input, 5x5 kernels, 6 output channels -> 24x24x6, ReLU,
//        re-quantised, 2x2 max pooling -> 12x12x6. Each input vector is the
//        25-element patch of one output pixel; pixels are ordered so that
//        the four pixels of a pooling window are consecutive. 576 vectors
//        exceed the accumulator, so the layer runs as two commands of 288.
// conv2: 12x12x6 (the pooled conv1 results read back from the bank),
//        5x5x6 kernels, 16 output channels -> 8x8x16, ReLU, 2x2 max
//        pooling -> 4x4x16. The 150-element patch is split over five
//        passes (K = 30 each, the 30 usable rows), the first overwriting and
//        the others accumulating, the last writing back.
// fc1..fc3: 256 -> 120 -> 84 -> 10 matrix-vector products (M = 1). Each
//        group of 32 outputs is one column block; the input is split into
//        passes of 30 elements that accumulate, the last one writes back
//        (ReLU on fc1 and fc2, none on fc3).
// Every layer's output is compared with a reference computed here from the
// layer input the hardware itself produced.
module tb_lenet;
  import mocca_pkg::*;

  localparam int N     = ARRAY_N;
  localparam int MW    = 4096;

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

  mocca_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank model, one access per cycle
  logic [WORD_W-1:0] bmem [MW];
  logic bpend = 0;
  logic [WORD_W-1:0] bdata;
  assign rq_ready = 1'b1;
  assign rs_valid = bpend;
  assign rs_data  = bdata;
  always @(posedge clk) begin
    bpend <= rq_valid && !rq_we;
    if (rq_valid) begin
      if (rq_we) bmem[rq_addr[11:0]] <= rq_wdata;
      else       bdata <= bmem[rq_addr[11:0]];
    end
  end

  function automatic int nrm(int x, int s, int sh);
    longint p;
    p = (longint'(x) * longint'(s)) >>> sh;
    return (p > 127) ? 127 : (p < -128) ? -128 : int'(p);
  endfunction

  task automatic run(input tile_cmd_t c);
    cmd = c;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin @(posedge clk); #1; end
  endtask

  task automatic push_row(input int vals [N]);
    for (int j = 0; j < N; j++) wf_push_data[j] = act_t'(vals[j]);
    wf_push_valid = 1;
    #1;
    while (!wf_push_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    wf_push_valid = 0;
  endtask

  // pixel order: pooling window (py, px) then the four pixels of it
  function automatic void pix(input int idx, input int ow, output int oy, output int ox);
    int win, sub, pw;
    pw  = ow / 2;
    win = idx / 4; sub = idx % 4;
    oy = 2 * (win / pw) + sub / 2;
    ox = 2 * (win % pw) + sub % 2;
  endfunction

  int img  [28][28];
  int w1   [6][25];
  int p1   [12][12][6];     // pooled conv1 (from the hardware)
  int w2   [16][150];
  int SC = 3, SH = 6;

  initial begin
    tile_cmd_t c;
    int row [N];
    start = 0; cmd = '0; wf_push_valid = 0;
    for (int j = 0; j < N; j++) wf_push_data[j] = '0;
    skip = (N'(1) << 3) | (N'(1) << 20);       // two outlier rows: 30 usable
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int y = 0; y < 28; y++) for (int x = 0; x < 28; x++) img[y][x] = $urandom_range(0, 127);
    for (int o = 0; o < 6; o++) for (int k = 0; k < 25; k++) w1[o][k] = int'($urandom_range(0, 60)) - 30;
    for (int o = 0; o < 16; o++) for (int k = 0; k < 150; k++) w2[o][k] = int'($urandom_range(0, 40)) - 20;

    // ---------------- conv1
    for (int i = 0; i < 576; i++) begin
      int oy, ox;
      pix(i, 24, oy, ox);
      bmem[i] = '0;
      for (int k = 0; k < 25; k++) bmem[i][k*8 +: 8] = 8'(img[oy + k / 5][ox + k % 5]);
    end
    for (int half = 0; half < 2; half++) begin
      for (int k = 0; k < 25; k++) begin
        for (int o = 0; o < N; o++) row[o] = (o < 6) ? w1[o][k] : 0;
        push_row(row);
      end
      c = '0;
      c.src_addr = ADDR_W'(288 * half); c.num_vec = 288; c.k_rows = 25; c.acc_addr = 0;
      c.writeback = 1; c.act_fn = ACT_RELU; c.norm_scale = 16'(SC); c.norm_shift = 5'(SH + 4);
      c.pool_mode = POOL_MAX; c.pool_log2 = 2; c.dst_addr = ADDR_W'(1000 + 72 * half);
      run(c);
    end
    for (int wi = 0; wi < 144; wi++) begin
      int py, px;
      py = wi / 12; px = wi % 12;
      for (int o = 0; o < N; o++) begin
        int e, got;
        e = -1000;
        for (int s = 0; s < 4; s++) begin
          int oy, ox, a, v;
          oy = 2 * py + s / 2; ox = 2 * px + s % 2;
          a = 0;
          if (o < 6) for (int k = 0; k < 25; k++) a += w1[o][k] * img[oy + k / 5][ox + k % 5];
          if (a < 0) a = 0;
          v = nrm(a, SC, SH + 4);
          if (v > e) e = v;
        end
        got = int'($signed(bmem[1000 + wi][o*8 +: 8]));
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("conv1 win %0d ch %0d got %0d exp %0d", wi, o, got, e);
        end
        if (o < 6) p1[py][px][o] = got;
      end
    end

    // ---------------- conv2: five passes of 30 patch elements
    for (int pass = 0; pass < 5; pass++) begin
      for (int i = 0; i < 64; i++) begin
        int oy, ox;
        pix(i, 8, oy, ox);
        bmem[2000 + i] = '0;
        for (int k = 0; k < 30; k++) begin
          int e, ch, ky, kx;
          e  = pass * 30 + k;          // patch element: (channel, ky, kx)
          ch = e / 25; ky = (e % 25) / 5; kx = e % 5;
          bmem[2000 + i][k*8 +: 8] = 8'(p1[oy + ky][ox + kx][ch]);
        end
      end
      for (int k = 0; k < 30; k++) begin
        for (int o = 0; o < N; o++) row[o] = (o < 16) ? w2[o][pass * 30 + k] : 0;
        push_row(row);
      end
      c = '0;
      c.src_addr = 2000; c.num_vec = 64; c.k_rows = 30; c.acc_addr = 0;
      c.accumulate = (pass != 0); c.writeback = (pass == 4); c.act_fn = ACT_RELU;
      c.norm_scale = 16'(SC); c.norm_shift = 5'(SH + 3);
      c.pool_mode = POOL_MAX; c.pool_log2 = 2; c.dst_addr = 3000;
      run(c);
      checks++;
      if (k_clamped) failures++;
    end
    for (int wi = 0; wi < 16; wi++) begin
      int py, px;
      py = wi / 4; px = wi % 4;
      for (int o = 0; o < N; o++) begin
        int e, got;
        e = -1000;
        for (int s = 0; s < 4; s++) begin
          int oy, ox, a, v;
          oy = 2 * py + s / 2; ox = 2 * px + s % 2;
          a = 0;
          if (o < 16)
            for (int k = 0; k < 150; k++)
              a += w2[o][k] * p1[oy + (k % 25) / 5][ox + k % 5][k / 25];
          if (a < 0) a = 0;
          v = nrm(a, SC, SH + 3);
          if (v > e) e = v;
        end
        got = int'($signed(bmem[3000 + wi][o*8 +: 8]));
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("conv2 win %0d ch %0d got %0d exp %0d", wi, o, got, e);
        end
      end
    end
    // ---------------- fully connected layers
    begin
      int x0 [], x1 [], x2 [], x3 [];
      x0 = new[256];
      for (int wi = 0; wi < 16; wi++)
        for (int o = 0; o < 16; o++) x0[wi * 16 + o] = int'($signed(bmem[3000 + wi][o*8 +: 8]));
      fc(x0, 256, 120, 1'b1, x1);
      fc(x1, 120, 84, 1'b1, x2);
      fc(x2, 84, 10, 1'b0, x3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one fully connected layer, checked against a reference; returns the
  // hardware's outputs
  task automatic fc(input int x [], input int nin, input int nout, input logic relu,
                    output int y []);
    int wt [][];
    int npass;
    tile_cmd_t c;
    int row [N];
    y = new[nout];
    wt = new[nout];
    foreach (wt[o]) begin
      wt[o] = new[nin];
      foreach (wt[o][k]) wt[o][k] = int'($urandom_range(0, 40)) - 20;
    end
    npass = (nin + 29) / 30;
    for (int g = 0; g < (nout + N - 1) / N; g++) begin
      for (int p = 0; p < npass; p++) begin
        bmem[3500] = '0;
        for (int k = 0; k < 30; k++)
          if (p * 30 + k < nin) bmem[3500][k*8 +: 8] = 8'(x[p * 30 + k]);
        for (int k = 0; k < 30; k++) begin
          for (int o = 0; o < N; o++)
            row[o] = (g * N + o < nout && p * 30 + k < nin) ? wt[g * N + o][p * 30 + k] : 0;
          push_row(row);
        end
        c = '0;
        c.src_addr = 3500; c.num_vec = 1; c.k_rows = 30; c.acc_addr = 9;
        c.accumulate = (p != 0); c.writeback = (p == npass - 1);
        c.act_fn = relu ? ACT_RELU : ACT_NONE;
        c.norm_scale = 16'(SC); c.norm_shift = 5'(SH + 4);
        c.pool_mode = POOL_NONE; c.dst_addr = ADDR_W'(3600 + g);
        run(c);
      end
      for (int o = 0; o < N && g * N + o < nout; o++) begin
        int a, e, got;
        a = 0;
        for (int k = 0; k < nin; k++) a += wt[g * N + o][k] * x[k];
        if (relu && a < 0) a = 0;
        e = nrm(a, SC, SH + 4);
        got = int'($signed(bmem[3600 + g][o*8 +: 8]));
        y[g * N + o] = got;
        checks++;
        if (got != e) begin
          failures++;
          if (failures < 10) $display("fc %0d->%0d out %0d got %0d exp %0d", nin, nout, g * N + o, got, e);
        end
      end
    end
  endtask
endmodule
