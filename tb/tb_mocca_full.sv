// tb_mocca_full: the end-to-end test of tb_mocca_top run on the
// accelerator at its full size: six 32 x 32 MAC arrays and six 4 MB banks,
// with the top's parameters left at their defaults. The host configures
// outlier rows, bank periods and a bank map mixing direct-via and crossbar
// pairings, loads 32 input vectors per tile, streams the weights, runs an
// overwrite pass and an accumulate + write-back pass on all six tiles at
// once and compares every result with W^T x computed here. The same
// mechanisms are counted and must each occur, and every tile read must
// take bank period + 1 cycles on either path.
module tb_mocca_full;
  import mocca_pkg::*;

  localparam int N     = ARRAY_N;
  localparam int M     = 32;      // input vectors per tile
  localparam int NC    = NUM_CORES;
  localparam int NB    = NUM_BANKS;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 cfg_we;
  logic [7:0]           cfg_addr;
  logic [31:0]          cfg_wdata, cfg_rdata;
  logic                 hq_valid, hq_ready, hq_we, hs_valid;
  logic [BANK_ID_W-1:0] hq_bank, w_core;
  logic [ADDR_W-1:0]    hq_addr;
  logic [WORD_W-1:0]    hq_wdata, hs_rdata;
  logic                 w_valid, w_ready;
  act_t                 w_data [N];
  logic [NC-1:0]        core_busy, core_done, ilv_direct_rsp;
  logic [NB-1:0]        ilv_direct_req;
  int                   checks = 0, failures = 0;

  mocca_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- event counters
  int n_direct = 0, n_xbar = 0, n_bank_stall = 0, n_host_wait = 0, n_wfull = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      if (dut.rs_valid[c] && ilv_direct_rsp[c]) n_direct++;
      if (dut.rs_valid[c] && !ilv_direct_rsp[c]) n_xbar++;
      if (dut.rq_valid[c] && !dut.rq_ready[c] && !dut.bk_ready[dut.bank_map[c]]) n_bank_stall++;
    end
    if (hq_valid && !hq_ready && dut.bk_ready[hq_bank]) n_host_wait++;
    if (w_valid && !w_ready) n_wfull++;
  end

  // ---- read latency: bank period + 1 (return crossbar), the same over the
  // direct via and over the central crossbars
  longint cyc = 0;
  longint rd_t [NC][$];
  int     n_lat_direct = 0, n_lat_xbar = 0, n_lat_bad = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int c = 0; c < NC; c++) begin
      if (dut.rs_valid[c]) begin
        longint t0;
        t0 = rd_t[c].pop_front();
        if (cyc - t0 != longint'(per[bmap[c]] + 1)) n_lat_bad++;
        else if (bmap[c] == c) n_lat_direct++;
        else n_lat_xbar++;
      end
      if (dut.rq_valid[c] && dut.rq_ready[c] && !dut.rq[c].we) rd_t[c].push_back(cyc);
    end
  end

  // ---- configuration chosen for this run
  logic [N-1:0] skip_of [NC];
  int           bmap [NC];
  int           per  [NB];
  act_t         W   [NC][N][N];
  act_t         X   [NC][M][N];
  int           acc [NC][M][N];
  int           R   [NC];

  task automatic cfg(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 8'(a); cfg_wdata = d;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic host_write(input int b, input int a, input logic [WORD_W-1:0] d);
    hq_valid = 1; hq_we = 1; hq_bank = BANK_ID_W'(b); hq_addr = ADDR_W'(a); hq_wdata = d;
    #1;
    while (!hq_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    hq_valid = 0;
  endtask

  task automatic host_read(input int b, input int a, output logic [WORD_W-1:0] d);
    hq_valid = 1; hq_we = 0; hq_bank = BANK_ID_W'(b); hq_addr = ADDR_W'(a);
    #1;
    while (!hq_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    hq_valid = 0;
    while (!hs_valid) begin @(posedge clk); #1; end
    d = hs_rdata;
  endtask

  task automatic push_weights(input int c, input int k);
    for (int r = 0; r < k; r++) begin
      w_valid = 1; w_core = BANK_ID_W'(c);
      for (int j = 0; j < N; j++) w_data[j] = W[c][r][j];
      #1;
      while (!w_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    w_valid = 0;
  endtask

  function automatic int nrm(int x, int s, int sh);
    longint p;
    p = (longint'(x) * longint'(s)) >>> sh;
    return (p > 127) ? 127 : (p < -128) ? -128 : int'(p);
  endfunction

  task automatic wait_all_done();
    logic [31:0] st;
    int guard;
    guard = 0;
    do begin
      cfg_addr = 8'h18; #1; st = cfg_rdata;
      // keep the host busy on the crossbar while the tiles run
      begin
        logic [WORD_W-1:0] d;
        host_read(guard % NB, 900, d);
      end
      guard++;
    end while (st[8 +: NC] != {NC{1'b1}} && guard < 100000);
    cfg(8'h18, {16'd0, 2'd0, {NC{1'b1}}, 8'd0});   // clear done bits
  endtask

  int kuse [NC], kreq [NC];
  int pmode [NC], plog [NC];
  int clamps = 0, skipped = 0, accum_passes = 0;
  int pool_seen [3];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    hq_valid = 0; hq_we = 0; hq_bank = 0; hq_addr = 0; hq_wdata = 0;
    w_valid = 0; w_core = 0;
    for (int j = 0; j < N; j++) w_data[j] = '0;
    pool_seen = '{0, 0, 0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // outlier rows (no two adjacent), bank periods, bank map (a permutation)
    skip_of[0] = '0;
    skip_of[1] = N'(1) << 2;
    skip_of[2] = (N'(1) << 0) | (N'(1) << (N - 1));
    skip_of[3] = (N'(1) << 1) | (N'(1) << 4);
    skip_of[4] = N'(1) << (N - 2);
    skip_of[5] = '0;
    per  = '{1, 2, 3, 1, 4, 2};
    bmap = '{0, 1, 3, 2, 5, 4};
    for (int c = 0; c < NC; c++) begin
      cfg(c, 32'(skip_of[c]));
      cfg(8'h10 + c, bmap[c]);
      R[c] = N - $countones(skip_of[c]);
      skipped += $countones(skip_of[c]);
    end
    for (int b = 0; b < NB; b++) cfg(8'h08 + b, per[b]);

    // inputs: tile c reads M vectors at address M*c of its bank
    for (int c = 0; c < NC; c++)
      for (int m = 0; m < M; m++) begin
        logic [WORD_W-1:0] wd;
        wd = '0;
        for (int k = 0; k < N; k++) begin
          X[c][m][k] = act_t'($urandom_range(0, 255));
          wd[k*8 +: 8] = X[c][m][k];
        end
        host_write(bmap[c], M * c + m, wd);
      end

    // two passes per tile: overwrite (no write-back), then accumulate + write-back
    for (int pass = 0; pass < 2; pass++) begin
      for (int c = 0; c < NC; c++) begin
        kreq[c] = (c == 3) ? N : (R[c] - (c % 2));   // tile 3 asks for more rows than usable
        kuse[c] = (kreq[c] > R[c]) ? R[c] : kreq[c];
        for (int r = 0; r < kuse[c]; r++)
          for (int j = 0; j < N; j++) W[c][r][j] = act_t'($urandom_range(0, 255));
        pmode[c] = c % 3;
        plog[c]  = 1 + (c % 2);
        cfg(8'h40 + 8 * c + 0, M * c);
        cfg(8'h40 + 8 * c + 1, M);
        cfg(8'h40 + 8 * c + 2, kreq[c]);
        cfg(8'h40 + 8 * c + 3, 0);
        cfg(8'h40 + 8 * c + 4, {22'd0, 2'(plog[c]), 2'(pmode[c]), 2'((c % 2 == 0) ? ACT_RELU : ACT_NONE),
                                2'b00, 1'(pass == 1), 1'(pass == 1)});
        cfg(8'h40 + 8 * c + 5, 512 + M * c);
        cfg(8'h40 + 8 * c + 6, {11'd0, 5'd10, 16'd5});
      end
      for (int c = 0; c < NC; c++) push_weights(c, kuse[c]);
      for (int c = 0; c < NC; c++) cfg(8'h40 + 8 * c + 7, 1);
      wait_all_done();
      for (int c = 0; c < NC; c++) begin
        for (int m = 0; m < M; m++)
          for (int col = 0; col < N; col++) begin
            int s;
            s = 0;
            for (int k = 0; k < kuse[c]; k++) s += int'(W[c][k][col]) * int'(X[c][m][k]);
            acc[c][m][col] = (pass == 1) ? acc[c][m][col] + s : s;
          end
        if (kreq[c] > R[c]) begin
          cfg_addr = 8'h18; #1;
          checks++;
          if (!cfg_rdata[16 + c]) failures++;
          clamps++;
        end
      end
    end
    accum_passes = NC;

    // read back and compare
    for (int c = 0; c < NC; c++) begin
      int w, nout;
      w = (pmode[c] == 0) ? 1 : (1 << plog[c]);
      nout = M / w;
      pool_seen[pmode[c]]++;
      for (int o = 0; o < nout; o++) begin
        logic [WORD_W-1:0] d;
        host_read(bmap[c], 512 + M * c + o, d);
        for (int col = 0; col < N; col++) begin
          int e, v;
          logic [7:0] g;
          for (int j = 0; j < w; j++) begin
            int a;
            a = acc[c][o * w + j][col];
            if (c % 2 == 0 && a < 0) a = 0;
            v = nrm(a, 5, 10);
            if (j == 0) e = v;
            else if (pmode[c] == 2) e += v;
            else if (v > e) e = v;
          end
          if (pmode[c] == 2) e = e >>> plog[c];
          g = d[col*8 +: 8];
          checks++;
          if (int'($signed(g)) != e) begin
            failures++;
            if (failures < 10) $display("tile %0d out %0d col %0d got %0d exp %0d",
                                        c, o, col, $signed(g), e);
          end
        end
      end
    end

    // weight FIFO back-pressure: push into tile 0's FIFO until it refuses
    for (int r = 0; r < 2 * N + 2; r++) begin
      w_valid = 1; w_core = 0;
      for (int j = 0; j < N; j++) w_data[j] = act_t'(r);
      @(posedge clk); #1;
      if (!w_ready) begin n_wfull++; break; end
    end
    w_valid = 0;

    $display("mechanisms: skipped_rows=%0d clamps=%0d bank_stalls=%0d direct=%0d crossbar=%0d host_waits=%0d wfifo_full=%0d accum=%0d pool none/max/avg=%0d/%0d/%0d",
             skipped, clamps, n_bank_stall, n_direct, n_xbar, n_host_wait, n_wfull, accum_passes,
             pool_seen[0], pool_seen[1], pool_seen[2]);
    $display("read latency: direct=%0d crossbar=%0d wrong=%0d", n_lat_direct, n_lat_xbar, n_lat_bad);
    checks++; if (n_lat_bad != 0 || n_lat_direct == 0 || n_lat_xbar == 0) failures++;
    checks++; if (skipped == 0)      failures++;
    checks++; if (clamps == 0)       failures++;
    checks++; if (n_bank_stall == 0) failures++;
    checks++; if (n_direct == 0)     failures++;
    checks++; if (n_xbar == 0)       failures++;
    checks++; if (n_host_wait == 0)  failures++;
    checks++; if (n_wfull == 0)      failures++;
    checks++; if (accum_passes == 0) failures++;
    for (int i = 0; i < 3; i++) begin checks++; if (pool_seen[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
