// tb_ctrl_regs: checks reset values (period 1, bank c for array c, no
// skipped rows), write and read-back of masks, periods and bank map, that
// the command fields land in the right tile_cmd_t members, that a write to
// +7 gives a one-cycle start pulse for that array only, and the sticky
// done bits with write-one-to-clear.
module tb_ctrl_regs;
  import mocca_pkg::*;

  localparam int NC = NUM_CORES;
  localparam int NB = NUM_BANKS;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 cfg_we;
  logic [7:0]           cfg_addr;
  logic [31:0]          cfg_wdata, cfg_rdata;
  logic [ARRAY_N-1:0]   skip     [NC];
  logic [PERIOD_W-1:0]  period   [NB];
  logic [BANK_ID_W-1:0] bank_map [NC];
  tile_cmd_t            cmd      [NC];
  logic [NC-1:0]        start, busy, done, k_clamped;
  int                   checks = 0, failures = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [31:0] d);
    cfg_we = 1; cfg_addr = 8'(a); cfg_wdata = d;
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic expect_rd(input int a, input logic [31:0] e);
    cfg_addr = 8'(a); #1;
    checks++;
    if (cfg_rdata !== e) begin
      failures++;
      $display("read %h got %h exp %h", a, cfg_rdata, e);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; busy = '0; done = '0; k_clamped = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      expect_rd(c, 0);
      expect_rd(8'h10 + c, c);
    end
    for (int b = 0; b < NB; b++) expect_rd(8'h08 + b, 1);
    for (int c = 0; c < NC; c++) begin
      logic [31:0] m;
      m = $urandom & 32'h5555_5555;
      wr(c, m); expect_rd(c, m);
      checks++; if (skip[c] !== m) failures++;
      wr(8'h10 + c, (c + 3) % NB); expect_rd(8'h10 + c, (c + 3) % NB);
      checks++; if (bank_map[c] !== BANK_ID_W'((c + 3) % NB)) failures++;
    end
    for (int b = 0; b < NB; b++) begin
      wr(8'h08 + b, b + 2); expect_rd(8'h08 + b, b + 2);
      checks++; if (period[b] !== PERIOD_W'(b + 2)) failures++;
    end
    for (int c = 0; c < NC; c++) begin
      int base;
      base = 8'h40 + 8 * c;
      wr(base + 0, 1000 + c);
      wr(base + 1, 17 + c);
      wr(base + 2, 9);
      wr(base + 3, 40 + c);
      wr(base + 4, {22'd0, 2'd1, 2'(POOL_MAX), 2'(ACT_RELU), 2'b00, 1'b1, 1'b0});
      wr(base + 5, 2000 + c);
      wr(base + 6, {11'd0, 5'd7, 16'hff80});
      checks++;
      if (cmd[c].src_addr != ADDR_W'(1000 + c) || cmd[c].num_vec != 16'(17 + c) ||
          cmd[c].k_rows != 6'd9 || cmd[c].acc_addr != ACC_AW'(40 + c) ||
          cmd[c].accumulate != 1'b0 || cmd[c].writeback != 1'b1 ||
          cmd[c].act_fn != ACT_RELU || cmd[c].pool_mode != POOL_MAX ||
          cmd[c].pool_log2 != 2'd1 || cmd[c].dst_addr != ADDR_W'(2000 + c) ||
          cmd[c].norm_scale != 16'hff80 || cmd[c].norm_shift != 5'd7)
        failures++;
      cfg_we = 1; cfg_addr = 8'(base + 7); cfg_wdata = 0;
      @(posedge clk); #1;
      cfg_we = 0;
      checks++; if (start !== NC'(1 << c)) failures++;
      @(posedge clk); #1;
      checks++; if (start !== '0) failures++;
    end
    busy = 6'b101010; k_clamped = 6'b000011;
    done = 6'b000101;
    @(posedge clk); #1;
    done = '0;
    expect_rd(8'h18, {10'd0, 6'b000011, 2'd0, 6'b000101, 2'd0, 6'b101010});
    wr(8'h18, 32'h0000_0100);   // clear done of array 0
    expect_rd(8'h18, {10'd0, 6'b000011, 2'd0, 6'b000100, 2'd0, 6'b101010});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
