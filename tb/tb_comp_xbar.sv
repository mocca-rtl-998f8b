// tb_comp_xbar: banks answer random requesters (never two answers to one
// requester in a cycle); checks that each answer arrives at its
// destination one cycle later with its data, that no other output fires,
// and that direct_hit marks bank r -> array r.
module tb_comp_xbar;
  import mocca_pkg::*;

  localparam int NR = NUM_REQ;
  localparam int NB = NUM_BANKS;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0]     bk_valid;
  bank_rsp_t         bk [NB];
  logic [NR-1:0]     rs_valid, direct_hit;
  logic [WORD_W-1:0] rs_data [NR];
  int                checks = 0, failures = 0;
  int                directs = 0;

  comp_xbar dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NR-1:0]     ev, ed;
    logic [WORD_W-1:0] edata [NR];
    bk_valid = '0;
    for (int b = 0; b < NB; b++) bk[b] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic [NR-1:0] used;
      used = '0; ev = '0; ed = '0;
      for (int b = 0; b < NB; b++) begin
        int d;
        d = $urandom_range(0, NR - 1);
        bk_valid[b] = ($urandom_range(0, 2) != 0) && !used[d];
        bk[b].dst   = REQ_ID_W'(d);
        bk[b].rdata = {8{$urandom}};
        if (bk_valid[b]) begin
          used[d] = 1'b1; ev[d] = 1'b1; edata[d] = bk[b].rdata;
          ed[d] = (b == d);
        end
      end
      @(posedge clk); #1;
      bk_valid = '0;
      checks++;
      if (rs_valid !== ev || direct_hit !== ed) failures++;
      for (int r = 0; r < NR; r++) if (ev[r]) begin
        checks++;
        if (rs_data[r] !== edata[r]) failures++;
        if (ed[r]) directs++;
      end
    end
    if (directs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
