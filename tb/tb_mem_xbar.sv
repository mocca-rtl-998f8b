// tb_mem_xbar: 7 requesters send random requests to 6 banks whose ready
// is random. Checks that every bank receives only requests aimed at it,
// with src set to the sender, that each request is delivered exactly once
// and in order per requester, that the ready returned to a requester
// matches the grant, that contending requesters are all served (round
// robin: no request waits longer than NREQ grants of its bank), and that
// direct_grant marks requester b -> bank b.
module tb_mem_xbar;
  import mocca_pkg::*;

  localparam int NR = NUM_REQ;
  localparam int NB = NUM_BANKS;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [NR-1:0]        rq_valid, rq_ready;
  logic [BANK_ID_W-1:0] rq_bank [NR];
  bank_req_t            rq      [NR];
  logic [NB-1:0]        bk_valid, bk_ready, direct_grant;
  bank_req_t            bk      [NB];
  int                   checks = 0, failures = 0;
  int                   directs = 0, crossed = 0;

  mem_xbar dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq [NR];      // sequence number of the pending request
  int waitc [NR];

  initial begin
    rq_valid = '0; bk_ready = '0;
    for (int i = 0; i < NR; i++) begin
      rq_bank[i] = '0; rq[i] = '0; seq[i] = 0; waitc[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NR; i++) begin
      rq_valid[i] = 1'b1;
      rq_bank[i]  = BANK_ID_W'($urandom_range(0, NB - 1));
      rq[i]       = '{we: 1'b1, addr: ADDR_W'(i), wdata: WORD_W'(seq[i]), src: '0};
    end
    for (int t = 0; t < 5000; t++) begin
      // in the first phase every requester hammers bank 2
      if (t < 300) for (int i = 0; i < NR; i++) if (rq_valid[i] && waitc[i] == 0) rq_bank[i] = 2;
      for (int b = 0; b < NB; b++) bk_ready[b] = ($urandom_range(0, 3) != 0);
      #1;
      for (int b = 0; b < NB; b++) begin
        if (bk_valid[b]) begin
          int s;
          s = int'(bk[b].src);
          checks++;
          if (s >= NR || !rq_valid[s] || int'(rq_bank[s]) != b ||
              bk[b].addr != ADDR_W'(s) || bk[b].wdata != WORD_W'(seq[s]) ||
              rq_ready[s] != bk_ready[b] || direct_grant[b] != (s == b && s < NR - 1))
            failures++;
          if (bk_ready[b]) begin
            if (s == b) directs++; else crossed++;
          end
        end
      end
      // every ready must be backed by a delivery
      for (int i = 0; i < NR; i++) if (rq_ready[i]) begin
        checks++;
        if (!(bk_valid[rq_bank[i]] && int'(bk[rq_bank[i]].src) == i && bk_ready[rq_bank[i]]))
          failures++;
      end
      @(posedge clk); #1;
      for (int i = 0; i < NR; i++) begin
        if (rq_valid[i] && rq_ready[i]) begin
          seq[i]++;
          waitc[i] = 0;
          rq_valid[i] = ($urandom_range(0, 3) != 0);
          rq_bank[i]  = BANK_ID_W'($urandom_range(0, NB - 1));
          rq[i]       = '{we: 1'b1, addr: ADDR_W'(i), wdata: WORD_W'(seq[i]), src: '0};
        end else if (rq_valid[i]) begin
          waitc[i]++;
          checks++;
          if (waitc[i] > 8 * NR) failures++;   // starvation
        end else begin
          rq_valid[i] = ($urandom_range(0, 1) != 0);
        end
      end
    end
    if (directs == 0 || crossed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
