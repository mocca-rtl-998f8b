// tb_sram_bank: writes and reads a small bank at access periods 1..5
// (and 0, meaning 1); checks read data against a model, that a read
// answers exactly `period` cycles after acceptance, that the bank is
// ready again in that cycle, and that the answer carries the requester id.
module tb_sram_bank;
  import mocca_pkg::*;

  localparam int WORDS = 64;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [PERIOD_W-1:0] period;
  logic                req_valid, req_ready, rsp_valid;
  bank_req_t           req;
  bank_rsp_t           rsp;
  int                  checks = 0, failures = 0;

  sram_bank #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WORD_W-1:0] model [WORDS];

  function automatic logic [WORD_W-1:0] rnd_word();
    logic [WORD_W-1:0] w;
    for (int i = 0; i < WORD_W / 32; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic access(input logic we, input int a, input logic [REQ_ID_W-1:0] src, input int per);
    int waitc;
    req_valid = 1;
    req = '{we: we, addr: ADDR_W'(a), wdata: rnd_word(), src: src};
    while (!req_ready) begin @(posedge clk); #1; end
    if (we) model[a] = req.wdata;
    @(posedge clk); #1;
    req_valid = 0;
    if (!we) begin
      waitc = 1;
      while (!rsp_valid && waitc < 40) begin @(posedge clk); #1; waitc++; end
      checks++;
      if (waitc != ((per == 0) ? 1 : per)) begin
        failures++;
        $display("period %0d: answer after %0d cycles", per, waitc);
      end
      checks++;
      if (rsp.rdata !== model[a] || rsp.dst !== src) failures++;
      checks++;
      if (!req_ready) failures++;
    end else begin
      // a write keeps the bank busy for the period as well
      for (int i = 1; i < ((per == 0) ? 1 : per); i++) begin
        checks++;
        if (req_ready) failures++;
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    period = 1; req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int per = 0; per <= 5; per++) begin
      period = PERIOD_W'(per);
      for (int a = 0; a < WORDS; a++) access(1'b1, a, '0, per);
      for (int i = 0; i < 100; i++)
        access($urandom_range(0, 2) == 0, $urandom_range(0, WORDS - 1),
               REQ_ID_W'($urandom_range(0, NUM_REQ - 1)), per);
    end
    // back-to-back reads at period 1: one word per cycle
    period = 1;
    req_valid = 1;
    for (int a = 0; a < 8; a++) begin
      req = '{we: 1'b0, addr: ADDR_W'(a), wdata: '0, src: '0};
      @(posedge clk); #1;
      checks++;
      if (!rsp_valid || rsp.rdata !== model[a]) failures++;
    end
    req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
