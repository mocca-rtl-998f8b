// core_ctrl: sequencer of one compute tile (MAC array with its weight
// FIFO, IFP loader, OFP accumulator and post-processing units).
//
// A command (tile_cmd_t) computes, for M input vectors x_m read from the
// tile's SRAM bank, acc[acc_addr+m] (+)= W^T x_m with a K x N weight block
// W taken from the weight FIFO, and optionally writes the activated,
// normalised and pooled results back to the bank. It runs in phases:
//   LOADW  - visits the N physical rows; each usable (not skipped) row gets
//            the next weight row from the FIFO while fewer than K have been
//            loaded, and zeros after that. Skipped rows are not loaded.
//   STREAM - issues the M bank reads in order and hands every returned
//            vector to the IFP loader, together with a tag (entry, accumulate
//            flag) that is delayed by R cycles (R = usable rows) so it reaches
//            the accumulator with column 0 of the matching result.
//   FLUSH  - waits until the last result has been accumulated.
//   DRAIN  - if writeback is set: reads the M entries one at a time, lets
//            each pass through activation and normalisation/pooling, and
//            writes every produced int8 vector to dst_addr, dst_addr+1, ...
// done pulses for one cycle at the end; busy is high from start to done.
// K is clamped to R if it is larger (flagged on k_clamped).
//
// The phase split follows the weight-stationary flow of the design
// description (weights preloaded and kept, inputs streamed, outputs
// accumulated at the edge); the command format, the one-at-a-time drain
// and all handshakes are this design's choices.
module core_ctrl
  import mocca_pkg::*;
#(
  parameter int unsigned N     = ARRAY_N,
  parameter int unsigned DEPTH = ACC_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  tile_cmd_t                cmd,
  input  logic [N-1:0]             skip,
  output logic                     busy,
  output logic                     done,
  output logic                     k_clamped,
  output tile_cmd_t                cmd_q,       // latched command, for the datapath
  // weight FIFO and array weight load
  input  logic                     wf_valid,
  output logic                     wf_ready,
  output logic [N-1:0]             w_row_we,
  output logic                     w_zero,      // load zeros instead of FIFO data
  // bank port
  output logic                     rq_valid,
  input  logic                     rq_ready,
  output logic                     rq_we,
  output logic [ADDR_W-1:0]        rq_addr,
  output logic [WORD_W-1:0]        rq_wdata,
  input  logic                     rs_valid,
  output logic                     vec_valid,   // to the IFP loader
  // accumulator
  output logic                     acc_valid,
  output logic [$clog2(DEPTH)-1:0] acc_addr,
  output logic                     acc_accum,
  output logic                     acc_rd_en,
  output logic [$clog2(DEPTH)-1:0] acc_rd_addr,
  // post-processing
  output logic                     np_clear,
  input  logic                     np_valid,
  input  act_t                     np_data [N]
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned RW = $clog2(N) + 1;
  localparam int unsigned TW = AW + 2;
  localparam int unsigned FLUSH_CYC = 2 * N + 4;

  typedef enum logic [2:0] {S_IDLE, S_LOADW, S_STREAM, S_FLUSH, S_DRAIN, S_DONE} state_e;
  state_e state;

  logic [RW-1:0] r_eff;       // usable rows
  logic [RW-1:0] k_eff;
  logic [RW-1:0] prow, lrow;
  logic [15:0]   issued, received, rd_idx;
  logic [ADDR_W-1:0] wr_addr;
  logic [$clog2(FLUSH_CYC+1)-1:0] fcnt;
  logic [3:0]    inflight;    // drain pipeline occupancy, one bit per stage
  logic          wb_pending;
  logic [WORD_W-1:0] wb_data;

  always_comb begin
    r_eff = '0;
    for (int p = 0; p < N; p++) r_eff = r_eff + RW'(!skip[p]);
  end

  assign busy = (state != S_IDLE);

  // ---- weight load
  always_comb begin
    w_row_we = '0;
    w_zero   = 1'b0;
    wf_ready = 1'b0;
    if (state == S_LOADW && !skip[prow[RW-2:0]]) begin
      if (lrow < k_eff) begin
        wf_ready = 1'b1;
        w_row_we[prow[RW-2:0]] = wf_valid;
      end else begin
        w_zero = 1'b1;
        w_row_we[prow[RW-2:0]] = 1'b1;
      end
    end
  end

  logic loadw_step;
  assign loadw_step = (state == S_LOADW) &&
                      (skip[prow[RW-2:0]] || lrow >= k_eff || wf_valid);

  // ---- tag delay line: R cycles
  logic [TW-1:0] tag_in;
  logic [TW-1:0] tsr [N];
  assign vec_valid = (state == S_STREAM) && rs_valid;
  assign tag_in    = {vec_valid, cmd_q.accumulate, AW'(cmd_q.acc_addr + AW'(received))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) tsr[j] <= '0;
    end else begin
      tsr[0] <= tag_in;
      for (int j = 1; j < N; j++) tsr[j] <= tsr[j-1];
    end
  end

  always_comb begin
    logic [TW-1:0] t;
    t = tsr[(r_eff == '0) ? 0 : int'(r_eff) - 1];
    {acc_valid, acc_accum, acc_addr} = t;
  end

  // ---- bank port
  logic drain_can_issue;
  assign drain_can_issue = (state == S_DRAIN) && (rd_idx < cmd_q.num_vec) &&
                           (inflight == '0) && !wb_pending && !np_valid;

  always_comb begin
    rq_valid = 1'b0;
    rq_we    = 1'b0;
    rq_addr  = '0;
    rq_wdata = wb_data;
    if (state == S_STREAM && issued < cmd_q.num_vec) begin
      rq_valid = 1'b1;
      rq_addr  = cmd_q.src_addr + ADDR_W'(issued);
    end else if (state == S_DRAIN && wb_pending) begin
      rq_valid = 1'b1;
      rq_we    = 1'b1;
      rq_addr  = wr_addr;
    end
  end

  assign acc_rd_en   = drain_can_issue;
  assign acc_rd_addr = AW'(cmd_q.acc_addr + AW'(rd_idx));
  assign np_clear    = (state == S_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd_q      <= '0;
      done       <= 1'b0;
      k_clamped  <= 1'b0;
      k_eff      <= '0;
      prow       <= '0;
      lrow       <= '0;
      issued     <= '0;
      received   <= '0;
      rd_idx     <= '0;
      wr_addr    <= '0;
      fcnt       <= '0;
      inflight   <= '0;
      wb_pending <= 1'b0;
      wb_data    <= '0;
    end else begin
      done     <= 1'b0;
      inflight <= {inflight[2:0], acc_rd_en};
      unique case (state)
        S_IDLE: if (start) begin
          cmd_q     <= cmd;
          state     <= S_LOADW;
          prow      <= '0;
          lrow      <= '0;
          issued    <= '0;
          received  <= '0;
          rd_idx    <= '0;
          wr_addr   <= cmd.dst_addr;
          k_clamped <= (RW'(cmd.k_rows) > r_eff);
          k_eff     <= (RW'(cmd.k_rows) > r_eff) ? r_eff : RW'(cmd.k_rows);
        end
        S_LOADW: if (loadw_step) begin
          if (!skip[prow[RW-2:0]]) lrow <= lrow + 1'b1;
          if (prow == RW'(N - 1)) state <= S_STREAM;
          prow <= prow + 1'b1;
        end
        S_STREAM: begin
          if (rq_valid && rq_ready) issued <= issued + 1'b1;
          if (vec_valid) begin
            received <= received + 1'b1;
            if (received + 1'b1 == cmd_q.num_vec) begin
              state <= S_FLUSH;
              fcnt  <= '0;
            end
          end
        end
        S_FLUSH: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt == ($bits(fcnt))'(FLUSH_CYC)) state <= cmd_q.writeback ? S_DRAIN : S_DONE;
        end
        S_DRAIN: begin
          if (acc_rd_en) rd_idx <= rd_idx + 1'b1;
          if (np_valid) begin
            wb_pending <= 1'b1;
            for (int c = 0; c < N; c++) wb_data[c*DATA_W +: DATA_W] <= np_data[c];
          end else if (wb_pending && rq_ready) begin
            wb_pending <= 1'b0;
            wr_addr    <= wr_addr + 1'b1;
          end
          if (rd_idx == cmd_q.num_vec && inflight == '0 && !wb_pending && !np_valid)
            state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_stream_only_in_stream: assert property (@(posedge clk) disable iff (!rst_n)
    rs_valid |-> (state == S_STREAM))
    else $error("core_ctrl: read data outside the stream phase");

endmodule
