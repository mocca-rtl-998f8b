// mocca_core: one compute tile of the computing layer: a weight FIFO, an
// IFP loader, an N x N MAC array with outlier skipping, an OFP accumulator,
// the activation unit and the normalization/pooling unit, sequenced by
// core_ctrl.
//
// Data flow: weight rows are pushed into the FIFO from outside; on start
// the controller loads them into the usable rows of the array. Input
// vectors come from the tile's bank port (rq_*/rs_*), pass through the
// loader into the array, and the column results are accumulated. On
// writeback the accumulated vectors go through activation and
// normalization/pooling and are written back as int8 vectors through the
// same bank port. Which bank the port reaches is decided outside (the bank
// map of ctrl_regs). Timing of each part is given in its own module.
module mocca_core
  import mocca_pkg::*;
#(
  parameter int unsigned N         = ARRAY_N,
  parameter int unsigned ACC_D     = ACC_DEPTH,
  parameter int unsigned WF_DEPTH  = 2 * N
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  tile_cmd_t         cmd,
  input  logic [N-1:0]      skip,
  output logic              busy,
  output logic              done,
  output logic              k_clamped,
  // weight stream
  input  logic              wf_push_valid,
  output logic              wf_push_ready,
  input  act_t              wf_push_data [N],
  // bank port
  output logic              rq_valid,
  input  logic              rq_ready,
  output logic              rq_we,
  output logic [ADDR_W-1:0] rq_addr,
  output logic [WORD_W-1:0] rq_wdata,
  input  logic              rs_valid,
  input  logic [WORD_W-1:0] rs_data
);

  localparam int unsigned AW = $clog2(ACC_D);

  tile_cmd_t cmd_q;

  logic     wf_valid, wf_ready;
  act_t     wf_data [N];
  logic [N-1:0] w_row_we;
  logic     w_zero;
  act_t     w_data  [N];

  logic     vec_valid;
  act_t     vec     [N];
  act_t     x_row   [N];
  psum_t    psum_out[N];

  logic          acc_valid, acc_accum, acc_rd_en, acc_rd_valid;
  logic [AW-1:0] acc_addr, acc_rd_addr;
  psum_t         acc_rd_data [N];

  logic     act_valid;
  psum_t    act_data [N];
  logic     np_clear, np_valid;
  act_t     np_data  [N];

  weight_fifo #(.N(N), .DEPTH(WF_DEPTH)) u_wfifo (
    .clk, .rst_n,
    .push_valid (wf_push_valid),
    .push_ready (wf_push_ready),
    .push_data  (wf_push_data),
    .pop_valid  (wf_valid),
    .pop_ready  (wf_ready),
    .pop_data   (wf_data),
    .count      ()
  );

  always_comb begin
    for (int c = 0; c < N; c++) begin
      w_data[c] = w_zero ? act_t'(0) : wf_data[c];
      vec[c]    = act_t'(rs_data[c*DATA_W +: DATA_W]);
    end
  end

  ifp_loader #(.N(N)) u_loader (
    .clk, .rst_n,
    .skip      (skip),
    .vec_valid (vec_valid),
    .vec       (vec),
    .x_row     (x_row)
  );

  mac_array #(.N(N)) u_array (
    .clk, .rst_n,
    .skip      (skip),
    .w_row_we  (w_row_we),
    .w_data    (w_data),
    .x_in      (x_row),
    .psum_out  (psum_out)
  );

  ofp_accumulator #(.N(N), .DEPTH(ACC_D)) u_acc (
    .clk, .rst_n,
    .in_valid (acc_valid),
    .in_addr  (acc_addr),
    .in_accum (acc_accum),
    .in_psum  (psum_out),
    .rd_en    (acc_rd_en),
    .rd_addr  (acc_rd_addr),
    .rd_valid (acc_rd_valid),
    .rd_data  (acc_rd_data)
  );

  activation_unit #(.N(N)) u_act (
    .clk, .rst_n,
    .fn        (cmd_q.act_fn),
    .in_valid  (acc_rd_valid),
    .in_data   (acc_rd_data),
    .out_valid (act_valid),
    .out_data  (act_data)
  );

  norm_pool_unit #(.N(N)) u_np (
    .clk, .rst_n,
    .clear     (np_clear),
    .scale     (cmd_q.norm_scale),
    .shift     (cmd_q.norm_shift),
    .pool_mode (cmd_q.pool_mode),
    .pool_log2 (cmd_q.pool_log2),
    .in_valid  (act_valid),
    .in_data   (act_data),
    .out_valid (np_valid),
    .out_data  (np_data)
  );

  core_ctrl #(.N(N), .DEPTH(ACC_D)) u_ctrl (
    .clk, .rst_n,
    .start, .cmd, .skip, .busy, .done, .k_clamped,
    .cmd_q       (cmd_q),
    .wf_valid    (wf_valid),
    .wf_ready    (wf_ready),
    .w_row_we    (w_row_we),
    .w_zero      (w_zero),
    .rq_valid, .rq_ready, .rq_we, .rq_addr, .rq_wdata,
    .rs_valid,
    .vec_valid   (vec_valid),
    .acc_valid   (acc_valid),
    .acc_addr    (acc_addr),
    .acc_accum   (acc_accum),
    .acc_rd_en   (acc_rd_en),
    .acc_rd_addr (acc_rd_addr),
    .np_clear    (np_clear),
    .np_valid    (np_valid),
    .np_data     (np_data)
  );

endmodule
