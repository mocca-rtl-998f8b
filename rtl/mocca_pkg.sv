// mocca_pkg: sizes, types and the bank-request format shared by the MOCCA
// accelerator. The accelerator stacks six 32x32 int8 weight-stationary MAC
// arrays (compute layer) under six 4 MB SRAM banks (memory layer). One
// memory word is one activation vector: ARRAY_N int8 lanes, 256 bits.
// The array size, bank count and bank size follow the design description;
// word width, address width and the request format are choices of this RTL.
package mocca_pkg;

  // Compute layer
  parameter int unsigned ARRAY_N    = 32;   // MAC array is ARRAY_N x ARRAY_N
  parameter int unsigned NUM_CORES  = 6;    // one MAC array per SRAM bank
  parameter int unsigned DATA_W     = 8;    // activations and weights
  parameter int unsigned PSUM_W     = 32;   // partial sums / accumulators

  // Memory layer
  parameter int unsigned NUM_BANKS  = 6;
  parameter longint unsigned BANK_BYTES = 64'd4 * 1024 * 1024;   // 4 MB
  parameter int unsigned WORD_W     = ARRAY_N * DATA_W;            // 256
  parameter int unsigned BANK_WORDS = int'(BANK_BYTES / 64'(WORD_W / 8)); // 131072
  parameter int unsigned ADDR_W     = $clog2(BANK_WORDS);          // 17
  parameter int unsigned BANK_ID_W  = $clog2(NUM_BANKS);           // 3
  parameter int unsigned NUM_REQ    = NUM_CORES + 1;               // cores + host
  parameter int unsigned REQ_ID_W   = $clog2(NUM_REQ);             // 3
  parameter int unsigned PERIOD_W   = 4;    // bank access period, cycles

  // Accumulator and post-processing
  parameter int unsigned ACC_DEPTH  = 512;
  parameter int unsigned ACC_AW     = $clog2(ACC_DEPTH);

  typedef logic signed [DATA_W-1:0] act_t;
  typedef logic signed [PSUM_W-1:0] psum_t;

  // Activation function select (ReLU or none)
  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,
    ACT_RELU  = 2'd1
  } act_fn_e;

  // Pooling mode of the normalization/pooling unit
  typedef enum logic [1:0] {
    POOL_NONE = 2'd0,
    POOL_MAX  = 2'd1,
    POOL_AVG  = 2'd2
  } pool_mode_e;

  // One request to a bank (read or write of one word)
  typedef struct packed {
    logic                 we;
    logic [ADDR_W-1:0]    addr;
    logic [WORD_W-1:0]    wdata;
    logic [REQ_ID_W-1:0]  src;     // requester, used to route the read data back
  } bank_req_t;

  // One read response from a bank
  typedef struct packed {
    logic [WORD_W-1:0]    rdata;
    logic [REQ_ID_W-1:0]  dst;
  } bank_rsp_t;

  // Command for one compute tile (one layer tile on one MAC array)
  typedef struct packed {
    logic [ADDR_W-1:0]    src_addr;   // first input vector in the bank
    logic [15:0]          num_vec;    // number of input vectors M (>=1)
    logic [5:0]           k_rows;     // weight rows used, 1..ARRAY_N
    logic [ACC_AW-1:0]    acc_addr;   // first accumulator entry
    logic                 accumulate; // add to accumulator instead of overwrite
    logic                 writeback;  // drain accumulators to the bank afterwards
    logic [ADDR_W-1:0]    dst_addr;   // first output vector in the bank
    act_fn_e              act_fn;
    logic [15:0]          norm_scale; // signed multiplier
    logic [4:0]           norm_shift; // arithmetic right shift after multiply
    pool_mode_e           pool_mode;
    logic [1:0]           pool_log2;  // pool window = 1 << pool_log2 vectors
  } tile_cmd_t;

endpackage
