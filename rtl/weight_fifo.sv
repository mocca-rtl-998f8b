// weight_fifo: first-in first-out buffer of weight rows between the
// off-chip weight stream and a MAC array.
//
// Each entry is one row of N int8 weights, the unit in which the array is
// loaded. Push and pop use valid/ready handshakes; a push and a pop may
// happen in the same cycle. The output (pop_data) is the oldest entry and
// is valid whenever pop_valid is high (first-word fall-through). Storage
// is a circular buffer of DEPTH entries. That weights are staged in a FIFO
// follows the design description; the depth (two full array loads) and the
// handshake are this design's choices.
module weight_fifo
  import mocca_pkg::*;
#(
  parameter int unsigned N     = ARRAY_N,
  parameter int unsigned DEPTH = 2 * N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  output logic  push_ready,
  input  act_t  push_data [N],
  output logic  pop_valid,
  input  logic  pop_ready,
  output act_t  pop_data  [N],
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  act_t          mem [DEPTH][N];
  logic [PW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign push_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (count != '0);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  always_comb begin
    for (int c = 0; c < N; c++) pop_data[c] = mem[rp][c];
  end

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      for (int c = 0; c < N; c++) mem[wp][c] <= push_data[c];
    end
  end

endmodule
