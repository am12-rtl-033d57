// fetch_fifo: first-in first-out word buffer of the fetch unit.
//
// One of these sits in front of every literal outbox, and one holds rewritten
// instructions on their way to the instruction horn. Words leave in the order
// they entered, which keeps literals from lower addresses ahead of literals
// from higher addresses in the same outbox, as the document requires.
//
// Storage is a circular array of DEPTH words with read and write indices that
// wrap at DEPTH, so DEPTH need not be a power of two; `count` reports the
// number of words held, which the fetch controller uses to reserve room
// before it asks memory for a word. Push and pop use valid/ready; a push into
// a full FIFO is refused (push_ready low), also when a pop happens in the
// same cycle. Data pushed at one edge can be popped from the next cycle on.
//
// The default depth of 3 matches the three cells drawn in each literal FIFO of
// the fetch unit diagram; the document states no depth.
module fetch_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 3,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_valid,
  output logic             push_ready,
  input  logic [WIDTH-1:0] push_data,
  output logic             pop_valid,
  input  logic             pop_ready,
  output logic [WIDTH-1:0] pop_data,
  output logic [CNT_W-1:0] count
);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [IDX_W-1:0] wr_q, rd_q;
  logic [CNT_W-1:0] cnt_q;
  logic             do_push, do_pop;

  assign push_ready = cnt_q != CNT_W'(DEPTH);
  assign pop_valid  = cnt_q != '0;
  assign pop_data   = mem_q[rd_q];
  assign count      = cnt_q;
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [IDX_W-1:0] next_idx(logic [IDX_W-1:0] i);
    return (i == IDX_W'(DEPTH - 1)) ? '0 : i + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= next_idx(wr_q);
      if (do_pop)  rd_q <= next_idx(rd_q);
      cnt_q <= cnt_q + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wr_q] <= push_data;
  end

endmodule
