// fetch_unit: a Fleet fetch unit that dispatches a code bag split into a
// literal portion and an instruction portion.
//
// A code bag is described by three separate inputs, each with its own inbox:
// Address, NumLiterals and NumInstructions. Address points at the lowest word
// of the literal portion, which extends upward for NumLiterals words; the
// instruction portion sits directly below it and extends downward for
// NumInstructions words. The unit fires when all three inboxes hold a value
// and then, with both streams interleaved on one memory read port:
//
//   * sends each literal word to one of N_OUT literal FIFOs, each followed by
//     an outbox L_c1 .. L_cN. In round-robin mode the word at address a goes
//     to FIFO a mod N_OUT; in serial mode (serial_mode high when the unit
//     fires) every literal goes to FIFO Address mod N_OUT, keeping them all in
//     one ordered stream;
//   * reads the instructions from the lowest address up, rewrites generic
//     literal references L_k in their source and destination fields to this
//     unit's outbox port ids (literal_rewrite), and queues them for the
//     instruction horn.
//
// Interfaces (all valid/ready unless noted):
//   nlit_*, addr_*, nins_*   descriptor inputs; serial_mode is a level
//   mem_req_* / mem_resp_*   one read port; responses in order, one cycle each
//   lit_out_*[i]             outbox L_c(i+1) towards the switch fabric
//   ins_out_*                rewritten instructions towards the instruction horn
//
// Timing with a memory that accepts every request and answers one cycle
// later: the unit fires one cycle after the last descriptor field arrives,
// issues its first read the next cycle and then reads one word per cycle;
// a literal appears at its outbox three cycles after its read is issued, an
// instruction two cycles after.
//
// The document gives the three inputs, the firing rule, the memory layout,
// the modulo mapping, the rewriting rule, the serial mode and the outboxes
// (three by default, as for fetch unit C). The shared memory port, the FIFO depths,
// the handshakes, the instruction encoding and the port ids are this design's
// own. Synchronous active-low reset.
module fetch_unit
  import fetch_pkg::*;
#(
  parameter int unsigned N_OUT         = 3,
  parameter int unsigned LIT_DEPTH     = 3,
  parameter int unsigned INS_DEPTH     = 3,
  parameter port_t       UNIT_LIT_BASE = 8'h20
) (
  input  logic              clk,
  input  logic              rst_n,
  // code bag descriptor
  input  logic              nlit_valid,
  output logic              nlit_ready,
  input  count_t            nlit_data,
  input  logic              addr_valid,
  output logic              addr_ready,
  input  addr_t             addr_data,
  input  logic              nins_valid,
  output logic              nins_ready,
  input  count_t            nins_data,
  input  logic              serial_mode,
  // memory read port
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output addr_t             mem_req_addr,
  input  logic              mem_resp_valid,
  input  word_t             mem_resp_data,
  // literal outboxes L_c1 .. L_cN
  output logic [N_OUT-1:0]  lit_out_valid,
  input  logic [N_OUT-1:0]  lit_out_ready,
  output word_t             lit_out_data [N_OUT],
  // to the instruction horn
  output logic              ins_out_valid,
  input  logic              ins_out_ready,
  output word_t             ins_out_data,
  // status
  output logic              busy
);

  localparam int unsigned SEL_W  = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int unsigned LCNT_W = $clog2(LIT_DEPTH + 1);
  localparam int unsigned ICNT_W = $clog2(INS_DEPTH + 1);

  // ---------------------------------------------------------------- inboxes
  logic   fire;
  logic   nlit_v, addr_v, nins_v;
  count_t nlit_q, nins_q;
  addr_t  addr_q;

  inbox #(.WIDTH(COUNT_W)) u_inbox_nlit (
    .clk, .rst_n, .in_valid(nlit_valid), .in_ready(nlit_ready), .in_data(nlit_data),
    .out_valid(nlit_v), .out_data(nlit_q), .take(fire));
  inbox #(.WIDTH(ADDR_W)) u_inbox_addr (
    .clk, .rst_n, .in_valid(addr_valid), .in_ready(addr_ready), .in_data(addr_data),
    .out_valid(addr_v), .out_data(addr_q), .take(fire));
  inbox #(.WIDTH(COUNT_W)) u_inbox_nins (
    .clk, .rst_n, .in_valid(nins_valid), .in_ready(nins_ready), .in_data(nins_data),
    .out_valid(nins_v), .out_data(nins_q), .take(fire));

  // ------------------------------------------------------------- controller
  logic [N_OUT-1:0]  lit_push;
  word_t             lit_word;
  logic [LCNT_W-1:0] lit_count [N_OUT];
  logic              ins_push;
  word_t             ins_raw, ins_rewritten;
  logic [ICNT_W-1:0] ins_count;
  logic [SEL_W-1:0]  base_mod;
  logic              serial;

  fetch_ctrl #(.N_OUT(N_OUT), .LIT_DEPTH(LIT_DEPTH), .INS_DEPTH(INS_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .nlit_valid(nlit_v), .nlit(nlit_q),
    .addr_valid(addr_v), .addr(addr_q),
    .nins_valid(nins_v), .nins(nins_q),
    .serial_mode, .fire,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
    .lit_push, .lit_data(lit_word), .lit_count,
    .ins_push, .ins_data(ins_raw), .ins_count,
    .base_mod, .serial, .busy);

  // ------------------------------------------------ literal FIFOs, outboxes
  for (genvar i = 0; i < N_OUT; i++) begin : g_lit
    logic  f_valid, f_ready, f_push_ready;
    word_t f_data;

    fetch_fifo #(.WIDTH(WORD_W), .DEPTH(LIT_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push_valid(lit_push[i]), .push_ready(f_push_ready), .push_data(lit_word),
      .pop_valid(f_valid), .pop_ready(f_ready), .pop_data(f_data),
      .count(lit_count[i]));

    outbox #(.WIDTH(WORD_W)) u_outbox (
      .clk, .rst_n,
      .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
      .out_valid(lit_out_valid[i]), .out_ready(lit_out_ready[i]),
      .out_data(lit_out_data[i]));

    // The controller reserves room before it reads, so no push is refused.
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      lit_push[i] |-> f_push_ready);
  end

  // ------------------------------------------------ rewrite, instruction queue
  logic ins_push_ready;

  literal_rewrite #(.N_OUT(N_OUT), .UNIT_LIT_BASE(UNIT_LIT_BASE)) u_rewrite (
    .in_instr(ins_raw), .base_mod, .serial, .out_instr(ins_rewritten));

  fetch_fifo #(.WIDTH(WORD_W), .DEPTH(INS_DEPTH)) u_ins_fifo (
    .clk, .rst_n,
    .push_valid(ins_push), .push_ready(ins_push_ready), .push_data(ins_rewritten),
    .pop_valid(ins_out_valid), .pop_ready(ins_out_ready), .pop_data(ins_out_data),
    .count(ins_count));

  a_no_ins_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    ins_push |-> ins_push_ready);

endmodule
