// fetch_ctrl: firing rule, address generation and memory sequencing of the
// fetch unit.
//
// The unit fires when NumLiterals, Address and NumInstructions are all present
// and the previous code bag has been fully requested. Firing consumes the
// three values and starts two streams that run side by side:
//
//   literal stream      words Address .. Address+NumLiterals-1, lowest first;
//                       word at address a goes to literal FIFO a mod N_OUT
//                       (round-robin mode), or every word goes to FIFO
//                       Address mod N_OUT (serial mode).
//   instruction stream  words Address-NumInstructions .. Address-1, lowest
//                       first, so the canonical order (lesser address first)
//                       is the order in which they reach the instruction horn.
//
// Both streams share one memory read port. When both have a word to fetch and
// room to put it, the port alternates between them. A word is only requested
// when its destination FIFO has a free slot counting the word already in
// flight, so a response is always accepted. One request is outstanding at a
// time; a new one may be issued in the cycle the previous response returns,
// so a memory answering in one cycle delivers a word per cycle.
//
// Memory port: mem_req_valid/ready/addr; while mem_req_valid is high and
// mem_req_ready low the request holds steady. The memory answers each
// accepted request, in order, with one cycle of mem_resp_valid and the word.
//
// The serial mode is sampled from serial_mode when the unit fires. base_mod
// and serial describe the bag whose words are arriving, for the rewrite
// stage; they change only at firing, and firing waits until no response of
// the previous bag is pending.
//
// From the document: the three inputs, the firing rule, both address ranges,
// the modulo-N_OUT mapping and its ordering, and the serial mode. This
// design's own: the shared port and its alternation, the order of the
// instruction reads, one outstanding request, and how serial mode is selected.
module fetch_ctrl
  import fetch_pkg::*;
#(
  parameter int unsigned N_OUT     = 3,
  parameter int unsigned LIT_DEPTH = 3,
  parameter int unsigned INS_DEPTH = 3,
  localparam int unsigned SEL_W   = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned LCNT_W  = $clog2(LIT_DEPTH + 1),
  localparam int unsigned ICNT_W  = $clog2(INS_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // descriptor inboxes
  input  logic                   nlit_valid,
  input  count_t                 nlit,
  input  logic                   addr_valid,
  input  addr_t                  addr,
  input  logic                   nins_valid,
  input  count_t                 nins,
  input  logic                   serial_mode,
  output logic                   fire,
  // memory read port
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output addr_t                  mem_req_addr,
  input  logic                   mem_resp_valid,
  input  word_t                  mem_resp_data,
  // literal FIFOs
  output logic [N_OUT-1:0]       lit_push,
  output word_t                  lit_data,
  input  logic [LCNT_W-1:0]      lit_count [N_OUT],
  // instruction path
  output logic                   ins_push,
  output word_t                  ins_data,
  input  logic [ICNT_W-1:0]      ins_count,
  // bag context for the rewrite stage
  output logic [SEL_W-1:0]       base_mod,
  output logic                   serial,
  output logic                   busy
);

  // Current bag
  addr_t            lit_addr_q, ins_addr_q;
  count_t           lit_rem_q, ins_rem_q;
  logic [SEL_W-1:0] lit_sel_q, base_q;
  logic             serial_q;
  // Request in flight
  logic             out_q;         // a response is pending
  logic             out_lit_q;     // ... for the literal stream
  logic [SEL_W-1:0] out_sel_q;     // ... and its FIFO
  // Request presented but not yet accepted
  logic             hold_q, hold_lit_q;
  logic             last_lit_q;    // stream that used the port last

  logic             port_free, idle;
  logic             lit_room, ins_room, lit_want, ins_want, pick_lit, handshake;

  assign idle      = (lit_rem_q == '0) && (ins_rem_q == '0);
  assign port_free = !out_q || mem_resp_valid;
  assign busy      = !idle || out_q;

  // Room in the destination, counting the word still in flight to it.
  assign lit_room = (32'(lit_count[lit_sel_q])
                     + 32'(out_q && out_lit_q && (out_sel_q == lit_sel_q))) < LIT_DEPTH;
  assign ins_room = (32'(ins_count) + 32'(out_q && !out_lit_q)) < INS_DEPTH;
  assign lit_want = (lit_rem_q != '0) && lit_room;
  assign ins_want = (ins_rem_q != '0) && ins_room;

  always_comb begin
    if (hold_q)                pick_lit = hold_lit_q;
    else if (lit_want && ins_want) pick_lit = !last_lit_q;
    else                       pick_lit = lit_want;
  end

  assign mem_req_valid = port_free && (hold_q || lit_want || ins_want);
  assign mem_req_addr  = pick_lit ? lit_addr_q : ins_addr_q;
  assign handshake     = mem_req_valid && mem_req_ready;

  assign fire = nlit_valid && addr_valid && nins_valid && idle && port_free;

  // Steering of the returning word
  assign lit_data = mem_resp_data;
  assign ins_data = mem_resp_data;
  assign ins_push = mem_resp_valid && !out_lit_q;
  always_comb begin
    lit_push = '0;
    if (mem_resp_valid && out_lit_q) lit_push[out_sel_q] = 1'b1;
  end

  assign base_mod = base_q;
  assign serial   = serial_q;

  function automatic logic [SEL_W-1:0] next_sel(logic [SEL_W-1:0] s);
    return (s == SEL_W'(N_OUT - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lit_addr_q <= '0;
      ins_addr_q <= '0;
      lit_rem_q  <= '0;
      ins_rem_q  <= '0;
      lit_sel_q  <= '0;
      base_q     <= '0;
      serial_q   <= 1'b0;
      out_q      <= 1'b0;
      out_lit_q  <= 1'b0;
      out_sel_q  <= '0;
      hold_q     <= 1'b0;
      hold_lit_q <= 1'b0;
      last_lit_q <= 1'b0;
    end else begin
      if (fire) begin
        lit_addr_q <= addr;
        ins_addr_q <= addr - ADDR_W'(nins);
        lit_rem_q  <= nlit;
        ins_rem_q  <= nins;
        base_q     <= SEL_W'(addr % ADDR_W'(N_OUT));
        lit_sel_q  <= SEL_W'(addr % ADDR_W'(N_OUT));
        serial_q   <= serial_mode;
      end

      hold_q     <= mem_req_valid && !mem_req_ready;
      hold_lit_q <= pick_lit;

      if (handshake) begin
        out_q      <= 1'b1;
        out_lit_q  <= pick_lit;
        out_sel_q  <= lit_sel_q;
        last_lit_q <= pick_lit;
        if (pick_lit) begin
          lit_addr_q <= lit_addr_q + 1'b1;
          lit_rem_q  <= lit_rem_q - 1'b1;
          if (!serial_q) lit_sel_q <= next_sel(lit_sel_q);
        end else begin
          ins_addr_q <= ins_addr_q + 1'b1;
          ins_rem_q  <= ins_rem_q - 1'b1;
        end
      end else if (mem_resp_valid) begin
        out_q <= 1'b0;
      end
    end
  end

  // Memory port rules
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> out_q);

endmodule
