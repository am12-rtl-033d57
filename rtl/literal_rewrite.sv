// literal_rewrite: the Rewrite stage on the fetch unit's instruction path.
//
// Code is written as if there were a single set of literal outboxes L_0,
// L_1, ...; L_0 names the literal at the code bag's Address, L_1 the next
// word up, and so on. Every fetch unit has its own outboxes, so an
// instruction whose source or destination is a generic L_k is rewritten to
// name the outbox of this unit that received literal k.
//
// In the round-robin mode literal k (at address Address+k) went to outbox
// (Address + k) mod N_OUT, since words whose addresses are equal modulo N_OUT
// share an outbox. In the serial mode every literal went to outbox
// Address mod N_OUT, so every L_k is rewritten to that outbox. base_mod is
// Address mod N_OUT of the bag being fetched. Outbox i of this unit has port id
// UNIT_LIT_BASE + i. Fields that are not generic literal references pass
// unchanged, as does the instruction body.
//
// The encoding of port ids (generic references at GENERIC_LIT_BASE..+15) and
// UNIT_LIT_BASE are this design's choices; the document gives the rule, not
// the encoding. Purely combinational.
module literal_rewrite
  import fetch_pkg::*;
#(
  parameter int unsigned N_OUT         = 3,
  parameter port_t       UNIT_LIT_BASE = 8'h20,
  localparam int unsigned SEL_W = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  word_t            in_instr,
  input  logic [SEL_W-1:0] base_mod,
  input  logic             serial,
  output word_t            out_instr
);

  function automatic port_t rewrite_port(port_t p, logic [SEL_W-1:0] base, logic ser);
    logic [LITREF_W+SEL_W:0] sum;
    logic [SEL_W-1:0]        idx;
    if (!is_generic_lit(p)) return p;
    sum = (LITREF_W + SEL_W + 1)'(base) + (LITREF_W + SEL_W + 1)'(p[LITREF_W-1:0]);
    idx = ser ? base : SEL_W'(sum % (LITREF_W + SEL_W + 1)'(N_OUT));
    return UNIT_LIT_BASE + port_t'(idx);
  endfunction

  instr_t in_s, out_s;

  always_comb begin
    in_s      = instr_t'(in_instr);
    out_s     = in_s;
    out_s.src = rewrite_port(in_s.src, base_mod, serial);
    out_s.dst = rewrite_port(in_s.dst, base_mod, serial);
    out_instr = word_t'(out_s);
  end

endmodule
