// fetch_pkg: types and constants shared by the fetch unit and its parts.
//
// The fetch unit moves words of one width: literals and instructions are the
// same size, and addresses are 32 bits wide like the example layout's
// 0xBEEF0000..0xBEEF000B. The instruction format is this design's own choice,
// since the fetch unit only needs to find the source and destination fields:
//
//   [31:24] src    port id of the instruction's source
//   [23:16] dst    port id of the instruction's destination
//   [15:0]  body   everything else, passed through untouched
//
// Port ids GENERIC_LIT_BASE .. GENERIC_LIT_BASE+15 name the generic literal
// outboxes L_0 .. L_15 that code is written against; the fetch unit rewrites
// them to the port ids of its own outboxes.
package fetch_pkg;

  localparam int unsigned WORD_W   = 32;   // literal and instruction width
  localparam int unsigned ADDR_W   = 32;   // memory word address width
  localparam int unsigned COUNT_W  = 16;   // width of NumLiterals / NumInstructions
  localparam int unsigned PORT_W   = 8;    // width of a source/destination port id
  localparam int unsigned LITREF_W = 4;    // generic literal index bits (L_0..L_15)

  localparam logic [PORT_W-1:0] GENERIC_LIT_BASE = 8'hF0;

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [COUNT_W-1:0] count_t;
  typedef logic [PORT_W-1:0]  port_t;

  typedef struct packed {
    port_t       src;
    port_t       dst;
    logic [15:0] body;
  } instr_t;

  // Code bag descriptor as captured when the fetch unit fires.
  typedef struct packed {
    addr_t  address;
    count_t num_literals;
    count_t num_instructions;
    logic   serial;
  } descriptor_t;

  // True when a port id names one of the generic literal outboxes L_k.
  function automatic logic is_generic_lit(port_t p);
    return port_t'(p - GENERIC_LIT_BASE) < port_t'(1 << LITREF_W);
  endfunction

endpackage
