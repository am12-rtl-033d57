// outbox: one literal outbox of the fetch unit (L_c1, L_c2, ... in the
// diagram), the point where literals leave for the switch fabric.
//
// It is a one-word output register with a valid/ready handshake on both
// sides: it takes the word at the head of its literal FIFO whenever it is
// empty or its own word is being taken, so a steady stream passes at one
// word per cycle and the fabric sees a registered output. The document only
// names the outboxes; the register and the handshake are this design's
// choices.
//
// Timing: one cycle from in_valid/in_ready to out_valid; in_ready is
// combinational from out_ready. out_data holds steady while out_valid is
// high and out_ready low.
module outbox #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  logic             valid_q;
  logic [WIDTH-1:0] data_q;

  assign in_ready  = !valid_q || out_ready;
  assign out_valid = valid_q;
  assign out_data  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      data_q  <= '0;
    end else if (in_ready) begin
      valid_q <= in_valid;
      if (in_valid) data_q <= in_data;
    end
  end

  // A word on offer stays on offer, unchanged, until the fabric takes it.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
