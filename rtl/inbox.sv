// inbox: one input of the fetch unit (NumLiterals, Address or NumInstructions).
//
// Each field of a code bag descriptor arrives at its own inbox, and the fetch
// unit fires only once all of them hold a value. An inbox therefore holds
// exactly one value: it accepts a word with a valid/ready handshake, shows it
// on out_data with out_valid high, and lets it go when the fetch unit raises
// `take`. A new value may be accepted in the same cycle as `take`, so a
// stream of descriptors can fire one per cycle.
//
// The document gives the three inputs and the firing rule; the one-entry
// depth and the valid/ready handshake are this design's choices.
//
// Timing: a value accepted at a clock edge is visible on out_data from that
// edge on; in_ready is combinational from `take`.
module inbox #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             take
);

  logic             full_q;
  logic [WIDTH-1:0] data_q;

  assign in_ready  = !full_q || take;
  assign out_valid = full_q;
  assign out_data  = data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      data_q <= '0;
    end else begin
      if (in_valid && in_ready) begin
        full_q <= 1'b1;
        data_q <= in_data;
      end else if (take) begin
        full_q <= 1'b0;
      end
    end
  end

  // The fetch unit may only take a value that is there.
  a_take_full: assert property (@(posedge clk) disable iff (!rst_n) take |-> full_q);

endmodule
