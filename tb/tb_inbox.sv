// tb_inbox: checks that an inbox holds exactly one value, refuses a second
// one until the value is taken, accepts a new value in the cycle of `take`,
// and empties on `take` alone. A reference model of the one-entry register is
// kept here and compared every cycle under random traffic.
module tb_inbox;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, take = 0;
  logic [W-1:0] in_data = '0, out_data;

  inbox #(.WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  bit           m_full = 0;
  logic [W-1:0] m_data = '0;
  int accepted = 0, taken = 0, refused = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: fill, refuse, take-and-refill, take alone.
    @(negedge clk); in_valid = 1; in_data = 16'h1234; take = 0;
    @(negedge clk); check(out_valid && out_data == 16'h1234, "value held");
    in_data = 16'h5678; check(!in_ready, "second value refused while full");
    @(negedge clk); check(out_data == 16'h1234, "held value not overwritten");
    take = 1; #1 check(in_ready, "ready during take");
    @(negedge clk); check(out_valid && out_data == 16'h5678, "refilled on take");
    in_valid = 0; take = out_valid;
    @(negedge clk); check(!out_valid, "empty after take");
    take = 0;
    // Random traffic against the model.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(out_valid == m_full, "valid matches model");
      if (m_full) check(out_data == m_data, "data matches model");
      check(in_ready == (!m_full || take), "ready matches model");
      in_valid = $urandom_range(1);
      in_data  = W'($urandom);
      take     = m_full && ($urandom_range(2) == 0);
      #1;
      if (in_valid && in_ready) begin m_full = 1; m_data = in_data; accepted++; end
      else if (take) m_full = 0;
      if (take) taken++;
      if (in_valid && !in_ready) refused++;
    end
    check(accepted > 100 && taken > 100 && refused > 100, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
