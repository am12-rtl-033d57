// tb_literal_fifo: checks the fetch FIFO at its default depth of 3 and at
// depth 4 against a queue model: order, count, refusal when full, one push
// and one pop per cycle, and a full FIFO that takes exactly DEPTH words.
module tb_literal_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Default depth
  logic        pv3 = 0, pr3, ov3, or3 = 0;
  logic [31:0] pd3 = 0, od3;
  logic [1:0]  c3;
  fetch_fifo dut3 (.clk, .rst_n, .push_valid(pv3), .push_ready(pr3), .push_data(pd3),
                   .pop_valid(ov3), .pop_ready(or3), .pop_data(od3), .count(c3));
  // Depth 4
  logic        pv4 = 0, pr4, ov4, or4 = 0;
  logic [31:0] pd4 = 0, od4;
  logic [2:0]  c4;
  fetch_fifo #(.DEPTH(4)) dut4 (.clk, .rst_n, .push_valid(pv4), .push_ready(pr4), .push_data(pd4),
                   .pop_valid(ov4), .pop_ready(or4), .pop_data(od4), .count(c4));

  logic [31:0] q3 [$], q4 [$];
  int full3 = 0, full4 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill the default FIFO: exactly 3 words fit.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); pv3 = 1; pd3 = 32'hA0 + i;
      check(pr3 == (i < 3), $sformatf("push_ready with %0d words", i));
      @(posedge clk); #1;
    end
    pv3 = 0;
    check(c3 == 2'd3, "count 3 when full");
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); or3 = 1;
      check(ov3 && od3 == 32'hA0 + i, "order after fill");
      @(posedge clk); #1;
    end
    @(negedge clk); or3 = 0; check(!ov3 && c3 == 0, "empty after three pops");
    // Random traffic against queue models.
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(int'(c3) == q3.size() && int'(c4) == q4.size(), "count matches");
      check(ov3 == (q3.size() != 0) && ov4 == (q4.size() != 0), "pop_valid matches");
      if (q3.size() != 0) check(od3 == q3[0], "depth 3 data");
      if (q4.size() != 0) check(od4 == q4[0], "depth 4 data");
      if (c3 == 3) full3++;
      if (c4 == 4) full4++;
      pv3 = $urandom_range(1); pd3 = $urandom; or3 = $urandom_range(2) == 0;
      pv4 = $urandom_range(1); pd4 = $urandom; or4 = $urandom_range(2) == 0;
      #1;
      begin
        bit ph3, pp3, ph4, pp4;
        ph3 = pv3 && pr3; pp3 = or3 && ov3; ph4 = pv4 && pr4; pp4 = or4 && ov4;
        if (pp3) void'(q3.pop_front());
        if (ph3) q3.push_back(pd3);
        if (pp4) void'(q4.pop_front());
        if (ph4) q4.push_back(pd4);
      end
    end
    check(full3 > 0 && full4 > 0, "both FIFOs were full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
