// tb_outbox: checks the outbox register: one cycle from input to output, one
// word per cycle when the fabric always takes, words held steady while the
// fabric refuses, and order and contents under random backpressure.
module tb_outbox;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0] in_data = 0, out_data;
  outbox dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [31:0] q [$];
  int sent = 0, got = 0, held = 0;
  logic [31:0] next_val = 0;

  // Fabric side
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check(q.size() != 0 && out_data == q[0], $sformatf("word %0d", got));
      if (q.size() != 0) void'(q.pop_front());
      got++;
    end
    if (rst_n && out_valid && !out_ready) held++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Streaming: 10 words in 10 consecutive cycles, first out one cycle later.
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); in_valid = 1; in_data = 32'h100 + i;
      check(in_ready, "ready while streaming");
      if (i > 0) check(out_valid && out_data == 32'h100 + i - 1, "one cycle latency");
      @(posedge clk); q.push_back(in_data); sent++;
    end
    @(negedge clk); in_valid = 0;
    check(out_valid && out_data == 32'h109, "last word");
    @(negedge clk); check(!out_valid, "empty afterwards");
    // Random backpressure.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      out_ready = $urandom_range(1);
      if (!in_valid || in_ready) begin
        in_valid = $urandom_range(1);
        in_data  = $urandom;
      end
      #1;
      if (in_valid && in_ready) begin q.push_back(in_data); sent++; end
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    check(got == sent && q.size() == 0, $sformatf("sent %0d got %0d", sent, got));
    check(held > 100, "backpressure seen");
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
