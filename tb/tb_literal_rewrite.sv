// tb_literal_rewrite: exhaustive check of the literal rewrite for three
// outboxes (fetch unit C as drawn) and for five: every source and destination
// port id, every base residue, both modes, with random instruction bodies.
// Generic reference L_k (port 0xF0+k) must become the outbox that holds the
// literal at Address+k; all other ports and the body must pass unchanged.
module tb_literal_rewrite;
  import fetch_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  word_t in3, out3, in5, out5;
  logic [1:0] b3;
  logic [2:0] b5;
  logic s3, s5;

  literal_rewrite u3 (.in_instr(in3), .base_mod(b3), .serial(s3), .out_instr(out3));
  literal_rewrite #(.N_OUT(5), .UNIT_LIT_BASE(8'h40)) u5 (
    .in_instr(in5), .base_mod(b5), .serial(s5), .out_instr(out5));

  // Expected port: counting k steps round the outboxes from the base.
  function automatic int exp_port(int p, int base, int n, int unit, bit ser);
    int idx;
    if (p < 'hF0) return p;
    idx = base;
    if (!ser) for (int k = 0; k < p - 'hF0; k++) idx = (idx == n - 1) ? 0 : idx + 1;
    return unit + idx;
  endfunction

  initial begin
    for (int ser = 0; ser < 2; ser++)
      for (int base = 0; base < 5; base++)
        for (int p = 0; p < 256; p++) begin
          logic [15:0] body;
          int q;
          body = 16'($urandom);
          q = (p * 37 + base) & 255;
          in3 = {8'(p), 8'(q), body}; b3 = 2'(base % 3); s3 = ser[0];
          in5 = {8'(q), 8'(p), body}; b5 = 3'(base);     s5 = ser[0];
          #1;
          check(int'(out3[31:24]) == exp_port(p, base % 3, 3, 'h20, ser[0]), $sformatf("N=3 src %h base %0d ser %0d", p, base, ser));
          check(int'(out3[23:16]) == exp_port(q, base % 3, 3, 'h20, ser[0]), "N=3 dst");
          check(out3[15:0] == body, "N=3 body");
          check(int'(out5[31:24]) == exp_port(q, base, 5, 'h40, ser[0]), "N=5 src");
          check(int'(out5[23:16]) == exp_port(p, base, 5, 'h40, ser[0]), $sformatf("N=5 dst %h base %0d ser %0d", p, base, ser));
          check(out5[15:0] == body, "N=5 body");
        end
    // The example of the text: L_0 names the lowest literal word.
    in3 = 32'hF0F1_0000; b3 = 2'(32'hBEEF_0008 % 3); s3 = 0; #1;
    check(out3[31:24] == 8'h20 + 8'(32'hBEEF_0008 % 3), "L_0 -> outbox of Address");
    check(out3[23:16] == 8'h20 + 8'(32'hBEEF_0009 % 3), "L_1 -> outbox of Address+1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
