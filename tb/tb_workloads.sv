// tb_workloads: runs the usage patterns of the fetch unit at its default
// parameters and checks what they mean, not only which words come out.
//
//   packet       a 9-word packet is dispatched as a literal-only bag, then an
//                instruction-only bag at the same Address holds 9
//                instructions whose sources are L_0 .. L_8;
//   two halves   a code bag is loaded as its literal half, then its
//                instruction half, at an address with a different residue;
//   serial       the packet pattern again in serial mode.
//
// A consumer then executes the instructions in order: each one takes the next
// word from the outbox its rewritten source names. Instruction j must receive
// word j of the packet, which holds only if the rewrite names the outbox that
// really got literal j and each outbox keeps address order.
module tb_workloads;
  import fetch_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       nlit_valid = 0, nlit_ready, addr_valid = 0, addr_ready, nins_valid = 0, nins_ready;
  count_t     nlit_data = '0, nins_data = '0;
  addr_t      addr_data = '0;
  logic       serial_mode = 0;
  logic       mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t      mem_req_addr;
  word_t      mem_resp_data;
  logic [2:0] lit_out_valid, lit_out_ready;
  word_t      lit_out_data [3];
  logic       ins_out_valid, ins_out_ready, busy;
  word_t      ins_out_data;

  fetch_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Memory: a sparse array, filled by each scenario.
  word_t mem [addr_t];
  logic  resp_pending = 0;
  addr_t resp_addr = '0;
  assign mem_req_ready  = 1'b1;
  assign mem_resp_valid = resp_pending;
  assign mem_resp_data  = mem.exists(resp_addr) ? mem[resp_addr] : 32'hDEAD_BEEF;
  always @(posedge clk) begin
    resp_pending <= rst_n && mem_req_valid && mem_req_ready;
    resp_addr    <= mem_req_addr;
  end

  // Collect everything the unit sends out.
  word_t outq [3][$];
  word_t insq [$];
  assign lit_out_ready = '1;
  assign ins_out_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n) for (int i = 0; i < 3; i++) if (lit_out_valid[i]) outq[i].push_back(lit_out_data[i]);
    if (rst_n && ins_out_valid) insq.push_back(ins_out_data);
  end

  task automatic dispatch(addr_t a, int nl, int ni);
    @(negedge clk);
    nlit_valid = 1; addr_valid = 1; nins_valid = 1;
    nlit_data = count_t'(nl); addr_data = a; nins_data = count_t'(ni);
    @(posedge clk);
    while (!(nlit_ready && addr_ready && nins_ready)) @(posedge clk);
    @(negedge clk);
    nlit_valid = 0; addr_valid = 0; nins_valid = 0;
  endtask

  task automatic settle();
    repeat (5) @(posedge clk);
    while (busy || resp_pending) @(posedge clk);
    repeat (10) @(posedge clk);
  endtask

  // Literal bag of n words at p, then n instructions below p with sources
  // L_0 .. L_{n-1}; the consumer must see word j for instruction j.
  task automatic scenario(string name, addr_t p, int n, bit split, bit ser);
    word_t pkt [$];
    int    used [3] = '{0, 0, 0};
    for (int j = 0; j < n; j++) begin
      word_t w;
      w = $urandom;
      pkt.push_back(w);
      mem[p + addr_t'(j)] = w;
      // instruction j sits at p-n+j: lower address, earlier execution
      mem[p - addr_t'(n) + addr_t'(j)] = {8'hF0 + 8'(j), 8'h05, 16'(j)};
    end
    serial_mode = ser;
    if (split) begin
      dispatch(p, n, 0);
      dispatch(p, 0, n);
    end else begin
      dispatch(p, n, n);
    end
    settle();
    check(insq.size() == n, $sformatf("%s: %0d instructions", name, insq.size()));
    for (int j = 0; j < n && insq.size() != 0; j++) begin
      instr_t ins;
      int     box;
      word_t  got;
      ins = instr_t'(insq.pop_front());
      box = int'(ins.src) - 'h20;
      check(ins.body == 16'(j) && ins.dst == 8'h05, $sformatf("%s: instruction %0d order", name, j));
      check(box >= 0 && box < 3, $sformatf("%s: instruction %0d source %h", name, j, ins.src));
      if (box >= 0 && box < 3) begin
        got = outq[box].size() != 0 ? outq[box].pop_front() : 32'hBAD0_0000;
        check(got == pkt[j], $sformatf("%s: L_%0d read %h from L_c%0d, expected %h",
                                       name, j, got, box + 1, pkt[j]));
        used[box]++;
      end
    end
    check(outq[0].size() == 0 && outq[1].size() == 0 && outq[2].size() == 0,
          $sformatf("%s: literals left over", name));
    if (ser) check(used[0] == n || used[1] == n || used[2] == n, $sformatf("%s: not one outbox", name));
    else     check(used[0] > 0 && used[1] > 0 && used[2] > 0, $sformatf("%s: not round-robin", name));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    scenario("packet",     32'h0004_0000, 9, 1, 0);
    scenario("two halves", 32'h0004_1001, 7, 1, 0);
    scenario("whole bag",  32'h0004_2002, 8, 0, 0);
    scenario("serial",     32'h0004_3000, 9, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
