// tb_fetch_ctrl: checks the fetch controller on its own. The literal FIFOs and
// the instruction queue are modelled here by their counts and drained at
// random; a behavioural memory answers after 1..3 cycles and stalls at random.
// For every code bag the controller must read exactly Address-NumInstructions
// .. Address+NumLiterals-1, steer literal a to FIFO a mod 3 (round-robin) or
// to FIFO Address mod 3 (serial), deliver instructions lowest address first,
// never push into a full FIFO, and report the bag's base residue and mode.
// With an ideal memory and empty FIFOs it must read one word per cycle.
module tb_fetch_ctrl;
  import fetch_pkg::*;

  localparam int N = 3, LD = 3, ID = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   nlit_valid = 0, addr_valid = 0, nins_valid = 0, serial_mode = 0, fire;
  count_t nlit = 0, nins = 0;
  addr_t  addr = 0;
  logic   mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t  mem_req_addr;
  word_t  mem_resp_data;
  logic [N-1:0] lit_push;
  word_t  lit_data, ins_data;
  logic [1:0] lit_count [N];
  logic   ins_push;
  logic [1:0] ins_count;
  logic [1:0] base_mod;
  logic   serial, busy;

  fetch_ctrl dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic word_t mem_word(addr_t a);
    return (a * 32'h0101_0DB3) ^ 32'hC0DE_0000;
  endfunction

  // Memory
  int stall_pct = 0;
  bit fixed_lat = 1;
  addr_t pa [$];
  longint pd [$];
  always @(posedge clk) mem_req_ready <= $urandom_range(99) >= stall_pct;
  initial mem_req_ready = 1;
  always @(posedge clk)
    if (rst_n && mem_req_valid && mem_req_ready) begin
      pa.push_back(mem_req_addr);
      pd.push_back(cycle + longint'(fixed_lat ? 1 : $urandom_range(3, 1)));
    end
  always_comb begin
    mem_resp_valid = pa.size() != 0 && pd[0] <= cycle;
    mem_resp_data  = mem_resp_valid ? mem_word(pa[0]) : '0;
  end
  always @(posedge clk) if (mem_resp_valid) begin void'(pa.pop_front()); void'(pd.pop_front()); end

  // FIFO models
  int drain_pct = 100;
  int cnt [N] = '{0, 0, 0};
  int icnt = 0;
  always_comb begin
    for (int i = 0; i < N; i++) lit_count[i] = 2'(cnt[i]);
    ins_count = 2'(icnt);
  end

  word_t exp_lit [N][$];
  word_t exp_ins [$];
  int    exp_base [$];
  bit    exp_ser [$];
  int    n_full_wait = 0, n_stall = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (mem_req_valid && !mem_req_ready) n_stall++;
      for (int i = 0; i < N; i++) begin
        if (lit_push[i]) begin
          word_t e;
          check(cnt[i] < LD, "push into a full literal FIFO");
          check(exp_lit[i].size() != 0, "unexpected literal push");
          e = exp_lit[i].size() != 0 ? exp_lit[i].pop_front() : '0;
          check(lit_data == e, $sformatf("FIFO %0d got %h expected %h", i, lit_data, e));
        end
      end
      check($countones(lit_push) + int'(ins_push) <= 1, "more than one push");
      if (ins_push) begin
        word_t e;
        check(icnt < ID, "push into a full instruction queue");
        check(exp_ins.size() != 0, "unexpected instruction push");
        e = exp_ins.size() != 0 ? exp_ins.pop_front() : '0;
        check(ins_data == e, $sformatf("instruction got %h expected %h", ins_data, e));
        check(int'(base_mod) == exp_base[0] && serial == exp_ser[0], "bag context");
        void'(exp_base.pop_front()); void'(exp_ser.pop_front());
      end
      for (int i = 0; i < N; i++) begin
        if (cnt[i] == LD) n_full_wait++;
        cnt[i] <= cnt[i] + int'(lit_push[i])
                  - int'(cnt[i] > 0 && $urandom_range(99) < drain_pct);
      end
      icnt <= icnt + int'(ins_push) - int'(icnt > 0 && $urandom_range(99) < drain_pct);
    end
  end

  task automatic run_bag(addr_t a, int nl, int ni, bit ser);
    for (int i = 0; i < nl; i++)
      exp_lit[ser ? int'(a % N) : int'((a + addr_t'(i)) % N)].push_back(mem_word(a + addr_t'(i)));
    for (int i = ni; i >= 1; i--) begin
      exp_ins.push_back(mem_word(a - addr_t'(i)));
      exp_base.push_back(int'(a % N));
      exp_ser.push_back(ser);
    end
    @(negedge clk);
    nlit_valid = 1; addr_valid = 1; nins_valid = 1; serial_mode = ser;
    nlit = count_t'(nl); nins = count_t'(ni); addr = a;
    #1;
    while (!fire) begin @(negedge clk); #1; end
    @(negedge clk);
    nlit_valid = 0; addr_valid = 0; nins_valid = 0; serial_mode = $urandom_range(1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Timing with an ideal memory: 2 literals + 5 instructions, 7 cycles.
    begin
      longint t_first, t_last;
      int reads;
      reads = 0; t_first = -1; t_last = -1;
      fork
        run_bag(32'hBEEF_0008, 2, 5, 0);
        begin
          repeat (20) begin
            @(posedge clk);
            if (mem_req_valid && mem_req_ready) begin
              if (t_first < 0) t_first = cycle;
              t_last = cycle; reads++;
            end
          end
        end
      join
      check(reads == 7, $sformatf("%0d reads", reads));
      check(t_last - t_first == 6, "one read per cycle");
    end
    // Random bags with stalls and slow FIFOs.
    fixed_lat = 0; stall_pct = 30; drain_pct = 30;
    for (int b = 0; b < 150; b++) run_bag($urandom, $urandom_range(10), $urandom_range(10), $urandom_range(1));
    repeat (200) @(posedge clk);
    check(!busy, "idle at the end");
    check(exp_ins.size() == 0 && exp_lit[0].size() == 0 && exp_lit[1].size() == 0
          && exp_lit[2].size() == 0, "all words delivered");
    check(n_full_wait > 0 && n_stall > 0, "full FIFOs and memory stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
