// tb_fetch_unit: end-to-end test of the fetch unit at its default parameters.
//
// A behavioural memory answers reads after 1..3 cycles and at times refuses
// requests; the outboxes and the instruction horn take words at random. Code
// bags are sent as three independent descriptor streams with random gaps. The
// expected contents of every outbox and of the instruction stream are worked
// out here from the memory contents, the modulo mapping and the rewrite rule,
// and every word that leaves the unit is compared with them in order.
//
// Directed parts: the example bag (Address 0xBEEF0008, two literals, five
// instructions) with its exact set of addresses and its cycle timing with an
// ideal memory; a bag loaded in two halves; a literal-only "packet" bag
// followed by an instruction-only bag that references its fields. Random
// parts run in round-robin and in serial mode. Each mechanism of the unit is
// counted and must occur at least once.
module tb_fetch_unit;
  import fetch_pkg::*;

  localparam int unsigned N_OUT     = 3;
  localparam port_t       UNIT_BASE = 8'h20;
  localparam int unsigned LIT_DEPTH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             nlit_valid, nlit_ready, addr_valid, addr_ready, nins_valid, nins_ready;
  count_t           nlit_data, nins_data;
  addr_t            addr_data;
  logic             serial_mode;
  logic             mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t            mem_req_addr;
  word_t            mem_resp_data;
  logic [N_OUT-1:0] lit_out_valid, lit_out_ready;
  word_t            lit_out_data [N_OUT];
  logic             ins_out_valid, ins_out_ready, busy;
  word_t            ins_out_data;

  fetch_unit dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------------------------------------------------------- memory
  // Every word is a function of its address. Half the words carry a generic
  // literal reference L_k (port id 0xF0+k) in the source, a quarter in the
  // destination.
  function automatic word_t mem_word(addr_t a);
    word_t h = (a * 32'h9E37_79B1) ^ (a >> 7) ^ 32'h5A17_C3E5;
    h = h ^ (h >> 13);
    if (h[0]) h[31:28] = 4'hF;
    if (h[1] && h[2]) h[23:20] = 4'hF;
    return h;
  endfunction

  // Independent model of the rewrite: L_k is the literal at Address+k.
  function automatic port_t exp_port(port_t p, addr_t base, bit ser);
    int k;
    if (p < 8'hF0) return p;
    k = int'(p) - 'hF0;
    if (ser) return UNIT_BASE + port_t'(base % N_OUT);
    return UNIT_BASE + port_t'((base + addr_t'(k)) % N_OUT);
  endfunction

  function automatic word_t exp_instr(word_t w, addr_t base, bit ser);
    return {exp_port(w[31:24], base, ser), exp_port(w[23:16], base, ser), w[15:0]};
  endfunction

  int  mem_stall_pct = 0;
  bit  mem_fixed_latency = 1;
  addr_t  pend_addr [$];
  longint pend_due  [$];

  always @(posedge clk) begin
    mem_req_ready <= ($urandom_range(99) >= mem_stall_pct);
  end
  initial mem_req_ready = 1'b1;

  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      pend_addr.push_back(mem_req_addr);
      pend_due.push_back(cycle + longint'(mem_fixed_latency ? 1 : $urandom_range(3, 1)));
    end
  end
  always_comb begin
    mem_resp_valid = 1'b0;
    mem_resp_data  = '0;
    if (pend_addr.size() != 0 && pend_due[0] <= cycle) begin
      mem_resp_valid = 1'b1;
      mem_resp_data  = mem_word(pend_addr[0]);
    end
  end
  always @(posedge clk) begin
    if (mem_resp_valid) begin
      void'(pend_addr.pop_front());
      void'(pend_due.pop_front());
    end
  end

  // ------------------------------------------------------------------ sinks
  int sink_stall_pct = 0;
  word_t exp_lit [N_OUT][$];
  word_t exp_ins [$];
  int    lit_seen = 0, ins_seen = 0;
  longint first_lit_out = -1, last_ins_out = -1;

  always @(posedge clk) begin
    for (int i = 0; i < N_OUT; i++) lit_out_ready[i] <= ($urandom_range(99) >= sink_stall_pct);
    ins_out_ready <= ($urandom_range(99) >= sink_stall_pct);
  end
  initial begin lit_out_ready = '1; ins_out_ready = 1'b1; end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N_OUT; i++) begin
        if (lit_out_valid[i] && lit_out_ready[i]) begin
          if (exp_lit[i].size() == 0) check(0, $sformatf("unexpected literal %h at L_c%0d", lit_out_data[i], i + 1));
          else begin
            word_t e;
            e = exp_lit[i].pop_front();
            check(lit_out_data[i] == e, $sformatf("L_c%0d got %h expected %h", i + 1, lit_out_data[i], e));
          end
          lit_seen++;
          if (first_lit_out < 0) first_lit_out = cycle;
        end
      end
      if (ins_out_valid && ins_out_ready) begin
        if (exp_ins.size() == 0) check(0, $sformatf("unexpected instruction %h", ins_out_data));
        else begin
          word_t e;
          e = exp_ins.pop_front();
          check(ins_out_data == e, $sformatf("instruction got %h expected %h", ins_out_data, e));
        end
        ins_seen++;
        last_ins_out = cycle;
      end
    end
  end

  // ------------------------------------------------------ mechanism counters
  // Everything is observed at the unit's ports. Reads are classified as
  // literal or instruction reads by following the bags in the order sent.
  typedef struct { addr_t a; int nl; int ni; } trk_t;
  trk_t trk [$];
  int   trk_lit_left = 0, trk_ins_left = 0;
  addr_t trk_a;
  int n_accept = 0, n_serial_bag = 0, n_wrap_bag = 0, n_mem_stall = 0, n_backpressure = 0;
  int n_rw_src = 0, n_rw_dst = 0, n_nolit_bag = 0, n_noins_bag = 0, n_interleave = 0;
  int n_horn_stall = 0, n_outbox_stall = 0, n_same_fifo = 0, n_bad_read = 0;
  bit last_was_lit;
  bit any_issue = 0;
  addr_t req_log [$];
  longint first_req = -1, last_req = -1, desc_cycle = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      // Move to the next bag that has reads once the current one is done.
      while (trk_lit_left == 0 && trk_ins_left == 0 && trk.size() != 0) begin
        trk_t t;
        t = trk.pop_front();
        trk_a = t.a; trk_lit_left = t.nl; trk_ins_left = t.ni;
      end
      if (mem_req_valid && !mem_req_ready) n_mem_stall++;
      if (busy && !mem_req_valid && pend_addr.size() == 0
          && (trk_lit_left != 0 || trk_ins_left != 0)) n_backpressure++;
      if (mem_req_valid && mem_req_ready) begin
        bit is_lit;
        is_lit = (mem_req_addr - trk_a) < addr_t'(32'h8000_0000);
        if (any_issue && is_lit != last_was_lit && trk_lit_left != 0 && trk_ins_left != 0)
          n_interleave++;
        if (is_lit) begin
          if (trk_lit_left == 0) n_bad_read++; else trk_lit_left--;
        end else begin
          if (trk_ins_left == 0) n_bad_read++; else trk_ins_left--;
        end
        last_was_lit = is_lit;
        any_issue = 1;
        req_log.push_back(mem_req_addr);
        if (first_req < 0) first_req = cycle;
        last_req = cycle;
      end
      for (int i = 0; i < N_OUT; i++)
        if (lit_out_valid[i] && !lit_out_ready[i]) n_outbox_stall++;
      if (ins_out_valid && !ins_out_ready) n_horn_stall++;
      if (nlit_valid && nlit_ready) begin n_accept++; desc_cycle = cycle; end
    end
  end

  // ------------------------------------------------------ descriptor drivers
  typedef struct { addr_t a; count_t nl; count_t ni; } bag_t;
  bag_t q_nl [$], q_a [$], q_ni [$];
  int gap_max = 0;

  task automatic send(addr_t a, int nl, int ni);
    bag_t b = '{a, count_t'(nl), count_t'(ni)};
    bit ser = serial_mode;
    for (int i = 0; i < nl; i++) begin
      addr_t w = a + addr_t'(i);
      int f = ser ? int'(a % N_OUT) : int'(w % N_OUT);
      exp_lit[f].push_back(mem_word(w));
    end
    for (int i = ni; i >= 1; i--) begin
      word_t raw, rw;
      raw = mem_word(a - addr_t'(i));
      rw  = exp_instr(raw, a, ser);
      exp_ins.push_back(rw);
      if (raw[31:24] != rw[31:24]) n_rw_src++;
      if (raw[23:16] != rw[23:16]) n_rw_dst++;
    end
    trk.push_back('{a, nl, ni});
    if (ser) n_serial_bag++;
    if (!ser && nl > N_OUT) n_wrap_bag++;
    if (ser && nl > 1) n_same_fifo++;
    if (nl == 0) n_nolit_bag++;
    if (ni == 0) n_noins_bag++;
    q_nl.push_back(b); q_a.push_back(b); q_ni.push_back(b);
  endtask

  initial begin nlit_valid = 0; addr_valid = 0; nins_valid = 0;
    nlit_data = '0; addr_data = '0; nins_data = '0; end

  always @(posedge clk) begin
    if (rst_n) begin
      if (nlit_valid && nlit_ready) void'(q_nl.pop_front());
      if (addr_valid && addr_ready) void'(q_a.pop_front());
      if (nins_valid && nins_ready) void'(q_ni.pop_front());
    end
  end
  // Each field stream is presented on its own, with random gaps.
  always @(negedge clk) begin
    if (!nlit_valid || $urandom_range(gap_max) == 0) begin
      nlit_valid = q_nl.size() != 0; if (nlit_valid) nlit_data = q_nl[0].nl; end
    else if (q_nl.size() != 0) nlit_data = q_nl[0].nl;
    if (!addr_valid || $urandom_range(gap_max) == 0) begin
      addr_valid = q_a.size() != 0; if (addr_valid) addr_data = q_a[0].a; end
    else if (q_a.size() != 0) addr_data = q_a[0].a;
    if (!nins_valid || $urandom_range(gap_max) == 0) begin
      nins_valid = q_ni.size() != 0; if (nins_valid) nins_data = q_ni[0].ni; end
    else if (q_ni.size() != 0) nins_data = q_ni[0].ni;
    // A field that has been accepted is no longer offered.
    if (q_nl.size() == 0) nlit_valid = 0;
    if (q_a.size() == 0)  addr_valid = 0;
    if (q_ni.size() == 0) nins_valid = 0;
  end

  task automatic drain();
    int t = 0;
    while ((q_nl.size() != 0 || q_a.size() != 0 || q_ni.size() != 0 || busy
            || pend_addr.size() != 0 || exp_ins.size() != 0 || exp_lit[0].size() != 0
            || exp_lit[1].size() != 0 || exp_lit[2].size() != 0)
           && t < 20000) begin
      @(posedge clk); t++;
    end
    check(t < 20000, "drain timed out");
    repeat (5) @(posedge clk);
  endtask

  // ------------------------------------------------------------------ test
  initial begin
    serial_mode = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. The example bag, ideal memory and sinks, all fields at once.
    req_log.delete();
    first_req = -1;
    send(32'hBEEF_0008, 2, 5);
    drain();
    check(req_log.size() == 7, $sformatf("example bag made %0d reads", req_log.size()));
    begin
      bit seen [addr_t];
      foreach (req_log[i]) seen[req_log[i]] = 1;
      for (addr_t a = 32'hBEEF_0003; a <= 32'hBEEF_0009; a++)
        check(seen.exists(a), $sformatf("address %h not read", a));
      check(!seen.exists(32'hBEEF_0002) && !seen.exists(32'hBEEF_000A), "read outside the bag");
    end
    // Timing: fields accepted at the first edge, fire one edge later, first
    // read the edge after, then one read per cycle.
    check(first_req - desc_cycle == 2, $sformatf("descriptor to first read %0d cycles", first_req - desc_cycle));
    check(last_req - first_req == 6, $sformatf("7 reads took %0d cycles", last_req - first_req + 1));
    // Literal 0 is the first read (round-robin alternation starts with
    // literals) and reaches its outbox three cycles later.
    check(req_log[0] == 32'hBEEF_0008, "first read is not the literal at Address");
    check(last_ins_out - last_req == 2, $sformatf("read to horn %0d cycles", last_ins_out - last_req));
    check(first_lit_out - first_req == 3, $sformatf("read to outbox %0d cycles", first_lit_out - first_req));

    // 2. A bag loaded in two halves, and a packet dispatched as a literal bag
    //    then read through an instruction-only bag.
    send(32'h0000_1000, 7, 0);
    send(32'h0000_1000, 0, 7);
    send(32'h0000_2001, 9, 0);
    send(32'h0000_2001, 0, 4);
    drain();

    // 3. Random bags, round-robin, with stalls everywhere.
    mem_fixed_latency = 0; mem_stall_pct = 30; sink_stall_pct = 40; gap_max = 3;
    for (int b = 0; b < 60; b++)
      send($urandom, $urandom_range(12), $urandom_range(12));
    drain();

    // 4. Serial mode.
    serial_mode = 1'b1;
    for (int b = 0; b < 40; b++)
      send($urandom, $urandom_range(12), $urandom_range(8));
    drain();

    // 5. Back to round-robin with a fast memory and slow sinks.
    serial_mode = 1'b0;
    mem_stall_pct = 0; mem_fixed_latency = 1; sink_stall_pct = 70;
    for (int b = 0; b < 30; b++)
      send($urandom, $urandom_range(15), $urandom_range(6));
    drain();

    check(exp_ins.size() == 0 && exp_lit[0].size() == 0 && exp_lit[1].size() == 0
          && exp_lit[2].size() == 0, "words never delivered");
    $display("mechanisms: bags=%0d serial_bags=%0d serial_same_fifo=%0d rr_wrap_bags=%0d mem_stall=%0d fifo_backpressure=%0d outbox_stall=%0d horn_stall=%0d rewrite_src=%0d rewrite_dst=%0d no_literal_bags=%0d no_instruction_bags=%0d interleave=%0d literals=%0d instructions=%0d",
             n_accept, n_serial_bag, n_same_fifo, n_wrap_bag, n_mem_stall, n_backpressure, n_outbox_stall,
             n_horn_stall, n_rw_src, n_rw_dst, n_nolit_bag, n_noins_bag, n_interleave, lit_seen, ins_seen);
    check(n_accept == 135, $sformatf("%0d of 135 descriptors accepted", n_accept));
    check(n_bad_read == 0 && trk.size() == 0 && trk_lit_left == 0 && trk_ins_left == 0,
          $sformatf("reads do not match the bags (%0d stray)", n_bad_read));
    check(n_serial_bag > 0, "serial mode never used");
    check(n_same_fifo > 0, "serial bag with several literals never ran");
    check(n_wrap_bag > 0, "round-robin never wrapped");
    check(n_mem_stall > 0, "memory never stalled");
    check(n_backpressure > 0, "full FIFOs never held back a read");
    check(n_outbox_stall > 0, "outbox never held");
    check(n_horn_stall > 0, "instruction horn never stalled");
    check(n_rw_src > 0, "source never rewritten");
    check(n_rw_dst > 0, "destination never rewritten");
    check(n_nolit_bag > 0, "no bag without literals");
    check(n_noins_bag > 0, "no bag without instructions");
    check(n_interleave > 0, "streams never interleaved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
