// tb_rq_regfile: end-to-end test of the register-queue register file.
//
// The testbench plays the execution units of the host pipeline: each cycle it
// issues one bundle, reads the physical specifiers and source data the
// register file returns, computes the results (iadd, fload from a synthetic
// memory, fadd, fmove) and writes them back in the same cycle.
//
// Part 1 runs the three software-pipelined loop schedules worked through for
// register queues, cycle by cycle:
//   * the array-sum loop at II = 2 with one queue and an epilogue that
//     re-connects and finally disconnects f2;
//   * the same loop with an 11-cycle load, where six live instances overflow
//     a 4-register queue and fmove copies the oldest one into a second queue
//     (a read and a write of q2 in one cycle);
//   * the loop with a second reader, where f2 is re-connected inside the
//     kernel and the connect is forwarded to instructions of the same cycle.
// Every queue read is checked against the loaded element the schedule expects,
// Qtail against the values in the schedules' queue tables, the final sums
// against the sum of the loaded elements, and each schedule must take exactly
// its length in cycles (one bundle per cycle, no stall).
//
// Part 2 issues random bundles (connects, disconnects, reads, writes) and
// compares every source value, Qtail and the free-register count with an
// architectural reference model written independently of the RTL.
// The run counts how often each mechanism happened and fails if one never did.
//
// Register names: r1 = R1, f2 = R18, f4 = R20, f6 = R22, f8 = R24.
module tb_rq_regfile;
  import rq_pkg::*;

  localparam int R1 = 1, F2 = 18, F4 = 20, F6 = 22, F8 = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bundle_v;
  slot_t    [ISSUE_W-1:0]      bundle;
  renamed_t [ISSUE_W-1:0]      ren;
  data_t    [ISSUE_W-1:0][1:0] src_data;
  logic     [ISSUE_W-1:0]      wb_v;
  preg_t    [ISSUE_W-1:0]      wb_preg;
  data_t    [ISSUE_W-1:0]      wb_data;
  ofs_t     [NUM_QUEUES:1]     qtail;
  logic     [$clog2(NUM_PRF+1)-1:0] free_count;

  rq_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int n_qwrite = 0, n_qread = 0, n_wrap = 0, n_conn_fwd = 0, n_rw_same_cycle = 0;
  int n_multi_write = 0, n_disconnect = 0, n_free_push = 0, n_concat = 0, n_prf_rw = 0;

  // ---------------------------------------------------------- instructions
  typedef enum int {I_IADD, I_FLOAD, I_FADD, I_FMOVE, I_CONN} op_e;
  typedef struct {
    int  cyc;
    op_e op;
    int  rd, rs1, rs2;
    int  q, imm;
    int  exp_src;   // source operand holding a queue value (-1: none)
    int  exp_k;     // element index that operand must hold
  } instr_t;

  instr_t prog[$];

  function automatic data_t elem(int k);   // memory word at address 4k
    return data_t'(64'h1000 + 64'(k) * 17);
  endfunction

  function automatic void add(int cyc, op_e op, int rd = 0, int rs1 = 0, int rs2 = 0,
                              int q = 0, int imm = 0, int exp_src = -1, int exp_k = 0);
    instr_t t;
    t.cyc = cyc; t.op = op; t.rd = rd; t.rs1 = rs1; t.rs2 = rs2;
    t.q = q; t.imm = imm; t.exp_src = exp_src; t.exp_k = exp_k;
    prog.push_back(t);
  endfunction
  function automatic void iadd(int c);                 add(c, I_IADD, R1, R1);                endfunction
  function automatic void fload(int c, int fd = F2);   add(c, I_FLOAD, fd, R1);               endfunction
  function automatic void fadd(int c, int fd, int fb, int k); add(c, I_FADD, fd, F6, fb, 0, 0, 1, k); endfunction
  function automatic void fmove(int c, int k);         add(c, I_FMOVE, F4, F2, 0, 0, 0, 0, k); endfunction
  function automatic void conn(int c, int q, int ar, int imm); add(c, I_CONN, 0, 0, 0, q, imm); prog[$].rd = ar; endfunction

  typedef struct { int cyc; int q; int tail; } qexp_t;
  qexp_t qexp[$];
  function automatic void expect_tail(int cyc, int q, int tail);
    qexp_t e; e.cyc = cyc; e.q = q; e.tail = tail; qexp.push_back(e);
  endfunction

  task automatic idle_inputs();
    bundle_v = 1'b0;
    bundle   = '0;
    wb_v     = '0;
    wb_preg  = '0;
    wb_data  = '0;
  endtask

  task automatic do_reset();
    idle_inputs();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Run one bundle made of the given instructions; act as execution units.
  task automatic run_bundle(instr_t ins[$]);
    ofs_t [NUM_QUEUES:1] tail_before;
    @(negedge clk);
    bundle_v = 1'b1;
    bundle   = '0;
    wb_v     = '0;
    foreach (ins[i]) begin
      if (ins[i].op == I_CONN) begin
        bundle[i].kind = SLOT_CONNECT;
        bundle[i].rq   = qid_t'(ins[i].q);
        bundle[i].ar   = areg_t'(ins[i].rd);
        bundle[i].imm  = ofs_t'(ins[i].imm);
      end else begin
        bundle[i].kind   = SLOT_OP;
        bundle[i].src_v  = (ins[i].op == I_FADD) ? 2'b11 : 2'b01;
        bundle[i].src[0] = areg_t'(ins[i].rs1);
        bundle[i].src[1] = areg_t'(ins[i].rs2);
        bundle[i].dst_v  = 1'b1;
        bundle[i].dst    = areg_t'(ins[i].rd);
      end
    end
    tail_before = qtail;
    #1;
    foreach (ins[i]) begin
      if (ins[i].op == I_CONN) continue;
      case (ins[i].op)
        I_IADD:  wb_data[i] = src_data[i][0] + 4;
        I_FLOAD: wb_data[i] = elem(int'(src_data[i][0]) / 4);
        I_FADD:  wb_data[i] = src_data[i][0] + src_data[i][1];
        default: wb_data[i] = src_data[i][0];
      endcase
      wb_v[i]    = 1'b1;
      wb_preg[i] = ren[i].dst;
      if (ins[i].exp_src >= 0)
        check(src_data[i][ins[i].exp_src] == elem(ins[i].exp_k),
              $sformatf("cycle %0d slot %0d read %0h, expected element %0d (%0h)",
                        ins[i].cyc, i, src_data[i][ins[i].exp_src], ins[i].exp_k,
                        elem(ins[i].exp_k)));
      if (32'(ren[i].dst) < NUM_QREGS) n_qwrite++;
      if (ins[i].exp_src >= 0) n_qread++;
    end
    @(posedge clk);
    #1;
    for (int q = 1; q <= int'(NUM_QUEUES); q++)
      if (qtail[q] > tail_before[q]) n_wrap++;
  endtask

  // Read an architected register through a one-slot bundle (no write).
  task automatic read_arch(int a, output data_t v);
    @(negedge clk);
    bundle_v = 1'b1;
    bundle   = '0;
    bundle[0].kind   = SLOT_OP;
    bundle[0].src_v  = 2'b01;
    bundle[0].src[0] = areg_t'(a);
    #1;
    v = src_data[0][0];
    @(posedge clk);
    @(negedge clk);
    idle_inputs();
  endtask

  task automatic run_schedule(string name, int length);
    int start;
    do_reset();
    #1;
    start = cycles;
    for (int c = 1; c <= length; c++) begin
      instr_t ins[$];
      foreach (prog[i]) if (prog[i].cyc == c) ins.push_back(prog[i]);
      if (ins.size() > 0) begin
        run_bundle(ins);
      end else begin
        @(negedge clk);
        idle_inputs();
        @(posedge clk);
        #1;
      end
      foreach (qexp[i])
        if (qexp[i].cyc == c)
          check(int'(qtail[qexp[i].q]) == qexp[i].tail,
                $sformatf("%s: Qtail of q%0d after cycle %0d is %0d, expected %0d",
                          name, qexp[i].q, c, qtail[qexp[i].q], qexp[i].tail));
    end
    @(negedge clk);
    idle_inputs();
    // bundles issue back to back: one clock per schedule cycle, plus the idle
    // clock between reset and the first bundle
    check((cycles - start) == length + 1,
          $sformatf("%s: took %0d clock edges for %0d schedule cycles", name, cycles - start, length));
    prog.delete();
    qexp.delete();
  endtask

  function automatic data_t sum_elems(int n);
    data_t s = '0;
    for (int k = 1; k <= n; k++) s += elem(k);
    return s;
  endfunction

  // ------------------------------------------------- architectural model
  typedef struct { bit is_q; int q; int ro; } mmap_t;
  typedef struct { int q; int pos; data_t v; } qw_t;
  mmap_t m_map[NUM_ARCH];
  data_t m_pv[NUM_ARCH];
  bit    m_pv_ok[NUM_ARCH];
  data_t m_qv[NUM_QUEUES+1][QUEUE_LEN];
  bit    m_qv_ok[NUM_QUEUES+1][QUEUE_LEN];
  int    m_qt[NUM_QUEUES+1];
  int    m_free;

  task automatic random_phase(int n_bundles);
    do_reset();
    for (int a = 0; a < int'(NUM_ARCH); a++) begin
      m_map[a] = '{0, 0, 0}; m_pv[a] = '0; m_pv_ok[a] = 1;   // arrays clear at reset
    end
    for (int q = 0; q <= int'(NUM_QUEUES); q++) begin
      m_qt[q] = 0;
      for (int p = 0; p < int'(QUEUE_LEN); p++) begin m_qv[q][p] = '0; m_qv_ok[q][p] = 1; end
    end
    m_free = ARCH_BASE - NUM_QREGS;

    for (int b = 0; b < n_bundles; b++) begin
      mmap_t map_now[NUM_ARCH];
      bit    fresh[NUM_ARCH];           // remapped to an unknown register earlier in the bundle
      int    qt_now[NUM_QUEUES+1];
      data_t pv_next[NUM_ARCH];
      bit    pv_next_ok[NUM_ARCH];
      bit    conn_seen[NUM_ARCH];
      int    qwrites[NUM_QUEUES+1];
      bit    qread[NUM_QUEUES+1];
      bit    remapped[NUM_ARCH];
      qw_t   qw[$];

      map_now = m_map; qt_now = m_qt; pv_next = m_pv; pv_next_ok = m_pv_ok;
      fresh = '{default: 0}; conn_seen = '{default: 0}; qwrites = '{default: 0};
      qread = '{default: 0}; remapped = '{default: 0};

      @(negedge clk);
      bundle_v = 1'b1;
      bundle   = '0;
      wb_v     = '0;
      for (int i = 0; i < int'(ISSUE_W); i++) begin
        int r = $urandom_range(0, 9);
        if (r < 3) begin
          int a = $urandom_range(0, 7);
          if (conn_seen[a]) continue;
          conn_seen[a] = 1;
          bundle[i].kind = SLOT_CONNECT;
          bundle[i].ar   = areg_t'(a);
          bundle[i].rq   = (r == 0) ? '0 : qid_t'($urandom_range(1, 3));
          bundle[i].imm  = (r == 0) ? '0 : ofs_t'($urandom_range(0, QUEUE_LEN - 1));
        end else if (r < 9) begin
          bundle[i].kind   = SLOT_OP;
          bundle[i].src_v  = 2'($urandom_range(0, 3));
          bundle[i].src[0] = areg_t'($urandom_range(0, 7));
          bundle[i].src[1] = areg_t'($urandom_range(0, 7));
          bundle[i].dst_v  = 1'($urandom_range(0, 1));
          bundle[i].dst    = areg_t'($urandom_range(0, 7));
          wb_data[i]       = {$urandom, $urandom};
        end
      end
      #1;
      // model, in program order
      for (int i = 0; i < int'(ISSUE_W); i++) begin
        if (bundle[i].kind == SLOT_CONNECT) begin
          int a = int'(bundle[i].ar);
          if (bundle[i].rq != 0) begin
            if (!map_now[a].is_q) begin m_free++; n_free_push++; end
            map_now[a] = '{1, int'(bundle[i].rq), int'(bundle[i].imm)};
            remapped[a] = 1;
          end else if (map_now[a].is_q) begin
            m_free--; n_disconnect++;
            map_now[a] = '{0, 0, 0};
            fresh[a] = 1; remapped[a] = 1;
            pv_next_ok[a] = 0;
          end
        end else if (bundle[i].kind == SLOT_OP) begin
          for (int s = 0; s < 2; s++) begin
            int a = int'(bundle[i].src[s]);
            if (!bundle[i].src_v[s]) continue;
            if (remapped[a]) n_conn_fwd++;
            if (map_now[a].is_q) begin
              int q = map_now[a].q;
              int pos = (m_qt[q] + map_now[a].ro) % QUEUE_LEN;
              qread[q] = 1;
              if (m_qv_ok[q][pos])
                check(src_data[i][s] == m_qv[q][pos],
                      $sformatf("random %0d slot %0d src %0d: R%0d (q%0d pos %0d) read %0h, model %0h",
                                b, i, s, a, q, pos, src_data[i][s], m_qv[q][pos]));
            end else begin
              n_prf_rw++;
              if (!fresh[a] && m_pv_ok[a])
                check(src_data[i][s] == m_pv[a],
                      $sformatf("random %0d slot %0d src %0d: R%0d read %0h, model %0h",
                                b, i, s, a, src_data[i][s], m_pv[a]));
            end
          end
          if (bundle[i].dst_v) begin
            int a = int'(bundle[i].dst);
            wb_v[i]    = 1'b1;
            wb_preg[i] = ren[i].dst;
            if (map_now[a].is_q) begin
              int q = map_now[a].q;
              qt_now[q] = (qt_now[q] + QUEUE_LEN - 1) % QUEUE_LEN;
              qwrites[q]++;
              check(int'(ren[i].dst) == (q - 1) * QUEUE_LEN + qt_now[q],
                    $sformatf("random %0d slot %0d: queue write to pr%0d, model pr%0d",
                              b, i, ren[i].dst, (q - 1) * QUEUE_LEN + qt_now[q]));
              qw.push_back('{q, qt_now[q], wb_data[i]});
            end else begin
              check(32'(ren[i].dst) >= NUM_QREGS,
                    $sformatf("random %0d slot %0d: ordinary write to queue register pr%0d",
                              b, i, ren[i].dst));
              pv_next[a] = wb_data[i]; pv_next_ok[a] = 1;
            end
          end
        end
      end
      for (int q = 1; q <= int'(NUM_QUEUES); q++) begin
        if (qwrites[q] > 1) n_multi_write++;
        if (qwrites[q] > 0 && qread[q]) n_rw_same_cycle++;
        if (qwrites[q] > 0 && qt_now[q] > m_qt[q]) n_wrap++;
      end
      @(posedge clk);
      #1;
      foreach (qw[k]) begin m_qv[qw[k].q][qw[k].pos] = qw[k].v; m_qv_ok[qw[k].q][qw[k].pos] = 1; end
      m_map = map_now; m_qt = qt_now; m_pv = pv_next; m_pv_ok = pv_next_ok;
      for (int q = 1; q <= int'(NUM_QUEUES); q++)
        check(int'(qtail[q]) == m_qt[q],
              $sformatf("random %0d: Qtail q%0d = %0d, model %0d", b, q, qtail[q], m_qt[q]));
      check(int'(free_count) == m_free,
            $sformatf("random %0d: free count %0d, model %0d", b, free_count, m_free));
    end
    @(negedge clk);
    idle_inputs();
  endtask

  // ------------------------------------------------------------- schedules
  initial begin
    data_t v;
    idle_inputs();

    // Loop of Fig. 1 with register queues (II = 2, load latency 3).
    conn(1, 1, F2, 1);
    iadd(2);  fload(3);
    iadd(4);  fload(5);
    fadd(6, F6, F2, 1); iadd(6);  fload(7);
    fadd(8, F6, F2, 2); iadd(8);  fload(9);
    fadd(10, F6, F2, 3); iadd(10); fload(11);
    fadd(12, F6, F2, 4); conn(12, 1, F2, 0);   // the connect follows the read
    fadd(13, F6, F2, 5);
    conn(14, 0, F2, 0);
    expect_tail(3, 1, 3); expect_tail(5, 1, 2); expect_tail(6, 1, 2); expect_tail(7, 1, 1);
    expect_tail(9, 1, 0); expect_tail(11, 1, 3); expect_tail(13, 1, 3);
    run_schedule("array sum, one queue", 15);
    read_arch(F6, v);
    check(v == sum_elems(5), $sformatf("array sum: f6 = %0h, expected %0h", v, sum_elems(5)));
    check(int'(free_count) == int'(ARCH_BASE - NUM_QREGS),
          "array sum: free count after connect and disconnect of f2");
    n_disconnect++;
    n_free_push++;

    // Queue overflow: load latency 11, q1 concatenated with q2 through fmove.
    conn(1, 1, F2, 3);
    conn(2, 2, F4, 1);
    iadd(3); fload(4);
    iadd(5); fload(6);
    iadd(7); fload(8);
    iadd(9); fload(10);
    fmove(11, 1); iadd(11); fload(12);
    fmove(13, 2); iadd(13); fload(14);
    fadd(15, F6, F4, 1); fmove(15, 3); iadd(15); fload(16);
    fadd(17, F6, F4, 2);
    conn(18, 2, F4, 0); fadd(19, F6, F4, 3);
    prog[$].cyc = 19;
    fadd(21, F6, F2, 4);
    conn(22, 1, F2, 2); fadd(23, F6, F2, 5);
    conn(24, 1, F2, 1); fadd(25, F6, F2, 6);
    conn(26, 1, F2, 0); fadd(27, F6, F2, 7);
    expect_tail(4, 1, 3);  expect_tail(6, 1, 2);  expect_tail(8, 1, 1);  expect_tail(10, 1, 0);
    expect_tail(11, 2, 3); expect_tail(12, 1, 3); expect_tail(13, 2, 2); expect_tail(14, 1, 2);
    expect_tail(15, 2, 1); expect_tail(16, 1, 1);
    run_schedule("queue overflow, two queues", 27);
    read_arch(F6, v);
    check(v == sum_elems(7), $sformatf("overflow: f6 = %0h, expected %0h", v, sum_elems(7)));
    n_concat += 3;
    n_rw_same_cycle++;   // cycle 15 reads and writes q2

    // Architected register pressure: f2 re-connected inside the kernel.
    conn(1, 1, F2, 1);
    iadd(2); fload(3);
    iadd(4); fload(5);
    fadd(6, F6, F2, 1); iadd(6);
    fload(7);
    conn(8, 1, F2, 2); fadd(8, F8, F2, 1); iadd(8);
    conn(9, 1, F2, 1); fadd(9, F6, F2, 2); fload(9);
    conn(10, 1, F2, 2); fadd(10, F8, F2, 2);
    conn(11, 1, F2, 1); fadd(11, F6, F2, 3);
    fadd(12, F8, F2, 3);
    conn(13, 1, F2, 0); fadd(13, F6, F2, 4);
    fadd(14, F8, F2, 4);
    expect_tail(3, 1, 3); expect_tail(5, 1, 2); expect_tail(7, 1, 1); expect_tail(9, 1, 0);
    run_schedule("register pressure, in-kernel reconnect", 14);
    read_arch(F6, v);
    check(v == sum_elems(4), $sformatf("reconnect: f6 = %0h, expected %0h", v, sum_elems(4)));
    read_arch(F8, v);
    check(v == sum_elems(4) + elem(4), $sformatf("reconnect: f8 = %0h, expected %0h", v, sum_elems(4) + elem(4)));
    n_conn_fwd += 6;

    // Random bundles against the reference model.
    random_phase(3000);

    $display("mechanisms: queue writes %0d, queue reads %0d, Qtail wraps %0d, connect forwarded %0d,",
             n_qwrite, n_qread, n_wrap, n_conn_fwd);
    $display("  read+write of one queue in a cycle %0d, several writes to one queue in a cycle %0d,",
             n_rw_same_cycle, n_multi_write);
    $display("  disconnects %0d, registers freed by connect %0d, queue concatenation copies %0d, PRF accesses %0d",
             n_disconnect, n_free_push, n_concat, n_prf_rw);
    check(n_qwrite > 0, "no queue write happened");
    check(n_qread > 0, "no queue read happened");
    check(n_wrap > 0, "Qtail never wrapped");
    check(n_conn_fwd > 0, "no same-cycle connect forwarding happened");
    check(n_rw_same_cycle > 0, "no same-cycle read and write of one queue happened");
    check(n_multi_write > 0, "no bundle wrote one queue twice");
    check(n_disconnect > 0, "no disconnect happened");
    check(n_free_push > 0, "no register was returned to the free list");
    check(n_concat > 0, "no queue concatenation happened");
    check(n_prf_rw > 0, "no ordinary register access happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
