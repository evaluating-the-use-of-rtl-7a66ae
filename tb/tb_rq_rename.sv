// tb_rq_rename: checks the register-queue access logic at the level of
// physical register specifiers.
//
// Directed part: the write and read specifiers of the array-sum loop with
// f2 (R18) connected to q1 at offset 1.  The fload writes must go to
// pr3, pr2, pr1, pr0, pr3 and the fadd reads to pr3, pr2, pr1, pr0, then,
// after `rq-connect q1, f2, 0` issued in the same cycle but after the fourth
// read, pr3; the connect must not affect the read that precedes it in the
// bundle.  The final `rq-connect 0, f2, 0` must map f2 to the first free
// register of the physical register file, pr64.
//
// Random part: bundles of connects, disconnects and register accesses on
// R0..R7 over queues q1..q3, compared with a model that keeps the map table,
// the Qtail pointers and the free list as an ordered list of registers.
module tb_rq_rename;
  import rq_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bundle_v;
  slot_t    [ISSUE_W-1:0] bundle;
  renamed_t [ISSUE_W-1:0] ren;
  ofs_t     [NUM_QUEUES:1] qtail;
  logic     [$clog2(NUM_PRF+1)-1:0] free_count;

  rq_rename dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int F2 = 18, F6 = 22;

  function automatic slot_t s_conn(int q, int ar, int imm);
    slot_t s = '0;
    s.kind = SLOT_CONNECT; s.rq = qid_t'(q); s.ar = areg_t'(ar); s.imm = ofs_t'(imm);
    return s;
  endfunction
  function automatic slot_t s_op(int dst, int src0, int src1, bit dv, bit [1:0] sv);
    slot_t s = '0;
    s.kind = SLOT_OP; s.dst = areg_t'(dst); s.dst_v = dv;
    s.src[0] = areg_t'(src0); s.src[1] = areg_t'(src1); s.src_v = sv;
    return s;
  endfunction

  // model
  map_entry_t mm [NUM_ARCH];
  int mt [NUM_QUEUES+1];
  int mfree[$];

  task automatic model_reset();
    for (int i = 0; i < int'(NUM_ARCH); i++) mm[i] = '{is_q: 1'b0, pri: preg_t'(ARCH_BASE + i), ro: '0};
    for (int q = 0; q <= int'(NUM_QUEUES); q++) mt[q] = 0;
    mfree.delete();
    for (int r = NUM_QREGS; r < int'(ARCH_BASE); r++) mfree.push_back(r);
  endtask

  // Apply the current bundle to the model and compare the DUT's specifiers.
  task automatic model_step(string tag);
    map_entry_t nm [NUM_ARCH];
    int nt [NUM_QUEUES+1];
    int pushes[$];
    nm = mm; nt = mt;
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      if (bundle[i].kind == SLOT_CONNECT) begin
        automatic int a = int'(bundle[i].ar);
        if (bundle[i].rq != '0) begin
          if (!nm[a].is_q) pushes.push_back(int'(nm[a].pri));
          nm[a] = '{is_q: 1'b1, pri: preg_t'(bundle[i].rq), ro: bundle[i].imm};
        end else if (nm[a].is_q) begin
          nm[a] = '{is_q: 1'b0, pri: preg_t'(mfree.pop_front()), ro: '0};
        end
      end else if (bundle[i].kind == SLOT_OP) begin
        for (int s = 0; s < 2; s++) begin
          automatic map_entry_t e = nm[bundle[i].src[s]];
          automatic int exp = e.is_q ? (int'(e.pri) - 1) * QUEUE_LEN + (mt[e.pri] + int'(e.ro)) % QUEUE_LEN
                                     : int'(e.pri);
          check(ren[i].src_v[s] == bundle[i].src_v[s], $sformatf("%s slot %0d src_v", tag, i));
          if (bundle[i].src_v[s])
            check(int'(ren[i].src[s]) == exp,
                  $sformatf("%s slot %0d src %0d (R%0d): pr%0d, expected pr%0d", tag, i, s, bundle[i].src[s], ren[i].src[s], exp));
        end
        check(ren[i].dst_v == bundle[i].dst_v, $sformatf("%s slot %0d dst_v", tag, i));
        if (bundle[i].dst_v) begin
          automatic map_entry_t e = nm[bundle[i].dst];
          automatic int exp;
          if (e.is_q) begin
            nt[e.pri] = (nt[e.pri] + QUEUE_LEN - 1) % QUEUE_LEN;
            exp = (int'(e.pri) - 1) * QUEUE_LEN + nt[e.pri];
          end else exp = int'(e.pri);
          check(int'(ren[i].dst) == exp,
                $sformatf("%s slot %0d dst (R%0d): pr%0d, expected pr%0d", tag, i, bundle[i].dst, ren[i].dst, exp));
        end
      end
    end
    foreach (pushes[k]) mfree.push_back(pushes[k]);
    mm = nm; mt = nt;
  endtask

  task automatic step(string tag);
    #1;
    model_step(tag);
    @(posedge clk); #1;
    for (int q = 1; q <= int'(NUM_QUEUES); q++)
      check(int'(qtail[q]) == mt[q], $sformatf("%s: Qtail q%0d = %0d, expected %0d", tag, q, qtail[q], mt[q]));
    check(int'(free_count) == mfree.size(), $sformatf("%s: free count %0d, expected %0d", tag, free_count, mfree.size()));
    @(negedge clk);
    bundle = '0;
  endtask

  initial begin
    int wr_exp [5] = '{3, 2, 1, 0, 3};
    int rd_exp [4] = '{3, 2, 1, 0};
    bundle_v = 1'b0; bundle = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    model_reset();
    bundle_v = 1'b1;

    // directed: the array-sum loop
    bundle[0] = s_conn(1, F2, 1);
    step("connect f2");
    for (int n = 0; n < 5; n++) begin
      bundle[0] = s_op(F2, 1, 0, 1'b1, 2'b01);           // fload f2, 0(r1)
      #1;
      check(ren[0].dst == preg_t'(wr_exp[n]), $sformatf("fload %0d wrote pr%0d, expected pr%0d", n, ren[0].dst, wr_exp[n]));
      step("fload");
      if (n >= 1) begin
        bundle[0] = s_op(F6, F6, F2, 1'b1, 2'b11);       // fadd f6, f6, f2
        if (n == 4) bundle[1] = s_conn(1, F2, 0);        // connect after the read
        #1;
        check(ren[0].src[1] == preg_t'(rd_exp[n - 1]),
              $sformatf("fadd %0d read pr%0d, expected pr%0d", n - 1, ren[0].src[1], rd_exp[n - 1]));
        step("fadd");
      end
    end
    bundle[0] = s_op(F6, F6, F2, 1'b1, 2'b11);
    bundle[1] = s_conn(0, F2, 0);                         // disconnect after the read
    bundle[2] = s_op(0, F2, 0, 1'b0, 2'b01);              // read after the disconnect
    #1;
    check(ren[0].src[1] == preg_t'(3), $sformatf("last fadd read pr%0d, expected pr3", ren[0].src[1]));
    check(ren[2].src[0] == preg_t'(NUM_QREGS), $sformatf("f2 after disconnect is pr%0d, expected pr%0d", ren[2].src[0], NUM_QREGS));
    step("epilogue");

    // random
    for (int b = 0; b < 6000; b++) begin
      bit seen [8];
      seen = '{default: 0};
      for (int i = 0; i < int'(ISSUE_W); i++) begin
        automatic int r = $urandom_range(0, 9);
        automatic int a = $urandom_range(0, 7);
        if (r < 3 && !seen[a]) begin
          seen[a] = 1;
          bundle[i] = (r == 0) ? s_conn(0, a, 0) : s_conn($urandom_range(1, 3), a, $urandom_range(0, 3));
        end else if (r < 9) begin
          bundle[i] = s_op($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                           1'($urandom_range(0, 1)), 2'($urandom_range(0, 3)));
        end
      end
      step($sformatf("random %0d", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
