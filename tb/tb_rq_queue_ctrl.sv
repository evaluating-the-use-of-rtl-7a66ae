// tb_rq_queue_ctrl: checks Qtail pointers and queue address arithmetic.
// A reference model keeps one Qtail per queue.  Each random cycle presents
// reads (queue, offset) and writes (queue) on all ports with a random commit.
// Expected: read specifier = 4(q-1) + (Qtail+ro) mod 4 using the Qtail at
// the start of the cycle; the k-th write to a queue in the cycle lands at
// 4(q-1) + (Qtail-k) mod 4; Qtail moves only when commit is high.  Starts
// with the single-queue sequence of writes from the array-sum example
// (Qtail 0 -> 3 -> 2 -> 1 -> 0 -> 3), then the register-file example with
// Qtail 1 and read offset 2, which must address pr3.
module tb_rq_queue_ctrl;
  import rq_pkg::*;
  localparam int unsigned NRD = 2 * ISSUE_W;
  localparam int unsigned NWR = ISSUE_W;

  logic clk = 1'b0, rst_n = 1'b0, commit;
  logic  [NRD-1:0] rd_v;
  qid_t  [NRD-1:0] rd_q;
  ofs_t  [NRD-1:0] rd_ro;
  preg_t [NRD-1:0] rd_preg;
  logic  [NWR-1:0] wr_v;
  qid_t  [NWR-1:0] wr_q;
  preg_t [NWR-1:0] wr_preg;
  ofs_t  [NUM_QUEUES:1] qtail;

  rq_queue_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mt [NUM_QUEUES+1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int exp_tail [5] = '{3, 2, 1, 0, 3};
    commit = 1'b0; rd_v = '0; rd_q = '0; rd_ro = '0; wr_v = '0; wr_q = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int q = 0; q <= int'(NUM_QUEUES); q++) mt[q] = 0;
    for (int q = 1; q <= int'(NUM_QUEUES); q++) check(qtail[q] == '0, "Qtail not 0 after reset");

    // single writes to q1, as the fload instructions of the example do
    for (int n = 0; n < 5; n++) begin
      @(negedge clk);
      commit = 1'b1; wr_v = '0; wr_v[0] = 1'b1; wr_q[0] = qid_t'(1);
      #1;
      check(wr_preg[0] == preg_t'(exp_tail[n]),
            $sformatf("write %0d to q1 went to pr%0d, expected pr%0d", n, wr_preg[0], exp_tail[n]));
      @(posedge clk); #1;
      check(int'(qtail[1]) == exp_tail[n], $sformatf("Qtail q1 = %0d, expected %0d", qtail[1], exp_tail[n]));
    end
    // two more writes bring Qtail of q1 to 1; a read at offset 2 must then
    // address position 3 of queue 1 (pr3), and of queue 2 pr7
    for (int n = 0; n < 2; n++) begin
      @(negedge clk);
      commit = 1'b1; wr_v = '0; wr_v[0] = 1'b1; wr_q[0] = qid_t'(1);
      @(posedge clk); #1;
    end
    @(negedge clk);
    commit = 1'b0; wr_v = '0;
    rd_v = '0; rd_v[0] = 1'b1; rd_q[0] = qid_t'(1); rd_ro[0] = ofs_t'(2);
    #1;
    check(int'(qtail[1]) == 1, $sformatf("Qtail q1 = %0d, expected 1", qtail[1]));
    check(rd_preg[0] == preg_t'(3), $sformatf("q1 read at offset 2 with Qtail 1: pr%0d, expected pr3", rd_preg[0]));
    mt[1] = 1;

    for (int c = 0; c < 5000; c++) begin
      automatic int t [NUM_QUEUES+1];
      @(negedge clk);
      commit = 1'($urandom_range(0, 3) != 0);
      for (int p = 0; p < int'(NRD); p++) begin
        rd_v[p]  = 1'b1;
        rd_q[p]  = qid_t'($urandom_range(1, NUM_QUEUES));
        rd_ro[p] = ofs_t'($urandom);
      end
      for (int p = 0; p < int'(NWR); p++) begin
        wr_v[p] = 1'($urandom_range(0, 1));
        wr_q[p] = qid_t'($urandom_range(1, 3));   // few queues: frequent collisions
      end
      #1;
      t = mt;
      for (int p = 0; p < int'(NRD); p++) begin
        automatic int q = int'(rd_q[p]);
        automatic int e = (q - 1) * QUEUE_LEN + (mt[q] + int'(rd_ro[p])) % QUEUE_LEN;
        check(int'(rd_preg[p]) == e, $sformatf("cycle %0d read port %0d: pr%0d, expected pr%0d", c, p, rd_preg[p], e));
      end
      for (int p = 0; p < int'(NWR); p++) begin
        if (!wr_v[p]) continue;
        begin
          automatic int q = int'(wr_q[p]);
          t[q] = (t[q] + QUEUE_LEN - 1) % QUEUE_LEN;
          check(int'(wr_preg[p]) == (q - 1) * QUEUE_LEN + t[q],
                $sformatf("cycle %0d write port %0d: pr%0d, expected pr%0d", c, p, wr_preg[p], (q - 1) * QUEUE_LEN + t[q]));
        end
      end
      @(posedge clk); #1;
      if (commit) mt = t;
      for (int q = 1; q <= int'(NUM_QUEUES); q++)
        check(int'(qtail[q]) == mt[q], $sformatf("cycle %0d: Qtail q%0d = %0d, expected %0d", c, q, qtail[q], mt[q]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
