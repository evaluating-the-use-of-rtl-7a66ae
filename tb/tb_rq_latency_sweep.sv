// tb_rq_latency_sweep: the array-sum loop (s += a[i]) software-pipelined onto
// register queues for load latencies 1 to 45.
//
// For each latency L the testbench schedules N iterations cycle by cycle and
// acts as the execution units.  Schedule, built by a small list scheduler in
// the testbench, which keeps its own model of which element sits where:
//   * a load `fload g1, 4(r1)` plus `iadd r1, r1, #4` starts every II = 2
//     cycles when a slot is free; g1 is connected to queue 1, so each load
//     appends to queue 1;
//   * when a queue already holds 4 newer elements than a still-needed element,
//     that element is at offset 3 and is copied into the next queue with
//     `fmove g(m+1), g(m)` before the next write overwrites it; registers g1..g16
//     are connected to queues 1..16 at offset 3, so chains of queues grow as
//     far as the latency needs;
//   * the accumulate `fadd s, s, c` of element i issues no earlier than L cycles
//     after its load; the reader register c is re-connected (in the same
//     bundle, before the fadd) to whichever queue and offset holds element i.
// Copies have priority, then the accumulate, then new loads; at most
// ISSUE_W instructions issue per cycle.  The copy rule is conservative: it
// moves every element still unread when it reaches offset 3, so a chain can be
// one queue longer than the live instances strictly require, and slot
// conflicts can stretch the loop beyond II cycles per iteration.
// Checked: every value the accumulate reads is the element the schedule
// expects, the final sum, and that no element is lost.  Reported per latency:
// queues used, architected registers used and cycles per iteration.
module tb_rq_latency_sweep;
  import rq_pkg::*;

  localparam int N  = 40;       // iterations per latency
  localparam int II = 2;        // initiation interval for the loads
  localparam int R1 = 1, C = 30, S = 31, G0 = 8;   // g_m = R(G0 + m - 1)

  logic clk = 1'b0, rst_n = 1'b0, bundle_v;
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic data_t elem(int k);
    return data_t'(64'h5000 + 64'(k) * 29);
  endfunction

  typedef enum int {X_LOAD, X_IADD, X_FMOVE, X_FADD, X_CONN} xop_e;
  typedef struct { xop_e op; int a, b, q, ro, e; } xi_t;

  task automatic issue(xi_t ins[$]);
    @(negedge clk);
    bundle_v = 1'b1; bundle = '0; wb_v = '0;
    foreach (ins[i]) begin
      case (ins[i].op)
        X_CONN: begin
          bundle[i].kind = SLOT_CONNECT; bundle[i].rq = qid_t'(ins[i].q);
          bundle[i].ar = areg_t'(ins[i].a); bundle[i].imm = ofs_t'(ins[i].ro);
        end
        X_LOAD:  begin bundle[i].kind = SLOT_OP; bundle[i].src_v = 2'b01; bundle[i].src[0] = areg_t'(R1);
                       bundle[i].dst_v = 1'b1; bundle[i].dst = areg_t'(G0); end
        X_IADD:  begin bundle[i].kind = SLOT_OP; bundle[i].src_v = 2'b01; bundle[i].src[0] = areg_t'(R1);
                       bundle[i].dst_v = 1'b1; bundle[i].dst = areg_t'(R1); end
        X_FMOVE: begin bundle[i].kind = SLOT_OP; bundle[i].src_v = 2'b01; bundle[i].src[0] = areg_t'(ins[i].a);
                       bundle[i].dst_v = 1'b1; bundle[i].dst = areg_t'(ins[i].b); end
        X_FADD:  begin bundle[i].kind = SLOT_OP; bundle[i].src_v = 2'b11; bundle[i].src[0] = areg_t'(S);
                       bundle[i].src[1] = areg_t'(C); bundle[i].dst_v = 1'b1; bundle[i].dst = areg_t'(S); end
        default: ;
      endcase
    end
    #1;
    foreach (ins[i]) begin
      if (ins[i].op == X_CONN) continue;
      wb_v[i] = 1'b1; wb_preg[i] = ren[i].dst;
      case (ins[i].op)
        X_LOAD:  wb_data[i] = elem((int'(src_data[i][0]) + 4) / 4);
        X_IADD:  wb_data[i] = src_data[i][0] + 4;
        X_FMOVE: wb_data[i] = src_data[i][0];
        default: begin
          wb_data[i] = src_data[i][0] + src_data[i][1];
          check(src_data[i][1] == elem(ins[i].e),
                $sformatf("accumulate of element %0d read %0h, expected %0h", ins[i].e, src_data[i][1], elem(ins[i].e)));
        end
      endcase
    end
    @(posedge clk); #1;
  endtask

  task automatic run_latency(int L);
    int qlist [NUM_QUEUES+1][$];   // element ids, newest first
    int loc [N+1];                 // newest queue holding the element
    int load_cyc [N+1];
    int next_load = 1, next_use = 1, last_load_start = -100;
    int c = 0, k_used = 1, cur_q = -1, cur_ro = -1;
    int regs_used;
    data_t s_exp = '0, v;

    bundle_v = 1'b0; bundle = '0; wb_v = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // prologue: connect g1..g16 to queues 1..16 at offset 3
    for (int m = 1; m <= int'(NUM_QUEUES); m += ISSUE_W) begin
      xi_t ins[$];
      for (int j = 0; j < int'(ISSUE_W); j++)
        ins.push_back('{X_CONN, G0 + m - 1 + j, 0, m + j, 3, 0});
      issue(ins);
    end
    foreach (loc[i]) loc[i] = 0;

    while (next_use <= N && c < 20 * N + 4 * L + 100) begin
      xi_t ins[$];
      int wr [NUM_QUEUES+1];
      foreach (wr[m]) wr[m] = -1;
      c++;
      // 1. copies of needed elements about to be overwritten
      for (int m = 1; m < int'(NUM_QUEUES); m++) begin
        if (qlist[m].size() >= QUEUE_LEN) begin
          int e = qlist[m][QUEUE_LEN - 1];
          if (e >= next_use && loc[e] == m && ins.size() < int'(ISSUE_W)) begin
            ins.push_back('{X_FMOVE, G0 + m - 1, G0 + m, 0, 0, e});
            wr[m + 1] = e;
            if (m + 1 > k_used) k_used = m + 1;
          end
        end
      end
      // 2. the accumulate of the next element, once its load has completed
      if (next_use < next_load && c >= load_cyc[next_use] + L) begin
        int e = next_use, q = loc[e], ro = -1;
        foreach (qlist[q][j]) if (qlist[q][j] == e) ro = j;
        check(ro >= 0 && ro < int'(QUEUE_LEN), $sformatf("L=%0d: element %0d lost", L, e));
        if (!(ro >= 0 && ro < int'(QUEUE_LEN))) return;
        if ((q != cur_q || ro != cur_ro) && ins.size() + 2 <= int'(ISSUE_W)) begin
          ins.push_back('{X_CONN, C, 0, q, ro, 0});
          cur_q = q; cur_ro = ro;
        end
        if (q == cur_q && ro == cur_ro && ins.size() < int'(ISSUE_W)) begin
          ins.push_back('{X_FADD, 0, 0, 0, 0, e});
          s_exp += elem(e);
          next_use++;
        end
      end
      // 3. a new iteration: load and pointer increment
      if (next_load <= N && c - last_load_start >= II && ins.size() + 2 <= int'(ISSUE_W)) begin
        ins.push_back('{X_LOAD, 0, 0, 0, 0, next_load});
        ins.push_back('{X_IADD, 0, 0, 0, 0, 0});
        wr[1] = next_load;
        load_cyc[next_load] = c;
        last_load_start = c;
        next_load++;
      end
      issue(ins);
      // model update at the end of the cycle
      for (int m = 1; m <= int'(NUM_QUEUES); m++)
        if (wr[m] > 0) begin
          qlist[m].push_front(wr[m]);
          if (qlist[m].size() > int'(QUEUE_LEN)) void'(qlist[m].pop_back());
          loc[wr[m]] = m;
        end
    end
    @(negedge clk); bundle_v = 1'b0; bundle = '0; wb_v = '0;
    check(next_use == N + 1, $sformatf("L=%0d: only %0d of %0d iterations finished", L, next_use - 1, N));
    // read the sum
    @(negedge clk);
    bundle_v = 1'b1; bundle = '0;
    bundle[0].kind = SLOT_OP; bundle[0].src_v = 2'b01; bundle[0].src[0] = areg_t'(S);
    #1 v = src_data[0][0];
    @(posedge clk); @(negedge clk); bundle_v = 1'b0; bundle = '0;
    check(v == s_exp, $sformatf("L=%0d: sum %0h, expected %0h", L, v, s_exp));
    regs_used = k_used + 3;   // g1..gK, reader, sum, pointer
    $display("load latency %2d: queues used %2d, architected registers %2d, %0d cycles for %0d iterations",
             L, k_used, regs_used, c, N);
  endtask

  initial begin
    for (int L = 1; L <= 45; L++) run_latency(L);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
