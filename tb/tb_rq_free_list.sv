// tb_rq_free_list: checks the free list against a queue model.
// After reset the list must hand out pr[NUM_QREGS], pr[NUM_QREGS+1], ... in
// order.  Random cycles then pop (never more than the list holds) and push
// back registers popped earlier; every popped register and the count are
// compared with the model, and a register must never be handed out twice
// while it is in use.
module tb_rq_free_list;
  import rq_pkg::*;
  localparam int unsigned NPORT = ISSUE_W;
  localparam int unsigned CW = $clog2(NUM_PRF + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic  [NPORT-1:0] pop_v, push_v;
  preg_t [NPORT-1:0] pop_preg, push_preg;
  logic  [CW-1:0]    count;
  logic              empty_err;

  rq_free_list dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model[$];
  int held[$];
  bit in_use [NUM_PHYS];

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
    pop_v = '0; push_v = '0; push_preg = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = NUM_QREGS; r < int'(ARCH_BASE); r++) model.push_back(r);
    in_use = '{default: 0};
    #1;
    check(int'(count) == model.size(), $sformatf("reset count %0d, expected %0d", count, model.size()));
    for (int c = 0; c < 6000; c++) begin
      automatic int npop = 0;
      automatic int pushed[$];
      @(negedge clk);
      // bias towards draining in the first half and refilling in the second
      for (int p = 0; p < int'(NPORT); p++) begin
        pop_v[p] = 1'($urandom_range(0, 9) < ((c % 400) < 200 ? 6 : 2)) && (npop < model.size());
        if (pop_v[p]) npop++;
        push_v[p] = 1'b0;
        if (held.size() > 0 && $urandom_range(0, 9) < ((c % 400) < 200 ? 2 : 6)) begin
          automatic int k = $urandom_range(0, held.size() - 1);
          push_v[p]    = 1'b1;
          push_preg[p] = preg_t'(held[k]);
          pushed.push_back(held[k]);
          held.delete(k);
        end
      end
      #1;
      check(!empty_err, "empty_err with legal pops");
      for (int p = 0; p < int'(NPORT); p++) begin
        if (!pop_v[p]) continue;
        begin
          automatic int e = model.pop_front();
          check(int'(pop_preg[p]) == e, $sformatf("cycle %0d port %0d popped pr%0d, expected pr%0d", c, p, pop_preg[p], e));
          check(!in_use[pop_preg[p]], $sformatf("pr%0d handed out twice", pop_preg[p]));
          in_use[pop_preg[p]] = 1;
          held.push_back(int'(pop_preg[p]));
        end
      end
      foreach (pushed[k]) begin model.push_back(pushed[k]); in_use[pushed[k]] = 0; end
      @(posedge clk); #1;
      check(int'(count) == model.size(), $sformatf("cycle %0d count %0d, expected %0d", c, count, model.size()));
    end
    // pop more than the list holds: the error flag must rise
    @(negedge clk);
    push_v = '0;
    while (model.size() > 0) begin
      pop_v = '0; pop_v[0] = 1'b1;
      @(posedge clk); #1;
      void'(model.pop_front());
      @(negedge clk);
    end
    pop_v = '0;
    #1;
    check(count == '0, "list not empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
