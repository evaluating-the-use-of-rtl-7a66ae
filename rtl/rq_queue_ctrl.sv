// rq_queue_ctrl: Qtail pointers and queue address arithmetic.
//
// Every register queue q (1..NUM_QUEUES) owns QUEUE_LEN contiguous physical
// registers and a Qtail pointer.  A read of queue q at read offset ro
// addresses position (Qtail + ro) mod QUEUE_LEN; the physical specifier is
// the queue's base with its low OFS_W bits replaced by that position, so the
// adder is only OFS_W (2) bits wide.  A write to queue q first decrements
// Qtail and then addresses the new Qtail position, so offset 0 is always the
// most recent write, offset 1 the one before, and so on.
//
// Timing: all specifiers are combinational from the Qtail values at the start
// of the cycle.  Reads therefore never see a write issued in the same cycle
// (the document's rule for a read and a write in one cycle).  When several
// write ports name the same queue in one cycle they are taken in port order:
// the k-th of them gets Qtail-k, and Qtail drops by the number of writes at
// the clock edge when `commit` is high.  Qtail resets to 0, as in the
// document's worked examples.  Multiple writes per queue per cycle and the
// reset value are choices of this design; the arithmetic follows the
// document.
module rq_queue_ctrl
  import rq_pkg::*;
#(
  parameter int unsigned NRD = 2 * ISSUE_W,  // read translation ports
  parameter int unsigned NWR = ISSUE_W       // write translation ports
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              commit,           // apply this cycle's writes
  input  logic  [NRD-1:0]   rd_v,
  input  qid_t  [NRD-1:0]   rd_q,
  input  ofs_t  [NRD-1:0]   rd_ro,
  output preg_t [NRD-1:0]   rd_preg,
  input  logic  [NWR-1:0]   wr_v,
  input  qid_t  [NWR-1:0]   wr_q,
  output preg_t [NWR-1:0]   wr_preg,
  output ofs_t  [NUM_QUEUES:1] qtail          // current Qtail of each queue
);

  ofs_t qtail_q [NUM_QUEUES + 1];  // index 0 unused (queue 0 means "none")
  ofs_t qtail_d [NUM_QUEUES + 1];

  always_comb begin
    for (int q = 1; q <= int'(NUM_QUEUES); q++) qtail[q] = qtail_q[q];
  end

  // Reads: position = Qtail + ro (mod QUEUE_LEN).
  always_comb begin
    for (int p = 0; p < int'(NRD); p++)
      rd_preg[p] = queue_preg(rd_q[p], ofs_t'(qtail_q[rd_q[p]] + rd_ro[p]));
  end

  // Writes: the k-th write to a queue in this cycle lands at Qtail - k.
  always_comb begin
    for (int q = 0; q <= int'(NUM_QUEUES); q++) qtail_d[q] = qtail_q[q];
    for (int p = 0; p < int'(NWR); p++) begin
      wr_preg[p] = '0;
      if (wr_v[p]) begin
        qtail_d[wr_q[p]] = qtail_d[wr_q[p]] - ofs_t'(1);
        wr_preg[p]       = queue_preg(wr_q[p], qtail_d[wr_q[p]]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int q = 0; q <= int'(NUM_QUEUES); q++) qtail_q[q] <= '0;
    end else if (commit) begin
      for (int q = 1; q <= int'(NUM_QUEUES); q++) qtail_q[q] <= qtail_d[q];
    end
  end

  // Queue numbers must name a real queue.
  logic bad_queue;
  always_comb begin
    bad_queue = 1'b0;
    for (int p = 0; p < int'(NWR); p++)
      if (wr_v[p] && (wr_q[p] == '0 || 32'(wr_q[p]) > NUM_QUEUES)) bad_queue = 1'b1;
    for (int p = 0; p < int'(NRD); p++)
      if (rd_v[p] && (rd_q[p] == '0 || 32'(rd_q[p]) > NUM_QUEUES)) bad_queue = 1'b1;
  end

  a_valid_queue: assert property (@(posedge clk) disable iff (!rst_n) commit |-> !bad_queue)
    else $error("access to a queue number outside 1..%0d", NUM_QUEUES);

endmodule
