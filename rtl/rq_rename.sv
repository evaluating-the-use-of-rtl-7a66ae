// rq_rename: register-queue access logic for one issue bundle per cycle.
//
// Takes a bundle of ISSUE_W instruction slots, in program order, and
//   * executes its rq-connect slots: `rq-connect q, ar, imm` (q = 1..n) writes
//     {queue q, read offset imm} into ar's map-table entry; `rq-connect 0, ar, 0`
//     maps ar back to a free register of the physical register file;
//   * translates the architected source and destination registers of its
//     ordinary slots into physical register specifiers.  A source mapped to
//     queue q with offset ro reads position (Qtail_q + ro) mod 4; a destination
//     mapped to queue q decrements Qtail_q and writes the new tail position; a
//     register mapped to an ordinary physical register uses that register.
//
// Same-cycle rules, from the document's worked examples:
//   * an rq-connect is forwarded to the slots after it in the same bundle
//     (they use its queue and read offset instead of the map table); slots
//     before it still see the old mapping;
//   * every read uses Qtail as it was at the start of the cycle, so a read and
//     a write of the same queue in one cycle read the old contents;
//   * several writes to one queue in a bundle take successive tail positions.
//
// Timing: purely combinational from the bundle to `ren`; map table, Qtail
// pointers and free list update at the rising edge of every cycle in which
// bundle_v is high.  There is no back-pressure: the free list cannot run out
// (see rq_free_list).
//
// Choices of this design, not the document's: bundle width, forwarding order
// inside a bundle, what happens to the register released by a connect
// (returned to the free list), and that `rq-connect 0` on a register that is
// not connected to a queue leaves it unchanged.  Writes to registers that are
// not connected to a queue go to the register they are mapped to; per-write
// renaming of such registers belongs to the host pipeline and is not done here.
module rq_rename
  import rq_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bundle_v,
  input  slot_t    [ISSUE_W-1:0]     bundle,
  output renamed_t [ISSUE_W-1:0]     ren,
  output ofs_t     [NUM_QUEUES:1]    qtail,
  output logic     [$clog2(NUM_PRF+1)-1:0] free_count  // free PRF registers
);

  localparam int unsigned NMAP = 4 * ISSUE_W;

  // ---------------------------------------------------------------- map table
  areg_t      [NMAP-1:0]    map_rd_idx;
  map_entry_t [NMAP-1:0]    map_rd;
  logic       [ISSUE_W-1:0] map_wr_en;
  areg_t      [ISSUE_W-1:0] map_wr_idx;
  map_entry_t [ISSUE_W-1:0] map_wr_entry;

  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      map_rd_idx[4*i + 0] = bundle[i].src[0];
      map_rd_idx[4*i + 1] = bundle[i].src[1];
      map_rd_idx[4*i + 2] = bundle[i].dst;
      map_rd_idx[4*i + 3] = bundle[i].ar;
    end
  end

  rq_map_table #(.NRD(NMAP), .NWR(ISSUE_W)) u_map (
    .clk, .rst_n,
    .rd_idx(map_rd_idx), .rd_entry(map_rd),
    .wr_en(map_wr_en), .wr_idx(map_wr_idx), .wr_entry(map_wr_entry)
  );

  // ---------------------------------------------------------------- free list
  logic  [ISSUE_W-1:0] fl_pop_v, fl_push_v;
  preg_t [ISSUE_W-1:0] fl_pop_preg, fl_push_preg;
  logic                fl_empty_err;

  rq_free_list #(.NPORT(ISSUE_W)) u_free (
    .clk, .rst_n,
    .pop_v(fl_pop_v), .pop_preg(fl_pop_preg),
    .push_v(fl_push_v), .push_preg(fl_push_preg),
    .count(free_count), .empty_err(fl_empty_err)
  );

  // ------------------------------------------------------- rq-connect slots
  map_entry_t [ISSUE_W-1:0] new_entry;   // mapping written by slot i's connect
  logic       [ISSUE_W-1:0] is_conn;

  // Free-list traffic: a connect frees the PRF register the entry held, a
  // disconnect of a queue-mapped register takes a new one.
  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      is_conn[i]      = bundle[i].kind == SLOT_CONNECT;
      fl_push_v[i]    = bundle_v && is_conn[i] && bundle[i].rq != '0 && !map_rd[4*i + 3].is_q;
      fl_push_preg[i] = map_rd[4*i + 3].pri;
      fl_pop_v[i]     = bundle_v && is_conn[i] && bundle[i].rq == '0 && map_rd[4*i + 3].is_q;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      new_entry[i] = map_rd[4*i + 3];
      if (is_conn[i]) begin
        if (bundle[i].rq != '0)
          // connect (or reconnect) to a queue at read offset imm
          new_entry[i] = '{is_q: 1'b1, pri: preg_t'(bundle[i].rq), ro: bundle[i].imm};
        else if (map_rd[4*i + 3].is_q)
          // disconnect: a fresh register of the physical register file
          new_entry[i] = '{is_q: 1'b0, pri: fl_pop_preg[i], ro: '0};
      end
      map_wr_en[i]    = bundle_v && is_conn[i];
      map_wr_idx[i]   = bundle[i].ar;
      map_wr_entry[i] = new_entry[i];
    end
  end

  // ----------------------------------------- effective mapping of each access
  // Port order per slot: source 0, source 1, destination.
  map_entry_t [ISSUE_W-1:0][2:0] eff;

  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      for (int k = 0; k < 3; k++) begin
        areg_t a;
        a         = (k == 2) ? bundle[i].dst : bundle[i].src[k];
        eff[i][k] = map_rd[4*i + k];
        // the youngest earlier connect of the same register in this bundle wins
        for (int j = 0; j < i; j++)
          if (is_conn[j] && bundle[j].ar == a) eff[i][k] = new_entry[j];
      end
    end
  end

  // ---------------------------------------------------- queue tail pointers
  logic  [2*ISSUE_W-1:0] qc_rd_v;
  qid_t  [2*ISSUE_W-1:0] qc_rd_q;
  ofs_t  [2*ISSUE_W-1:0] qc_rd_ro;
  preg_t [2*ISSUE_W-1:0] qc_rd_preg;
  logic  [ISSUE_W-1:0]   qc_wr_v;
  qid_t  [ISSUE_W-1:0]   qc_wr_q;
  preg_t [ISSUE_W-1:0]   qc_wr_preg;

  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      logic op;
      op = bundle[i].kind == SLOT_OP;
      for (int s = 0; s < 2; s++) begin
        qc_rd_v[2*i + s]  = op && bundle[i].src_v[s] && eff[i][s].is_q;
        qc_rd_q[2*i + s]  = qid_t'(eff[i][s].pri);
        qc_rd_ro[2*i + s] = eff[i][s].ro;
      end
      qc_wr_v[i] = op && bundle[i].dst_v && eff[i][2].is_q;
      qc_wr_q[i] = qid_t'(eff[i][2].pri);
    end
  end

  rq_queue_ctrl #(.NRD(2 * ISSUE_W), .NWR(ISSUE_W)) u_qc (
    .clk, .rst_n, .commit(bundle_v),
    .rd_v(qc_rd_v), .rd_q(qc_rd_q), .rd_ro(qc_rd_ro), .rd_preg(qc_rd_preg),
    .wr_v(qc_wr_v), .wr_q(qc_wr_q), .wr_preg(qc_wr_preg),
    .qtail
  );

  // ------------------------------------------------------ physical specifiers
  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      logic op;
      op = bundle_v && bundle[i].kind == SLOT_OP;
      for (int s = 0; s < 2; s++) begin
        ren[i].src_v[s] = op && bundle[i].src_v[s];
        ren[i].src[s]   = eff[i][s].is_q ? qc_rd_preg[2*i + s] : eff[i][s].pri;
      end
      ren[i].dst_v = op && bundle[i].dst_v;
      ren[i].dst   = eff[i][2].is_q ? qc_wr_preg[i] : eff[i][2].pri;
    end
  end

  // At most one rq-connect per architected register per cycle.
  logic conn_err;
  always_comb begin
    conn_err = 1'b0;
    for (int a = 0; a < int'(ISSUE_W); a++) begin
      for (int b = a + 1; b < int'(ISSUE_W); b++)
        if (is_conn[a] && is_conn[b] && bundle[a].ar == bundle[b].ar) conn_err = 1'b1;
      if (is_conn[a] && bundle[a].rq == '0 && bundle[a].imm != '0) conn_err = 1'b1;
    end
  end

  a_free_register: assert property (@(posedge clk) disable iff (!rst_n) !fl_empty_err)
    else $error("disconnect found no free physical register");

  a_connect_rules: assert property (@(posedge clk) disable iff (!rst_n) bundle_v |-> !conn_err)
    else $error("rq-connect rules broken: two connects of one register, or rq-connect 0 with a nonzero offset");

endmodule
