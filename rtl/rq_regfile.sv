// rq_regfile: register file with register queues (top level).
//
// The problem: a software-pipelined loop keeps several instances of a loop
// variable alive at once, one per overlapped iteration, and every instance
// normally needs its own architected register name.  Here those instances
// live in register queues, circular buffers of physical registers outside
// the architected name space.  Software connects an architected register to
// a queue position with `rq-connect`; every write to that register then goes
// to a new queue position and older instances stay readable at fixed offsets
// from the queue tail, so the loop needs neither unrolling nor one
// architected register per instance.
//
// Structure: rq_rename (map table, Qtail pointers, free list and the access
// rules) turns each bundle's architected registers into physical specifiers
// pr0..pr255.  pr0..pr[4n-1] are held by the queue register array, the rest
// by the physical register file array; specifiers are routed to the right
// array by their value.
//
// Interface and timing:
//   bundle_v/bundle  ISSUE_W slots in program order, accepted every cycle.
//   ren              physical specifiers of each slot, same cycle.
//   src_data         contents of the slots' source registers, same cycle,
//                    as they were at the start of the cycle.
//   wb_*             write-back of results by physical specifier (usually a
//                    specifier earlier returned in ren[].dst); written at the
//                    clock edge.
//   qtail            Qtail of each queue, for observation.
//   free_count       free registers in the physical register file.
// The split of the name space and the map-table indirection follow the
// document; the port structure (combinational read in the rename cycle,
// separate write-back ports) is this design's choice, standing in for the
// reservation stations and forwarding network of the host pipeline.
module rq_regfile
  import rq_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 bundle_v,
  input  slot_t    [ISSUE_W-1:0]               bundle,
  output renamed_t [ISSUE_W-1:0]               ren,
  output data_t    [ISSUE_W-1:0][1:0]          src_data,
  input  logic     [ISSUE_W-1:0]               wb_v,
  input  preg_t    [ISSUE_W-1:0]               wb_preg,
  input  data_t    [ISSUE_W-1:0]               wb_data,
  output ofs_t     [NUM_QUEUES:1]              qtail,
  output logic     [$clog2(NUM_PRF+1)-1:0]     free_count
);

  localparam int unsigned NRD = 2 * ISSUE_W;
  localparam int unsigned QAW = $clog2(NUM_QREGS);
  localparam int unsigned PAW = $clog2(NUM_PRF);

  rq_rename u_rename (
    .clk, .rst_n, .bundle_v, .bundle, .ren, .qtail, .free_count
  );

  // -------------------------------------------------------------- routing
  logic [NRD-1:0][QAW-1:0]   q_rd_addr;
  logic [NRD-1:0][PAW-1:0]   p_rd_addr;
  data_t [NRD-1:0]           q_rd_data, p_rd_data;
  logic  [ISSUE_W-1:0]       q_wr_en, p_wr_en;
  logic [ISSUE_W-1:0][QAW-1:0] q_wr_addr;
  logic [ISSUE_W-1:0][PAW-1:0] p_wr_addr;

  function automatic logic in_queues(preg_t p);
    return 32'(p) < NUM_QREGS;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(ISSUE_W); i++) begin
      for (int s = 0; s < 2; s++) begin
        q_rd_addr[2*i + s] = QAW'(ren[i].src[s]);
        p_rd_addr[2*i + s] = PAW'(32'(ren[i].src[s]) - NUM_QREGS);
        src_data[i][s]     = in_queues(ren[i].src[s]) ? q_rd_data[2*i + s]
                                                      : p_rd_data[2*i + s];
      end
      q_wr_en[i]   = wb_v[i] &&  in_queues(wb_preg[i]);
      p_wr_en[i]   = wb_v[i] && !in_queues(wb_preg[i]);
      q_wr_addr[i] = QAW'(wb_preg[i]);
      p_wr_addr[i] = PAW'(32'(wb_preg[i]) - NUM_QREGS);
    end
  end

  // -------------------------------------------------------------- storage
  rq_reg_array #(.DEPTH(NUM_QREGS), .DATA_W(DATA_W), .NRD(NRD), .NWR(ISSUE_W)) u_qregs (
    .clk, .rst_n,
    .rd_addr(q_rd_addr), .rd_data(q_rd_data),
    .wr_en(q_wr_en), .wr_addr(q_wr_addr), .wr_data(wb_data)
  );

  rq_reg_array #(.DEPTH(NUM_PRF), .DATA_W(DATA_W), .NRD(NRD), .NWR(ISSUE_W)) u_prf (
    .clk, .rst_n,
    .rd_addr(p_rd_addr), .rd_data(p_rd_data),
    .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_data(wb_data)
  );

endmodule
