// rq_map_table: architected register map table.
//
// One entry per architected register.  Each entry holds a pri field and a
// read offset ro: pri is either a physical register index (ordinary mapping)
// or a register-queue number (queue mapping, set by rq-connect), and is_q
// tells which.  Read ports are combinational and return the table as it was
// at the start of the cycle; write ports update entries at the rising clock
// edge.  At reset register Ri maps to physical register pr[ARCH_BASE+i]
// (R31 -> pr255), so the file behaves as a plain register file until the
// first rq-connect.
//
// The entry layout (pri, ro) follows the document; the explicit is_q flag,
// the reset mapping and the number of ports are choices of this design.
// Two write ports must not name the same entry in one cycle (asserted):
// at most one rq-connect per architected register is issued per cycle.
module rq_map_table
  import rq_pkg::*;
#(
  parameter int unsigned NRD = 4 * ISSUE_W,  // read ports
  parameter int unsigned NWR = ISSUE_W       // write ports
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  areg_t      [NRD-1:0] rd_idx,
  output map_entry_t [NRD-1:0] rd_entry,
  input  logic       [NWR-1:0] wr_en,
  input  areg_t      [NWR-1:0] wr_idx,
  input  map_entry_t [NWR-1:0] wr_entry
);

  map_entry_t table_q [NUM_ARCH];

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) rd_entry[p] = table_q[rd_idx[p]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_ARCH); i++)
        table_q[i] <= '{is_q: 1'b0, pri: preg_t'(ARCH_BASE + i), ro: '0};
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (wr_en[p]) table_q[wr_idx[p]] <= wr_entry[p];
    end
  end

  logic dup_write;
  always_comb begin
    dup_write = 1'b0;
    for (int a = 0; a < int'(NWR); a++)
      for (int b = a + 1; b < int'(NWR); b++)
        if (wr_en[a] && wr_en[b] && wr_idx[a] == wr_idx[b]) dup_write = 1'b1;
  end

  a_one_write_per_entry: assert property (@(posedge clk) disable iff (!rst_n) !dup_write)
    else $error("map table: two writes to one entry in one cycle");

endmodule
