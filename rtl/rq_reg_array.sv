// rq_reg_array: multi-ported register array.
//
// Used twice in the register file: once for the registers that make up the
// register queues (pr0..pr[4n-1]) and once for the ordinary physical register
// file (pr[4n]..pr255).  The document keeps the two in one name space but
// "logically (and probably physically) separate"; this array is the storage
// of either.
//
// Reads are combinational and return the value held at the start of the
// cycle, so a read and a write of the same register in one cycle read the
// old value, as the document requires for queue registers.  Writes take
// effect at the rising clock edge; if two write ports name the same register
// the higher-numbered port wins (a choice of this design).  The array is
// cleared at reset, also a choice of this design.
module rq_reg_array #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned NRD    = 8,
  parameter int unsigned NWR    = 4,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NRD-1:0][AW-1:0]       rd_addr,
  output logic [NRD-1:0][DATA_W-1:0]   rd_data,
  input  logic [NWR-1:0]               wr_en,
  input  logic [NWR-1:0][AW-1:0]       wr_addr,
  input  logic [NWR-1:0][DATA_W-1:0]   wr_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_comb begin
    for (int p = 0; p < int'(NRD); p++) begin
      rd_data[p] = '0;
      if (32'(rd_addr[p]) < DEPTH) rd_data[p] = mem[rd_addr[p]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (wr_en[p] && 32'(wr_addr[p]) < DEPTH) mem[wr_addr[p]] <= wr_data[p];
    end
  end

endmodule
