// tb_rq_reg_array: checks the multi-ported register array against a model.
// After reset all registers read 0.  Random cycles write on every port
// (including several ports to one register, where the highest port wins) and
// read on every port; reads must return the value from before this cycle's
// writes, and writes must be visible in the next cycle.
module tb_rq_reg_array;
  localparam int unsigned DEPTH = 64, DATA_W = 64, NRD = 8, NWR = 4, AW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NRD-1:0][AW-1:0]     rd_addr;
  logic [NRD-1:0][DATA_W-1:0] rd_data;
  logic [NWR-1:0]             wr_en;
  logic [NWR-1:0][AW-1:0]     wr_addr;
  logic [NWR-1:0][DATA_W-1:0] wr_data;

  rq_reg_array dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model [DEPTH];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < int'(DEPTH); i++) model[i] = '0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      for (int p = 0; p < int'(NWR); p++) begin
        wr_en[p]   = 1'($urandom_range(0, 1));
        wr_addr[p] = AW'($urandom_range(0, 7) + (c % 8) * 8);   // a small window: collisions
        wr_data[p] = {$urandom, $urandom};
      end
      for (int p = 0; p < int'(NRD); p++) rd_addr[p] = AW'($urandom_range(0, DEPTH - 1));
      if (c % 3 == 0) rd_addr[0] = wr_addr[0];   // read and write one register together
      #1;
      for (int p = 0; p < int'(NRD); p++) begin
        checks++;
        if (rd_data[p] !== model[rd_addr[p]]) begin
          failures++;
          $display("FAIL cycle %0d port %0d pr%0d: %h, model %h", c, p, rd_addr[p], rd_data[p], model[rd_addr[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < int'(NWR); p++) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
