// tb_rq_map_table: checks the map table against an array model.
// After reset every register Ri must map to pr[ARCH_BASE+i] with no queue and
// offset 0.  Then random cycles write up to NWR distinct entries and every
// read port reads a random entry; reads must return the table as it was at
// the start of the cycle, and the writes must be visible from the next cycle.
module tb_rq_map_table;
  import rq_pkg::*;
  localparam int unsigned NRD = 4 * ISSUE_W;
  localparam int unsigned NWR = ISSUE_W;

  logic clk = 1'b0, rst_n = 1'b0;
  areg_t      [NRD-1:0] rd_idx;
  map_entry_t [NRD-1:0] rd_entry;
  logic       [NWR-1:0] wr_en;
  areg_t      [NWR-1:0] wr_idx;
  map_entry_t [NWR-1:0] wr_entry;

  rq_map_table dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  map_entry_t model [NUM_ARCH];

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; wr_idx = '0; wr_entry = '0; rd_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < int'(NUM_ARCH); i++)
      model[i] = '{is_q: 1'b0, pri: preg_t'(ARCH_BASE + i), ro: '0};
    // reset contents, read through every port
    for (int i = 0; i < int'(NUM_ARCH); i++) begin
      for (int p = 0; p < int'(NRD); p++) rd_idx[p] = areg_t'(i);
      #1;
      for (int p = 0; p < int'(NRD); p++) begin
        checks++;
        if (rd_entry[p] != model[i]) begin
          failures++;
          $display("FAIL reset entry R%0d port %0d: %p", i, p, rd_entry[p]);
        end
      end
    end
    for (int c = 0; c < 4000; c++) begin
      automatic bit used [NUM_ARCH];
      used = '{default: 0};
      @(negedge clk);
      for (int p = 0; p < int'(NWR); p++) begin
        automatic int a = $urandom_range(0, NUM_ARCH - 1);
        wr_en[p]    = !used[a] && ($urandom_range(0, 2) != 0);
        used[a]     = used[a] | wr_en[p];
        wr_idx[p]   = areg_t'(a);
        wr_entry[p] = map_entry_t'($urandom);
      end
      for (int p = 0; p < int'(NRD); p++) rd_idx[p] = areg_t'($urandom_range(0, NUM_ARCH - 1));
      #1;
      for (int p = 0; p < int'(NRD); p++) begin
        checks++;
        if (rd_entry[p] != model[rd_idx[p]]) begin
          failures++;
          $display("FAIL cycle %0d port %0d R%0d: %p, model %p", c, p, rd_idx[p], rd_entry[p], model[rd_idx[p]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < int'(NWR); p++) if (wr_en[p]) model[wr_idx[p]] = wr_entry[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
