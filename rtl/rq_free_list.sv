// rq_free_list: free registers of the ordinary physical register file.
//
// `rq-connect 0, ar, 0` disconnects an architected register from its queue
// and maps it to "a free register from the physical register file"; this
// list supplies that register.  Conversely, when an architected register that
// holds an ordinary physical register is connected to a queue, that register
// is no longer named by anyone and is returned here.
//
// Implementation: a circular buffer of register indices with NPORT pop and
// NPORT push ports per cycle.  Pops are served in port order from the head;
// pop_preg is valid combinationally in the same cycle and the head moves at
// the clock edge.  Pushes are appended at the tail at the clock edge, so a
// register returned in one cycle can be handed out from the next cycle on.
// At reset the list holds every PRF register not given to an architected
// register: pr[NUM_QREGS] .. pr[ARCH_BASE-1].
//
// Only the existence of free registers is taken from the document; the list
// itself is this design's choice.  With every architected register owning at
// most one PRF register the list can never run dry (32 owners, NUM_PRF
// registers), which `empty_err` and an assertion watch.
module rq_free_list
  import rq_pkg::*;
#(
  parameter int unsigned NPORT = ISSUE_W,
  parameter int unsigned DEPTH = NUM_PRF,
  parameter int unsigned FIRST = NUM_QREGS,            // first register at reset
  parameter int unsigned INIT  = ARCH_BASE - NUM_QREGS, // registers free at reset
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NPORT-1:0]   pop_v,
  output preg_t [NPORT-1:0]   pop_preg,
  input  logic  [NPORT-1:0]   push_v,
  input  preg_t [NPORT-1:0]   push_preg,
  output logic  [CW-1:0]      count,
  output logic                empty_err   // more pops requested than registers held
);

  preg_t          mem [DEPTH];
  logic [PW-1:0]  head_q, tail_q;
  logic [CW-1:0]  count_q;
  logic [CW-1:0]  n_pop, n_push;

  function automatic logic [PW-1:0] wrap(int unsigned v);
    return PW'(v % DEPTH);
  endfunction

  always_comb begin
    n_pop  = '0;
    for (int p = 0; p < int'(NPORT); p++) begin
      pop_preg[p] = mem[wrap(int'(head_q) + int'(n_pop))];
      if (pop_v[p]) n_pop = n_pop + 1'b1;
    end
    n_push = '0;
    for (int p = 0; p < int'(NPORT); p++) if (push_v[p]) n_push = n_push + 1'b1;
  end

  assign count     = count_q;
  assign empty_err = n_pop > count_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= preg_t'(FIRST + i);
      head_q  <= '0;
      tail_q  <= wrap(INIT);
      count_q <= CW'(INIT);
    end else begin
      logic [CW-1:0] k;
      k = '0;
      for (int p = 0; p < int'(NPORT); p++) begin
        if (push_v[p]) begin
          mem[wrap(int'(tail_q) + int'(k))] <= push_preg[p];
          k = k + 1'b1;
        end
      end
      head_q  <= wrap(int'(head_q) + int'(n_pop));
      tail_q  <= wrap(int'(tail_q) + int'(n_push));
      count_q <= count_q + n_push - n_pop;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !empty_err)
    else $error("free list: pop from empty list");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(count_q) + 32'(n_push) <= DEPTH + 32'(n_pop))
    else $error("free list: overflow");

endmodule
