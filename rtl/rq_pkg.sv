// rq_pkg: configuration and types shared by the register-queue register file.
//
// The register file decouples the architected register names seen by software
// from the physical registers that hold live values.  An architected register
// is mapped, through the map table, either to an ordinary physical register or
// to a position in a register queue: a small circular buffer whose tail
// pointer (Qtail) moves on every write, so that successive loop iterations
// write successive registers without the code naming them.
//
// Sizes that follow the document: 32 architected registers, 256 physical
// registers sharing one name space, queues of 4 registers (2-bit offsets),
// queues numbered 1..n with number 0 meaning "not a queue".  Queue q holds
// physical registers pr[4(q-1)] .. pr[4(q-1)+3]; the ordinary physical
// register file is pr[4n] .. pr[255].
//
// Choices of this design: n = 16 queues, 64-bit registers, an issue bundle
// of 4 instruction slots (2 source and 1 destination register per slot).
package rq_pkg;

  localparam int unsigned NUM_ARCH   = 32;   // architected registers R0..R31
  localparam int unsigned NUM_PHYS   = 256;  // physical name space pr0..pr255
  localparam int unsigned QUEUE_LEN  = 4;    // registers per queue
  localparam int unsigned NUM_QUEUES = 16;   // queues q1..q16
  localparam int unsigned DATA_W     = 64;   // register width
  localparam int unsigned ISSUE_W    = 4;    // instruction slots per bundle

  localparam int unsigned AREG_W    = $clog2(NUM_ARCH);
  localparam int unsigned PREG_W    = $clog2(NUM_PHYS);
  localparam int unsigned OFS_W     = $clog2(QUEUE_LEN);
  localparam int unsigned QID_W     = $clog2(NUM_QUEUES + 1);
  localparam int unsigned NUM_QREGS = NUM_QUEUES * QUEUE_LEN;  // pr0..pr(4n-1)
  localparam int unsigned NUM_PRF   = NUM_PHYS - NUM_QREGS;    // pr4n..pr255
  // At reset architected register Ri is mapped to pr[ARCH_BASE + i], so R31
  // sits in pr255; the PRF registers below ARCH_BASE start out free.
  localparam int unsigned ARCH_BASE = NUM_PHYS - NUM_ARCH;

  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [OFS_W-1:0]  ofs_t;
  typedef logic [QID_W-1:0]  qid_t;
  typedef logic [DATA_W-1:0] data_t;

  // Map table entry.  is_q selects the meaning of pri: a queue number
  // (1..NUM_QUEUES) when set, a physical register index when clear.
  // ro is the read offset from Qtail, used only for queue mappings.
  typedef struct packed {
    logic  is_q;
    preg_t pri;
    ofs_t  ro;
  } map_entry_t;

  typedef enum logic [1:0] {
    SLOT_NOP     = 2'd0,
    SLOT_OP      = 2'd1,  // ordinary instruction: up to 2 sources, 1 destination
    SLOT_CONNECT = 2'd2   // rq-connect rq, ar, imm
  } slot_kind_e;

  // One instruction slot of an issue bundle.  Slots are in program order:
  // slot 0 is the oldest.
  typedef struct packed {
    slot_kind_e      kind;
    logic [1:0]      src_v;   // SLOT_OP: source register present
    areg_t [1:0]     src;     // SLOT_OP: architected source registers
    logic            dst_v;   // SLOT_OP: destination register present
    areg_t           dst;     // SLOT_OP: architected destination register
    qid_t            rq;      // SLOT_CONNECT: queue number, 0 = disconnect
    areg_t           ar;      // SLOT_CONNECT: architected register
    ofs_t            imm;     // SLOT_CONNECT: read offset
  } slot_t;

  // Physical specifiers produced for one slot.
  typedef struct packed {
    logic [1:0]  src_v;
    preg_t [1:0] src;
    logic        dst_v;
    preg_t       dst;
  } renamed_t;

  // Physical register holding position pos of queue q (q counted from 1).
  function automatic preg_t queue_preg(qid_t q, ofs_t pos);
    return preg_t'((int'(q) - 1) * QUEUE_LEN + int'(pos));
  endfunction

endpackage
