// dw_pkg: shared types and constants of the decoupled-instruction-window core.
//
// The core keeps two structures for instructions in flight: a small scheduling
// window that only schedules, and a large in-order instruction buffer that holds
// every instruction until commit and re-dispatches (reissues) instructions whose
// source values turned out wrong after a value misprediction. The sizes below
// are the evaluated configuration: an 8-way machine, a 64-entry scheduling
// window, a 128-entry buffer with two-cycle wakeup/select, and a 4096-entry
// stride value predictor. Word width, register count, the operation set and the
// tag format are choices of this implementation.
package dw_pkg;

  parameter int unsigned XLEN     = 32;   // data word (MIPS-like ISA)
  parameter int unsigned NREGS    = 32;   // architectural registers, r0 reads as 0
  parameter int unsigned REGW     = $clog2(NREGS);
  parameter int unsigned BUF_IDXW = 7;    // instruction buffer index width (128 entries)
  parameter int unsigned TAGW     = BUF_IDXW + 1; // tag = {generation bit, buffer index}
  parameter int unsigned VERW     = 4;    // execution version of a buffer entry

  typedef logic [XLEN-1:0] word_t;
  typedef logic [REGW-1:0] reg_t;
  typedef logic [TAGW-1:0] tag_t;
  typedef logic [VERW-1:0] ver_t;

  // Operation set. Every functional unit executes all of them.
  typedef enum logic [3:0] {
    OP_ADD = 4'd0,
    OP_SUB = 4'd1,
    OP_AND = 4'd2,
    OP_OR  = 4'd3,
    OP_XOR = 4'd4,
    OP_SLL = 4'd5,
    OP_SRL = 4'd6,
    OP_SLT = 4'd7,
    OP_MUL = 4'd8,
    OP_DIV = 4'd9
  } op_e;

  // Functional unit latencies (cycles from dispatch to result).
  parameter int unsigned LAT_ALU = 1;
  parameter int unsigned LAT_MUL = 4;
  parameter int unsigned LAT_DIV = 12;

  // Instruction as delivered by the front end.
  typedef struct packed {
    word_t pc;
    op_e   op;
    reg_t  rd;
    reg_t  rs1;
    reg_t  rs2;
    logic  use_imm;   // second operand is imm instead of rs2
    word_t imm;
  } instr_t;

  // One source operand while waiting for or holding its value.
  typedef struct packed {
    logic  ready;     // value holds the latest value seen for this source
    logic  live;      // linked to an in-flight producer (else register/immediate)
    tag_t  tag;       // producer tag; a result broadcast with this tag updates value
    word_t value;
  } src_t;

  // Instruction as it sits in the scheduling window / is dispatched.
  typedef struct packed {
    tag_t  tag;       // its own instruction-buffer tag
    op_e   op;
    src_t  s1;
    src_t  s2;
  } uop_t;

  // Operation sent to a functional unit.
  typedef struct packed {
    tag_t  tag;
    ver_t  ver;
    op_e   op;
    word_t a;
    word_t b;
  } fu_req_t;

  // Result leaving a functional unit / broadcast on a result bus.
  typedef struct packed {
    tag_t  tag;
    ver_t  ver;
    word_t value;
  } result_t;

  // Snoop one result broadcast. A waiting source captures the value. A source
  // that already holds a value takes the new one when it differs; 'changed'
  // then reports that anything computed from the old value is wrong.
  function automatic src_t snoop_src(src_t s, logic bus_valid, result_t bus,
                                     output logic changed);
    src_t n = s;
    changed = 1'b0;
    if (bus_valid && s.live && bus.tag == s.tag) begin
      if (s.ready && s.value != bus.value) changed = 1'b1;
      n.ready = 1'b1;
      n.value = bus.value;
    end
    return n;
  endfunction

  function automatic word_t alu_compute(op_e op, word_t a, word_t b);
    word_t r;
    unique case (op)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_SLL:  r = a << b[4:0];
      OP_SRL:  r = a >> b[4:0];
      OP_SLT:  r = word_t'($signed(a) < $signed(b));
      OP_MUL:  r = a * b;
      OP_DIV:  r = (b == '0) ? '1 : a / b;
      default: r = '0;
    endcase
    return r;
  endfunction

  function automatic int unsigned op_latency(op_e op);
    if (op == OP_MUL) return LAT_MUL;
    if (op == OP_DIV) return LAT_DIV;
    return LAT_ALU;
  endfunction

endpackage
