// dfg_pkg: types and constants shared by the DFG task processors.
//
// A data flow graph is compiled off-line into a queue of tasks; each task is
// one 41-bit instruction. The field layout below follows the published
// instruction format bit for bit:
//   [40:25] multiplication factor (16-bit immediate)
//   [24:19] operand1 identifier (ID of the task producing operand 1)
//   [18:13] operand2 identifier
//   [12:7]  task identifier
//   [6]     last_task bit (1 on the last task of an iteration)
//   [5:4]   operation code
//   [3:2]   operand1 iteration number (0 = this iteration, k = k iterations ago)
//   [1:0]   operand2 iteration number
// The opcode encoding, the fixed-point format and the reserved input-stream
// ID are this design's own choices (the format names the fields only).
package dfg_pkg;

  localparam int unsigned ID_W    = 6;   // task identifier width
  localparam int unsigned DATA_W  = 16;  // data path width
  localparam int unsigned ITER_W  = 2;   // operand iteration number width
  localparam int unsigned HIST    = 4;   // iterations kept in the function buffer
  localparam int unsigned INSTR_W = 41;
  localparam int unsigned NTASK   = 1 << ID_W;  // 64 task slots

  // Fixed-point format of all data: signed Q8.8 (products are shifted right
  // by FRAC_BITS and wrap to 16 bits).
  localparam int unsigned FRAC_BITS = 8;

  // ID 0 is never a task: an all-zero operand or result bus means "nothing".
  // ID 63 is the external input stream x[n]; its four newest samples are kept
  // in the function buffer like any task result.
  localparam logic [ID_W-1:0] NO_ID    = '0;
  localparam logic [ID_W-1:0] INPUT_ID = '1;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,  // result = op1 + op2
    OP_MUL = 2'b01,  // result = op1 * factor          (op2 unused)
    OP_MAC = 2'b10,  // result = op1 * factor + op2     (compound task)
    OP_RSV = 2'b11   // reserved, executed as OP_ADD
  } opcode_e;

  typedef struct packed {
    logic [DATA_W-1:0] factor;
    logic [ID_W-1:0]   op1_id;
    logic [ID_W-1:0]   op2_id;
    logic [ID_W-1:0]   task_id;
    logic              last;
    opcode_e           opcode;
    logic [ITER_W-1:0] op1_iter;
    logic [ITER_W-1:0] op2_iter;
  } instr_t;

  // ALU_Result: 23 bits = {last_task, task ID, value}; task ID 0 = no result.
  typedef struct packed {
    logic              last;
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] value;
  } alu_res_t;

  // Src: 24 bits = {operand ID, iteration number, value}; ID 0 = not ready.
  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ITER_W-1:0] iter;
    logic [DATA_W-1:0] value;
  } src_t;

  // Operand lookup request handed to the state table (the 16-bit slice of the
  // instruction it uses) and its answer (S and C outputs).
  typedef struct packed {
    logic [ID_W-1:0]   op1_id;
    logic [ID_W-1:0]   op2_id;
    logic [ITER_W-1:0] op1_iter;
    logic [ITER_W-1:0] op2_iter;
  } lookup_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [ITER_W-1:0] iter;
  } opref_t;

  // Execution-array entry: the 73-bit {instruction, R1, R2} word plus the two
  // operand-present flags this design adds so that a value of 0 is legal.
  typedef struct packed {
    logic              valid;
    logic              r1_ok;
    logic              r2_ok;
    instr_t            ins;
    logic [DATA_W-1:0] r1;
    logic [DATA_W-1:0] r2;
  } ea_entry_t;

  function automatic lookup_t to_lookup(instr_t i);
    return '{op1_id: i.op1_id, op2_id: i.op2_id, op1_iter: i.op1_iter, op2_iter: i.op2_iter};
  endfunction

  // Operand 2 is needed by ADD and MAC only.
  function automatic logic needs_op2(opcode_e op);
    return op != OP_MUL;
  endfunction

  // Reference arithmetic of one task, used by the PE and by testbenches.
  function automatic logic [DATA_W-1:0] fx_mul(logic [DATA_W-1:0] a, logic [DATA_W-1:0] f);
    logic signed [2*DATA_W-1:0] p;
    p = $signed(a) * $signed(f);
    return p[FRAC_BITS +: DATA_W];
  endfunction

endpackage
