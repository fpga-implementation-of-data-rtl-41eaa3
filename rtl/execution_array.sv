// execution_array: holds tasks until both operands are present and hands them
// to the processing element in queue order.
//
// STAGES cascaded stages (4 in the serial system, EA4 -> EA1; 1 per lane in the
// parallel system). A task enters at the last stage (EA4) from the instruction
// buffer and moves one stage per cycle towards EA1 whenever the stage ahead is
// empty or is itself moving, so the first tasks of an iteration fill the array
// without waiting for the PE. Each stage holds the 73-bit word
// {instruction, R1, R2} of the published design, plus two operand-present
// flags (this design's addition: the document marks a missing operand by a
// zero value, which cannot tell it from a real zero).
//
// Operand capture, every cycle and in every stage, as in the published
// comparator network: an operand is taken
//   - from an ALU result bus when its ID matches and its iteration number is 0;
//   - from Src1 or Src2 (function-buffer answers) when ID and iteration match.
// A task arriving from the instruction buffer is also compared with the ALU
// results of that cycle, which its state-table lookup cannot yet see.
// EA1 issues its task when its operands are present and the PE is free
// (alu_ready); that hand-over is the Ready event that lets the stages move.
module execution_array
  import dfg_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter int unsigned NRES   = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              in_valid,
  input  instr_t            in_ins,
  output logic              take,          // pops the instruction buffer
  input  src_t              src1,
  input  src_t              src2,
  input  alu_res_t          alu_result [NRES],
  input  logic              alu_ready,
  output logic              issue,         // Ready: EA1 task goes to the PE
  output instr_t            pe_ins,
  output logic [DATA_W-1:0] pe_op1,
  output logic [DATA_W-1:0] pe_op2,
  output logic              empty,
  output logic              waiting        // EA1 holds a task lacking an operand
);

  ea_entry_t st [STAGES];
  ea_entry_t m  [STAGES];
  ea_entry_t in_e, in_m;
  logic      vac [STAGES];

  function automatic ea_entry_t capture(ea_entry_t e, alu_res_t res [NRES],
                                        src_t a, src_t b);
    ea_entry_t r;
    r = e;
    for (int k = 0; k < NRES; k++) begin
      if (res[k].id != NO_ID) begin
        if (!r.r1_ok && res[k].id == r.ins.op1_id && r.ins.op1_iter == '0) begin
          r.r1 = res[k].value; r.r1_ok = 1'b1;
        end
        if (!r.r2_ok && res[k].id == r.ins.op2_id && r.ins.op2_iter == '0) begin
          r.r2 = res[k].value; r.r2_ok = 1'b1;
        end
      end
    end
    if (a.id != NO_ID) begin
      if (!r.r1_ok && a.id == r.ins.op1_id && a.iter == r.ins.op1_iter) begin
        r.r1 = a.value; r.r1_ok = 1'b1;
      end
      if (!r.r2_ok && a.id == r.ins.op2_id && a.iter == r.ins.op2_iter) begin
        r.r2 = a.value; r.r2_ok = 1'b1;
      end
    end
    if (b.id != NO_ID) begin
      if (!r.r1_ok && b.id == r.ins.op1_id && b.iter == r.ins.op1_iter) begin
        r.r1 = b.value; r.r1_ok = 1'b1;
      end
      if (!r.r2_ok && b.id == r.ins.op2_id && b.iter == r.ins.op2_iter) begin
        r.r2 = b.value; r.r2_ok = 1'b1;
      end
    end
    return r;
  endfunction

  function automatic logic ready_to_run(logic valid, logic r1_ok, logic r2_ok, opcode_e op);
    return valid && r1_ok && (r2_ok || !needs_op2(op));
  endfunction

  always_comb begin
    in_e       = '0;
    in_e.valid = 1'b1;
    in_e.ins   = in_ins;
    in_m       = capture(in_e, alu_result, src1, src2);
    for (int i = 0; i < STAGES; i++) begin
      m[i] = st[i].valid ? capture(st[i], alu_result, src1, src2) : '0;
    end
    issue  = ready_to_run(m[0].valid, m[0].r1_ok, m[0].r2_ok, m[0].ins.opcode) && alu_ready;
    vac[0] = !m[0].valid || issue;
    for (int i = 1; i < STAGES; i++) vac[i] = !m[i].valid || vac[i-1];
    take    = in_valid && vac[STAGES-1];
    empty   = 1'b1;
    for (int i = 0; i < STAGES; i++) if (st[i].valid) empty = 1'b0;
    waiting = m[0].valid && !ready_to_run(m[0].valid, m[0].r1_ok, m[0].r2_ok, m[0].ins.opcode);
  end

  assign pe_ins = m[0].ins;
  assign pe_op1 = m[0].r1;
  assign pe_op2 = m[0].r2;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int i = 0; i < STAGES; i++) st[i] <= '0;
    end else begin
      for (int i = 0; i < int'(STAGES) - 1; i++) begin
        st[i] <= vac[i] ? m[i+1] : m[i];
      end
      if (vac[STAGES-1]) st[STAGES-1] <= take ? in_m : '0;
      else               st[STAGES-1] <= m[STAGES-1];
    end
  end

endmodule
