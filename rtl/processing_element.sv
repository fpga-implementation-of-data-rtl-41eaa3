// processing_element: executes one DFG task at a time.
//
// Operations (dfg_pkg::opcode_e): addition op1+op2, multiplication of op1 by
// the task's 16-bit immediate factor, and the compound multiply-add
// op1*factor+op2. As in the published design the multiplier is a three-stage
// pipeline and the adder a single stage, so the result appears 1 cycle after
// issue for ADD, 3 cycles for MUL and 4 cycles for MAC (multiplier, then
// adder). A task holds the element until its result is out; alu_ready is high
// whenever no task is inside, which includes the cycle the result is shown, so
// the next task may issue in that same cycle.
//
// Interface: issue/ins/op1/op2 in; alu_result out for exactly one cycle per
// task as {last_task, task ID, value}, all zero otherwise (task ID 0 never
// exists). Arithmetic is signed Q8.8 with wrap-around, a choice of this design
// (the document gives only the 16-bit operand widths).
module processing_element
  import dfg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              issue,       // accepted only while alu_ready
  input  instr_t            ins,
  input  logic [DATA_W-1:0] op1,
  input  logic [DATA_W-1:0] op2,
  output logic              alu_ready,
  output alu_res_t          alu_result
);

  logic              busy;
  logic [2:0]        cnt;              // cycles since issue
  opcode_e           op_q;
  logic [ID_W-1:0]   id_q;
  logic              last_q;
  logic [DATA_W-1:0] b_q;
  logic [DATA_W-1:0] p1, p2, p3;       // multiplier pipeline stages

  assign alu_ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      cnt        <= '0;
      op_q       <= OP_ADD;
      id_q       <= '0;
      last_q     <= 1'b0;
      b_q        <= '0;
      p1         <= '0;
      p2         <= '0;
      p3         <= '0;
      alu_result <= '0;
    end else begin
      alu_result <= '0;
      // multiplier pipeline runs every cycle
      p2 <= p1;
      p3 <= p2;
      if (issue && alu_ready) begin
        p1     <= fx_mul(op1, ins.factor);
        op_q   <= ins.opcode;
        id_q   <= ins.task_id;
        last_q <= ins.last;
        b_q    <= op2;
        cnt    <= 3'd1;
        if (ins.opcode == OP_MUL || ins.opcode == OP_MAC) begin
          busy <= 1'b1;
        end else begin
          alu_result <= '{last: ins.last, id: ins.task_id, value: op1 + op2};
        end
      end else if (busy) begin
        cnt <= cnt + 3'd1;
        if (op_q == OP_MUL && cnt == 3'd2) begin
          busy       <= 1'b0;
          alu_result <= '{last: last_q, id: id_q, value: p2};
        end else if (op_q == OP_MAC && cnt == 3'd3) begin
          busy       <= 1'b0;
          alu_result <= '{last: last_q, id: id_q, value: p3 + b_q};
        end
      end
    end
  end

  // A task never arrives while another one is inside.
  a_no_issue_busy: assert property (@(posedge clk) disable iff (rst) issue |-> alu_ready);

endmodule
