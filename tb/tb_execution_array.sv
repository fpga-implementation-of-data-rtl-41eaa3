// tb_execution_array: four-stage execution array of the serial system.
//
// Each operand (ID, iteration) has a fixed random value. Tasks with random
// operands are offered from a queue; every cycle random operands are
// broadcast on Src1/Src2 (any iteration) and on the ALU result bus (iteration
// 0 only, the rule of the result comparators). Checks: the first four tasks
// enter while the PE is not ready; tasks issue in order; each issued task
// carries the right operand values (so it never issues early); an operand of
// iteration k>0 is not taken from the ALU result bus.
module tb_execution_array;
  import dfg_pkg::*;
  import dfg_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, in_valid = 1'b0, alu_ready = 1'b0;
  instr_t in_ins = '0;
  src_t src1 = '0, src2 = '0;
  alu_res_t alu_result [1];
  logic take, issue, empty, waiting;
  instr_t pe_ins;
  logic [DATA_W-1:0] pe_op1, pe_op2;
  logic [DATA_W-1:0] val [NTASK][HIST];
  instr_t pending [$];
  instr_t inflight [$];
  int checks = 0, failures = 0, n_issued = 0;

  execution_array #(.STAGES(4), .NRES(1)) dut (
    .clk, .rst, .clear, .in_valid, .in_ins, .take, .src1, .src2, .alu_result, .alu_ready,
    .issue, .pe_ins, .pe_op1, .pe_op2, .empty, .waiting
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic instr_t rand_task(int id);
    return mk(id, opcode_e'($urandom % 3), 0, 1 + int'($urandom % 12), int'($urandom % 4),
              1 + int'($urandom % 12), int'($urandom % 4), 0);
  endfunction

  initial begin
    int takes;
    alu_result[0] = '0;
    for (int i = 0; i < NTASK; i++) for (int h = 0; h < HIST; h++) val[i][h] = 16'($urandom);
    for (int i = 0; i < 400; i++) pending.push_back(rand_task(1 + (i % 60)));
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // fill phase: PE not ready, the array takes four tasks
    takes = 0;
    for (int c = 0; c < 8; c++) begin
      in_valid = 1'b1; in_ins = pending[0];
      #1;
      if (take) begin takes++; inflight.push_back(pending.pop_front()); end
      @(negedge clk);
    end
    check(takes == 4, $sformatf("fill took %0d tasks", takes));
    check(!issue, "issue while PE not ready");
    // run phase
    while (pending.size() != 0 || inflight.size() != 0) begin
      int k;
      logic [ITER_W-1:0] it;
      in_valid = pending.size() != 0;
      if (in_valid) in_ins = pending[0];
      alu_ready = ($urandom % 4) != 0;
      k = 1 + int'($urandom % 12); it = ITER_W'($urandom);
      src1 = ($urandom % 2) ? '{id: ID_W'(k), iter: it, value: val[k][it]} : '0;
      k = 1 + int'($urandom % 12); it = ITER_W'($urandom);
      src2 = ($urandom % 2) ? '{id: ID_W'(k), iter: it, value: val[k][it]} : '0;
      k = 1 + int'($urandom % 12);
      alu_result[0] = ($urandom % 3 == 0) ? '{last: 1'b0, id: ID_W'(k), value: val[k][0]} : '0;
      #1;
      if (issue) begin
        instr_t t;
        t = inflight.pop_front();
        n_issued++;
        check(pe_ins == t, "issue order");
        check(pe_op1 == val[t.op1_id][t.op1_iter], "operand 1 value");
        if (needs_op2(t.opcode)) check(pe_op2 == val[t.op2_id][t.op2_iter], "operand 2 value");
        check(alu_ready, "issue while PE busy");
      end
      if (take) inflight.push_back(pending.pop_front());
      @(negedge clk);
    end
    check(n_issued == 400, "not all tasks issued");
    #1 check(empty, "array not empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
