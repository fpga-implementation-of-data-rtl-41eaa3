// tb_processing_element: random ADD, MUL and MAC tasks; checks the value, the
// task ID and last_task bit on the result bus, the latency (1, 3 and 4
// cycles), that alu_ready is low while a task is inside, and that the result
// bus is all zero when no result is shown. Stimulus and sampling on the
// falling clock edge.
module tb_processing_element;
  import dfg_pkg::*;
  import dfg_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1, issue = 1'b0;
  instr_t ins = '0;
  logic [DATA_W-1:0] op1 = '0, op2 = '0;
  logic alu_ready;
  alu_res_t alu_result;
  int checks = 0, failures = 0;

  processing_element dut (.clk, .rst, .issue, .ins, .op1, .op2, .alu_ready, .alu_result);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      logic [DATA_W-1:0] expv;
      int lat, waited;
      opcode_e op;
      op  = opcode_e'($urandom % 3);
      ins = mk(1 + int'($urandom % 62), op, int'($urandom % 65536), 0, 0, 0, 0, bit'($urandom % 2));
      op1 = DATA_W'($urandom);
      op2 = DATA_W'($urandom);
      expv = ref_exec(ins, op1, op2);
      lat  = (op == OP_ADD) ? 1 : (op == OP_MUL) ? 3 : 4;
      check(alu_ready, "not ready before issue");
      issue = 1'b1;
      @(negedge clk);
      issue = 1'b0;
      waited = 1;
      while (alu_result.id == NO_ID && waited < 10) begin
        check(!alu_ready, "ready while busy");
        check(alu_result == '0, "result bus not idle");
        @(negedge clk);
        waited++;
      end
      check(waited == lat, $sformatf("op %0d latency %0d, expected %0d", op, waited, lat));
      check(alu_result.value == expv, $sformatf("op %0d value %h expected %h", op, alu_result.value, expv));
      check(alu_result.id == ins.task_id && alu_result.last == ins.last, "id/last");
      check(alu_ready, "not ready when result shown");
      if ($urandom % 2) begin
        @(negedge clk);
        check(alu_result == '0, "result lasted more than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
