// tb_state_table: four-lane state table against a bit-array model. Random
// result writes and lookups; checks that each answer (S = ID if ready else 0,
// C = iteration number) appears one cycle after the lookup, that operands of
// earlier iterations and the input stream are always ready, that invalid
// lookups answer 0, that Rd needs both a last_task result and idle lanes, and
// that the end of an iteration and the load-mode sweep clear the table.
module tb_state_table;
  import dfg_pkg::*;
  localparam int LANES = 4;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, lanes_idle = 1'b0, iter_end = 1'b0;
  logic [ID_W-1:0] address_in = '0;
  lookup_t  lookup [LANES];
  logic     lookup_valid [LANES];
  alu_res_t alu_result [LANES];
  opref_t   s1 [LANES], s2 [LANES];
  logic     rd;
  logic [NTASK-1:0] model = '0;
  int checks = 0, failures = 0;

  state_table #(.LANES(LANES)) dut (.clk, .rst, .rw, .address_in, .lookup, .lookup_valid,
                                    .alu_result, .lanes_idle, .iter_end, .s1, .s2, .rd);

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

  function automatic opref_t expect_ans(logic [ID_W-1:0] id, logic [ITER_W-1:0] it, logic v);
    if (!v) return '0;
    return '{id: (it != 0 || model[id] || id == INPUT_ID) ? id : NO_ID, iter: it};
  endfunction

  initial begin
    opref_t e1 [LANES], e2 [LANES];
    foreach (lookup[k]) begin lookup[k] = '0; lookup_valid[k] = 1'b0; alu_result[k] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // load-mode sweep clears
    rw = 1'b1;
    for (int a = 0; a < NTASK; a++) begin address_in = ID_W'(a); @(negedge clk); end
    rw = 1'b0;
    for (int n = 0; n < 600; n++) begin
      for (int k = 0; k < LANES; k++) begin
        lookup[k]       = lookup_t'($urandom);
        lookup_valid[k] = ($urandom % 4) != 0;
        alu_result[k]   = ($urandom % 2) ? '{last: 1'b0, id: ID_W'($urandom), value: 16'($urandom)} : '0;
        e1[k] = expect_ans(lookup[k].op1_id, lookup[k].op1_iter, lookup_valid[k]);
        e2[k] = expect_ans(lookup[k].op2_id, lookup[k].op2_iter, lookup_valid[k]);
      end
      iter_end = ($urandom % 50) == 0;
      @(negedge clk);
      if (iter_end) model = '0;
      else for (int k = 0; k < LANES; k++) if (alu_result[k].id != 0) model[alu_result[k].id] = 1'b1;
      for (int k = 0; k < LANES; k++) begin
        if (iter_end) check(s1[k] == '0 && s2[k] == '0, "answers dropped at iteration end");
        else check(s1[k] == e1[k] && s2[k] == e2[k], $sformatf("lane %0d answer", k));
      end
      iter_end = 1'b0;
      check(!rd, "Rd without last task");
    end
    // Rd: last result, then idle
    foreach (alu_result[k]) alu_result[k] = '0;
    alu_result[2] = '{last: 1'b1, id: 6'd9, value: 16'h1};
    @(negedge clk);
    alu_result[2] = '0;
    check(!rd, "Rd while lanes busy");
    lanes_idle = 1'b1; #1;
    check(rd, "Rd after last task with idle lanes");
    iter_end = 1'b1;
    @(negedge clk);
    iter_end = 1'b0; #1;
    check(!rd, "Rd cleared after iteration end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
