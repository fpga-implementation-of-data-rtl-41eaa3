// tb_serial_system: runs task programs on the one-PE system and checks
// every task result of every iteration against the reference interpreter,
// and that the single PE completes the tasks in queue order.
//
// Programs: the second-order IIR filter and random dependency-ordered programs
// of 14, 13, 26 and 62 tasks (the task counts of the lattice, Jaumann and
// elliptic filter queues, and the largest program the 64-slot memory holds
// with IDs 0 and 63 reserved), and the compiled elliptic filter graph, whose
// last queued task can finish before others. Each program is loaded through the rw port,
// run for ITERS iterations, and every result is compared by task ID. It also
// checks that each task reports exactly once per iteration and that the
// stall (operand wait) and Buffer_full mechanisms occur. Stimulus and
// sampling happen on the falling clock edge.
module tb_serial_system;
  import dfg_pkg::*;
  import dfg_tb_pkg::*;

  localparam int LANES = 1;
  localparam int ITERS = 6;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, reset_addr = 1'b0;
  instr_t data_in = '0;
  logic [HIST*DATA_W-1:0] data_buffer = '0;
  logic [DATA_W-1:0] sample_in;
  logic sample_take, iter_done, buffer_full_any, ea_waiting_any;
  alu_res_t alu_result;
  alu_res_t res_bus [LANES];
  assign res_bus[0] = alu_result;

  int checks = 0, failures = 0;
  int n_full = 0, n_wait = 0;
  longint cycle = 0;
  logic [DATA_W-1:0] xs [];        // input stream of the running program
  int sidx = 0;                    // samples taken so far

  // The system consumes sample_in at the clock edge ending a sample_take cycle.
  always @(posedge clk) if (sample_take) sidx <= sidx + 1;
  assign sample_in = (sidx < xs.size()) ? xs[sidx] : '0;

  serial_system dut (
    .clk, .rst, .rw, .reset_addr, .data_in, .data_buffer, .sample_in, .sample_take,
    .alu_result, .iter_done, .buffer_full_any, .ea_waiting_any
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_program(prog_t p, string name);
    logic [DATA_W-1:0] x [];
    vals_t exp [];
    logic [DATA_W-1:0] got [NTASK];
    int seen [NTASK];
    int iter, nres;
    longint t0;
    x = new[ITERS + 2];
    foreach (x[i]) x[i] = DATA_W'($urandom);
    reference(p, x, ITERS, exp);
    // reset and load
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0; rw = 1'b1;
    for (int a = 0; a < NTASK; a++) begin
      data_in = (a < p.size()) ? p[a] : '0;
      @(negedge clk);
    end
    xs = x; sidx = 0;
    rw = 1'b0; reset_addr = 1'b1;
    iter = 0; nres = 0; t0 = cycle;
    foreach (seen[i]) seen[i] = 0;
    while (iter < ITERS) begin
      @(negedge clk);
      reset_addr = 1'b0;
      if (buffer_full_any) n_full++;
      if (ea_waiting_any)  n_wait++;
      for (int k = 0; k < LANES; k++) begin
        if (res_bus[k].id != NO_ID) begin
          got[res_bus[k].id] = res_bus[k].value;
          seen[res_bus[k].id]++;
          check(nres < p.size() && res_bus[k].id == p[nres % p.size()].task_id,
                $sformatf("%s result %0d out of queue order", name, nres));
          nres++;
          check(res_bus[k].last == (res_bus[k].id == p[p.size()-1].task_id),
                $sformatf("%s last flag of task %0d", name, res_bus[k].id));
        end
      end
      if (iter_done) begin
        check(nres == p.size(), $sformatf("%s iter %0d: %0d results, expected %0d",
                                          name, iter, nres, p.size()));
        foreach (p[t]) begin
          int id;
          id = int'(p[t].task_id);
          check(seen[id] == 1 && got[id] == exp[iter][id],
                $sformatf("%s iter %0d task %0d: got %h (x%0d) expected %h",
                          name, iter, id, got[id], seen[id], exp[iter][id]));
        end
        foreach (seen[i]) seen[i] = 0;
        nres = 0;
        iter++;
      end
    end
    $display("%s: %0d tasks, %0d iterations in %0d cycles", name, p.size(), ITERS, cycle - t0);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_program(iir_program(int'(16'sd200), -int'(16'sd80), int'(16'sd128), int'(16'sd64)), "iir");
    run_program(random_program(14), "rand14");
    run_program(random_program(13), "rand13");
    run_program(random_program(26), "rand26");
    run_program(random_program(62), "rand62");
    begin
      graph_t g;
      group_t grp;
      int errs;
      elliptic_graph(g, grp);
      run_program(compile_graph(g, grp, errs), "elliptic");
      check(errs == 0, "elliptic graph does not compile");
    end
    check(n_full > 0, "Buffer_full never asserted");
    check(n_wait > 0, "no operand stall seen");
    $display("buffer_full cycles=%0d stall cycles=%0d", n_full, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
