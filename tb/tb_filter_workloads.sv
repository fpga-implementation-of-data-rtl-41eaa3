// tb_filter_workloads: the published filter graphs run on both processors.
//
// Four filters are described node by node in dfg_tb_pkg (second-order IIR,
// all-pole lattice, fourth-order Jaumann wave digital filter, fifth-order
// wave elliptic filter) with their published compound-task grouping. Each is compiled into a task
// queue (the compiler must find no ordering or merge error), loaded into the
// serial and the four-lane parallel system of dfg_top at their default sizes,
// and run for ITERS iterations with a random input stream. Every task result
// of every iteration is compared with the direct node-level evaluation of the
// graph (the value of the task's last node), and the task-level reference
// interpreter must agree with the same evaluation. Cycle counts of both
// systems are printed; the parallel system must be faster on each.
//
// The graphs and their coefficients are this testbench's reading of the
// published drawings (see dfg_tb_pkg); the task groupings are the published ones.
module tb_filter_workloads;
  import dfg_pkg::*;
  import dfg_tb_pkg::*;

  localparam int LANES = 4;
  localparam int ITERS = 8;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, reset_addr = 1'b0;
  instr_t data_in = '0;
  logic [HIST*DATA_W-1:0] data_buffer = '0;
  logic [DATA_W-1:0] s_sample_in, p_sample_in;
  logic s_sample_take, s_iter_done, s_buffer_full, s_ea_waiting;
  logic p_sample_take, p_iter_done, p_buffer_full, p_ea_waiting;
  alu_res_t s_alu_result;
  alu_res_t p_alu_result [LANES];

  int checks = 0, failures = 0;
  int n_full = 0, n_wait = 0, n_iter = 0, n_take = 0, n_mac = 0, n_old = 0, n_faster = 0;
  longint cycle = 0;
  logic [DATA_W-1:0] xs [];
  int s_sidx = 0, p_sidx = 0;

  always @(posedge clk) if (s_sample_take) s_sidx <= s_sidx + 1;
  always @(posedge clk) if (p_sample_take) p_sidx <= p_sidx + 1;
  assign s_sample_in = (s_sidx < xs.size()) ? xs[s_sidx] : '0;
  assign p_sample_in = (p_sidx < xs.size()) ? xs[p_sidx] : '0;

  dfg_top dut (
    .clk, .rst,
    .s_rw(rw), .s_reset_addr(reset_addr), .s_data_in(data_in), .s_data_buffer(data_buffer),
    .s_sample_in, .s_sample_take, .s_alu_result, .s_iter_done, .s_buffer_full, .s_ea_waiting,
    .p_rw(rw), .p_reset_addr(reset_addr), .p_data_in(data_in), .p_data_buffer(data_buffer),
    .p_sample_in, .p_sample_take, .p_alu_result, .p_iter_done, .p_buffer_full, .p_ea_waiting
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20_000_000;
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

  // Collect one system's results; returns when ITERS iterations are done.
  task automatic monitor(bit par, prog_t p, vals_t exp [], string name, output longint cycles);
    logic [DATA_W-1:0] got [NTASK];
    int seen [NTASK];
    int iter, nres;
    longint t0;
    alu_res_t r [LANES];
    iter = 0; nres = 0; t0 = cycle;
    foreach (seen[i]) seen[i] = 0;
    while (iter < ITERS) begin
      @(negedge clk);
      for (int k = 0; k < LANES; k++) r[k] = par ? p_alu_result[k] : ((k == 0) ? s_alu_result : '0);
      if (par ? p_buffer_full : s_buffer_full) n_full++;
      if (par ? p_ea_waiting : s_ea_waiting)   n_wait++;
      if (par ? p_sample_take : s_sample_take) n_take++;
      for (int k = 0; k < LANES; k++) begin
        if (r[k].id != NO_ID) begin
          got[r[k].id] = r[k].value;
          seen[r[k].id]++;
          nres++;
        end
      end
      if (par ? p_iter_done : s_iter_done) begin
        n_iter++;
        check(nres == p.size(), $sformatf("%s iter %0d: %0d results", name, iter, nres));
        foreach (p[t]) begin
          int id;
          id = int'(p[t].task_id);
          if (p[t].opcode == OP_MAC) n_mac++;
          if (p[t].op1_iter != 0) n_old++;
          check(seen[id] == 1 && got[id] == exp[iter][id],
                $sformatf("%s iter %0d task %0d: got %h expected %h",
                          name, iter, id, got[id], exp[iter][id]));
        end
        foreach (seen[i]) seen[i] = 0;
        nres = 0;
        iter++;
      end
    end
    cycles = cycle - t0;
  endtask

  // Run one filter: compile, evaluate the graph, check the interpreter
  // against it, then check both systems against it.
  task automatic run_filter(string name, graph_t g, group_t grp);
    prog_t p;
    nvals_t v [];
    vals_t exp [], ref_exp [];
    logic [DATA_W-1:0] x [];
    longint cs, cp;
    int errors;
    p = compile_graph(g, grp, errors);
    check(errors == 0, $sformatf("%s: %0d compile errors", name, errors));
    x = new[ITERS + 2];
    foreach (x[i]) x[i] = DATA_W'($urandom % 1024) - DATA_W'(512);  // |x| < 2.0
    eval_graph(g, x, ITERS, v);
    reference(p, x, ITERS, ref_exp);
    exp = new[ITERS];
    for (int n = 0; n < ITERS; n++) begin
      foreach (exp[n][i]) exp[n][i] = '0;
      foreach (grp[t]) begin
        int last;
        last = (grp[t][1] != 0) ? grp[t][1] : grp[t][0];
        exp[n][t+1] = v[n][last];
        check(ref_exp[n][t+1] == v[n][last],
              $sformatf("%s iter %0d task %0d: interpreter %h graph %h", name, n, t + 1,
                        ref_exp[n][t+1], v[n][last]));
      end
    end
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0; rw = 1'b1;
    for (int a = 0; a < NTASK; a++) begin
      data_in = (a < p.size()) ? p[a] : '0;
      @(negedge clk);
    end
    xs = x; s_sidx = 0; p_sidx = 0;
    rw = 1'b0; reset_addr = 1'b1;
    @(negedge clk); reset_addr = 1'b0;
    fork
      monitor(1'b0, p, exp, {name, "/serial"}, cs);
      monitor(1'b1, p, exp, {name, "/parallel"}, cp);
    join
    $display("%s: %0d nodes, %0d tasks, %0d iterations: serial %0d cycles, parallel %0d cycles",
             name, g.size() - 1, p.size(), ITERS, cs, cp);
    check(cp < cs, $sformatf("%s: parallel not faster", name));
    if (cp < cs) n_faster++;
  endtask

  initial begin
    graph_t g;
    group_t grp;
    repeat (3) @(negedge clk);
    iir_graph(g, grp);
    run_filter("second-order iir", g, grp);
    lattice_graph(g, grp);
    run_filter("all-pole lattice", g, grp);
    jaumann_graph(g, grp);
    run_filter("jaumann", g, grp);
    elliptic_graph(g, grp);
    run_filter("elliptic", g, grp);
    $display("mechanisms: buffer_full=%0d stall=%0d iteration_end=%0d sample_take=%0d mac=%0d old_operand=%0d parallel_faster=%0d",
             n_full, n_wait, n_iter, n_take, n_mac, n_old, n_faster);
    check(n_iter == 8 * ITERS, "iteration count");
    check(n_faster == 4, "parallel system not faster on every filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
