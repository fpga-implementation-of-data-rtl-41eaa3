// tb_dfg_top: end-to-end test of both DFG processors at their default sizes.
//
// The same task program and input stream are loaded into the serial and the
// parallel system, which then run side by side. Every task result of every
// iteration is compared with the reference interpreter. The second-order IIR
// filter is also checked against its difference equations written out
// directly (w[n] = x[n] + a1*w[n-1] + a2*w[n-2], y[n] = w[n] + b1*w[n-1] +
// b2*w[n-2], Q8.8). Programs: the IIR filter, random programs with the task
// counts of the lattice (14), Jaumann (13) and elliptic (26) filter queues,
// and a 62-task program that fills the instruction memory.
//
// Mechanisms counted, each must occur: Buffer_full stopping the address
// generator, an execution-array stall on a missing operand, the end of an
// iteration (Rb and Rd), taking an input sample, compound multiply-add tasks,
// operands from earlier iterations, the parallel system finishing in fewer
// cycles than the serial one, and the first task of an iteration passing
// straight through the empty instruction buffer. The last is seen in the
// latency from an iteration's end to the next first result, which is checked
// against its formula (see first_latency) and would be one cycle longer if
// the task were stored first.
module tb_dfg_top;
  import dfg_pkg::*;
  import dfg_tb_pkg::*;

  localparam int LANES = 4;
  localparam int ITERS = 5;

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
  int n_pass = 0;

  function automatic int pe_latency(opcode_e op);
    return (op == OP_MUL) ? 3 : (op == OP_MAC) ? 4 : 1;
  endfunction

  // Cycles from the end of an iteration to the first result of the next one.
  // A task whose operands all come from earlier iterations or the input can
  // start at once: 1 cycle to fetch, 1 for the memory read, 0 in the empty
  // instruction buffer (pass-through), then max(STAGES, 2) until it issues
  // (the array's STAGES stages, or the 2-cycle state table and function
  // buffer lookup if longer), then the PE latency. The serial array has 4
  // stages, a parallel lane 1, and the first tasks of all lanes start together.
  function automatic int first_latency(bit par, prog_t p);
    int best;
    best = 1 << 30;
    for (int t = 0; t < (par ? LANES : 1) && t < p.size(); t++) begin
      bit free_start;
      free_start = (p[t].op1_iter != 0 || p[t].op1_id == INPUT_ID) &&
                   (p[t].opcode == OP_MUL || p[t].op2_iter != 0 || p[t].op2_id == INPUT_ID);
      if (free_start && 2 + (par ? 2 : 4) + pe_latency(p[t].opcode) < best)
        best = 2 + (par ? 2 : 4) + pe_latency(p[t].opcode);
    end
    return best;
  endfunction
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
    longint t0, tstart;
    alu_res_t r [LANES];
    iter = 0; nres = 0; t0 = cycle;
    tstart = cycle;
    foreach (seen[i]) seen[i] = 0;
    while (iter < ITERS) begin
      @(negedge clk);
      for (int k = 0; k < LANES; k++) r[k] = par ? p_alu_result[k] : ((k == 0) ? s_alu_result : '0);
      if (par ? p_buffer_full : s_buffer_full) n_full++;
      if (par ? p_ea_waiting : s_ea_waiting)   n_wait++;
      if (par ? p_sample_take : s_sample_take) n_take++;
      if (iter > 0 && nres == 0 &&
          (r[0].id != NO_ID || r[1].id != NO_ID || r[2].id != NO_ID || r[3].id != NO_ID)) begin
        check(cycle - tstart == longint'(first_latency(par, p)),
              $sformatf("%s iter %0d: first result after %0d cycles, expected %0d",
                        name, iter, cycle - tstart, first_latency(par, p)));
        if (cycle - tstart == longint'(first_latency(par, p))) n_pass++;
      end
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
        tstart = cycle;
      end
    end
    cycles = cycle - t0;
  endtask

  task automatic run_program(prog_t p, string name, output vals_t exp []);
    logic [DATA_W-1:0] x [];
    longint cs, cp;
    x = new[ITERS + 2];
    foreach (x[i]) x[i] = DATA_W'($urandom % 2048) - DATA_W'(1024);  // |x| < 4.0
    reference(p, x, ITERS, exp);
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
    $display("%s: %0d tasks, %0d iterations: serial %0d cycles, parallel %0d cycles",
             name, p.size(), ITERS, cs, cp);
    if (p.size() >= 8) begin
      check(cp < cs, $sformatf("%s: parallel not faster", name));
      if (cp < cs) n_faster++;
    end
    xs_hist = x;
  endtask

  logic [DATA_W-1:0] xs_hist [];

  // Direct-form second-order IIR, independent of the task program.
  task automatic check_iir(int a1, int a2, int b1, int b2, vals_t exp []);
    logic [DATA_W-1:0] w1, w2, w, y;
    w1 = '0; w2 = '0;
    for (int n = 0; n < ITERS; n++) begin
      w = xs_hist[n] + ref_mul(w2, DATA_W'(a2)) + ref_mul(w1, DATA_W'(a1));
      y = w + ref_mul(w1, DATA_W'(b1)) + ref_mul(w2, DATA_W'(b2));
      check(exp[n][2] == w && exp[n][4] == y,
            $sformatf("iir difference equation n=%0d: w %h/%h y %h/%h", n, exp[n][2], w, exp[n][4], y));
      w2 = w1; w1 = w;
    end
  endtask

  initial begin
    vals_t e [];
    repeat (3) @(negedge clk);
    run_program(iir_program(200, -80, 128, 64), "iir", e);
    check_iir(200, -80, 128, 64, e);
    run_program(random_program(14), "lattice-size", e);
    run_program(random_program(13), "jaumann-size", e);
    run_program(random_program(26), "elliptic-size", e);
    run_program(random_program(62), "full-memory", e);
    $display("mechanisms: buffer_full=%0d stall=%0d iteration_end=%0d sample_take=%0d mac=%0d old_operand=%0d parallel_faster=%0d pass_through=%0d",
             n_full, n_wait, n_iter, n_take, n_mac, n_old, n_faster, n_pass);
    check(n_full > 0, "Buffer_full never asserted");
    check(n_pass > 0, "no task passed straight through an instruction buffer");
    check(n_wait > 0, "no operand stall");
    check(n_iter > 0, "no iteration end");
    check(n_take > 0, "no input sample taken");
    check(n_mac > 0, "no compound task");
    check(n_old > 0, "no operand from an earlier iteration");
    check(n_faster > 0, "parallel system never faster");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
