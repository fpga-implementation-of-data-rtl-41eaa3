// dfg_tb_pkg: test programs and a reference interpreter for the DFG processors.
//
// A program is a task queue (IDs 1..N in queue order). The reference model
// runs it one task at a time, iteration after iteration, keeping for every ID
// the values of the current and three previous iterations, and returns the
// value every task must produce in every iteration. It knows nothing of the
// hardware's timing or structure. Programs come from a random generator that
// obeys the compiler's rule (an operand of the current iteration comes from an
// earlier task or from the input stream) and from the second-order IIR filter.
//
// The package also describes four published filter graphs node by node (the
// second-order IIR, the all-pole lattice, the fourth-order Jaumann and the fifth-order elliptic wave
// filter) together with their published task grouping, and holds a small
// compiler that turns graph plus grouping into a task queue and a node-level
// evaluator that computes every node of the graph directly. The evaluator is
// the check on both the compiler and the hardware. Node operations follow the
// drawings: nodes marked as multipliers multiply by a constant, all others
// add. Where a drawn adder shows a single input, the input stream is taken as
// its second operand; that, and the coefficient values, are this package's
// choices.
package dfg_tb_pkg;
  import dfg_pkg::*;

  typedef instr_t              prog_t [];
  typedef logic [DATA_W-1:0]   vals_t [NTASK];

  // Q8.8 product, written independently of the design's helper.
  function automatic logic [DATA_W-1:0] ref_mul(logic [DATA_W-1:0] a, logic [DATA_W-1:0] f);
    int signed p;
    p = int'($signed(a)) * int'($signed(f));
    p = p >>> FRAC_BITS;
    return p[DATA_W-1:0];
  endfunction

  function automatic logic [DATA_W-1:0] ref_exec(instr_t t, logic [DATA_W-1:0] a,
                                                 logic [DATA_W-1:0] b);
    case (t.opcode)
      OP_MUL:  return ref_mul(a, t.factor);
      OP_MAC:  return ref_mul(a, t.factor) + b;
      default: return a + b;
    endcase
  endfunction

  function automatic instr_t mk(int id, opcode_e op, int f, int a_id, int a_it,
                                int b_id, int b_it, bit last);
    instr_t t;
    t.factor   = DATA_W'(f);
    t.op1_id   = ID_W'(a_id);
    t.op2_id   = ID_W'(b_id);
    t.task_id  = ID_W'(id);
    t.last     = last;
    t.opcode   = op;
    t.op1_iter = ITER_W'(a_it);
    t.op2_iter = ITER_W'(b_it);
    return t;
  endfunction

  // Random operand reference for task `id` of an n-task program.
  function automatic void rand_operand(int id, int n, output int oid, output int oit);
    if (($urandom % 3) != 0) begin
      oit = 0;
      oid = (id == 1 || ($urandom % 4) == 0) ? int'(INPUT_ID) : 1 + int'($urandom % (id - 1));
    end else begin
      oit = 1 + int'($urandom % 3);
      oid = (($urandom % 5) == 0) ? int'(INPUT_ID) : 1 + int'($urandom % n);
    end
  endfunction

  function automatic prog_t random_program(int n);
    prog_t p;
    p = new[n];
    for (int i = 1; i <= n; i++) begin
      int a, ai, b, bi, f;
      opcode_e op;
      rand_operand(i, n, a, ai);
      rand_operand(i, n, b, bi);
      op = opcode_e'($urandom % 3);
      f  = int'($urandom % 1024) - 512;          // factor in [-2.0, 2.0)
      p[i-1] = mk(i, op, f, a, ai, b, bi, i == n);
    end
    return p;
  endfunction

  // Second-order IIR filter as four compound tasks (multiply-add pairs):
  //   T1 = x[n] + a2*w[n-2]     T2 = w[n] = T1 + a1*w[n-1]
  //   T3 = w[n] + b1*w[n-1]     T4 = y[n] = T3 + b2*w[n-2]
  function automatic prog_t iir_program(int a1, int a2, int b1, int b2);
    prog_t p;
    p = new[4];
    p[0] = mk(1, OP_MAC, a2, 2, 2, int'(INPUT_ID), 0, 0);
    p[1] = mk(2, OP_MAC, a1, 2, 1, 1, 0, 0);
    p[2] = mk(3, OP_MAC, b1, 2, 1, 2, 0, 0);
    p[3] = mk(4, OP_MAC, b2, 2, 2, 3, 0, 1);
    return p;
  endfunction

  // Reference run: exp[n][id] is the result of task id in iteration n.
  function automatic void reference(prog_t p, logic [DATA_W-1:0] x [], int iters,
                                    ref vals_t exp []);
    logic [DATA_W-1:0] h [NTASK][HIST];
    for (int i = 0; i < NTASK; i++) for (int k = 0; k < HIST; k++) h[i][k] = '0;
    exp = new[iters];
    for (int n = 0; n < iters; n++) begin
      h[INPUT_ID][0] = x[n];
      for (int t = 0; t < p.size(); t++) begin
        logic [DATA_W-1:0] a, b;
        a = h[p[t].op1_id][p[t].op1_iter];
        b = h[p[t].op2_id][p[t].op2_iter];
        h[p[t].task_id][0] = ref_exec(p[t], a, b);
      end
      for (int i = 0; i < NTASK; i++) exp[n][i] = h[i][0];
      for (int i = 0; i < NTASK; i++) begin
        for (int k = HIST-1; k > 0; k--) h[i][k] = h[i][k-1];
        h[i][0] = '0;
      end
    end
  endfunction

  // ---------------------------------------------------------------------
  // Filter graphs. Node 0 is the input stream in every graph. An operand is
  // (node, delay in iterations).
  typedef enum logic [1:0] {N_IN, N_ADD, N_MUL} nkind_e;
  typedef struct {
    nkind_e kind;
    int     a, ad, b, bd;
    int     coef;
  } node_t;
  typedef node_t graph_t [];
  // group[t] = {first node, second node or 0}: task t+1 runs node `first`
  // alone, or the multiply `first` merged with the adder `second` it feeds.
  typedef int    group_t [][2];

  function automatic node_t nadd(int a, int ad, int b, int bd);
    return '{kind: N_ADD, a: a, ad: ad, b: b, bd: bd, coef: 0};
  endfunction
  function automatic node_t nmul(int a, int ad);
    int c;
    c = 64 + int'($urandom % 128);                  // |coefficient| in [0.25, 0.75)
    if ($urandom % 2) c = -c;
    return '{kind: N_MUL, a: a, ad: ad, b: 0, bd: 0, coef: c};
  endfunction
  function automatic node_t nin();
    return '{kind: N_IN, a: 0, ad: 0, b: 0, bd: 0, coef: 0};
  endfunction

  // Second-order IIR filter: 8 nodes, multipliers 3, 4, 5, 7 reading node 2
  // (the filter state w) one or two iterations back; 4 compound tasks.
  function automatic void iir_graph(output graph_t g, output group_t grp);
    g = new[9];
    g[0] = nin();
    g[1] = nadd(0, 0, 3, 0);
    g[2] = nadd(1, 0, 4, 0);
    g[3] = nmul(2, 2);
    g[4] = nmul(2, 1);
    g[5] = nmul(2, 1);
    g[6] = nadd(2, 0, 5, 0);
    g[7] = nmul(2, 2);
    g[8] = nadd(6, 0, 7, 0);
    grp = '{'{3,1}, '{4,2}, '{5,6}, '{7,8}};
  endfunction

  // All-pole lattice filter: 15 nodes, multipliers 2, 5, 8, 11; 14 tasks.
  function automatic void lattice_graph(output graph_t g, output group_t grp);
    g = new[16];
    g[0]  = nin();
    g[1]  = nadd(13, 1, 0, 0);    // drawn with one input
    g[2]  = nmul(1, 0);
    g[3]  = nadd(2, 0, 0, 0);     // drawn with one input
    g[4]  = nadd(3, 0, 14, 1);
    g[5]  = nmul(4, 0);
    g[6]  = nadd(3, 0, 5, 0);
    g[7]  = nadd(6, 0, 12, 1);
    g[8]  = nmul(7, 0);
    g[9]  = nadd(6, 0, 8, 0);
    g[10] = nadd(9, 0, 15, 1);
    g[11] = nmul(10, 0);
    g[12] = nadd(11, 0, 15, 1);
    g[13] = nadd(5, 0, 14, 1);
    g[14] = nadd(8, 0, 12, 1);
    g[15] = nadd(11, 0, 0, 0);
    grp = '{'{1,0}, '{2,3}, '{4,0}, '{5,0}, '{5,6}, '{7,0}, '{8,0}, '{8,9}, '{10,0},
            '{11,0}, '{11,12}, '{13,0}, '{14,0}, '{15,0}};
  endfunction

  // Fourth-order Jaumann wave digital filter: 17 nodes plus input node 18,
  // multipliers 8, 9, 12, 14; 13 tasks.
  function automatic void jaumann_graph(output graph_t g, output group_t grp);
    g = new[19];
    g[0]  = nin();
    g[18] = nin();
    g[1]  = nadd(6, 0, 7, 0);
    g[2]  = nadd(1, 0, 11, 0);
    g[3]  = nadd(11, 0, 17, 0);
    g[4]  = nadd(3, 0, 13, 0);
    g[5]  = nadd(13, 0, 15, 0);
    g[6]  = nadd(7, 1, 16, 1);
    g[7]  = nadd(8, 0, 7, 1);
    g[8]  = nmul(6, 0);
    g[9]  = nmul(2, 0);
    g[10] = nadd(9, 0, 11, 0);
    g[11] = nadd(12, 0, 17, 0);
    g[12] = nmul(17, 0);
    g[13] = nadd(14, 0, 18, 0);
    g[14] = nmul(15, 0);
    g[15] = nadd(18, 0, 5, 1);
    g[16] = nadd(2, 0, 10, 0);
    g[17] = nadd(10, 1, 18, 0);
    grp = '{'{6,0}, '{8,7}, '{1,0}, '{17,0}, '{12,11}, '{2,0}, '{3,0}, '{15,0}, '{14,13},
            '{4,0}, '{5,0}, '{9,10}, '{16,0}};
  endfunction

  // Fifth-order wave elliptic filter: input node 1 and 34 operation nodes,
  // multipliers 5, 8, 14, 18, 21, 26, 31, 33; 26 tasks.
  function automatic void elliptic_graph(output graph_t g, output group_t grp);
    g = new[36];
    g[0]  = nin();
    g[1]  = nin();
    g[2]  = nadd(1, 0, 9, 1);
    g[3]  = nadd(1, 0, 5, 0);
    g[4]  = nadd(3, 0, 7, 0);
    g[5]  = nmul(6, 0);
    g[6]  = nadd(2, 0, 7, 0);
    g[7]  = nadd(2, 0, 8, 0);
    g[8]  = nmul(10, 0);
    g[9]  = nadd(7, 0, 16, 0);
    g[10] = nadd(11, 0, 16, 0);
    g[11] = nadd(2, 0, 12, 1);
    g[12] = nadd(13, 0, 15, 0);
    g[13] = nadd(9, 0, 15, 1);
    g[14] = nmul(13, 0);
    g[15] = nadd(14, 0, 15, 1);
    g[16] = nadd(11, 0, 18, 0);
    g[17] = nadd(11, 0, 20, 1);
    g[18] = nmul(22, 0);
    g[19] = nadd(16, 0, 22, 0);
    g[20] = nadd(19, 0, 23, 0);
    g[21] = nmul(22, 0);
    g[22] = nadd(17, 0, 28, 0);
    g[23] = nadd(21, 0, 28, 0);
    g[24] = nadd(23, 0, 27, 1);
    g[25] = nadd(28, 0, 23, 0);
    g[26] = nmul(25, 0);
    g[27] = nadd(26, 0, 28, 0);
    g[28] = nadd(29, 1, 35, 1);
    g[29] = nadd(30, 0, 32, 0);
    g[30] = nadd(24, 0, 32, 1);
    g[31] = nmul(30, 0);
    g[32] = nadd(31, 0, 32, 1);
    g[33] = nmul(34, 0);
    g[34] = nadd(28, 0, 27, 1);
    g[35] = nadd(33, 0, 27, 1);
    grp = '{'{2,0}, '{11,0}, '{17,0}, '{28,0}, '{22,0}, '{18,16}, '{10,0}, '{8,7}, '{6,0},
            '{5,3}, '{4,0}, '{9,0}, '{13,0}, '{14,15}, '{12,0}, '{19,0}, '{21,23}, '{20,0},
            '{25,0}, '{26,27}, '{24,0}, '{30,0}, '{31,32}, '{29,0}, '{34,0}, '{33,35}};
  endfunction

  // Task that delivers node n's value: the input stream, or the task whose
  // last node is n. 0 if there is none.
  function automatic int producer(graph_t g, group_t grp, int n);
    if (g[n].kind == N_IN) return int'(INPUT_ID);
    foreach (grp[t]) if ((grp[t][1] != 0 ? grp[t][1] : grp[t][0]) == n) return t + 1;
    return 0;
  endfunction

  // Compile graph + grouping into a task queue. errors counts operands with
  // no producer, current-iteration operands produced later in the queue,
  // delays beyond the history depth and merges that are not multiply->add.
  function automatic prog_t compile_graph(graph_t g, group_t grp, output int errors);
    prog_t p;
    errors = 0;
    p = new[grp.size()];
    foreach (grp[t]) begin
      int id, n, m, oa, oad, ob, obd, pa, pb;
      opcode_e op;
      id = t + 1;
      n  = grp[t][0];
      m  = grp[t][1];
      if (m != 0) begin
        // multiply n feeding adder m: MAC(op1 = input of n, op2 = other input of m)
        if (g[n].kind != N_MUL || g[m].kind != N_ADD) errors++;
        op = OP_MAC;
        oa = g[n].a; oad = g[n].ad;
        if (g[m].a == n && g[m].ad == 0) begin ob = g[m].b; obd = g[m].bd; end
        else if (g[m].b == n && g[m].bd == 0) begin ob = g[m].a; obd = g[m].ad; end
        else begin errors++; ob = 0; obd = 0; end
      end else begin
        op = (g[n].kind == N_MUL) ? OP_MUL : OP_ADD;
        oa = g[n].a; oad = g[n].ad; ob = g[n].b; obd = g[n].bd;
      end
      pa = producer(g, grp, oa);
      pb = (op == OP_MUL) ? 0 : producer(g, grp, ob);
      if (pa == 0 || oad >= HIST || (oad == 0 && pa != int'(INPUT_ID) && pa >= id)) errors++;
      if (op != OP_MUL &&
          (pb == 0 || obd >= HIST || (obd == 0 && pb != int'(INPUT_ID) && pb >= id))) errors++;
      if (op == OP_MUL) obd = 0;
      p[t] = mk(id, op, g[n].coef, pa, oad, pb, obd, id == grp.size());
    end
    return p;
  endfunction

  // Direct evaluation of every node, iteration by iteration, in an order
  // found by repeated sweeps (independent of the published queues).
  typedef logic [DATA_W-1:0] nvals_t [];
  function automatic void eval_graph(graph_t g, logic [DATA_W-1:0] x [], int iters,
                                     ref nvals_t v []);
    v = new[iters];
    for (int n = 0; n < iters; n++) begin
      bit done [];
      int left;
      v[n] = new[g.size()];
      done = new[g.size()];
      left = 0;
      foreach (g[i]) begin
        done[i] = (g[i].kind == N_IN);
        if (done[i]) v[n][i] = x[n]; else left++;
      end
      for (int sweep = 0; sweep < g.size() && left > 0; sweep++) begin
        foreach (g[i]) begin
          if (!done[i] && (g[i].ad != 0 || done[g[i].a]) &&
              (g[i].kind == N_MUL || g[i].bd != 0 || done[g[i].b])) begin
            logic [DATA_W-1:0] a, b;
            a = (g[i].ad == 0) ? v[n][g[i].a] : (n >= g[i].ad ? v[n-g[i].ad][g[i].a] : '0);
            b = (g[i].bd == 0) ? v[n][g[i].b] : (n >= g[i].bd ? v[n-g[i].bd][g[i].b] : '0);
            v[n][i] = (g[i].kind == N_MUL) ? ref_mul(a, DATA_W'(g[i].coef)) : a + b;
            done[i] = 1'b1;
            left--;
          end
        end
      end
    end
  endfunction

endpackage
