// parallel_system: DFG task processor with LANES (4) processing elements.
//
// The compiled task queue of one DFG iteration sits in the main memory. Each
// cycle the address generator fetches LANES consecutive tasks; task k of a
// group goes to instruction buffer k, then to execution-array stage k, then to
// processing element k, so lane k runs every LANES-th task of the queue in
// order. The state table (8 lookups, 4 updates) and the multiway function
// buffer (8 reads, 4 writes) are shared, and every execution-array stage
// watches all four ALU result buses, so a task can take an operand produced in
// any lane. Because the queue is in dependency order and each lane is in
// order, the oldest unfinished task always has its operands and the lanes
// cannot deadlock. When a last_task result has been seen and all lanes are
// idle, Rd and Rb clear the address, the state table and the buffers, the
// function buffer ages one iteration, a new input sample is taken and the
// next iteration starts.
//
// Use: hold rw=1 and present one instruction per cycle on data_in (and the
// initial function-buffer entry on data_buffer) for 64 cycles, then drop rw
// with a one-cycle reset_addr pulse. sample_in is read when sample_take is
// high. All results appear on alu_result (one bus per PE).
//
// The lane mapping of tasks, the end-of-iteration idle condition (no task
// left anywhere and no result on a bus) and the input-stream entry are this
// design's choices; the units and their connections follow the published
// block diagram.
module parallel_system
  import dfg_pkg::*;
#(
  parameter int unsigned LANES    = 4,
  parameter int unsigned IB_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   rw,
  input  logic                   reset_addr,
  input  instr_t                 data_in,
  input  logic [HIST*DATA_W-1:0] data_buffer,
  input  logic [DATA_W-1:0]      sample_in,
  output logic                   sample_take,
  output alu_res_t               alu_result [LANES],
  output logic                   iter_done,
  output logic                   buffer_full_any,
  output logic                   ea_waiting_any
);

  logic [ID_W-1:0] address, address_in;
  logic            fetch, fetch_done, mem_valid, rb, rd, iter_end, lanes_idle;
  instr_t          memory_out [LANES];
  logic [LANES-1:0] mem_last, lane_load, buffer_full, ib_empty, ea_empty, ea_wait, alu_ready;
  instr_t          buffer_out [LANES];
  logic [LANES-1:0] ib_valid, take, issue;
  logic            lookup_valid [LANES];
  lookup_t         lookup [LANES];
  opref_t          s1 [LANES], s2 [LANES];
  src_t            src1 [LANES], src2 [LANES];
  instr_t          pe_ins [LANES];
  logic [DATA_W-1:0] pe_op1 [LANES], pe_op2 [LANES];

  assign iter_end        = rd && rb;
  assign iter_done       = iter_end;
  assign address_in      = rw ? address : '0;
  // Idle also means no result on any ALU bus in this cycle: the last task of
  // the queue may finish before others, and a result shown in the cycle of
  // the iteration end would not be stored.
  always_comb begin
    lanes_idle = (&ib_empty) && (&ea_empty) && (&alu_ready) && !mem_valid && fetch_done;
    for (int k = 0; k < LANES; k++) if (alu_result[k].id != NO_ID) lanes_idle = 1'b0;
  end
  assign buffer_full_any = |buffer_full;
  assign ea_waiting_any  = |ea_wait;

  address_generator #(.LANES(LANES)) u_agen (
    .clk, .rst, .rw, .reset_addr, .rb, .rd, .mem_valid, .mem_last, .buffer_full,
    .address, .fetch, .lane_load, .fetch_done
  );

  main_memory #(.LANES(LANES)) u_mem (
    .clk, .rst, .rw, .address, .data_in, .fetch, .memory_out, .mem_valid
  );

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    assign mem_last[k] = memory_out[k].last;
    assign lookup[k]   = to_lookup(buffer_out[k]);
    assign lookup_valid[k] = ib_valid[k];

    instruction_buffer #(.DEPTH(IB_DEPTH)) u_ib (
      .clk, .rst, .clear(iter_end), .push(lane_load[k]), .din(memory_out[k]),
      .pop(take[k]), .buffer_out(buffer_out[k]), .out_valid(ib_valid[k]),
      .buffer_full(buffer_full[k]), .empty(ib_empty[k])
    );

    execution_array #(.STAGES(1), .NRES(LANES)) u_ea (
      .clk, .rst, .clear(iter_end), .in_valid(ib_valid[k]), .in_ins(buffer_out[k]),
      .take(take[k]), .src1(src1[k]), .src2(src2[k]), .alu_result,
      .alu_ready(alu_ready[k]), .issue(issue[k]), .pe_ins(pe_ins[k]),
      .pe_op1(pe_op1[k]), .pe_op2(pe_op2[k]), .empty(ea_empty[k]), .waiting(ea_wait[k])
    );

    processing_element u_pe (
      .clk, .rst, .issue(issue[k]), .ins(pe_ins[k]), .op1(pe_op1[k]), .op2(pe_op2[k]),
      .alu_ready(alu_ready[k]), .alu_result(alu_result[k])
    );
  end

  state_table #(.LANES(LANES)) u_st (
    .clk, .rst, .rw, .address_in, .lookup, .lookup_valid, .alu_result, .lanes_idle, .iter_end,
    .s1, .s2, .rd
  );

  multiway_function_buffer #(.LANES(LANES)) u_mfb (
    .clk, .rst, .rw, .address_in, .data_buffer, .start(reset_addr && !rw), .sample_in,
    .s1, .s2, .alu_result, .lanes_idle, .iter_end, .src1, .src2, .rb, .sample_take
  );

endmodule
