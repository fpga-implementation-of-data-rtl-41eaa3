// serial_system: DFG task processor with a single processing element.
//
// The compiled task queue of one DFG iteration sits in the main memory. The
// address generator fetches one task per cycle into the instruction buffer
// until the buffer is nearly full or the last_task bit is seen. Tasks pass
// from the buffer through the four cascaded execution-array stages
// (EA4 -> EA1) to the processing element; on leaving the buffer each task's
// operands are looked up in the state table, and the multiway function buffer
// answers with the values that are already known. Values produced later are
// taken straight from the ALU result bus by the execution-array stages. EA1
// hands its task to the PE once both operands are present and the PE is free,
// so the tasks run one after the other in queue order. When the last task's
// result has been seen, Rd and Rb clear the address, the state table and the
// buffers, the function buffer ages one iteration, a new input sample is taken
// and the next iteration starts.
//
// Use: hold rw=1 and present one instruction per cycle on data_in (and the
// initial function-buffer entry on data_buffer) for 64 cycles, then drop rw
// with a one-cycle reset_addr pulse. sample_in is read when sample_take is
// high. Every task result appears on alu_result for one cycle.
//
// The end-of-iteration idle condition and the input-stream entry are this
// design's choices; the units and their connections follow the published
// block diagram.
module serial_system
  import dfg_pkg::*;
#(
  parameter int unsigned EA_STAGES = 4,
  parameter int unsigned IB_DEPTH  = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   rw,
  input  logic                   reset_addr,
  input  instr_t                 data_in,
  input  logic [HIST*DATA_W-1:0] data_buffer,
  input  logic [DATA_W-1:0]      sample_in,
  output logic                   sample_take,
  output alu_res_t               alu_result,
  output logic                   iter_done,
  output logic                   buffer_full_any,
  output logic                   ea_waiting_any
);

  logic [ID_W-1:0]   address, address_in;
  logic              fetch, fetch_done, mem_valid, rb, rd, iter_end, lanes_idle;
  instr_t            memory_out [1];
  logic              lane_load, buffer_full, ib_empty, ea_empty, alu_ready;
  instr_t            buffer_out;
  logic              ib_valid, take, issue;
  logic              lookup_valid [1];
  lookup_t           lookup [1];
  opref_t            s1 [1], s2 [1];
  src_t              src1 [1], src2 [1];
  alu_res_t          res_bus [1];
  instr_t            pe_ins;
  logic [DATA_W-1:0] pe_op1, pe_op2;

  assign iter_end        = rd && rb;
  assign iter_done       = iter_end;
  assign address_in      = rw ? address : '0;
  assign lanes_idle      = ib_empty && ea_empty && alu_ready && !mem_valid && fetch_done &&
                           (res_bus[0].id == NO_ID);
  assign buffer_full_any = buffer_full;
  assign lookup[0]       = to_lookup(buffer_out);
  assign lookup_valid[0] = ib_valid;
  assign res_bus[0]      = alu_result;

  address_generator #(.LANES(1)) u_agen (
    .clk, .rst, .rw, .reset_addr, .rb, .rd, .mem_valid, .mem_last(memory_out[0].last),
    .buffer_full, .address, .fetch, .lane_load, .fetch_done
  );

  main_memory #(.LANES(1)) u_mem (
    .clk, .rst, .rw, .address, .data_in, .fetch, .memory_out, .mem_valid
  );

  instruction_buffer #(.DEPTH(IB_DEPTH)) u_ib (
    .clk, .rst, .clear(iter_end), .push(lane_load), .din(memory_out[0]),
    .pop(take), .buffer_out, .out_valid(ib_valid), .buffer_full, .empty(ib_empty)
  );

  state_table #(.LANES(1)) u_st (
    .clk, .rst, .rw, .address_in, .lookup, .lookup_valid, .alu_result(res_bus), .lanes_idle, .iter_end,
    .s1, .s2, .rd
  );

  multiway_function_buffer #(.LANES(1)) u_mfb (
    .clk, .rst, .rw, .address_in, .data_buffer, .start(reset_addr && !rw), .sample_in,
    .s1, .s2, .alu_result(res_bus), .lanes_idle, .iter_end, .src1, .src2, .rb, .sample_take
  );

  execution_array #(.STAGES(EA_STAGES), .NRES(1)) u_ea (
    .clk, .rst, .clear(iter_end), .in_valid(ib_valid), .in_ins(buffer_out), .take,
    .src1(src1[0]), .src2(src2[0]), .alu_result(res_bus), .alu_ready, .issue,
    .pe_ins, .pe_op1, .pe_op2, .empty(ea_empty), .waiting(ea_waiting_any)
  );

  processing_element u_pe (
    .clk, .rst, .issue, .ins(pe_ins), .op1(pe_op1), .op2(pe_op2), .alu_ready, .alu_result
  );

endmodule
