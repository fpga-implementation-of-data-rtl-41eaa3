// dfg_top: the two DFG task processors side by side.
//
// The serial system (one processing element) and the parallel system (four
// processing elements) are the two alternative implementations of the same
// architecture. Both are instantiated here with their own ports (prefix s_ and
// p_) so that the same compiled task queue can be loaded into each and run
// from the same input stream. The two share nothing but the clock and reset.
// Both run at their published sizes: 64 instructions, a 64-bit state table and
// a 64 x 64-bit function buffer, 16-bit data.
module dfg_top
  import dfg_pkg::*;
#(
  parameter int unsigned P_LANES = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  // serial system
  input  logic                   s_rw,
  input  logic                   s_reset_addr,
  input  instr_t                 s_data_in,
  input  logic [HIST*DATA_W-1:0] s_data_buffer,
  input  logic [DATA_W-1:0]      s_sample_in,
  output logic                   s_sample_take,
  output alu_res_t               s_alu_result,
  output logic                   s_iter_done,
  output logic                   s_buffer_full,
  output logic                   s_ea_waiting,
  // parallel system
  input  logic                   p_rw,
  input  logic                   p_reset_addr,
  input  instr_t                 p_data_in,
  input  logic [HIST*DATA_W-1:0] p_data_buffer,
  input  logic [DATA_W-1:0]      p_sample_in,
  output logic                   p_sample_take,
  output alu_res_t               p_alu_result [P_LANES],
  output logic                   p_iter_done,
  output logic                   p_buffer_full,
  output logic                   p_ea_waiting
);

  serial_system u_serial (
    .clk, .rst, .rw(s_rw), .reset_addr(s_reset_addr), .data_in(s_data_in),
    .data_buffer(s_data_buffer), .sample_in(s_sample_in), .sample_take(s_sample_take),
    .alu_result(s_alu_result), .iter_done(s_iter_done), .buffer_full_any(s_buffer_full),
    .ea_waiting_any(s_ea_waiting)
  );

  parallel_system #(.LANES(P_LANES)) u_parallel (
    .clk, .rst, .rw(p_rw), .reset_addr(p_reset_addr), .data_in(p_data_in),
    .data_buffer(p_data_buffer), .sample_in(p_sample_in), .sample_take(p_sample_take),
    .alu_result(p_alu_result), .iter_done(p_iter_done), .buffer_full_any(p_buffer_full),
    .ea_waiting_any(p_ea_waiting)
  );

endmodule
