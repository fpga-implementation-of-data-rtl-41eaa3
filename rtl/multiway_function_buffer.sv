// multiway_function_buffer: result store of the DFG processors.
//
// NTASK entries of HIST x 16 bits (64 x 64 bits by default, as published):
// entry i holds the results of task i for the current iteration (slot 0) and
// the three iterations before it (slots 1..3). Slot k sits at bits
// [63-16k -: 16] of the entry, the order of the published read multiplexer.
// Each ALU result bus writes slot 0 of its task. At the end of an iteration
// (Rb & Rd) every entry ages by one slot, so the values keep their meaning
// "k iterations ago".
//
// Each of the 2*LANES read ports takes an (ID, iteration) pair from the state
// table (S, C) and answers one cycle later on a registered Src bus with
// {ID, iteration, value}; an ID of 0 (operand not ready) gives an all-zero
// bus. Answers still in flight at the end of an iteration are dropped, as
// their iteration numbers refer to the old iteration. In load mode (rw=1) the entry at Address_In is written with
// Data_Buffer, which clears the buffer or presets initial filter state.
//
// Design choices beyond the document: the external input stream is kept in
// entry INPUT_ID; sample_in is written into its slot 0 when a run starts and
// at every iteration end (sample_take marks the cycle). Rb is raised when a
// last_task result has been seen and all lanes are idle (see state_table).
module multiway_function_buffer
  import dfg_pkg::*;
#(
  parameter int unsigned LANES = 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   rw,
  input  logic [ID_W-1:0]        address_in,
  input  logic [HIST*DATA_W-1:0] data_buffer,
  input  logic                   start,        // run starts: take first sample
  input  logic [DATA_W-1:0]      sample_in,
  input  opref_t                 s1         [LANES],
  input  opref_t                 s2         [LANES],
  input  alu_res_t               alu_result [LANES],
  input  logic                   lanes_idle,
  input  logic                   iter_end,     // Rd & Rb
  output src_t                   src1       [LANES],
  output src_t                   src2       [LANES],
  output logic                   rb,
  output logic                   sample_take
);

  logic [DATA_W-1:0] buf_q [NTASK][HIST];
  logic              last_seen;

  assign sample_take = start || iter_end;
  assign rb          = last_seen && lanes_idle;

  function automatic src_t read_port(opref_t r, logic [DATA_W-1:0] v);
    return (r.id == NO_ID) ? '0 : '{id: r.id, iter: r.iter, value: v};
  endfunction

  always_ff @(posedge clk) begin
    if (rst || iter_end) begin
      for (int k = 0; k < LANES; k++) begin
        src1[k] <= '0;
        src2[k] <= '0;
      end
    end else begin
      for (int k = 0; k < LANES; k++) begin
        src1[k] <= read_port(s1[k], buf_q[s1[k].id][s1[k].iter]);
        src2[k] <= read_port(s2[k], buf_q[s2[k].id][s2[k].iter]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last_seen <= 1'b0;
    end else if (rw) begin
      for (int h = 0; h < HIST; h++)
        buf_q[address_in][h] <= data_buffer[(HIST-1-h)*DATA_W +: DATA_W];
      last_seen <= 1'b0;
    end else if (iter_end) begin
      for (int i = 0; i < NTASK; i++) begin
        for (int h = HIST-1; h > 0; h--) buf_q[i][h] <= buf_q[i][h-1];
        buf_q[i][0] <= '0;
      end
      buf_q[INPUT_ID][0] <= sample_in;
      last_seen          <= 1'b0;
    end else begin
      if (start) buf_q[INPUT_ID][0] <= sample_in;
      for (int k = 0; k < LANES; k++) begin
        if (alu_result[k].id != NO_ID) buf_q[alu_result[k].id][0] <= alu_result[k].value;
        if (alu_result[k].last) last_seen <= 1'b1;
      end
    end
  end

endmodule
