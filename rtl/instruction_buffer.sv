// instruction_buffer: queue between the main memory and the execution array.
//
// Holds fetched tasks until the execution array takes them. The head of the
// queue is Buffer_out; it is shown to the state table for the operand lookup
// in the same cycle the execution array takes it (pop). When the queue is
// empty, an arriving task is passed straight through to Buffer_out in the
// cycle it arrives; if the execution array takes it then, it is never stored.
// So at the start of an iteration, while the execution array has free
// stages, the first tasks go directly to the array, as the document
// describes, and only tasks that must wait are queued. Buffer_full stops the
// address generator; it rises one entry early because one read may still be
// on its way from the memory. The queue is emptied at the end of an iteration
// (clear, driven by Rb and Rd).
//
// Interface timing: push/din come from the registered memory output; out_valid
// and buffer_out are combinational from push/din when the queue is empty and
// from the queue head otherwise; pop must only be high with out_valid.
// empty and buffer_full depend on the stored count only.
//
// The document gives the function and the pass-through of the first tasks.
// The DEPTH-entry circular FIFO (DEPTH=4 by default) is this design's choice.
module instruction_buffer
  import dfg_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   clear,
  input  logic   push,
  input  instr_t din,
  input  logic   pop,
  output instr_t buffer_out,
  output logic   out_valid,
  output logic   buffer_full,
  output logic   empty
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  instr_t           q [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [PTR_W:0]   count;
  logic             do_pop, bypass;

  assign out_valid   = (count != 0) || push;
  assign empty       = (count == 0);
  assign buffer_out  = (count == 0) ? din : q[rd_ptr];
  assign buffer_full = (count >= (PTR_W+1)'(DEPTH - 1));
  assign do_pop      = pop && out_valid;
  assign bypass      = (count == 0) && push && pop;   // passes through, not stored

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (!bypass) begin
      if (push) begin
        q[wr_ptr] <= din;
        wr_ptr    <= inc(wr_ptr);
      end
      if (do_pop) rd_ptr <= inc(rd_ptr);
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst || clear)
                                  push |-> (count < (PTR_W+1)'(DEPTH)) || do_pop);

endmodule
