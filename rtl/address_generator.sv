// address_generator: instruction address counter of the serial (LANES=1) and
// parallel (LANES=4) systems.
//
// Following the published circuit, a 6-bit counter is cleared by the external
// Reset or when both end-of-iteration signals Rd (state table) and Rb
// (function buffer) are high, and counts only while no instruction buffer
// reports Buffer_full and the last_task bit (Memory_out[6]) has not been seen.
// In the parallel system LANES consecutive instructions are fetched at once, so
// the counter steps by LANES.
//
// Design choices beyond the figure: in load mode (rw=1) the counter steps by
// one every cycle so the host can write one instruction per cycle; the counter
// only fetches after a Reset pulse has started a run; and because the memory
// read takes one cycle, words fetched past the last task (in the same group or
// one cycle later) are masked by lane_load, the per-lane write enable of the
// instruction buffers.
//
// Timing: address is a register; fetch is high in the cycle a read of
// address..address+LANES-1 is issued; the words appear on Memory_out one cycle
// later together with mem_valid.
module address_generator
  import dfg_pkg::*;
#(
  parameter int unsigned LANES  = 1,
  parameter int unsigned ADDR_W = ID_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rw,            // 1: instruction load mode
  input  logic              reset_addr,    // Reset: clear address, start a run
  input  logic              rb,
  input  logic              rd,
  input  logic              mem_valid,     // Memory_out holds fetched words
  input  logic [LANES-1:0]  mem_last,      // Memory_outk[6]
  input  logic [LANES-1:0]  buffer_full,
  output logic [ADDR_W-1:0] address,
  output logic              fetch,
  output logic [LANES-1:0]  lane_load,
  output logic              fetch_done     // last task of the iteration fetched
);

  logic run;
  logic clr;

  assign clr   = reset_addr || (rd && rb);
  assign fetch = run && !rw && !fetch_done && !clr && !(|buffer_full) &&
                 !(mem_valid && |mem_last);

  // Lane k is loaded unless a lower lane of the same group holds the last task.
  always_comb begin
    logic seen;
    seen = 1'b0;
    for (int k = 0; k < LANES; k++) begin
      lane_load[k] = mem_valid && !fetch_done && !seen;
      seen         = seen || mem_last[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      address    <= '0;
      run        <= 1'b0;
      fetch_done <= 1'b0;
    end else if (clr) begin
      address    <= '0;
      fetch_done <= 1'b0;
      run        <= !rw;
    end else if (rw) begin
      address    <= address + ADDR_W'(1);
      run        <= 1'b0;
    end else begin
      if (fetch) address <= address + ADDR_W'(LANES);
      if (mem_valid && !fetch_done && |mem_last) fetch_done <= 1'b1;
    end
  end

endmodule
