// main_memory: instruction store of the DFG processors.
//
// DEPTH words of 41 bits (64 in the published configuration). In load mode
// (rw=1) data_in is written at address every cycle. In run mode LANES
// consecutive words starting at address are read and registered onto
// memory_out[0..LANES-1] (Memory_out1..4 in the parallel system), as in the
// published block diagram where the memory output passes through a register.
// mem_valid marks, one cycle after fetch, that memory_out holds fetched words;
// it is this design's addition so that the consumers know when to load.
module main_memory
  import dfg_pkg::*;
#(
  parameter int unsigned LANES  = 1,
  parameter int unsigned DEPTH  = NTASK,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rw,
  input  logic [ADDR_W-1:0] address,
  input  instr_t            data_in,
  input  logic              fetch,
  output instr_t            memory_out [LANES],
  output logic              mem_valid
);

  instr_t mem [DEPTH];

  if ($bits(instr_t) != INSTR_W) begin : g_bad_format
    $error("instr_t must be %0d bits wide", INSTR_W);
  end

  always_ff @(posedge clk) begin
    if (rw) mem[address] <= data_in;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++) begin
      memory_out[k] <= mem[ADDR_W'(address + ADDR_W'(k))];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) mem_valid <= 1'b0;
    else     mem_valid <= fetch && !rw;
  end

endmodule
