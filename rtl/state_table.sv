// state_table: readiness bit of every task for the current iteration.
//
// A NTASK x 1-bit array (64 bits) addressed by task ID. Each of the LANES
// lookup ports takes the operand fields of the task leaving an instruction
// buffer and answers, one cycle later through registers as in the published
// circuit, with S (operand ID) and C (iteration number) per operand: S is the
// ID when the operand is ready and 0 otherwise. An operand is ready when it
// belongs to an earlier iteration (iteration number not 0) or its bit is 1.
// The bit of the input stream ID always reads as ready. Bits are set by the
// task IDs on the LANES ALU result buses. The whole table is cleared at the
// end of an iteration, and one bit per cycle during instruction loading
// through Address_In.
//
// End of iteration: Rd is raised when a result carrying the last_task bit has
// been seen and all lanes are idle (lanes_idle); in the serial system this is
// the cycle after the last result. The idle condition is this design's
// addition: with four lanes the last task in the queue can finish before
// others.
module state_table
  import dfg_pkg::*;
#(
  parameter int unsigned LANES = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            rw,           // load mode: clear bit Address_In
  input  logic [ID_W-1:0] address_in,
  input  lookup_t         lookup     [LANES],
  input  logic            lookup_valid [LANES],
  input  alu_res_t        alu_result [LANES],
  input  logic            lanes_idle,
  input  logic            iter_end,     // Rd & Rb: clear the table
  output opref_t          s1         [LANES],
  output opref_t          s2         [LANES],
  output logic            rd
);

  logic [NTASK-1:0] ready_bits;
  logic             last_seen;

  function automatic opref_t answer(logic [ID_W-1:0] id, logic [ITER_W-1:0] it,
                                    logic [NTASK-1:0] c);
    logic ready;
    ready = (it != '0) || c[id] || (id == INPUT_ID);
    return '{id: ready ? id : NO_ID, iter: it};
  endfunction

  always_ff @(posedge clk) begin
    if (rst || iter_end) begin
      for (int k = 0; k < LANES; k++) begin
        s1[k] <= '0;
        s2[k] <= '0;
      end
    end else begin
      for (int k = 0; k < LANES; k++) begin
        s1[k] <= lookup_valid[k] ? answer(lookup[k].op1_id, lookup[k].op1_iter, ready_bits) : '0;
        s2[k] <= lookup_valid[k] ? answer(lookup[k].op2_id, lookup[k].op2_iter, ready_bits) : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || iter_end) begin
      ready_bits <= '0;
      last_seen <= 1'b0;
    end else if (rw) begin
      ready_bits[address_in] <= 1'b0;
      last_seen <= 1'b0;
    end else begin
      for (int k = 0; k < LANES; k++) begin
        if (alu_result[k].id != NO_ID) ready_bits[alu_result[k].id] <= 1'b1;
        if (alu_result[k].last) last_seen <= 1'b1;
      end
    end
  end

  assign rd = last_seen && lanes_idle;

endmodule
