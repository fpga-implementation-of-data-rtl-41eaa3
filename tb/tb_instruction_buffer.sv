// tb_instruction_buffer: random pushes and pops against a queue model; checks
// order, out_valid, empty, Buffer_full (raised at DEPTH-1 entries), that
// clear empties the buffer, and the pass-through of a task arriving at an
// empty buffer (shown on Buffer_out at once, not stored if taken). Pushes are made only while Buffer_full is low or
// one cycle after it rose, as the address generator does.
module tb_instruction_buffer;
  import dfg_pkg::*;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, push = 1'b0, pop = 1'b0;
  instr_t din = '0, buffer_out;
  logic out_valid, buffer_full, empty;
  instr_t model [$];
  int checks = 0, failures = 0, n_full = 0, n_bypass = 0;

  instruction_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .clear, .push, .din, .pop,
                                           .buffer_out, .out_valid, .buffer_full, .empty);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      push  = (model.size() < DEPTH) && ($urandom % 2);
      clear = ($urandom % 97) == 0;
      din   = instr_t'({$urandom, $urandom});
      #1;
      check(out_valid == (model.size() != 0 || push) && empty == (model.size() == 0),
            "valid/empty");
      check(buffer_full == (model.size() >= DEPTH - 1), $sformatf("full with %0d", model.size()));
      if (model.size() != 0) check(buffer_out == model[0], "head order");
      else if (push) check(buffer_out == din, "pass-through of an arriving task");
      if (buffer_full) n_full++;
      pop = out_valid && (($urandom % 3) == 0);
      if (pop && push && model.size() == 0) n_bypass++;
      @(negedge clk);
      if (clear) model.delete();
      else begin
        if (push) model.push_back(din);
        if (pop) void'(model.pop_front());
      end
    end
    check(n_full > 0, "never full");
    check(n_bypass > 0, "pass-through never taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
