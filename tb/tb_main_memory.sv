// tb_main_memory: writes all 64 words of the four-port configuration in load
// mode, then reads random addresses and checks that the four output ports
// show the four consecutive words (wrapping at the end) one cycle after the
// address, and that mem_valid follows fetch by one cycle.
module tb_main_memory;
  import dfg_pkg::*;
  localparam int LANES = 4;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, fetch = 1'b0;
  logic [5:0] address = '0;
  instr_t data_in = '0;
  instr_t memory_out [LANES];
  logic mem_valid;
  instr_t model [NTASK];
  int checks = 0, failures = 0;

  main_memory #(.LANES(LANES)) dut (.clk, .rst, .rw, .address, .data_in, .fetch, .memory_out, .mem_valid);

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
    rst = 1'b0; rw = 1'b1;
    for (int a = 0; a < NTASK; a++) begin
      address = 6'(a);
      data_in = instr_t'({$urandom, $urandom});
      model[a] = data_in;
      @(negedge clk);
    end
    rw = 1'b0;
    for (int n = 0; n < 200; n++) begin
      logic [5:0] a;
      logic f;
      a = 6'($urandom); f = 1'($urandom);
      address = a; fetch = f;
      @(negedge clk);
      check(mem_valid == f, "mem_valid");
      for (int k = 0; k < LANES; k++)
        check(memory_out[k] == model[6'(a + 6'(k))], $sformatf("port %0d addr %0d", k, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
