// tb_address_generator: checks the counter of the four-lane configuration
// against a small model: it steps by one per cycle in load mode, is cleared by
// Reset and by Rd&Rb together (not by either alone), steps by LANES while
// fetching, stops while any Buffer_full is high and after the last_task bit,
// and masks the lanes after the one holding the last task. Stimulus and
// sampling on the falling clock edge.
module tb_address_generator;
  localparam int LANES = 4;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, reset_addr = 1'b0, rb = 1'b0, rd = 1'b0;
  logic mem_valid = 1'b0;
  logic [LANES-1:0] mem_last = '0, buffer_full = '0;
  logic [5:0] address;
  logic fetch, fetch_done;
  logic [LANES-1:0] lane_load;
  int checks = 0, failures = 0;

  address_generator #(.LANES(LANES)) dut (
    .clk, .rst, .rw, .reset_addr, .rb, .rd, .mem_valid, .mem_last, .buffer_full,
    .address, .fetch, .lane_load, .fetch_done
  );

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
    logic [5:0] a;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // load mode: +1 per cycle, no fetch
    rw = 1'b1;
    for (int i = 0; i < 10; i++) begin
      check(address == 6'(i), "load count");
      check(!fetch, "fetch in load mode");
      @(negedge clk);
    end
    // start a run
    rw = 1'b0; reset_addr = 1'b1;
    @(negedge clk); reset_addr = 1'b0;
    check(address == 0, "Reset clears");
    a = 0;
    for (int i = 0; i < 40; i++) begin
      buffer_full = ($urandom % 3 == 0) ? LANES'(1 << ($urandom % LANES)) : '0;
      #1;
      check(fetch == (buffer_full == 0), "EC follows Buffer_full");
      @(negedge clk);
      if (buffer_full == 0) a = a + 6'(LANES);
      check(address == a, $sformatf("address %0d expected %0d", address, a));
    end
    buffer_full = '0;
    // last task in lane 1 of the group shown now
    mem_valid = 1'b1; mem_last = 4'b0010;
    #1;
    check(lane_load == 4'b0011, "lanes after the last task masked");
    check(!fetch, "fetch with last task shown");
    @(negedge clk);
    mem_valid = 1'b0; mem_last = '0;
    a = address;
    repeat (5) begin
      check(fetch_done && !fetch && address == a, "stopped after last task");
      @(negedge clk);
    end
    // Rd alone and Rb alone do not clear
    rd = 1'b1; @(negedge clk); check(address == a, "Rd alone cleared"); rd = 1'b0;
    rb = 1'b1; @(negedge clk); check(address == a, "Rb alone cleared"); rb = 1'b0;
    rd = 1'b1; rb = 1'b1; @(negedge clk); rd = 1'b0; rb = 1'b0;
    check(address == 0 && !fetch_done, "Rd&Rb clear");
    #1; check(fetch, "new iteration fetches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
