// tb_multiway_function_buffer: four-lane function buffer against a model of
// 64 entries x 4 iteration slots. Preloads all entries through Data_Buffer,
// then mixes random result writes, iteration ends (ageing by one slot, new
// input sample in the input-stream entry) and reads on all eight ports,
// checking each Src answer one cycle later. Also checks Rb and sample_take.
module tb_multiway_function_buffer;
  import dfg_pkg::*;
  localparam int LANES = 4;

  logic clk = 1'b0, rst = 1'b1, rw = 1'b0, start = 1'b0, lanes_idle = 1'b0, iter_end = 1'b0;
  logic [ID_W-1:0] address_in = '0;
  logic [HIST*DATA_W-1:0] data_buffer = '0;
  logic [DATA_W-1:0] sample_in = '0;
  opref_t   s1 [LANES], s2 [LANES];
  alu_res_t alu_result [LANES];
  src_t     src1 [LANES], src2 [LANES];
  logic     rb, sample_take;
  logic [DATA_W-1:0] model [NTASK][HIST];
  int checks = 0, failures = 0;

  multiway_function_buffer #(.LANES(LANES)) dut (
    .clk, .rst, .rw, .address_in, .data_buffer, .start, .sample_in, .s1, .s2, .alu_result,
    .lanes_idle, .iter_end, .src1, .src2, .rb, .sample_take
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

  function automatic src_t expect_src(opref_t r);
    if (r.id == NO_ID) return '0;
    return '{id: r.id, iter: r.iter, value: model[r.id][r.iter]};
  endfunction

  initial begin
    src_t e1 [LANES], e2 [LANES];
    foreach (s1[k]) begin s1[k] = '0; s2[k] = '0; alu_result[k] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0; rw = 1'b1;
    for (int a = 0; a < NTASK; a++) begin
      address_in  = ID_W'(a);
      data_buffer = {$urandom, $urandom};
      for (int h = 0; h < HIST; h++) model[a][h] = data_buffer[(HIST-1-h)*DATA_W +: DATA_W];
      @(negedge clk);
    end
    rw = 1'b0;
    start = 1'b1; sample_in = 16'h1234;
    #1 check(sample_take, "sample_take at start");
    @(negedge clk); start = 1'b0;
    model[INPUT_ID][0] = 16'h1234;
    for (int n = 0; n < 800; n++) begin
      logic [ID_W-1:0] used [$];
      iter_end = ($urandom % 40) == 0;
      sample_in = 16'($urandom);
      for (int k = 0; k < LANES; k++) begin
        logic [ID_W-1:0] id;
        s1[k] = opref_t'($urandom);
        s2[k] = opref_t'($urandom);
        e1[k] = expect_src(s1[k]);
        e2[k] = expect_src(s2[k]);
        id = ID_W'($urandom);
        alu_result[k] = (!iter_end && ($urandom % 2) && !(id inside {used})) ?
                        '{last: 1'b0, id: id, value: 16'($urandom)} : '0;
        used.push_back(id);
      end
      #1 check(sample_take == iter_end, "sample_take");
      @(negedge clk);
      if (iter_end) begin
        for (int i = 0; i < NTASK; i++) begin
          for (int h = HIST-1; h > 0; h--) model[i][h] = model[i][h-1];
          model[i][0] = '0;
        end
        model[INPUT_ID][0] = sample_in;
      end else begin
        for (int k = 0; k < LANES; k++)
          if (alu_result[k].id != 0) model[alu_result[k].id][0] = alu_result[k].value;
      end
      for (int k = 0; k < LANES; k++) begin
        if (iter_end) check(src1[k] == '0 && src2[k] == '0, "answers dropped at iteration end");
        else check(src1[k] == e1[k] && src2[k] == e2[k], $sformatf("lane %0d Src", k));
      end
      iter_end = 1'b0;
    end
    foreach (alu_result[k]) alu_result[k] = '0;
    alu_result[1] = '{last: 1'b1, id: 6'd3, value: 16'h5};
    @(negedge clk); alu_result[1] = '0;
    #1 check(!rb, "Rb while busy");
    lanes_idle = 1'b1; #1 check(rb, "Rb after last task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
