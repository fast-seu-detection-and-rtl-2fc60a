// instr_fifo_tb: random pushes and pops against a queue model, checking the
// head word, empty/full/count, that a push when full is dropped, and that
// flush empties the FIFO in one cycle.
module instr_fifo_tb;
  localparam int W = 80;
  localparam int D = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic flush, push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [3:0] count;
  logic [W-1:0] q [$];

  instr_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int pushes_full = 0;
  initial begin
    flush = 0; push = 0; pop = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(rdata == q[0], "head");
      push  = (t % 400 < 200) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop   = !empty && ($urandom % 2 == 0);
      flush = (t % 500 == 499);
      wdata = {$urandom, $urandom, 16'($urandom)};
      begin
        bit was_full;
        was_full = full;
        @(negedge clk);
        if (flush) q.delete();
        else begin
          if (pop) void'(q.pop_front());
          if (push && !was_full) q.push_back(wdata);
          if (push && was_full) pushes_full++;
        end
      end
    end
    check(pushes_full > 0, "full condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
