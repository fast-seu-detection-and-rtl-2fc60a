// mac_cell_tb: self-checking test of one weight-stationary MAC cell.
// Loads random weights, clears them, and checks every cycle that the
// registered partial sum equals psum_in + x_in * weight and that the input
// is forwarded unchanged, both with one cycle of latency.
module mac_cell_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic w_load, w_clear;
  logic signed [7:0]  w_in, x_in, x_out, w_q;
  logic signed [31:0] psum_in, psum_out;

  mac_cell #(.DATA_W(8), .ACC_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic signed [7:0]  w_ref, x_prev;
    logic signed [31:0] p_prev;
    w_load = 0; w_clear = 0; w_in = 0; x_in = 0; psum_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(w_q == 0 && psum_out == 0, "reset state");
    for (int t = 0; t < 200; t++) begin
      // occasionally change the weight
      if (t % 25 == 0) begin
        w_load = 1'b1;
        w_in   = (t == 50) ? -8'sd128 : 8'($urandom);
        w_ref  = w_in;
        @(negedge clk);
        w_load = 1'b0;
        check(w_q == w_ref, "weight load");
      end
      if (t == 120) begin
        w_clear = 1'b1;
        @(negedge clk);
        w_clear = 1'b0;
        w_ref = 0;
        check(w_q == 0, "weight clear");
      end
      x_in    = (t == 51) ? -8'sd128 : 8'($urandom);
      psum_in = $urandom;
      x_prev  = x_in;
      p_prev  = psum_in;
      @(negedge clk);
      check(psum_out == p_prev + 32'(x_prev) * 32'(w_ref), $sformatf("mac t=%0d", t));
      check(x_out == x_prev, "input forwarded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
