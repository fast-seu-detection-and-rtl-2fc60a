// tmr_voter_tb: random words with zero, one or three disagreeing replicas;
// checks the bitwise majority and the mismatch flag.
module tmr_voter_tb;
  localparam int W = 48;
  int checks = 0, failures = 0;
  logic [W-1:0] in_a, in_b, in_c, voted;
  logic mismatch;

  tmr_voter #(.W(W)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      logic [W-1:0] g, e;
      g = {$urandom, $urandom};
      e = {$urandom, $urandom};
      in_a = g; in_b = g; in_c = g;
      case (t % 4)
        1: in_a = g ^ e;
        2: in_b = g ^ e;
        3: in_c = g ^ e;
        default: ;
      endcase
      #1;
      if (t % 4 == 0 || e == 0) check(voted == g && !mismatch, "agree");
      else check(voted == g && mismatch, "one replica outvoted");
      // arbitrary inputs: per-bit majority
      in_a = {$urandom, $urandom}; in_b = {$urandom, $urandom}; in_c = {$urandom, $urandom};
      #1;
      for (int b = 0; b < W; b++)
        check(voted[b] == ((int'(in_a[b]) + int'(in_b[b]) + int'(in_c[b])) >= 2), "bit majority");
      check(mismatch == !(in_a == in_b && in_b == in_c), "mismatch flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
