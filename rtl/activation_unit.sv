// activation_unit: turns a vector of 32-bit accumulator values into int8
// activations, applying ReLU or sigmoid.
//
// Each element is first scaled by an arithmetic right shift (shift, set by
// the host) and saturated to 16 bits, giving s. ReLU then outputs s clamped
// to [0, 127]. Sigmoid uses the hard-sigmoid line 0.5 + x/4 with x = s/32
// and the output in units of 1/128, which reduces to clamp(64 + s, 0, 127).
// One vector per cycle, one cycle of latency (in_valid -> out_valid).
//
// ReLU and sigmoid are the two functions of the described unit; the shift
// requantisation and the hard-sigmoid approximation are this design's
// choices, since the exact quantised functions are not given.
module activation_unit #(
  parameter int unsigned N     = 14,
  parameter int unsigned ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    sigmoid,   // 0: ReLU, 1: sigmoid
  input  logic [4:0]              shift,
  input  logic signed [ACC_W-1:0] acc [N],
  output logic                    out_valid,
  output logic signed [7:0]       act [N]
);
  function automatic logic signed [7:0] apply(logic signed [ACC_W-1:0] v,
                                              logic [4:0] sh, logic sg);
    logic signed [ACC_W-1:0] t;
    logic signed [16:0]      s;
    t = v >>> sh;
    if (t > 32767)       s = 17'sd32767;
    else if (t < -32768) s = -17'sd32768;
    else                 s = 17'(t);
    if (sg) s = s + 17'sd64;
    if (s < 0)        return 8'sd0;
    else if (s > 127) return 8'sd127;
    else              return 8'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < N; j++) act[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int j = 0; j < N; j++) act[j] <= apply(acc[j], shift, sigmoid);
    end
  end
endmodule
