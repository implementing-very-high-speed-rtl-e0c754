// neuron_activation: the neuron activation function of both layers.
//
// A purely combinational unit. It takes a 24-bit neuron sum in Q.12 (the sum
// of weight Q2.5 times value Q0.7 products) and returns the neuron output
// as a Q0.7 value in 0..127, i.e. 0.0 .. 0.99.
//
// Both layers apply an activation function to their sums, but the function
// itself is not given. This unit uses the piecewise-linear sigmoid
// approximation known as PLAN. It needs only shifts, adds and compares, and
// it is odd-symmetric about 0.5:
//     |z| >= 5          : 1
//     2.375 <= |z| < 5  : |z|/32 + 0.84375
//     1 <= |z| < 2.375  : |z|/8  + 0.625
//     |z| < 1           : |z|/4  + 0.5
// For z < 0 the output is 1 - f(|z|). The sum is first cut to Q.5 (1.0 = 32)
// by an arithmetic shift of 7. The result is in units of 1/128 and is
// clamped to 127.
module neuron_activation
  import mlp_pkg::*;
(
  input  logic signed [ACC_W-1:0] acc_i,  // neuron sum, Q.12
  output logic signed [V_W-1:0]   y_o     // activation, Q0.7, 0..127
);

  logic signed [ACC_W-8:0] z;      // Q.5
  logic        [ACC_W-8:0] mag;    // |z|
  logic        [7:0]       f_pos;  // f(|z|) in 1/128 units, 64..128
  logic        [7:0]       f;

  always_comb begin
    z   = (ACC_W-7)'(acc_i >>> 7);
    mag = z[ACC_W-8] ? (ACC_W-7)'(-z) : (ACC_W-7)'(z);
    if (mag >= 160)      f_pos = 8'd128;
    else if (mag >= 76)  f_pos = 8'(mag[7:3]) + 8'd108;
    else if (mag >= 32)  f_pos = 8'(mag[6:1]) + 8'd80;
    else                 f_pos = 8'(mag[4:0]) + 8'd64;
    f   = z[ACC_W-8] ? (8'd128 - f_pos) : f_pos;
    y_o = (f > 8'd127) ? 8'sd127 : V_W'(f);
  end

endmodule
