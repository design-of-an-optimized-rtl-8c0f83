// cordic_pkg: word length, shift-count type and the constant control words of
// the fixed-angle rotator.
//
// A fixed rotation theta is split into M micro-rotations by the elementary
// angles atan(2^-k(i)), each taken with a fixed direction sigma_i, so that
// |theta - sum sigma_i*atan(2^-k(i))| is as small as M allows.  The CORDIC gain
// is undone by K_A = prod (1 + delta_j*2^-s(j)), which approximates
// K = prod (1 + 2^-2k(i))^-1/2.  The sets below were chosen this way:
//   * fewest micro-rotations reaching the 7 (20 deg) and 9 (30 deg) counts
//     quoted for these angles, distinct shifts 0..15, best angle error;
//   * fewest scaling terms with |K_A/K - 1| < 2^-16.
// Arrays are packed with element 0 in the least significant position: element i
// is the i-th micro-rotation.  A direction bit of 1 means sigma = +1
// (counter-clockwise, X <- X - Y*2^-k, Y <- Y + X*2^-k) or delta = +1.
package cordic_pkg;

  // Word length L of the X/Y datapath (two's complement).
  parameter int unsigned WIDTH = 25;

  typedef logic [4:0] shift_t;   // shift count, 0..31

  // ---- 20 degrees: 7 micro-rotations ----------------------------------------
  // k     = 1, 2, 3, 7, 9, 12, 14
  // sigma = +  -  +  +  -  +   -      sum = 20.0000237 deg, K = 0.860993232
  localparam int unsigned ROT20_M = 7;
  localparam shift_t [ROT20_M-1:0] ROT20_SHIFTS =
      {5'd14, 5'd12, 5'd9, 5'd7, 5'd3, 5'd2, 5'd1};
  localparam logic [ROT20_M-1:0] ROT20_DIRS = 7'b0101101;
  // s = 3, 5, 6, 13 ; delta = -, -, +, +      K_A/K - 1 = 1.5e-5
  localparam int unsigned SCL20_M = 4;
  localparam shift_t [SCL20_M-1:0] SCL20_SHIFTS = {5'd13, 5'd6, 5'd5, 5'd3};
  localparam logic [SCL20_M-1:0] SCL20_DIRS = 4'b1100;

  // ---- 30 degrees: 9 micro-rotations ----------------------------------------
  // k     = 0, 1, 3, 4, 6, 9, 10, 11, 14
  // sigma = +  -  +  +  +  -  +   +   -   sum = 29.9999999 deg, K = 0.626271472
  localparam int unsigned ROT30_M = 9;
  localparam shift_t [ROT30_M-1:0] ROT30_SHIFTS =
      {5'd14, 5'd11, 5'd10, 5'd9, 5'd6, 5'd4, 5'd3, 5'd1, 5'd0};
  localparam logic [ROT30_M-1:0] ROT30_DIRS = 9'b011011101;
  // s = 1, 2, 9, 14, 16 ; delta = -, +, +, +, +   K_A/K - 1 = 4.8e-6
  localparam int unsigned SCL30_M = 5;
  localparam shift_t [SCL30_M-1:0] SCL30_SHIFTS =
      {5'd16, 5'd14, 5'd9, 5'd2, 5'd1};
  localparam logic [SCL30_M-1:0] SCL30_DIRS = 5'b11110;

endpackage
