// sbr: sign-bit register of a fixed rotation (or scaling).
//
// Holds the predetermined direction bits sigma_i of the M micro-rotations.
// load copies the constant DIRS word in; each step shifts it one place right,
// so dir always shows the direction of the current iteration (bit 0).
// Interface: clk, active-low asynchronous rst_n, load, step in; dir out
// (1 = sigma +1).  load wins over step.  Reset also loads DIRS.
module sbr #(
  parameter int unsigned    M    = cordic_pkg::ROT20_M,
  parameter logic [M-1:0]   DIRS = cordic_pkg::ROT20_DIRS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic step,
  output logic dir
);

  logic [M-1:0] bits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bits_q <= DIRS;
    else if (load) bits_q <= DIRS;
    else if (step) bits_q <= bits_q >> 1;
  end

  assign dir = bits_q[0];

endmodule
