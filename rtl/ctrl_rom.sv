// ctrl_rom: the few-word ROM of shift counts of a fixed rotation (or scaling).
//
// Word i holds k(i), the number of right shifts of the i-th micro-rotation
// (or s(i) of the i-th scaling term); the directions are held apart in the
// sign-bit register.  Asynchronous read; an index beyond M-1 reads 0.
// Interface: idx (iteration number) in, shift out.
module ctrl_rom #(
  parameter int unsigned        M      = cordic_pkg::ROT20_M,
  parameter cordic_pkg::shift_t [M-1:0] SHIFTS = cordic_pkg::ROT20_SHIFTS,
  localparam int unsigned       IW     = (M < 2) ? 1 : $clog2(M)
) (
  input  logic [IW-1:0]      idx,
  output cordic_pkg::shift_t shift
);

  always_comb begin
    shift = '0;
    for (int unsigned i = 0; i < M; i++)
      if (idx == IW'(i)) shift = SHIFTS[i];
  end

endmodule
