// opt_cordic: iterative CORDIC rotator for one fixed, known angle.
//
// The angle is realised by M predetermined micro-rotations
//   X <- X - sigma_i * (Y >> k(i)),  Y <- Y + sigma_i * (X >> k(i)).
// Because k(i) and sigma_i are known in advance there is no angle datapath:
// a few-word ROM (ctrl_rom) gives k(i), a sign-bit register (sbr) gives
// sigma_i, and the two shifters use hardwired pre-shifting (preshift_shifter):
// only the (W-l) MSBs of a register, l = smallest k(i), enter a barrel shifter
// of (s-l) shifts, s = largest k(i).  The X/Y registers are loaded through a
// multiplexer from x0/y0 or fed back from the add/subtract units.
// Outputs are NOT scaled: the vector grows by 1/K = prod sqrt(1+2^-2k(i)).
//
// Interface / timing: a start pulse while idle loads x0/y0; one micro-rotation
// is made per clock; done pulses for one cycle M clocks after the start edge,
// with the result on x/y (held until the next start).  ovf reports a signed
// overflow in any add/subtract of the operation.  start is ignored while busy.
// The handshake and the register multiplexer are this design's choices; the
// reference circuit with shifts 0,1,2,... is this module with SHIFTS = i.
module opt_cordic #(
  parameter int unsigned                W      = cordic_pkg::WIDTH,
  parameter int unsigned                M      = cordic_pkg::ROT20_M,
  parameter cordic_pkg::shift_t [M-1:0] SHIFTS = cordic_pkg::ROT20_SHIFTS,
  parameter logic [M-1:0]               DIRS   = cordic_pkg::ROT20_DIRS,
  localparam int unsigned               IW     = (M < 2) ? 1 : $clog2(M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x0,
  input  logic [W-1:0] y0,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic         ovf
);

  function automatic int unsigned min_shift();
    int unsigned r = 31;
    for (int unsigned i = 0; i < M; i++) if (32'(SHIFTS[i]) < r) r = 32'(SHIFTS[i]);
    return r;
  endfunction

  function automatic int unsigned max_shift();
    int unsigned r = 0;
    for (int unsigned i = 0; i < M; i++) if (32'(SHIFTS[i]) > r) r = 32'(SHIFTS[i]);
    return r;
  endfunction

  localparam int unsigned PRE  = min_shift();   // l
  localparam int unsigned MAXS = max_shift();   // s

  logic [W-1:0]       x_q, y_q;
  logic [W-1:0]       x_sh, y_sh, x_nxt, y_nxt;
  logic [IW-1:0]      idx_q;
  logic               sigma, ovf_x, ovf_y;
  cordic_pkg::shift_t k;
  logic               last;

  ctrl_rom #(.M(M), .SHIFTS(SHIFTS)) u_rom (.idx(idx_q), .shift(k));

  sbr #(.M(M), .DIRS(DIRS)) u_sbr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start && !busy),
    .step (busy),
    .dir  (sigma)
  );

  preshift_shifter #(.W(W), .PRE(PRE), .MAX_SHIFT(MAXS)) u_shx (.din(x_q), .shamt(k), .dout(x_sh));
  preshift_shifter #(.W(W), .PRE(PRE), .MAX_SHIFT(MAXS)) u_shy (.din(y_q), .shamt(k), .dout(y_sh));

  // sigma = +1: X - Y*2^-k and Y + X*2^-k
  addsub #(.W(W)) u_addx (.a(x_q), .b(y_sh), .sub(sigma),  .sum(x_nxt), .ovf(ovf_x));
  addsub #(.W(W)) u_addy (.a(y_q), .b(x_sh), .sub(!sigma), .sum(y_nxt), .ovf(ovf_y));

  assign last = (idx_q == IW'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      idx_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      ovf   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x_q   <= x0;
        y_q   <= y0;
        idx_q <= '0;
        busy  <= 1'b1;
        ovf   <= 1'b0;
      end else if (busy) begin
        x_q   <= x_nxt;
        y_q   <= y_nxt;
        ovf   <= ovf | ovf_x | ovf_y;
        idx_q <= last ? '0 : idx_q + 1'b1;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign x = x_q;
  assign y = y_q;

endmodule
