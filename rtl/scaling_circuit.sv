// scaling_circuit: iterative shift-add scaling of a rotated vector.
//
// Removes the CORDIC gain by multiplying X and Y by
//   K_A = prod_j (1 + delta_j * 2^-s(j)),
// a product of M shift-add terms approximating K = prod (1+2^-2k(i))^-1/2.
// One term is applied per clock to both coordinates: X <- X + delta_j*(X>>s(j)),
// Y <- Y + delta_j*(Y>>s(j)).  s(j) comes from a few-word ROM, delta_j from a
// sign-bit register, and the shifters use hardwired pre-shifting with
// l = smallest s(j).  Each coordinate is scaled by a shifted copy of itself.
//
// Interface / timing: as opt_cordic: a start pulse while idle loads x0/y0,
// done pulses M clocks after the start edge with the result on x/y, ovf
// flags a signed overflow, start is ignored while busy.
module scaling_circuit #(
  parameter int unsigned                W      = cordic_pkg::WIDTH,
  parameter int unsigned                M      = cordic_pkg::SCL20_M,
  parameter cordic_pkg::shift_t [M-1:0] SHIFTS = cordic_pkg::SCL20_SHIFTS,
  parameter logic [M-1:0]               DIRS   = cordic_pkg::SCL20_DIRS,
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

  localparam int unsigned PRE  = min_shift();
  localparam int unsigned MAXS = max_shift();

  logic [W-1:0]       x_q, y_q;
  logic [W-1:0]       x_sh, y_sh, x_nxt, y_nxt;
  logic [IW-1:0]      idx_q;
  logic               delta, ovf_x, ovf_y;
  cordic_pkg::shift_t s;
  logic               last;

  ctrl_rom #(.M(M), .SHIFTS(SHIFTS)) u_rom (.idx(idx_q), .shift(s));

  sbr #(.M(M), .DIRS(DIRS)) u_sbr (
    .clk  (clk),
    .rst_n(rst_n),
    .load (start && !busy),
    .step (busy),
    .dir  (delta)
  );

  preshift_shifter #(.W(W), .PRE(PRE), .MAX_SHIFT(MAXS)) u_shx (.din(x_q), .shamt(s), .dout(x_sh));
  preshift_shifter #(.W(W), .PRE(PRE), .MAX_SHIFT(MAXS)) u_shy (.din(y_q), .shamt(s), .dout(y_sh));

  // delta = +1 adds the shifted copy, delta = -1 subtracts it
  addsub #(.W(W)) u_addx (.a(x_q), .b(x_sh), .sub(!delta), .sum(x_nxt), .ovf(ovf_x));
  addsub #(.W(W)) u_addy (.a(y_q), .b(y_sh), .sub(!delta), .sum(y_nxt), .ovf(ovf_y));

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
