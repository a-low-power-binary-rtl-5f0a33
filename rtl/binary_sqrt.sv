// binary_sqrt: combinational binary square rooter built from reversible
// gates, organised as a triangular array of RCSM (Reversible Controlled
// Subtract Multiplexer) rows.
//
// The radicand p is split into N/2 pairs of bits. Row k (k = 0 at the top)
// takes the next pair, trial-subtracts the root found so far with "01"
// appended, and produces root bit u[N/2-1-k]; if the subtraction went negative
// the row restores its input instead of passing the difference on. Row k is
// k+3 cells wide, so the array widens by one cell per row. After the last row
//     u = floor(sqrt(p))   and   r = p - u*u.
// The binary point is a convention of the user: with the default N = 8 the
// radicand read as N7N6N5N4.N3N2N1N0 gives the root U3U2.U1U0, e.g.
// 1101.0000 (13) -> 11.10 (3.5) and 0010.0011 (2.1875) -> 01.01 (1.25),
// both truncated.
//
// Interface: p (N bits) in; u (N/2 bits) and r (N/2+1 bits) out. There is no
// clock; the delay is one borrow ripple and one multiplexer per row.
// The algorithm, the 8-bit size and the port names p and u follow the
// published design; the remainder output r is brought out from the last row
// as the array diagram shows.
module binary_sqrt #(
  parameter int N = 8                        // radicand width, even
) (
  input  logic [N-1:0]   p,                  // radicand
  output logic [N/2-1:0] u,                  // root, MSB first
  output logic [N/2:0]   r                   // remainder p - u*u
);
  localparam int H = N / 2;                  // rows = root bits

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $error("binary_sqrt: N must be even and at least 2");
  end

  for (genvar k = 0; k < H; k++) begin : g_row
    logic [k+1:0]               rem_o;
    logic [k:0]                 rem_i;
    logic [((k > 0) ? k : 1)-1:0] root_i;

    if (k == 0) begin : g_first
      assign rem_i  = 1'b0;
      assign root_i = 1'b0;
    end else begin : g_next
      assign rem_i  = g_row[k-1].rem_o;
      assign root_i = u[H-1 -: k];
    end

    rcsm_row #(.K(k)) u_row (
      .rem_in  (rem_i),
      .pair    (p[N-1-2*k -: 2]),
      .root_in (root_i),
      .u       (u[H-1-k]),
      .rem_out (rem_o)
    );
  end

  assign r = g_row[H-1].rem_o;
endmodule
