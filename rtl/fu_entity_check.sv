// fu_entity_check: a dedicated functional unit of the kind every data
// processing instruction owns.
//
// Combinational. It takes three 2-bit arguments (a, b, c) and three 18-bit
// sequence-number style values (x, y, z) and derives six status bits:
//   f[0]  a differs from 1
//   f[1]  b differs from c
//   f[2]  x differs from y
//   f[3]  the low byte of x is zero, and either the upper ten bits of y and z
//         differ or y equals z
//   f[4]  any of f[0], f[1], f[2]
//   f[5]  f[4] or f[3]
// The execute stage stores the bits in a status register; f[4] is also
// reported as an error flag.
//
// The logic follows the example functional unit of the source design. Which
// values feed it, where its result is stored and the use of f[4] as an error
// are this design's choice.
module fu_entity_check
  import asip_pkg::*;
(
  input  logic [1:0]      a,
  input  logic [1:0]      b,
  input  logic [1:0]      c,
  input  logic [SN_W-1:0] x,
  input  logic [SN_W-1:0] y,
  input  logic [SN_W-1:0] z,
  output logic [5:0]      f
);

  logic a_ne_one, b_ne_c, x_ne_y, low_zero, hi_diff, y_eq_z, window_ok, mismatch;

  always_comb begin
    a_ne_one  = (a != 2'd1);
    b_ne_c    = (b != c);
    x_ne_y    = (x != y);
    low_zero  = (x[7:0] == 8'd0);
    hi_diff   = (z[17:8] != y[17:8]);
    y_eq_z    = (y == z);
    window_ok = low_zero && (hi_diff || y_eq_z);
    mismatch  = a_ne_one || b_ne_c || x_ne_y;
    f = {mismatch || window_ok, mismatch, window_ok, x_ne_y, b_ne_c, a_ne_one};
  end

endmodule
