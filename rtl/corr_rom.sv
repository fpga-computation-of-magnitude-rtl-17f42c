// corr_rom: the residual-angle correction table (ROM1).
//
// After the last CORDIC stage the vector (x, y) is still off the x axis by a
// small angle a = atan(y/x), and x falls short of the true scaled length by
// about y*a/2. The table returns that amount for a coarse version of (x, y):
// the address is {x index, y index}, XA_BITS + YA_BITS = 6 bits, 64 words.
// Word (xi, yi) holds round(yc * atan(yc/xc) / 2) with the bin centres
// xc = (xi + 0.5) * 2^X_LSB and yc = (yi + 0.5) * 2^Y_LSB (see
// cordic_pkg::corr_entry). The table is a constant evaluated at elaboration,
// read combinationally (a 64-word distributed ROM on an FPGA). The 6-bit
// address and the half-angle formula follow the source design; evaluating the
// words at bin centres is this implementation's choice.
module corr_rom #(
  parameter int XA_BITS = cordic_pkg::XA_BITS,
  parameter int YA_BITS = cordic_pkg::YA_BITS,
  parameter int X_LSB   = cordic_pkg::INT_W - 1 - cordic_pkg::XA_BITS,
  parameter int Y_LSB   = cordic_pkg::YA_LSB,
  parameter int CORR_W  = cordic_pkg::CORR_W
) (
  input  logic [XA_BITS-1:0] x_idx,
  input  logic [YA_BITS-1:0] y_idx,
  output logic [CORR_W-1:0]  corr
);

  localparam int DEPTH = 1 << (XA_BITS + YA_BITS);
  typedef logic [CORR_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < DEPTH; a++)
      r[a] = CORR_W'(cordic_pkg::corr_entry(a >> YA_BITS, a % (1 << YA_BITS), X_LSB, Y_LSB));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb corr = ROM[{x_idx, y_idx}];

endmodule
