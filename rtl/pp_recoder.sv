// Multiplexer controls for one multiplier digit.
// Binary (bd = 0): radix-16 Booth recoding of (b3 b2 b1 b0 . bm1), digit
// value -8b3+4b2+2b1+b0+bm1 in -8..8, split as MUX1 in {0,+-A,+-2A} (the
// radix-4 Booth digit of b1 b0 bm1) plus MUX2 in {0,+-4A,+-8A} (four times the
// radix-4 Booth digit of b3 b2 b1).  Decimal (bd = 1): digit 0..9 split as
// MUX1 in {0,+-A,+-2A} plus MUX2 in {0,5A,10A}.  The sum-of-products
// equations are those given for the design; combining each binary/decimal
// pair of sign terms into one signal is left to the selection stage.
// Purely combinational.
module pp_recoder
  import bdm_pkg::*;
(
  input  logic [3:0] b,     // multiplier digit
  input  logic       bm1,   // MSB of the next lower digit (binary only)
  input  logic       bd,    // 0 binary, 1 decimal
  output pp_ctl_t    ctl
);
  logic c;
  assign c = bd;
  always_comb begin
    // MUX1
    ctl.cond1  = ((b[0] & ~bm1) | (~b[0] & bm1)) & ~c
               | ((~b[0] & b[2]) | (b[0] & ~b[1] & ~b[2])) & c;
    ctl.cond2b = ((~b[0] & b[1] & ~bm1) | (b[0] & ~b[1] & bm1)) & ~c;
    ctl.cond2d = ((~b[0] & b[3]) | (b[0] & b[1]) | (b[1] & ~b[2])) & c;
    ctl.inv1b  = (~b[0] & b[1]) | (b[1] & ~bm1);
    ctl.inv1d  = b[3] | (b[0] & b[1] & ~b[2]) | (~b[0] & ~b[1] & b[2]);
    // MUX2
    ctl.cond4b  = ((b[1] & ~b[2]) | (~b[1] & b[2])) & ~c;
    ctl.cond8b  = ((~b[1] & ~b[2] & b[3]) | (b[1] & b[2] & ~b[3])) & ~c;
    ctl.cond5d  = ((b[0] & b[1]) | (b[2] & ~b[3])) & c;
    ctl.cond10d = b[3] & c;
    ctl.inv2b   = b[3];
  end
endmodule
