// Multiplicand multiples generation stage.
// Binary: A, 2A, 4A and 8A are plain left shifts (radix-16 Booth recoding of
// the multiplier needs no other multiple); negation is done later by
// inverting the selected multiple.  Decimal (BCD-8421, signed-digit
// radix-5 set): 2A is each digit recoded to BCD-5421 and the vector shifted
// left one bit; 5A is the vector shifted left three bits, each nibble read as
// BCD-5421 and recoded to BCD-8421; 10A is a one-digit shift; -A and -2A are
// the digit-wise nine's complements of A and 2A over the whole field (the
// plus-one comes later as a sign bit).  Every multiple is F_DIGITS digits
// wide.  Purely combinational: a few gate levels, no carry propagation.
module multiples_gen
  import bdm_pkg::*;
(
  input  logic [4*N_DIGITS-1:0] a,   // multiplicand, binary or BCD-8421
  output multiples_t            m
);
  logic [FW-1:0] az;        // A zero-extended to the field width
  logic [FW-1:0] a5421;     // A recoded digit-wise to BCD-5421
  logic [FW-1:0] a_sh3;     // A shifted left three bits
  logic [FW-1:0] d2, d5;

  assign az    = FW'(a);
  assign a_sh3 = az << 3;

  for (genvar k = 0; k < F_DIGITS; k++) begin : g_dig
    bcd8421_to_5421 u_to5421 (.x(az[4*k +: 4]),    .h(a5421[4*k +: 4]));
    bcd5421_to_8421 u_to8421 (.h(a_sh3[4*k +: 4]), .x(d5[4*k +: 4]));
    bcd_nines_comp  u_n1     (.y(az[4*k +: 4]),    .z(m.dn1[4*k +: 4]));
    bcd_nines_comp  u_n2     (.y(d2[4*k +: 4]),    .z(m.dn2[4*k +: 4]));
  end

  assign d2    = a5421 << 1;
  assign m.b1  = az;
  assign m.b2  = az << 1;
  assign m.b4  = az << 2;
  assign m.b8  = az << 3;
  assign m.d1  = az;
  assign m.d2  = d2;
  assign m.d5  = d5;
  assign m.d10 = az << 4;
endmodule
