// Partial products selection stage.
// For each of the 16 multiplier digits two partial products are chosen:
// MUX1 from {0, A, 2A} and MUX2 from {0, 4A, 8A} (binary) or {0, 5A, 10A}
// (decimal), with AND-OR multiplexers driven by pp_recoder.  A negative
// binary selection is the bitwise inverse of the selected multiple over the
// whole field (so "-0" becomes all ones); a negative decimal selection takes
// the nine's complement multiple.  In both cases the missing plus-one is
// output as a sign bit (inv1/inv2).  Binary operands are unsigned: the
// multiplier is padded with a zero on the right and zeros on the left, so
// a 17th digit exists whose MUX1 product is 0 or A and which has no MUX2
// product.  Purely combinational.
module pp_select
  import bdm_pkg::*;
(
  input  logic [4*N_DIGITS-1:0] b,     // multiplier
  input  logic                  bd,    // 0 binary, 1 decimal
  input  multiples_t            m,
  output logic [FW-1:0]         pp1 [N_DIGITS+1],  // MUX1 products, digit i
  output logic [FW-1:0]         pp2 [N_DIGITS],    // MUX2 products, digit i
  output logic [N_DIGITS:0]     inv1,              // plus-one of pp1[i]
  output logic [N_DIGITS-1:0]   inv2               // plus-one of pp2[i]
);
  logic [4*(N_DIGITS+1)-1:0] bx;   // multiplier with the zero 17th digit
  assign bx = {4'b0000, b};

  for (genvar i = 0; i <= N_DIGITS; i++) begin : g_dig
    pp_ctl_t ctl;
    logic    bm1;
    logic    n1;
    if (i == 0) begin : g_lsd
      assign bm1 = 1'b0;
    end else begin : g_up
      assign bm1 = bx[4*i-1];
    end
    pp_recoder u_rec (.b(bx[4*i +: 4]), .bm1(bm1), .bd(bd), .ctl(ctl));

    assign n1      = bd ? ctl.inv1d : ctl.inv1b;
    assign inv1[i] = n1;

    always_comb begin
      logic [FW-1:0] bin1, dec1;
      bin1 = ({FW{ctl.cond1}} & m.b1) | ({FW{ctl.cond2b}} & m.b2);
      dec1 = ({FW{ctl.cond1  & ~n1}} & m.d1)  | ({FW{ctl.cond1  & n1}} & m.dn1)
           | ({FW{ctl.cond2d & ~n1}} & m.d2)  | ({FW{ctl.cond2d & n1}} & m.dn2);
      pp1[i] = bd ? dec1 : (bin1 ^ {FW{n1}});
    end

    if (i < N_DIGITS) begin : g_mux2
      logic n2;
      assign n2      = ctl.inv2b & ~bd;
      assign inv2[i] = n2;
      always_comb begin
        logic [FW-1:0] sel2;
        sel2 = ({FW{ctl.cond4b}}  & m.b4) | ({FW{ctl.cond8b}}  & m.b8)
             | ({FW{ctl.cond5d}}  & m.d5) | ({FW{ctl.cond10d}} & m.d10);
        pp2[i] = sel2 ^ {FW{n2}};
      end
    end
  end
endmodule
