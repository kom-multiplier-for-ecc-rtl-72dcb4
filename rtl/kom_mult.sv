// kom_mult: recursive Karatsuba-Ofman (KOM) multiplier, purely combinational.
//
// For W-bit operands A and B the module splits each into a low half of
// H = ceil(W/2) bits and a high half of the remaining W-H bits, zero-extended
// to H bits (an odd width is padded with one zero so both halves are H bits).
// Three H-bit products are formed by recursive instances of this module:
//   Z1 = AH*BH,  Z2 = AL*BL,  Z3 = (AH+AL)*(BH+BL)
// and combined as  A*B = Z1*2^(2H) + (Z3 - Z1 - Z2)*2^H + Z2.
// The shifts are constant and cost only wiring; the combination is done by
// adders and subtractors. The recursion stops at LEAF_W bits, where the
// product is taken directly; with the default LEAF_W = 1 every leaf is a
// one-bit multiplier, i.e. an AND gate.
//
// The split, the three-product identity, the one-bit leaves and the padding
// of odd widths follow the KOM algorithm. Handling of the sums AH+AL and
// BH+BL is this design's choice: each sum is H+1 bits, and instead of a
// (H+1)-bit recursive product (which would never shrink to one bit for
// W = 2 or 3) its carry bit is split off. With sa = cA*2^H + sA and
// sb = cB*2^H + sB:
//   Z3 = sA*sB + (cA*sB + cB*sA)*2^H + cA*cB*2^(2H)
// so only the H-bit product sA*sB needs a multiplier and the carry terms are
// gated additions.
//
// Interface: a, b (W bits) in, p (2W bits) out, no clock. Delay grows with
// the recursion depth, ceil(log2 W) levels.
//
// Lint note: when this module is itself the top of a Verilator lint run, the
// lint does not elaborate instances of the top module inside its own
// hierarchy, and so reports z1, z2 and z3_lo of one level as undriven. The
// nets are driven (simulation and synthesis of the same source elaborate the
// full recursion); the warning does not appear when kom_mult sits below
// another module, as in kom_modmul.
module kom_mult #(
  parameter int unsigned W      = 191,
  parameter int unsigned LEAF_W = 1
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  if (W <= LEAF_W || W < 2) begin : g_leaf
    // One-bit (or small) multiplier at the bottom of the recursion.
    logic [2*W-1:0] a_ext, b_ext;
    assign a_ext = {{W{1'b0}}, a};
    assign b_ext = {{W{1'b0}}, b};
    assign p     = a_ext * b_ext;
  end else begin : g_split
    localparam int unsigned H  = (W + 1) / 2;  // low half width; the high half (W-H bits) is padded to H
    localparam int unsigned ZW = 4 * H;        // width of the combination arithmetic

    logic [H-1:0]   a_hi, a_lo, b_hi, b_lo;
    logic [H:0]     a_sum, b_sum;
    logic [2*H-1:0] z1, z2, z3_lo;
    logic [ZW-1:0]  z3, mid, full;

    assign a_lo = a[H-1:0];
    assign b_lo = b[H-1:0];
    assign a_hi = H'(a[W-1:H]);  // zero-pads the high half when W is odd
    assign b_hi = H'(b[W-1:H]);
    assign a_sum = {1'b0, a_hi} + {1'b0, a_lo};
    assign b_sum = {1'b0, b_hi} + {1'b0, b_lo};

    kom_mult #(.W(H), .LEAF_W(LEAF_W)) u_hh (.a(a_hi),         .b(b_hi),         .p(z1));
    kom_mult #(.W(H), .LEAF_W(LEAF_W)) u_ll (.a(a_lo),         .b(b_lo),         .p(z2));
    kom_mult #(.W(H), .LEAF_W(LEAF_W)) u_ss (.a(a_sum[H-1:0]), .b(b_sum[H-1:0]), .p(z3_lo));

    // Carry correction of the middle product, then the three-product identity.
    always_comb begin
      z3 = ZW'(z3_lo);
      if (a_sum[H]) z3 = z3 + (ZW'(b_sum[H-1:0]) << H);
      if (b_sum[H]) z3 = z3 + (ZW'(a_sum[H-1:0]) << H);
      if (a_sum[H] && b_sum[H]) z3 = z3 + (ZW'(1) << (2 * H));
      mid  = z3 - ZW'(z1) - ZW'(z2);
      full = (ZW'(z1) << (2 * H)) + (mid << H) + ZW'(z2);
    end

    // Upper bits of the combination are always zero: the product has 2W bits.
    assign p = full[2*W-1:0];
  end

endmodule
