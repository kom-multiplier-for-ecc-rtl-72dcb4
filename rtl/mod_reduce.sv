// mod_reduce: sequential reduction of a 2W-bit value modulo a W-bit modulus.
//
// The multiplier needs x mod p for a GF(p) result. This block does it by
// restoring binary long division, one dividend bit per clock: the remainder
// r (always < m) is doubled, the next bit of x (most significant first) is
// shifted in, and m is subtracted when the (W+1)-bit value is >= m. After 2W
// cycles r = x mod m. Only one W+1 bit comparator/subtractor is needed.
//
// Only the need for reduction modulo p comes from the multiplier's purpose;
// the bit-serial restoring method is this design's own, chosen as the
// simplest circuit that does it for any modulus supplied at run time.
//
// Interface and timing: x and m are loaded on a cycle with start high and
// busy low. busy is high for exactly 2W cycles after that; done pulses for
// one cycle together with busy falling, and r holds the result from then
// until the next start. m must be nonzero.
module mod_reduce #(
  parameter int unsigned W = 191
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*W-1:0] x,
  input  logic [W-1:0]   m,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   r
);

  localparam int unsigned CW = $clog2(2 * W + 1);

  logic [2*W-1:0] shreg;    // remaining dividend bits, MSB next
  logic [W-1:0]   mod_q;
  logic [CW-1:0]  count;    // bits still to process
  logic [W:0]     trial;    // 2r + next bit
  logic [W:0]     diff;
  logic           take;     // trial >= m, subtract

  always_comb begin
    trial = {r, shreg[2*W-1]};
    diff  = trial - {1'b0, mod_q};
    take  = !diff[W];  // no borrow: trial >= m (trial < 2m, so the difference fits in W bits)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      mod_q <= '0;
      count <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      r     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          shreg <= x;
          mod_q <= m;
          count <= CW'(2 * W);
          busy  <= 1'b1;
          r     <= '0;
        end
      end else begin
        r     <= take ? diff[W-1:0] : trial[W-1:0];
        shreg <= shreg << 1;
        count <= count - 1'b1;
        if (count == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A zero modulus has no residue.
  assert property (@(posedge clk) disable iff (!rst_n) (start && !busy) |-> (m != '0))
    else $error("mod_reduce: modulus must be nonzero");

endmodule
