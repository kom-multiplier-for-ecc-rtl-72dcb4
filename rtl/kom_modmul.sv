// kom_modmul: GF(p) modular multiplier built on a Karatsuba-Ofman multiplier.
//
// This is the field multiplier of an elliptic-curve datapath, for the 191-bit
// prime field of the main configuration. On start the operands a, b and the
// modulus are registered. The registered operands feed kom_mult, a
// combinational recursive Karatsuba-Ofman multiplier, whose 2W-bit product is
// handed one cycle later to mod_reduce, which brings it below the modulus.
//
// Sequence (kom_state_e): IDLE -> MUL (one cycle, product settles and the
// reduction is started) -> REDUCE (2W cycles) -> IDLE with done pulsed.
// Latency from the start cycle to the done cycle is 2W + 2 clocks (384 for
// W = 191). start is ignored while busy is high. product and result stay
// valid from done until the next accepted start.
//
// The Karatsuba-Ofman multiplier follows the published algorithm; the
// registered operands, the handshake and the reduction method are this
// design's own choices, since only the purpose (modular multiplication in
// GF(p)) is given for them. The modulus is an input, so any prime of up to W
// bits can be used; operands should be field elements (below the modulus),
// although any W-bit values give a correct a*b mod p.
module kom_modmul
  import kom_pkg::*;
#(
  parameter int unsigned W = KOM_FIELD_BITS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   modulus,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] product,
  output logic [W-1:0]   result
);

  kom_state_e     state;
  logic [W-1:0]   a_q, b_q, p_q;
  logic [2*W-1:0] prod_c;
  logic           red_start, red_busy, red_done;

  kom_mult #(.W(W), .LEAF_W(KOM_LEAF_BITS)) u_kom (
    .a (a_q),
    .b (b_q),
    .p (prod_c)
  );

  assign red_start = (state == KOM_MUL);

  mod_reduce #(.W(W)) u_red (
    .clk   (clk),
    .rst_n (rst_n),
    .start (red_start),
    .x     (prod_c),
    .m     (p_q),
    .busy  (red_busy),
    .done  (red_done),
    .r     (result)
  );

  assign busy = (state != KOM_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= KOM_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      p_q     <= '0;
      product <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        KOM_IDLE: begin
          if (start) begin
            a_q   <= a;
            b_q   <= b;
            p_q   <= modulus;
            state <= KOM_MUL;
          end
        end
        KOM_MUL: begin
          product <= prod_c;
          state   <= KOM_REDUCE;
        end
        KOM_REDUCE: begin
          if (red_done) begin
            done  <= 1'b1;
            state <= KOM_IDLE;
          end
        end
        default: state <= KOM_IDLE;
      endcase
    end
  end

  // The reducer is only started from IDLE-side state MUL, never while it runs.
  assert property (@(posedge clk) disable iff (!rst_n) red_start |-> !red_busy)
    else $error("kom_modmul: reduction started while busy");

endmodule
