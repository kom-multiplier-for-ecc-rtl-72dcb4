// tb_kom_modmul: end-to-end test of the GF(p) Karatsuba-Ofman modular
// multiplier at its default size (191-bit field), with no parameter changed.
//
// Each operation drives random 191-bit operands below a random 191-bit odd
// modulus with its top bit set (the shape of a field prime), plus corner
// cases, and compares the full product and the reduced result with the
// simulator's own * and % operators. The latency from the start cycle to the
// done cycle is checked against 2W + 2 = 384 clocks. The test counts how
// often each mechanism occurred and fails if one never did:
//   - the top-level middle-product carry correction (AH+AL or BH+BL carrying),
//   - an odd-width padded high half in use (operand bits above bit 95 set),
//   - a start issued while busy being ignored,
//   - a reduction that had to bring the product below the modulus.
module tb_kom_modmul;

  localparam int unsigned W = 191;
  localparam int unsigned NOPS = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0;
  int failures = 0;
  int n_carry = 0;
  int n_high = 0;
  int n_ignored = 0;
  int n_reduced = 0;

  logic           start, busy, done;
  logic [W-1:0]   a, b, modulus, result;
  logic [2*W-1:0] product;

  kom_modmul dut (
    .clk, .rst_n, .start, .a, .b, .modulus,
    .busy, .done, .product, .result
  );

  function automatic logic [W-1:0] rand_w();
    logic [W-1:0] v;
    for (int i = 0; i < 5; i++) v[i*32 +: 32] = $urandom();
    v[W-1:160] = 31'($urandom());
    return v;
  endfunction

  task automatic modmul(input logic [W-1:0] x, input logic [W-1:0] y, input logic [W-1:0] m);
    int cycles;
    logic [2*W-1:0] ref_p, ref_r;
    logic [96:0] sx, sy;
    @(negedge clk);
    a = x; b = y; modulus = m; start = 1'b1;
    @(negedge clk);
    cycles = 0;  // clock edges since the edge that sampled start
    // try to start another operation while busy: must be ignored
    a = ~x; b = ~y; modulus = m >> 1;
    if (busy) n_ignored++;
    @(negedge clk);
    cycles++;
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    ref_p = {{W{1'b0}}, x} * {{W{1'b0}}, y};
    ref_r = ref_p % {{W{1'b0}}, m};
    sx = {2'b0, x[W-1:96]} + {1'b0, x[95:0]};
    sy = {2'b0, y[W-1:96]} + {1'b0, y[95:0]};
    if (sx[96] || sy[96]) n_carry++;
    if (x[W-1:96] != '0 && y[W-1:96] != '0) n_high++;
    if (ref_p >= {{W{1'b0}}, m}) n_reduced++;
    checks++;
    if (product !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL product %h*%h: got %h expected %h", x, y, product, ref_p);
    end
    checks++;
    if ({{W{1'b0}}, result} !== ref_r) begin
      failures++;
      if (failures < 10) $display("FAIL result %h*%h mod %h: got %h expected %h", x, y, m, result, ref_r);
    end
    checks++;
    if (cycles != 2 * W + 2) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, 2 * W + 2);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL busy still high with done");
    end
  endtask

  initial begin
    repeat (60_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m, x, y;
    rst_n = 1'b0;
    start = 1'b0;
    a = '0; b = '0; modulus = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    m = {1'b1, {189{1'b0}}, 1'b1};
    modmul(m - 1'b1, m - 1'b1, m);  // (p-1)^2 mod p = 1
    modmul('0, m - 1'b1, m);
    modmul(191'd1, 191'd1, m);
    modmul({95'd0, {96{1'b1}}}, {95'd0, {96{1'b1}}}, '1);  // low halves only, sums carry-free
    for (int i = 0; i < NOPS; i++) begin
      m = rand_w() | {1'b1, 189'd0, 1'b1};
      x = rand_w();
      y = rand_w();
      if (x >= m) x = x - m;
      if (y >= m) y = y - m;
      modmul(x, y, m);
    end

    $display("mechanisms: carry correction %0d, padded high half %0d, start ignored %0d, reduced %0d",
             n_carry, n_high, n_ignored, n_reduced);
    if (n_carry == 0)   begin failures++; $display("FAIL carry correction never exercised"); end
    if (n_high == 0)    begin failures++; $display("FAIL padded high half never exercised"); end
    if (n_ignored == 0) begin failures++; $display("FAIL start-while-busy never exercised"); end
    if (n_reduced == 0) begin failures++; $display("FAIL reduction never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
