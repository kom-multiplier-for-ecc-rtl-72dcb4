// tb_kom_mult: self-checking testbench of the recursive Karatsuba-Ofman
// multiplier.
//
// Three instances are checked against the simulator's own wide multiply:
//   - 8 bits (the small demonstration size), all 65,536 operand pairs;
//   - 17 bits, an odd width so the high half is padded, random operands;
//   - 191 bits (the field size of the main configuration), corner cases and
//     random operands.
// The testbench also counts how often the top-level sums AH+AL and BH+BL
// carried out, so that the carry correction of the middle product is shown
// to be exercised. Operands are applied on the falling clock edge and the
// product is compared at the next rising edge; a watchdog ends the run.
module tb_kom_mult;

  localparam int unsigned W8   = 8;
  localparam int unsigned W17  = 17;
  localparam int unsigned W191 = 191;
  localparam int unsigned NRAND = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int carries_a = 0;
  int carries_both = 0;

  logic [W8-1:0]     a8, b8;
  logic [2*W8-1:0]   p8;
  logic [W17-1:0]    a17, b17;
  logic [2*W17-1:0]  p17;
  logic [W191-1:0]   a191, b191;
  logic [2*W191-1:0] p191;

  kom_mult #(.W(W8))   dut8   (.a(a8),   .b(b8),   .p(p8));
  kom_mult #(.W(W17))  dut17  (.a(a17),  .b(b17),  .p(p17));
  kom_mult #(.W(W191)) dut191 (.a(a191), .b(b191), .p(p191));

  function automatic logic [W191-1:0] rand191();
    logic [W191-1:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom();
    v[W191-1:160] = 31'($urandom());
    return v;
  endfunction

  task automatic check8(input logic [W8-1:0] x, input logic [W8-1:0] y);
    logic [2*W8-1:0] ref_p;
    @(negedge clk);
    a8 = x; b8 = y;
    @(posedge clk);
    ref_p = {8'd0, x} * {8'd0, y};
    checks++;
    if (p8 !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL W=8 %0d*%0d: got %0d expected %0d", x, y, p8, ref_p);
    end
  endtask

  task automatic check17(input logic [W17-1:0] x, input logic [W17-1:0] y);
    logic [2*W17-1:0] ref_p;
    @(negedge clk);
    a17 = x; b17 = y;
    @(posedge clk);
    ref_p = {17'd0, x} * {17'd0, y};
    checks++;
    if (p17 !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL W=17 %h*%h: got %h expected %h", x, y, p17, ref_p);
    end
  endtask

  task automatic check191(input logic [W191-1:0] x, input logic [W191-1:0] y);
    logic [2*W191-1:0] ref_p;
    // top-level halves: low 96 bits, high 95 bits
    logic [96:0] sa, sb;
    @(negedge clk);
    a191 = x; b191 = y;
    @(posedge clk);
    ref_p = {191'd0, x} * {191'd0, y};
    sa = {2'b0, x[190:96]} + {1'b0, x[95:0]};
    sb = {2'b0, y[190:96]} + {1'b0, y[95:0]};
    if (sa[96]) carries_a++;
    if (sa[96] && sb[96]) carries_both++;
    checks++;
    if (p191 !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL W=191 %h*%h: got %h expected %h", x, y, p191, ref_p);
    end
  endtask

  // Watchdog: the run needs about 72,000 cycles.
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a17 = '0; b17 = '0; a191 = '0; b191 = '0;

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        check8(W8'(i), W8'(j));

    check17('1, '1);
    check17('0, '1);
    check17(17'h10000, 17'h1ffff);
    for (int i = 0; i < NRAND; i++) check17(17'($urandom()), 17'($urandom()));

    check191('1, '1);
    check191('0, '1);
    check191('1, 191'd1);
    check191({1'b1, 190'd0}, {1'b1, 190'd0});
    check191({95'h0, {96{1'b1}}}, {95'h0, {96{1'b1}}});
    for (int i = 0; i < NRAND; i++) check191(rand191(), rand191());

    if (carries_a == 0 || carries_both == 0) begin
      failures++;
      $display("FAIL the middle-product carry correction was never exercised");
    end
    $display("carry events: a-sum carried %0d times, both sums carried %0d times",
             carries_a, carries_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
