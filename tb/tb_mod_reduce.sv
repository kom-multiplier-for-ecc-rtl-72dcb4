// tb_mod_reduce: self-checking testbench of the bit-serial modular reducer.
//
// A 191-bit instance (the field size of the main configuration) and a 13-bit
// instance are given random dividends and moduli plus corner cases (modulus
// 1, modulus all ones, dividend below the modulus, dividend all ones). Each
// result is compared with the simulator's own % operator, and the cycle count
// from the start cycle to done is checked against the 2W-cycle latency. A
// start issued while the reducer is busy must be ignored. A watchdog ends
// the run.
module tb_mod_reduce;

  localparam int unsigned WA = 191;
  localparam int unsigned WB = 13;
  localparam int unsigned NRAND = 150;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0;
  int failures = 0;

  logic              sa, busya, donea;
  logic [2*WA-1:0]   xa;
  logic [WA-1:0]     ma, ra;
  logic              sb, busyb, doneb;
  logic [2*WB-1:0]   xb;
  logic [WB-1:0]     mb, rb;

  mod_reduce #(.W(WA)) dut_a (.clk, .rst_n, .start(sa), .x(xa), .m(ma), .busy(busya), .done(donea), .r(ra));
  mod_reduce #(.W(WB)) dut_b (.clk, .rst_n, .start(sb), .x(xb), .m(mb), .busy(busyb), .done(doneb), .r(rb));

  function automatic logic [2*WA-1:0] rand_wide(input int unsigned bits);
    logic [2*WA-1:0] v = '0;
    for (int i = 0; i < 12; i++) v[i*32 +: 32] = $urandom();
    v = v & ((({{(2*WA-1){1'b0}}, 1'b1}) << bits) - 1'b1);
    return v;
  endfunction

  task automatic run_a(input logic [2*WA-1:0] x, input logic [WA-1:0] m);
    int cycles = 0;
    logic [2*WA-1:0] ref_r;
    @(negedge clk);
    xa = x; ma = m; sa = 1'b1;
    @(negedge clk);
    sa = 1'b0;
    // a second start while busy must be ignored
    xa = '1; ma = 191'd3; sa = 1'b1;
    @(negedge clk);
    sa = 1'b0;
    cycles = 1;  // clock edges since the edge that sampled start
    while (!donea) begin
      @(negedge clk);
      cycles++;
    end
    ref_r = x % {{WA{1'b0}}, m};
    checks++;
    if ({{WA{1'b0}}, ra} !== ref_r) begin
      failures++;
      if (failures < 10) $display("FAIL W=191 %h mod %h: got %h expected %h", x, m, ra, ref_r);
    end
    checks++;
    if (cycles != 2 * WA) begin
      failures++;
      $display("FAIL W=191 latency %0d cycles, expected %0d", cycles, 2 * WA);
    end
  endtask

  task automatic run_b(input logic [2*WB-1:0] x, input logic [WB-1:0] m);
    int cycles = 0;
    logic [2*WB-1:0] ref_r;
    @(negedge clk);
    xb = x; mb = m; sb = 1'b1;
    @(negedge clk);
    sb = 1'b0;
    cycles = 0;  // clock edges since the edge that sampled start
    while (!doneb) begin
      @(negedge clk);
      cycles++;
    end
    ref_r = x % {{WB{1'b0}}, m};
    checks++;
    if ({{WB{1'b0}}, rb} !== ref_r) begin
      failures++;
      if (failures < 10) $display("FAIL W=13 %0d mod %0d: got %0d expected %0d", x, m, rb, ref_r);
    end
    checks++;
    if (cycles != 2 * WB) begin
      failures++;
      $display("FAIL W=13 latency %0d cycles, expected %0d", cycles, 2 * WB);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    sa = 1'b0; sb = 1'b0;
    xa = '0; ma = '1; xb = '0; mb = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 13-bit instance
    run_b('1, 13'd1);
    run_b('1, '1);
    run_b(26'd100, 13'd101);
    run_b(26'd0, 13'd7);
    for (int i = 0; i < 2000; i++) begin
      logic [WB-1:0] m;
      m = WB'($urandom());
      if (m == '0) m = 13'd1;
      run_b(26'($urandom()), m);
    end

    // 191-bit instance
    run_a('1, 191'd1);
    run_a('1, '1);
    run_a({191'd0, 191'd12345}, 191'd12346);
    run_a({1'b1, 381'd0}, {1'b1, 190'd1});
    for (int i = 0; i < NRAND; i++) begin
      logic [WA-1:0] m;
      m = WA'(rand_wide(WA - (i % 40)));
      if (m == '0) m = 191'd1;
      run_a(rand_wide(2 * WA), m);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
