// End-to-end test of the semi-serial adder at its default size (N = 32).
// Loads operands, starts an addition, waits for done and compares the sum,
// the carry-out and the overwritten b operand (a | b) with ordinary
// arithmetic. It checks that every addition takes exactly 10N+2 step cycles,
// and counts the mechanisms of the algorithm: the first-bit carry-in
// inversion, the last-bit carry-out inversion, steps that run both sections
// at once, each work memristor switched onto each line the step table
// uses for it, carries propagated
// between bits and a carry out of the top bit. A mechanism never seen counts
// as a failure. Corner operands come first, then random ones.
module semi_serial_adder_tb;
  import semi_serial_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned BIT_W = $clog2(N);
  localparam int unsigned NRAND = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0, start = 1'b0, cin_in = 1'b0;
  logic [N-1:0] a_in = '0, b_in = '0;
  logic busy, done, cout, step_valid;
  logic [N-1:0] sum, b_mem;
  logic [NUM_WORK-1:0] work;
  step_e step;
  logic [BIT_W-1:0] bit_idx;

  semi_serial_adder dut (
    .clk, .rst_n, .load, .a_in, .b_in, .cin_in, .start, .busy, .done,
    .sum, .cout, .b_mem, .work, .step_valid, .step, .bit_idx
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cinv = 0, n_cout = 0, n_dual = 0, n_carry_prop = 0, n_cout1 = 0;
  int n_sw1 [NUM_WORK];
  int n_sw2 [NUM_WORK];
  int step_cycles;

  // mechanism counters, sampled on every step
  always @(posedge clk) begin
    if (step_valid) begin
      step_cycles++;
      if (step == STEP_CINV) n_cinv++;
      if (step == STEP_COUT) n_cout++;
      if ((dut.u_ucode.op.s1 != '0) && (dut.u_ucode.op.s2 != '0)) n_dual++;
      for (int k = 0; k < NUM_WORK; k++) begin
        if (dut.sw1[k]) n_sw1[k]++;
        if (dut.sw2[k]) n_sw2[k]++;
      end
      // carry into a bit above bit 0 is 1 when c (= inverted carry) is 0 at step 2
      if (step == STEP_2 && bit_idx != 0 && work[WK_C] == 1'b0) n_carry_prop++;
    end
  end

  task automatic check(input string what, input logic [N:0] got, input logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic add(input logic [N-1:0] a, input logic [N-1:0] b, input logic ci);
    logic [N:0] exp;
    exp = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, ci};
    @(negedge clk);
    a_in = a; b_in = b; cin_in = ci; load = 1'b1;
    @(negedge clk);
    load = 1'b0; start = 1'b1;
    step_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    check("sum",   {1'b0, sum}, {1'b0, exp[N-1:0]});
    check("cout",  {{N{1'b0}}, cout}, {{N{1'b0}}, exp[N]});
    check("b_mem", {1'b0, b_mem}, {1'b0, a | b});
    check("steps", (N+1)'(step_cycles), (N+1)'(10 * N + 2));
    if (exp[N]) n_cout1++;
  endtask

  initial begin
    foreach (n_sw1[k]) begin n_sw1[k] = 0; n_sw2[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // corner cases
    add('0, '0, 1'b0);
    add('0, '0, 1'b1);
    add('1, '0, 1'b1);          // carry ripples through every bit
    add('1, '1, 1'b1);
    add(32'h0000_000B, 32'h0000_0004, 1'b0);   // 4-bit example operands
    add(32'h0000_0009, 32'h0000_000C, 1'b1);
    add(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < NRAND; i++) add($urandom, $urandom, 1'($urandom));
    // mechanisms
    checks++; if (n_cinv == 0) begin failures++; $display("FAIL: no carry-in inversion"); end
    checks++; if (n_cout == 0) begin failures++; $display("FAIL: no carry-out inversion"); end
    checks++; if (n_dual == 0) begin failures++; $display("FAIL: no dual-section step"); end
    checks++; if (n_carry_prop == 0) begin failures++; $display("FAIL: no carry between bits"); end
    checks++; if (n_cout1 == 0) begin failures++; $display("FAIL: no carry out"); end
    // the step table puts c_in only on line 1 and w4 only on line 2
    for (int k = 0; k < NUM_WORK; k++) begin
      checks++;
      if ((k != WK_W4 && n_sw1[k] == 0) || (k != WK_CIN && n_sw2[k] == 0)) begin
        failures++;
        $display("FAIL: work memristor %0d never switched as the step table needs", k);
      end
    end
    $display("mechanisms: cinv=%0d cout_inv=%0d dual=%0d carry_prop=%0d cout1=%0d",
             n_cinv, n_cout, n_dual, n_carry_prop, n_cout1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * (10 * N + 6)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
