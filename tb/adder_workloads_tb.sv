// Exhaustive tests of small adders, the sizes used to validate the topology:
// a 1-bit adder over all 8 combinations of a, b and carry-in (12 steps each)
// and a 4-bit adder over all 512 combinations (42 steps each), including the
// operands of the two 4-bit examples (1011 + 0100 and 1001 + 1100, the
// latter with carry-in 1 giving sum 0110 and carry-out 1).
// Sum, carry-out and step count are compared with ordinary arithmetic.
module adder_workloads_tb;
  import semi_serial_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // 1-bit adder
  logic load1 = 1'b0, start1 = 1'b0, cin1 = 1'b0;
  logic [0:0] a1 = '0, b1 = '0, sum1, bm1;
  logic busy1, done1, cout1, sv1;
  logic [NUM_WORK-1:0] work1;
  step_e step1;
  logic [0:0] bit1;

  semi_serial_adder #(.N(1)) dut1 (
    .clk, .rst_n, .load (load1), .a_in (a1), .b_in (b1), .cin_in (cin1),
    .start (start1), .busy (busy1), .done (done1), .sum (sum1), .cout (cout1),
    .b_mem (bm1), .work (work1), .step_valid (sv1), .step (step1), .bit_idx (bit1)
  );

  // 4-bit adder
  logic load4 = 1'b0, start4 = 1'b0, cin4 = 1'b0;
  logic [3:0] a4 = '0, b4 = '0, sum4, bm4;
  logic busy4, done4, cout4, sv4;
  logic [NUM_WORK-1:0] work4;
  step_e step4;
  logic [1:0] bit4;

  semi_serial_adder #(.N(4)) dut4 (
    .clk, .rst_n, .load (load4), .a_in (a4), .b_in (b4), .cin_in (cin4),
    .start (start4), .busy (busy4), .done (done4), .sum (sum4), .cout (cout4),
    .b_mem (bm4), .work (work4), .step_valid (sv4), .step (step4), .bit_idx (bit4)
  );

  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic add1(input logic a, input logic b, input logic ci);
    int n;
    @(negedge clk); a1 = a; b1 = b; cin1 = ci; load1 = 1'b1;
    @(negedge clk); load1 = 1'b0; start1 = 1'b1;
    @(negedge clk); start1 = 1'b0;
    n = 0;
    while (!done1) begin if (busy1) n++; @(negedge clk); end
    expect_eq($sformatf("1-bit %b+%b+%b", a, b, ci), int'({cout1, sum1}), int'(a) + int'(b) + int'(ci));
    expect_eq("1-bit steps", n, 12);
  endtask

  task automatic add4(input logic [3:0] a, input logic [3:0] b, input logic ci);
    int n;
    @(negedge clk); a4 = a; b4 = b; cin4 = ci; load4 = 1'b1;
    @(negedge clk); load4 = 1'b0; start4 = 1'b1;
    @(negedge clk); start4 = 1'b0;
    n = 0;
    while (!done4) begin if (busy4) n++; @(negedge clk); end
    expect_eq($sformatf("4-bit %b+%b+%b", a, b, ci), int'({cout4, sum4}), int'(a) + int'(b) + int'(ci));
    expect_eq("4-bit steps", n, 42);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 8; v++) add1(v[2], v[1], v[0]);
    add4(4'b1011, 4'b0100, 1'b0);
    expect_eq("example 1 sum", int'(sum4), 4'b1111);
    expect_eq("example 1 cout", int'(cout4), 0);
    add4(4'b1001, 4'b1100, 1'b1);
    expect_eq("example 2 sum", int'(sum4), 4'b0110);
    expect_eq("example 2 cout", int'(cout4), 1);
    for (int v = 0; v < 512; v++) add4(v[8:5], v[4:1], v[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
