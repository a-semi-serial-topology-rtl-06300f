// Test of the step sequencer. For a 4-bit instance the expected step order
// is built independently: bit 0 runs step 1, the carry-in inversion and steps
// 2..10; bits 1..3 run steps 1..10; the carry-out inversion ends the
// addition. Every busy cycle is compared with that list (step, bit index,
// first/last-bit flags), the busy time must be 10N+2 cycles, done must pulse
// for exactly one cycle, and a start pulse while busy must be ignored. A
// default-size (N = 32) instance is checked for its 322-cycle busy time.
module adder_controller_tb;
  import semi_serial_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, start32 = 1'b0;
  logic busy, done, step_valid, first_bit, last_bit;
  step_e step;
  logic [1:0] bit_idx;
  logic busy32, done32, sv32, fb32, lb32;
  step_e step32;
  logic [4:0] bit32;

  adder_controller #(.N(N)) dut (
    .clk, .rst_n, .start, .busy, .done, .step_valid, .step, .bit_idx,
    .first_bit, .last_bit
  );

  adder_controller dut32 (
    .clk, .rst_n, .start (start32), .busy (busy32), .done (done32),
    .step_valid (sv32), .step (step32), .bit_idx (bit32),
    .first_bit (fb32), .last_bit (lb32)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  step_e exp_step [$];
  int    exp_bit  [$];

  initial begin
    // expected sequence
    for (int i = 0; i < N; i++) begin
      exp_step.push_back(STEP_1); exp_bit.push_back(i);
      if (i == 0) begin exp_step.push_back(STEP_CINV); exp_bit.push_back(i); end
      for (int s = 2; s <= 10; s++) begin
        exp_step.push_back(step_e'(s)); exp_bit.push_back(i);
      end
    end
    exp_step.push_back(STEP_COUT); exp_bit.push_back(N - 1);

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_eq("idle after reset", int'(busy), 0);
    for (int run = 0; run < 2; run++) begin
      int n;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      n = 0;
      while (busy) begin
        expect_eq("step_valid", int'(step_valid), 1);
        if (n < exp_step.size()) begin
          expect_eq($sformatf("step %0d", n), int'(step), int'(exp_step[n]));
          expect_eq($sformatf("bit %0d", n), int'(bit_idx), exp_bit[n]);
          expect_eq("first_bit", int'(first_bit), int'(exp_bit[n] == 0));
          expect_eq("last_bit", int'(last_bit), int'(exp_bit[n] == N - 1));
        end
        if (n == 5) start = 1'b1;   // must be ignored
        if (n == 6) start = 1'b0;
        expect_eq("done while busy", int'(done), 0);
        n++;
        @(negedge clk);
      end
      expect_eq("busy cycles", n, 10 * N + 2);
      expect_eq("done pulse", int'(done), 1);
      @(negedge clk);
      expect_eq("done one cycle", int'(done), 0);
      expect_eq("idle after done", int'(busy), 0);
      expect_eq("step_valid idle", int'(step_valid), 0);
    end
    // default size: 10*32+2 = 322 steps
    begin
      int n;
      @(negedge clk); start32 = 1'b1;
      @(negedge clk); start32 = 1'b0;
      n = 0;
      while (busy32) begin n++; @(negedge clk); end
      expect_eq("busy cycles N=32", n, 322);
      expect_eq("done N=32", int'(done32), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
