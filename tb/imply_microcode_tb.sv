// Test of the step table. The testbench has its own interpreter of the two
// stateful operations (FALSE: m = 0; IMPLY p -> q: q = ~p | q), applied to
// both sections of a step at once from the state before the step. For every
// combination of a, b and carry-in it runs one bit's steps as the sequencer
// issues them (first bit: with the carry-in inversion; other bits: c holds
// the inverted carry; last bit: with the carry-out inversion) and compares
// the result with a full adder: a = a ^ b ^ cin, c = ~cout, c_in = cout
// after the final inversion, b = a | b. The work memristors start from
// random values. It also checks the physical rules of every step: a only on
// section 1, b only on section 2, no memristor named in both sections.
module imply_microcode_tb;
  import semi_serial_pkg::*;

  step_e    step;
  logic     first_bit;
  step_op_t op;

  imply_microcode dut (.step, .first_bit, .op);

  int checks = 0, failures = 0;
  logic st [NUM_MEM_IDS];

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic mem_mask_t names(input sec_op_t s);
    mem_mask_t m;
    m = s.rst;
    if (s.imp_p != MEM_NONE) m[s.imp_p] = 1'b1;
    if (s.imp_q != MEM_NONE) m[s.imp_q] = 1'b1;
    return m;
  endfunction

  // run one step through the interpreter
  task automatic run(input step_e s, input logic fb);
    logic nx [NUM_MEM_IDS];
    step = s; first_bit = fb;
    #1;
    checks++;
    if ((names(op.s1) & names(op.s2)) != '0 || names(op.s2)[MEM_A] || names(op.s1)[MEM_B]) begin
      failures++;
      $display("FAIL step %0d: section rule broken", s);
    end
    nx = st;
    for (int k = 1; k < NUM_MEM_IDS; k++) begin
      if (op.s1.rst[k] || op.s2.rst[k]) nx[k] = 1'b0;
    end
    if (op.s1.imp_p != MEM_NONE) nx[op.s1.imp_q] = ~st[op.s1.imp_p] | st[op.s1.imp_q];
    if (op.s2.imp_p != MEM_NONE) nx[op.s2.imp_q] = ~st[op.s2.imp_p] | st[op.s2.imp_q];
    st = nx;
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      for (int mode = 0; mode < 3; mode++) begin   // 0: first bit, 1: middle, 2: last
        logic a, b, k;
        {a, b, k} = 3'(v);
        for (int m = 0; m < NUM_MEM_IDS; m++) st[m] = 1'($urandom);
        st[MEM_A] = a; st[MEM_B] = b;
        if (mode == 0) st[MEM_CIN] = k; else st[MEM_C] = ~k;
        run(STEP_1, mode == 0);
        if (mode == 0) run(STEP_CINV, 1'b1);
        for (int s = 2; s <= 10; s++) run(step_e'(s), mode == 0);
        if (mode == 2) run(STEP_COUT, 1'b0);
        expect_bit($sformatf("sum a=%b b=%b k=%b mode %0d", a, b, k, mode), st[MEM_A], a ^ b ^ k);
        expect_bit("b = a|b", st[MEM_B], a | b);
        expect_bit($sformatf("~cout in c a=%b b=%b k=%b", a, b, k), st[MEM_C], ~((a & b) | (k & (a | b))));
        if (mode == 2)
          expect_bit("cout in c_in", st[MEM_CIN], (a & b) | (k & (a | b)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
