// Test of the drivers and section switches, fed with the real step table.
// For every step (and both first-bit variants) and a random bit index of an
// 8-bit instance, the expected drive pattern is written out by hand here:
// which of a_i, b_i and the work memristors get V_COND, V_SET or V_RESET and
// which work memristors are switched onto line 1 or line 2. Every other
// a/b driver must be idle. With valid low everything must be idle.
module crossbar_driver_tb;
  import semi_serial_pkg::*;

  localparam int unsigned N = 8;

  logic valid;
  step_e step;
  logic first_bit;
  step_op_t op;
  logic [2:0] bit_idx;
  drive_e [N-1:0] drv_a, drv_b;
  drive_e [NUM_WORK-1:0] drv_w;
  logic [NUM_WORK-1:0] sw1, sw2;

  imply_microcode u_uc (.step, .first_bit, .op);
  crossbar_driver #(.N(N)) dut (.valid, .op, .bit_idx, .drv_a, .drv_b, .drv_w, .sw1, .sw2);

  int checks = 0, failures = 0;

  // expected pattern: a, b, then work levels c, c_in, w1, w2, w3, w4, and
  // the switch masks (bit k = work memristor k)
  typedef struct {
    drive_e a, b;
    drive_e w [NUM_WORK];
    logic [NUM_WORK-1:0] s1, s2;
  } pat_t;

  localparam drive_e O = DRV_NONE, P = DRV_COND, Q = DRV_SET, R = DRV_RESET;

  function automatic pat_t pat(input drive_e a, input drive_e b,
                               input drive_e c, input drive_e ci, input drive_e w1,
                               input drive_e w2, input drive_e w3, input drive_e w4,
                               input logic [5:0] s1, input logic [5:0] s2);
    pat_t p;
    p.a = a; p.b = b;
    p.w[0] = c; p.w[1] = ci; p.w[2] = w1; p.w[3] = w2; p.w[4] = w3; p.w[5] = w4;
    p.s1 = s1; p.s2 = s2;
    return p;
  endfunction

  // switch masks are written w4 w3 w2 w1 c_in c
  function automatic pat_t expected(input step_e s, input logic fb);
    case (s)
      STEP_1:    return fb ? pat(O, O, R, O, R, R, R, R, 6'b001101, 6'b110000)
                           : pat(O, O, O, O, R, R, R, R, 6'b001100, 6'b110000);
      STEP_CINV: return pat(O, O, Q, P, O, O, O, O, 6'b000011, 6'b000000);
      STEP_2:    return pat(P, P, O, O, Q, O, Q, O, 6'b000100, 6'b010000);
      STEP_3:    return pat(P, Q, O, O, P, O, Q, O, 6'b010000, 6'b000100);
      STEP_4:    return pat(O, O, P, O, O, Q, P, Q, 6'b001001, 6'b110000);
      STEP_5:    return pat(R, P, O, O, R, O, O, Q, 6'b000100, 6'b100000);
      STEP_6:    return pat(O, O, Q, O, O, Q, P, P, 6'b011000, 6'b100001);
      STEP_7:    return pat(Q, O, P, O, Q, P, O, O, 6'b000001, 6'b001100);
      STEP_8:    return pat(O, P, R, R, O, Q, R, O, 6'b010011, 6'b001000);
      STEP_9:    return pat(O, P, Q, O, P, O, Q, O, 6'b010100, 6'b000001);
      STEP_10:   return pat(Q, O, Q, O, O, P, P, O, 6'b001000, 6'b010001);
      default:   return pat(O, O, P, Q, O, O, O, O, 6'b000011, 6'b000000);  // STEP_COUT
    endcase
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s <= 11; s++) begin
        for (int fb = 0; fb < 2; fb++) begin
          pat_t e;
          int bi;
          bi = $urandom_range(N - 1);
          valid = 1'b1; step = step_e'(s); first_bit = 1'(fb); bit_idx = 3'(bi);
          #1;
          e = expected(step, first_bit);
          for (int i = 0; i < N; i++) begin
            expect_eq($sformatf("step %0d drv_a[%0d]", s, i), int'(drv_a[i]), (i == bi) ? int'(e.a) : int'(O));
            expect_eq($sformatf("step %0d drv_b[%0d]", s, i), int'(drv_b[i]), (i == bi) ? int'(e.b) : int'(O));
          end
          for (int k = 0; k < NUM_WORK; k++)
            expect_eq($sformatf("step %0d drv_w[%0d]", s, k), int'(drv_w[k]), int'(e.w[k]));
          expect_eq($sformatf("step %0d sw1", s), int'(sw1), int'(e.s1));
          expect_eq($sformatf("step %0d sw2", s), int'(sw2), int'(e.s2));
          valid = 1'b0;
          #1;
          expect_eq("idle sw", int'({sw1, sw2}), 0);
          expect_eq("idle a", int'(drv_a != '0), 0);
          expect_eq("idle w", int'(drv_w != '0), 0);
        end
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
