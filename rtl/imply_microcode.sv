// Operations of each step of the semi-serial addition algorithm.
//
// For a step of the bit being processed, this combinational table gives what
// runs on section 1 (line of the a operands) and on section 2 (line of the b
// operands). With a, b the operand bits, k the carry into the bit and c = ~k:
//   1     s1: FALSE c (first bit only), w1, w2      s2: FALSE w3, w4
//   CINV  s1: c_in -> c   (first bit only: c = ~c_in)
//   2     s1: a -> w1     (w1 = ~a)                 s2: b -> w3  (w3 = ~b)
//   3     s1: a -> w3     (w3 = ~(a & b))           s2: w1 -> b  (b = a | b)
//   4     s1: c -> w2     (w2 = k)                  s2: w3 -> w4 (w4 = a & b)
//   5     s1: FALSE a, w1                           s2: b -> w4  (w4 = ~(a ^ b))
//   6     s1: w3 -> w2    (w2 = a&b | k)            s2: w4 -> c  (c = (a^b) | ~k)
//   7     s1: c -> a      (a = ~(a^b) & k)          s2: w2 -> w1 (w1 = ~(a&b | k))
//   8     s1: FALSE c_in, c, w3                     s2: b -> w2
//   9     s1: w1 -> w3    (w3 = a&b | k)            s2: b -> c   (c = ~(a | b))
//   10    s1: w2 -> a     (a = a ^ b ^ k, the sum)  s2: w3 -> c  (c = ~carry out)
//   COUT  s1: c -> c_in   (last bit only: c_in = carry out)
// The table is the document's; c_in is reset in step 8 of every bit, as the
// table prints it, which is harmless since c_in is read only before that.
// The first-bit reset of c in step 1 is gated by first_bit, because c
// carries the inverted carry from one bit to the next.
module imply_microcode
  import semi_serial_pkg::*;
(
  input  step_e    step,
  input  logic     first_bit,
  output step_op_t op
);

  function automatic sec_op_t imp(input mem_e p, input mem_e q);
    sec_op_t s;
    s.imp_p = p;
    s.imp_q = q;
    s.rst   = '0;
    return s;
  endfunction

  function automatic sec_op_t rst(input mem_mask_t m);
    sec_op_t s;
    s.imp_p = MEM_NONE;
    s.imp_q = MEM_NONE;
    s.rst   = m;
    return s;
  endfunction

  localparam sec_op_t NOP = '{imp_p: MEM_NONE, imp_q: MEM_NONE, rst: '0};

  always_comb begin
    op.s1 = NOP;
    op.s2 = NOP;
    unique case (step)
      STEP_1: begin
        op.s1 = rst(mem_bit(MEM_W1) | mem_bit(MEM_W2) |
                    (first_bit ? mem_bit(MEM_C) : '0));
        op.s2 = rst(mem_bit(MEM_W3) | mem_bit(MEM_W4));
      end
      STEP_CINV: op.s1 = imp(MEM_CIN, MEM_C);
      STEP_2: begin op.s1 = imp(MEM_A,  MEM_W1); op.s2 = imp(MEM_B,  MEM_W3); end
      STEP_3: begin op.s1 = imp(MEM_A,  MEM_W3); op.s2 = imp(MEM_W1, MEM_B);  end
      STEP_4: begin op.s1 = imp(MEM_C,  MEM_W2); op.s2 = imp(MEM_W3, MEM_W4); end
      STEP_5: begin
        op.s1 = rst(mem_bit(MEM_A) | mem_bit(MEM_W1));
        op.s2 = imp(MEM_B, MEM_W4);
      end
      STEP_6: begin op.s1 = imp(MEM_W3, MEM_W2); op.s2 = imp(MEM_W4, MEM_C);  end
      STEP_7: begin op.s1 = imp(MEM_C,  MEM_A);  op.s2 = imp(MEM_W2, MEM_W1); end
      STEP_8: begin
        op.s1 = rst(mem_bit(MEM_CIN) | mem_bit(MEM_C) | mem_bit(MEM_W3));
        op.s2 = imp(MEM_B, MEM_W2);
      end
      STEP_9:  begin op.s1 = imp(MEM_W1, MEM_W3); op.s2 = imp(MEM_B,  MEM_C); end
      STEP_10: begin op.s1 = imp(MEM_W2, MEM_A);  op.s2 = imp(MEM_W3, MEM_C); end
      STEP_COUT: op.s1 = imp(MEM_C, MEM_CIN);
      default: ;
    endcase
  end

endmodule
