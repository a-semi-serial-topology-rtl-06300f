// Voltage drivers and section switches of the semi-serial adder.
//
// Turns one step's operations (a step_op_t) into what the array's periphery
// applies: a drive level for a_i and b_i of the bit being processed (bit_idx),
// a drive level for each of the six work memristors, and the 12 switches that
// put a work memristor on line 1 (sw1) or line 2 (sw2). In each section the
// IMPLY conditioning memristor gets DRV_COND, its target DRV_SET and every
// memristor to be reset DRV_RESET; a work memristor named in a section's
// operation is switched onto that section's line. All other drivers stay at
// DRV_NONE and all other switches open. When valid is low nothing is driven.
// Combinational. The drivers and the 12 switches are the topology's; the
// encoding and this decoding are this design's own.
module crossbar_driver
  import semi_serial_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned BIT_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  valid,
  input  step_op_t              op,
  input  logic   [BIT_W-1:0]    bit_idx,
  output drive_e [N-1:0]        drv_a,
  output drive_e [N-1:0]        drv_b,
  output drive_e [NUM_WORK-1:0] drv_w,
  output logic   [NUM_WORK-1:0] sw1,
  output logic   [NUM_WORK-1:0] sw2
);

  // drive level each memristor id gets from one section's operations
  function automatic drive_e level(input sec_op_t s, input mem_e m);
    drive_e d;
    d = DRV_NONE;
    if (s.rst[m])         d = DRV_RESET;
    else if (s.imp_p == m) d = DRV_COND;
    else if (s.imp_q == m) d = DRV_SET;
    return d;
  endfunction

  function automatic mem_e work_id(input int unsigned k);
    mem_e m;
    unique case (k)
      WK_C:    m = MEM_C;
      WK_CIN:  m = MEM_CIN;
      WK_W1:   m = MEM_W1;
      WK_W2:   m = MEM_W2;
      WK_W3:   m = MEM_W3;
      WK_W4:   m = MEM_W4;
      default: m = MEM_NONE;
    endcase
    return m;
  endfunction

  drive_e [NUM_WORK-1:0] l1, l2;  // level of each work memristor per section

  always_comb begin
    for (int unsigned k = 0; k < NUM_WORK; k++) begin
      l1[k] = level(op.s1, work_id(k));
      l2[k] = level(op.s2, work_id(k));
    end
  end

  always_comb begin
    drv_a = '{default: DRV_NONE};
    drv_b = '{default: DRV_NONE};
    drv_w = '{default: DRV_NONE};
    sw1   = '0;
    sw2   = '0;
    if (valid) begin
      drv_a[bit_idx] = level(op.s1, MEM_A);
      drv_b[bit_idx] = level(op.s2, MEM_B);
      for (int unsigned k = 0; k < NUM_WORK; k++) begin
        sw1[k]   = (l1[k] != DRV_NONE);
        sw2[k]   = (l2[k] != DRV_NONE);
        drv_w[k] = (l1[k] != DRV_NONE) ? l1[k] : l2[k];
      end
    end
  end

  // a_i sits only on line 1 and b_i only on line 2; a line runs either
  // FALSE or IMPLY in one step
  always_comb begin
    if (valid) begin
      a_a_on_line1: assert (level(op.s2, MEM_A) == DRV_NONE)
        else $error("operand a addressed on section 2");
      a_b_on_line2: assert (level(op.s1, MEM_B) == DRV_NONE)
        else $error("operand b addressed on section 1");
      a_no_mixed_s1: assert (op.s1.rst == '0 || op.s1.imp_p == MEM_NONE)
        else $error("FALSE and IMPLY mixed on section 1");
      a_no_mixed_s2: assert (op.s2.rst == '0 || op.s2.imp_p == MEM_NONE)
        else $error("FALSE and IMPLY mixed on section 2");
    end
  end

endmodule
