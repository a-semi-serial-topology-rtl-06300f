// Shared types of the semi-serial IMPLY adder.
//
// The adder keeps its data in memristors, one bit each, and computes with two
// stateful operations: FALSE (reset a memristor to 0) and IMPLY (q <= ~p | q).
// Every step of the addition runs at most one operation group on each of the
// two horizontal lines ("sections"): section 1 carries the a operand
// memristors, section 2 the b operand memristors. The six work memristors
// (c, c_in, w1..w4) can be switched onto either line.
//
// mem_e names a memristor as the algorithm sees it: MEM_A and MEM_B stand for
// a_i and b_i of the bit being processed. A sec_op_t is what happens on one
// line in one step; a step_op_t is a whole step. The encodings are this
// design's own choice.
package semi_serial_pkg;

  // Memristors addressed by the algorithm
  typedef enum logic [3:0] {
    MEM_NONE = 4'd0,
    MEM_A    = 4'd1,
    MEM_B    = 4'd2,
    MEM_C    = 4'd3,
    MEM_CIN  = 4'd4,
    MEM_W1   = 4'd5,
    MEM_W2   = 4'd6,
    MEM_W3   = 4'd7,
    MEM_W4   = 4'd8
  } mem_e;

  localparam int unsigned NUM_MEM_IDS = 9;
  typedef logic [NUM_MEM_IDS-1:0] mem_mask_t;  // bit k set: memristor mem_e'(k)

  // Work memristors, in the order of their drivers and switches
  localparam int unsigned NUM_WORK = 6;
  localparam int unsigned WK_C   = 0;
  localparam int unsigned WK_CIN = 1;
  localparam int unsigned WK_W1  = 2;
  localparam int unsigned WK_W2  = 3;
  localparam int unsigned WK_W3  = 4;
  localparam int unsigned WK_W4  = 5;

  // Voltage applied by a memristor's driver during a step
  typedef enum logic [1:0] {
    DRV_NONE  = 2'd0,  // driver idle: state kept
    DRV_COND  = 2'd1,  // V_COND: conditioning (p) memristor of an IMPLY
    DRV_SET   = 2'd2,  // V_SET: target (q) memristor of an IMPLY
    DRV_RESET = 2'd3   // V_RESET: FALSE
  } drive_e;

  // Operations on one line in one step
  typedef struct packed {
    mem_e      imp_p;   // IMPLY conditioning memristor, MEM_NONE: no IMPLY
    mem_e      imp_q;   // IMPLY target memristor
    mem_mask_t rst;     // memristors reset to 0 (FALSE)
  } sec_op_t;

  typedef struct packed {
    sec_op_t s1;
    sec_op_t s2;
  } step_op_t;

  // Steps of one bit; STEP_CINV and STEP_COUT are the unnumbered first-bit and
  // last-bit carry inversions.
  typedef enum logic [3:0] {
    STEP_1    = 4'd0,
    STEP_CINV = 4'd1,
    STEP_2    = 4'd2,
    STEP_3    = 4'd3,
    STEP_4    = 4'd4,
    STEP_5    = 4'd5,
    STEP_6    = 4'd6,
    STEP_7    = 4'd7,
    STEP_8    = 4'd8,
    STEP_9    = 4'd9,
    STEP_10   = 4'd10,
    STEP_COUT = 4'd11
  } step_e;

  // Steps for an n-bit addition: ten per bit and the two carry inversions
  function automatic int unsigned add_steps(input int unsigned n);
    return 10 * n + 2;
  endfunction

  // Memristor count of the topology: a, b, c_in, and c, w1..w4
  function automatic int unsigned num_memristors(input int unsigned n);
    return 2 * n + 6;
  endfunction

  function automatic mem_mask_t mem_bit(input mem_e m);
    mem_mask_t r;
    r = '0;
    if (m != MEM_NONE) r[m] = 1'b1;
    return r;
  endfunction

endpackage
