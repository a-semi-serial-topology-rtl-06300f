// N-bit semi-serial IMPLY adder: controller, step table, drivers and the
// logic-level memristor array, wired as one unit.
//
// The operands live in memristors: a on line 1 (section 1), b on line 2
// (section 2), and the carry-in in the work memristor c_in. Five more work
// memristors (c, w1..w4) form a third section that switches onto either line.
// An addition runs the 10N+2 steps of the algorithm; afterwards the a
// memristors hold the sum, c_in holds the carry-out, and b holds a | b.
// 2N+6 memristors in all, 12 switches for any N. The topology and the
// algorithm follow the document; the load port, the start/done handshake and
// one step per clock cycle are this design's own.
//
// Interface: load (one cycle, while idle) writes a_in, b_in, cin_in into the
// array. start (one cycle, while idle) begins the addition; busy is high for
// exactly 10N+2 cycles, one step each, then done pulses for one cycle. sum
// and cout show the a and c_in memristors at all times, so they are the
// result from the done cycle on. step, bit_idx and step_valid expose the
// running step; work shows the work memristors (c, c_in, w1, w2, w3, w4).
module semi_serial_adder
  import semi_serial_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned BIT_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [N-1:0]          a_in,
  input  logic [N-1:0]          b_in,
  input  logic                  cin_in,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [N-1:0]          sum,
  output logic                  cout,
  output logic [N-1:0]          b_mem,
  output logic [NUM_WORK-1:0]   work,
  output logic                  step_valid,
  output step_e                 step,
  output logic [BIT_W-1:0]      bit_idx
);

  logic                  first_bit, last_bit;
  step_op_t              op;
  drive_e [N-1:0]        drv_a, drv_b;
  drive_e [NUM_WORK-1:0] drv_w;
  logic   [NUM_WORK-1:0] sw1, sw2;
  logic   [N-1:0]        a_q;
  logic   [NUM_WORK-1:0] w_q;

  adder_controller #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .step_valid, .step, .bit_idx,
    .first_bit, .last_bit
  );

  imply_microcode u_ucode (
    .step, .first_bit, .op
  );

  crossbar_driver #(.N(N)) u_drv (
    .valid (step_valid), .op, .bit_idx, .drv_a, .drv_b, .drv_w, .sw1, .sw2
  );

  memristor_array #(.N(N)) u_array (
    .clk,
    .load     (load && !busy),
    .load_a   (a_in),
    .load_b   (b_in),
    .load_cin (cin_in),
    .step_valid,
    .drv_a, .drv_b, .drv_w, .sw1, .sw2,
    .a_q, .b_q (b_mem), .w_q
  );

  assign sum  = a_q;
  assign cout = w_q[WK_CIN];
  assign work = w_q;

  // last_bit is used by the controller only; keep it visible for assertions
  a_cout_last: assert property (@(posedge clk) disable iff (!rst_n)
    (step_valid && step == STEP_COUT) |-> last_bit)
    else $error("carry-out inversion outside the last bit");

endmodule
