// Logic-level model of the memristor array of the semi-serial adder
// (behavioural model of an analog circuit, written so that it also
// synthesizes). It holds 2N+6 nonvolatile bits:
//   a[N]   operand a on line 1 (section 1); after an addition it holds the sum
//   b[N]   operand b on line 2 (section 2); it is overwritten by a | b
//   w[6]   work section: c, c_in, w1, w2, w3, w4 (indices WK_* of the package)
// Each work memristor has two switches, sw1[k] to line 1 and sw2[k] to line 2
// (12 switches for any N). On a clock edge with step_valid high, both lines
// run their operations at once through two imply_line instances, and each
// work memristor takes the result of the line it is connected to.
// A work memristor connected to both lines would short them: an assertion
// forbids it. A work memristor that is on no line keeps its state.
//
// load writes a, b and c_in in one clock edge. This stands in for the array's
// ordinary memory write, which the topology does not describe; the other
// memristors are not touched and need no reset, since the algorithm clears
// every work memristor before it reads it. There is no reset: the state is
// nonvolatile.
module memristor_array
  import semi_serial_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                  clk,
  // memory write of the operands
  input  logic                  load,
  input  logic   [N-1:0]        load_a,
  input  logic   [N-1:0]        load_b,
  input  logic                  load_cin,
  // one algorithm step
  input  logic                  step_valid,
  input  drive_e [N-1:0]        drv_a,
  input  drive_e [N-1:0]        drv_b,
  input  drive_e [NUM_WORK-1:0] drv_w,
  input  logic   [NUM_WORK-1:0] sw1,
  input  logic   [NUM_WORK-1:0] sw2,
  // memristor states, readable at any time
  output logic   [N-1:0]        a_q,
  output logic   [N-1:0]        b_q,
  output logic   [NUM_WORK-1:0] w_q
);

  localparam int unsigned M = N + NUM_WORK;

  logic [M-1:0] next1, next2;
  logic [N-1:0] a_d, b_d;
  logic [NUM_WORK-1:0] w_d;

  imply_line #(.M(M)) u_line1 (
    .state (({w_q, a_q})),
    .drive (({drv_w, drv_a})),
    .conn  (({sw1, {N{1'b1}}})),
    .next  (next1)
  );

  imply_line #(.M(M)) u_line2 (
    .state (({w_q, b_q})),
    .drive (({drv_w, drv_b})),
    .conn  (({sw2, {N{1'b1}}})),
    .next  (next2)
  );

  always_comb begin
    a_d = next1[N-1:0];
    b_d = next2[N-1:0];
    for (int unsigned k = 0; k < NUM_WORK; k++) begin
      if (sw1[k])      w_d[k] = next1[N+k];
      else if (sw2[k]) w_d[k] = next2[N+k];
      else             w_d[k] = w_q[k];
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      a_q        <= load_a;
      b_q        <= load_b;
      w_q[WK_CIN] <= load_cin;
    end else if (step_valid) begin
      a_q <= a_d;
      b_q <= b_d;
      w_q <= w_d;
    end
  end

  // The two lines must never be joined through a work memristor
  a_no_short: assert property (@(posedge clk) step_valid |-> ((sw1 & sw2) == '0))
    else $error("work memristor switched onto both lines");

endmodule
