// One horizontal line of the memristive adder, with its load resistor R_G,
// modelled at the logic level (behavioural model of an analog circuit,
// written so that it also synthesizes).
//
// M memristors can sit on the line; conn[k] says whether memristor k is
// connected for this step (operand memristors always are, work memristors
// through their section switch). Each connected memristor sees the level of
// its own driver:
//   DRV_RESET  FALSE: the memristor goes to 0 (R_off).
//   DRV_COND   conditioning memristor p of an IMPLY: its state is kept.
//   DRV_SET    target q of an IMPLY: q <= ~p | q. Only a p in R_on (1) pulls
//              the line up far enough to keep q from switching.
//   DRV_NONE   state kept.
// The material implication and the 1 = R_on, 0 = R_off mapping follow the
// IMPLY definition of the topology. Two choices are this model's own: with
// several conditioning memristors on one line q is set only if all of them
// are 0 (q <= q | NOR(p)), and a V_SET target with no conditioning memristor
// on its line is simply set to 1. The adder's algorithm never uses either.
// Purely combinational: next[] is the state after the step.
module imply_line
  import semi_serial_pkg::*;
#(
  parameter int unsigned M = 38
) (
  input  logic   [M-1:0] state,
  input  drive_e [M-1:0] drive,
  input  logic   [M-1:0] conn,
  output logic   [M-1:0] next
);

  logic [M-1:0] is_cond;
  logic         cond_any;   // an IMPLY is running on this line
  logic         cond_on;    // some conditioning memristor holds 1

  always_comb begin
    for (int unsigned k = 0; k < M; k++) begin
      is_cond[k] = conn[k] && (drive[k] == DRV_COND);
    end
    cond_any = |is_cond;
    cond_on  = |(is_cond & state);
  end

  always_comb begin
    for (int unsigned k = 0; k < M; k++) begin
      next[k] = state[k];
      if (conn[k]) begin
        unique case (drive[k])
          DRV_RESET: next[k] = 1'b0;
          DRV_SET:   next[k] = cond_any ? (state[k] | ~cond_on) : 1'b1;
          default:   next[k] = state[k];
        endcase
      end
    end
  end

endmodule
