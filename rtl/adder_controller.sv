// Step sequencer of the semi-serial adder.
//
// The addition runs bit after bit, least significant first. Each bit takes
// steps 1 to 10; the first bit has one extra step right after step 1, the
// inversion of the carry-in (STEP_CINV), and after step 10 of the last bit
// comes one more, the inversion that leaves the carry-out in c_in
// (STEP_COUT). An N-bit addition thus takes 10N+2 steps, the count the
// topology is specified with. The order of the steps is the document's; the
// handshake and the timing are this design's own.
//
// rst_n is a synchronous, active-low reset.
// Interface: a one-cycle start pulse while idle begins an addition (start is
// ignored while busy). Every cycle with busy high is one step: step_valid is
// high, step/bit_idx/first_bit/last_bit name it, and the array applies it at
// the end of the cycle. done pulses for one cycle right after the last step,
// when the sum can be read. Start to done: 10N+2 busy cycles, then done.
module adder_controller
  import semi_serial_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned BIT_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             step_valid,
  output step_e            step,
  output logic [BIT_W-1:0] bit_idx,
  output logic             first_bit,
  output logic             last_bit
);

  localparam logic [BIT_W-1:0] LAST = BIT_W'(N - 1);

  assign step_valid = busy;
  assign first_bit  = (bit_idx == '0);
  assign last_bit   = (bit_idx == LAST);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      step    <= STEP_1;
      bit_idx <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          step    <= STEP_1;
          bit_idx <= '0;
        end
      end else begin
        unique case (step)
          STEP_1:  step <= first_bit ? STEP_CINV : STEP_2;
          STEP_10: begin
            if (last_bit) begin
              step <= STEP_COUT;
            end else begin
              step    <= STEP_1;
              bit_idx <= bit_idx + 1'b1;
            end
          end
          STEP_COUT: begin
            busy <= 1'b0;
            done <= 1'b1;
            step <= STEP_1;
          end
          default: step <= step_e'(step + 1'b1);  // CINV->2, 2->3, ... 9->10
        endcase
      end
    end
  end

  a_step_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (step <= STEP_COUT))
    else $error("step out of range");
  a_cinv_first: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && step == STEP_CINV) |-> first_bit)
    else $error("carry-in inversion outside the first bit");

endmodule
