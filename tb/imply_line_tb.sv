// Test of one line's stateful logic with random states, drive levels and
// connections on an 8-memristor line. The reference is written per case:
// with one conditioning memristor p the V_SET targets take ~p | q; with none
// they are set; V_RESET clears; undriven or unconnected memristors keep
// their state; the conditioning memristors themselves are unchanged. The
// full IMPLY truth table (p, q) is also walked explicitly.
module imply_line_tb;
  import semi_serial_pkg::*;

  localparam int unsigned M = 8;

  logic   [M-1:0] state, conn, next;
  drive_e [M-1:0] drive;

  imply_line #(.M(M)) dut (.state, .drive, .conn, .next);

  int checks = 0, failures = 0;

  task automatic expect_eq(input string what, input logic [M-1:0] got, input logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    // IMPLY truth table: p on memristor 2, q on memristor 5
    for (int v = 0; v < 4; v++) begin
      logic p, q;
      {p, q} = 2'(v);
      state = '0; state[2] = p; state[5] = q;
      conn = '1;
      drive = '{default: DRV_NONE}; drive[2] = DRV_COND; drive[5] = DRV_SET;
      #1;
      expect_eq($sformatf("imply p=%b q=%b", p, q), next, {state[7:6], ~p | q, state[4:0]});
    end
    // random single-IMPLY / FALSE steps
    for (int t = 0; t < 2000; t++) begin
      logic [M-1:0] exp;
      int p, has_p;
      state = M'($urandom);
      conn  = M'($urandom) | M'($urandom);
      drive = '{default: DRV_NONE};
      has_p = $urandom_range(1);
      p = $urandom_range(M - 1);
      for (int k = 0; k < M; k++) begin
        case ($urandom_range(3))
          0: drive[k] = DRV_RESET;
          1: drive[k] = DRV_SET;
          default: drive[k] = DRV_NONE;
        endcase
      end
      if (has_p != 0) drive[p] = DRV_COND;
      #1;
      exp = state;
      for (int k = 0; k < M; k++) begin
        if (!conn[k]) continue;
        if (drive[k] == DRV_RESET) exp[k] = 1'b0;
        if (drive[k] == DRV_SET) begin
          if (has_p != 0 && conn[p]) exp[k] = state[k] | ~state[p];
          else exp[k] = 1'b1;
        end
      end
      expect_eq($sformatf("random %0d", t), next, exp);
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
