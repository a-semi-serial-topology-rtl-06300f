// Test of the logic-level memristor array (4 bits). After a load, random
// steps are applied: each work memristor is put on line 1, line 2 or neither,
// and each line gets either a FALSE on random members or one IMPLY p -> q
// between two of its members (an a or b memristor, or a work memristor on
// that line). A work memristor on no line gets a random drive that must have
// no effect. A reference copy of all 2N+6 bits, updated by the rules
// FALSE: m = 0 and IMPLY: q = ~p | q, is compared with the array after every
// step; the load port is checked as well.
module memristor_array_tb;
  import semi_serial_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic load = 1'b0, load_cin = 1'b0, step_valid = 1'b0;
  logic [N-1:0] load_a = '0, load_b = '0;
  drive_e [N-1:0] drv_a, drv_b;
  drive_e [NUM_WORK-1:0] drv_w;
  logic [NUM_WORK-1:0] sw1, sw2, w_q;
  logic [N-1:0] a_q, b_q;

  memristor_array #(.N(N)) dut (
    .clk, .load, .load_a, .load_b, .load_cin, .step_valid,
    .drv_a, .drv_b, .drv_w, .sw1, .sw2, .a_q, .b_q, .w_q
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_imply = 0, n_false = 0;
  // reference: members 0..N-1 = a, N..2N-1 = b, 2N..2N+5 = work
  logic ref_st [2*N+NUM_WORK];

  task automatic compare(input string what);
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (a_q[i] !== ref_st[i])   begin failures++; $display("FAIL %s a[%0d]", what, i); end
      if (b_q[i] !== ref_st[N+i]) begin failures++; $display("FAIL %s b[%0d]", what, i); end
    end
    for (int k = 0; k < NUM_WORK; k++) begin
      checks++;
      if (w_q[k] !== ref_st[2*N+k]) begin failures++; $display("FAIL %s w[%0d]", what, k); end
    end
  endtask

  // drive one member (array index) with a level
  task automatic set_drive(input int m, input drive_e d);
    if (m < N) drv_a[m] = d;
    else if (m < 2*N) drv_b[m-N] = d;
    else drv_w[m-2*N] = d;
  endtask

  initial begin
    drv_a = '0; drv_b = '0; drv_w = '0; sw1 = '0; sw2 = '0;
    // load all memristors to known values: load, then FALSE the work section
    @(negedge clk);
    load_a = 4'b1011; load_b = 4'b0100; load_cin = 1'b1; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    checks += 3;
    if (a_q !== 4'b1011) begin failures++; $display("FAIL load a"); end
    if (b_q !== 4'b0100) begin failures++; $display("FAIL load b"); end
    if (w_q[WK_CIN] !== 1'b1) begin failures++; $display("FAIL load cin"); end
    sw1 = '1; drv_w = '{default: DRV_RESET}; step_valid = 1'b1;
    @(negedge clk);
    step_valid = 1'b0; sw1 = '0; drv_w = '0;
    for (int i = 0; i < N; i++) begin ref_st[i] = a_q[i]; ref_st[N+i] = b_q[i]; end
    for (int k = 0; k < NUM_WORK; k++) ref_st[2*N+k] = 1'b0;
    compare("after clear");

    for (int t = 0; t < 3000; t++) begin
      automatic int line_of [NUM_WORK];   // 0 none, 1 line 1, 2 line 2
      automatic int mem1 [$];
      automatic int mem2 [$];
      logic nx [2*N+NUM_WORK];
      drv_a = '0; drv_b = '0; drv_w = '0; sw1 = '0; sw2 = '0;
      for (int i = 0; i < N; i++) begin mem1.push_back(i); mem2.push_back(N + i); end
      for (int k = 0; k < NUM_WORK; k++) begin
        line_of[k] = $urandom_range(2);
        if (line_of[k] == 1) begin sw1[k] = 1'b1; mem1.push_back(2*N+k); end
        if (line_of[k] == 2) begin sw2[k] = 1'b1; mem2.push_back(2*N+k); end
        if (line_of[k] == 0) drv_w[k] = drive_e'($urandom_range(3));
      end
      nx = ref_st;
      for (int l = 1; l <= 2; l++) begin
        automatic int mem [$];
        mem = (l == 1) ? mem1 : mem2;
        if ($urandom_range(1) == 0) begin
          foreach (mem[j]) if ($urandom_range(2) == 0) begin
            set_drive(mem[j], DRV_RESET); nx[mem[j]] = 1'b0; n_false++;
          end
        end else begin
          int p, q;
          p = mem[$urandom_range(mem.size() - 1)];
          do q = mem[$urandom_range(mem.size() - 1)]; while (q == p);
          set_drive(p, DRV_COND); set_drive(q, DRV_SET);
          nx[q] = ~ref_st[p] | ref_st[q];
          n_imply++;
        end
      end
      step_valid = 1'b1;
      @(negedge clk);
      step_valid = 1'b0;
      ref_st = nx;
      compare($sformatf("step %0d", t));
    end
    checks++;
    if (n_imply == 0 || n_false == 0) begin failures++; $display("FAIL: operation never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
