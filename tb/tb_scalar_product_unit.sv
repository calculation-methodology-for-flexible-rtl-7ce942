// End-to-end testbench of the scalar product unit at its default size
// (k = 8, n = 32, default cycle counts). Random vectors at speeds drawn
// from all four speed intervals; each result is compared with the sum of
// the three reference products of the selected precision (modulo 2^64)
// and its overflow flag, the selection with the speed table, and the
// operation time with 3 * SEL_CYCLES[sel] busy cycles. It also starts an
// operation in the cycle right after done, raises start while busy (it
// must be ignored) and forces sums of 1.0 or more to exercise the
// overflow flag. Every mechanism must have happened at least once.
module tb_scalar_product_unit;
  import flex_pkg::*;
  import tb_flex_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [7:0]  speed = '0;
  logic [31:0] r_vec [3];
  logic [31:0] s_vec [3];
  logic        busy, done, ovf;
  logic [63:0] result;
  sel_t        sel_used;

  int checks = 0, failures = 0;
  int n_sel [4] = '{0, 0, 0, 0};
  int n_ovf = 0, n_b2b = 0, n_ignored = 0;
  int cyc_table [4] = '{5, 6, 8, 10};

  scalar_product_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int stages_of(input int v);
    if (v < 32) return 4;
    if (v < 64) return 3;
    if (v < 96) return 2;
    return 1;
  endfunction

  // One operation: drive inputs in the start cycle, wait for done, check.
  task automatic run_op(input int v, input bit big, input bit poke_busy);
    logic [65:0] exp;
    int sel, cycles;
    @(negedge clk);
    speed = 8'(v);
    for (int c = 0; c < 3; c++) begin
      r_vec[c] = big ? 32'hffff_0000 | $urandom : $urandom;
      s_vec[c] = big ? 32'hffff_0000 | $urandom : $urandom;
    end
    sel = stages_of(v) - 1;
    exp = '0;
    for (int c = 0; c < 3; c++) exp = exp + {2'b0, flex_ref(r_vec[c], s_vec[c], sel)};
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      if (busy) cycles++;
      if (poke_busy && cycles == 2) begin
        // a request while busy must not disturb the running operation
        start = 1;
        speed = 8'd255 - speed;
        r_vec[0] = ~r_vec[0];
        n_ignored++;
      end else begin
        start = 0;
      end
      @(negedge clk);
    end
    start = 0;
    check(result == exp[63:0], $sformatf("speed %0d result %h vs %h", v, result, exp[63:0]));
    check(ovf == (exp[65:64] != 0), $sformatf("speed %0d ovf %0d, sum %h", v, ovf, exp));
    check(int'(sel_used) == sel, $sformatf("speed %0d sel %0d vs %0d", v, sel_used, sel));
    check(cycles == 3 * cyc_table[sel],
          $sformatf("speed %0d took %0d cycles, expected %0d", v, cycles, 3 * cyc_table[sel]));
    n_sel[sel]++;
    if (exp[65:64] != 0) n_ovf++;
  endtask

  initial begin
    for (int c = 0; c < 3; c++) begin r_vec[c] = '0; s_vec[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      run_op($urandom % 151, (t % 7) == 3, (t % 11) == 5);
    end
    // back-to-back: start again in the cycle in which done is high
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      speed = 8'(t * 20);
      for (int c = 0; c < 3; c++) begin r_vec[c] = $urandom; s_vec[c] = $urandom; end
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      // done is high now; request the next one in this very cycle
      begin
        logic [65:0] exp;
        int sel;
        sel = stages_of(100);
        speed = 8'd100;
        for (int c = 0; c < 3; c++) begin r_vec[c] = $urandom; s_vec[c] = $urandom; end
        exp = '0;
        for (int c = 0; c < 3; c++) exp = exp + {2'b0, flex_ref(r_vec[c], s_vec[c], sel - 1)};
        start = 1;
        @(negedge clk);
        start = 0;
        check(busy, "back-to-back start not taken");
        while (!done) @(negedge clk);
        check(result == exp[63:0], "back-to-back result");
        n_b2b++;
      end
    end
    for (int s = 0; s < 4; s++) begin
      check(n_sel[s] > 0, $sformatf("selection %0d never used", s + 1));
      $display("selection %0d (%0d stages): %0d operations", s, s + 1, n_sel[s]);
    end
    check(n_ovf > 0, "overflow never happened");
    check(n_b2b > 0, "no back-to-back operation");
    check(n_ignored > 0, "no start while busy");
    $display("overflows %0d, back-to-back %0d, starts while busy %0d", n_ovf, n_b2b, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
