// tb_dwt_ctrl: checks the IRSA read order of the control unit for N = 8
// and N = 6 against the order written out with nested loops (pass k, row
// pair m, three pixels), the first/last-pass flags, the mirrored column on
// the last pass, the (3/4)N^2 input cycle count, and that a start pulse
// during a run is ignored.
module tb_dwt_ctrl;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // N = 8
  logic         start8 = 0;
  logic         v8, fp8, lp8, done8;
  phase_t       ph8;
  logic [2:0]   r18, r28, c8;
  dwt_ctrl #(.N(8)) dut8 (.clk, .rst_n, .start(start8), .pix_valid(v8), .phase(ph8),
    .row1(r18), .row2(r28), .col(c8), .first_pass(fp8), .last_pass(lp8), .in_done(done8));

  // N = 6 (not a power of two)
  logic         start6 = 0;
  logic         v6, fp6, lp6, done6;
  phase_t       ph6;
  logic [2:0]   r16, r26, c6;
  dwt_ctrl #(.N(6)) dut6 (.clk, .rst_n, .start(start6), .pix_valid(v6), .phase(ph6),
    .row1(r16), .row2(r26), .col(c6), .first_pass(fp6), .last_pass(lp6), .in_done(done6));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!v8 && !v6, "idle after reset");
    // N = 8 run; a second start pulse mid-run must be ignored.
    start8 = 1;
    @(negedge clk);
    start8 = 0;
    cyc = 0;
    for (int k = 0; k < 4; k++)
      for (int m = 0; m < 4; m++)
        for (int p = 0; p < 3; p++) begin
          int col;
          col = 2 * k + p;
          if (col == 8) col = 6;
          check(v8, "valid");
          check(ph8 == phase_t'(p), "phase");
          check(r18 == 3'(2 * m) && r28 == 3'(2 * m + 1), "rows");
          check(int'(c8) == col, "col");
          check(fp8 == (k == 0) && lp8 == (k == 3), "pass flags");
          check(done8 == (k == 3 && m == 3 && p == 2), "in_done");
          if (cyc == 20) start8 = 1;
          @(negedge clk);
          start8 = 0;
          cyc++;
        end
    check(cyc == 48, "48 input cycles for N = 8");
    check(!v8, "stops after (3/4)N^2 cycles");
    repeat (3) begin
      @(negedge clk);
      check(!v8, "stays idle");
    end
    // N = 6 run
    start6 = 1;
    @(negedge clk);
    start6 = 0;
    for (int k = 0; k < 3; k++)
      for (int m = 0; m < 3; m++)
        for (int p = 0; p < 3; p++) begin
          int col;
          col = 2 * k + p;
          if (col == 6) col = 4;
          check(v6 && ph6 == phase_t'(p), "valid/phase N=6");
          check(r16 == 3'(2 * m) && r26 == 3'(2 * m + 1), "rows N=6");
          check(int'(c6) == col, "col N=6");
          check(done6 == (k == 2 && m == 2 && p == 2), "in_done N=6");
          @(negedge clk);
        end
    check(!v6, "N=6 stops after 27 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
