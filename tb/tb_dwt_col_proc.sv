// tb_dwt_col_proc: feeds a column processor (N = 8, and N = 4 where the
// first and the last pair coincide) with columns of signed values, two rows
// every three cycles as the row processors deliver them, and checks every
// (hi, lo) pair, its subband coordinates, the last-pair flag and the
// output timing: pair m-1 two cycles after pair m arrives, the column's last
// pair four cycles after it arrives.
module tb_dwt_col_proc;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct {
    int hi, lo, row, col, at;
    bit last;
  } exp_t;

  // ---------------- N = 8 ----------------
  logic       v8 = 0;
  coef_t      e8 = '0, o8 = '0;
  logic       ov8, last8;
  coef_t      hi8, lo8;
  logic [1:0] row8, col8;
  exp_t       q8[$];

  dwt_col_proc #(.N(8)) dut8 (.clk, .rst_n, .clear, .in_valid(v8), .in_even(e8), .in_odd(o8),
    .out_valid(ov8), .out_hi(hi8), .out_lo(lo8), .out_row(row8), .out_col(col8), .out_last(last8));

  // ---------------- N = 4 ----------------
  logic       v4 = 0;
  coef_t      e4 = '0, o4 = '0;
  logic       ov4, last4;
  coef_t      hi4, lo4;
  logic [0:0] row4, col4;
  exp_t       q4[$];

  dwt_col_proc #(.N(4)) dut4 (.clk, .rst_n, .clear, .in_valid(v4), .in_even(e4), .in_odd(o4),
    .out_valid(ov4), .out_hi(hi4), .out_lo(lo4), .out_row(row4), .out_col(col4), .out_last(last4));

  always @(negedge clk) if (rst_n) begin
    if (ov8) begin
      check(q8.size() > 0, "unexpected output N=8");
      if (q8.size() > 0) begin
        exp_t e;
        e = q8.pop_front();
        check(int'(hi8) == e.hi && int'(lo8) == e.lo, "hi/lo N=8");
        check(int'(row8) == e.row && int'(col8) == e.col, "coordinates N=8");
        check(last8 == e.last, "last N=8");
        check(cyc == e.at, "timing N=8");
      end
    end
    if (ov4) begin
      check(q4.size() > 0, "unexpected output N=4");
      if (q4.size() > 0) begin
        exp_t e;
        e = q4.pop_front();
        check(int'(hi4) == e.hi && int'(lo4) == e.lo, "hi/lo N=4");
        check(int'(row4) == e.row && int'(col4) == e.col, "coordinates N=4");
        check(last4 == e.last, "last N=4");
        check(cyc == e.at, "timing N=4");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Feeds N/2 columns of random values (range +-rng) back to back.
  task automatic run8(input int rng);
    dwt_ref_pkg::line_t y, lo, hi;
    for (int k = 0; k < 4; k++) begin
      for (int r = 0; r < 8; r++) y[r] = int'($urandom_range(2 * rng)) - rng;
      lift(8, y, lo, hi);
      for (int m = 0; m < 4; m++) begin
        @(negedge clk);
        v8 = 1; e8 = coef_t'(y[2 * m]); o8 = coef_t'(y[2 * m + 1]);
        // the arrival is sampled at the coming edge, cycle cyc
        if (m >= 1) q8.push_back('{hi[m - 1], lo[m - 1], m - 1, k, cyc + 2, 1'b0});
        if (m == 3) q8.push_back('{hi[3], lo[3], 3, k, cyc + 4, k == 3});
        @(negedge clk);
        v8 = 0;
        @(negedge clk);
      end
    end
  endtask

  task automatic run4(input int rng);
    dwt_ref_pkg::line_t y, lo, hi;
    for (int k = 0; k < 2; k++) begin
      for (int r = 0; r < 4; r++) y[r] = int'($urandom_range(2 * rng)) - rng;
      lift(4, y, lo, hi);
      for (int m = 0; m < 2; m++) begin
        @(negedge clk);
        v4 = 1; e4 = coef_t'(y[2 * m]); o4 = coef_t'(y[2 * m + 1]);
        if (m == 1) begin
          q4.push_back('{hi[0], lo[0], 0, k, cyc + 2, 1'b0});
          q4.push_back('{hi[1], lo[1], 1, k, cyc + 4, k == 1});
        end
        @(negedge clk);
        v4 = 0;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        run8(400); run8(10); run8(511);
        repeat (20) run8(300);
      end
      begin
        repeat (20) run4(300);
      end
    join
    repeat (8) @(negedge clk);
    check(q8.size() == 0 && q4.size() == 0, "all outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
