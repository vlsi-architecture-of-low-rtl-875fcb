// tb_dwt_row_proc: drives one row processor (N = 8) in IRSA order with the
// even rows of random and extreme images and checks every H and L against
// the golden 1-D lifting of its row. Also checks the timing: H is valid in
// the cycle after phase C, L one cycle later.
module tb_dwt_row_proc;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;

  logic   clk = 0, rst_n = 0, clear = 0;
  logic   pix_valid = 0, first_pass = 0, last_pass = 0;
  phase_t phase = PH_A;
  pixel_t pix = '0;
  logic   h_valid, l_valid;
  coef_t  h, l;
  int     checks = 0, failures = 0;
  int     img [N][N];
  int     exp_h[$], exp_l[$];
  int     cyc = 0, last_c_cyc = -10;

  dwt_row_proc #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Output checker.
  always @(negedge clk) if (rst_n) begin
    if (pix_valid && phase == PH_C) last_c_cyc = cyc;
    if (h_valid) begin
      check(exp_h.size() > 0, "unexpected H");
      if (exp_h.size() > 0) check(int'(h) == exp_h.pop_front(), "H value");
      check(cyc == last_c_cyc + 1, "H one cycle after phase C");
    end
    if (l_valid) begin
      check(exp_l.size() > 0, "unexpected L");
      if (exp_l.size() > 0) check(int'(l) == exp_l.pop_front(), "L value");
      check(cyc == last_c_cyc + 2, "L two cycles after phase C");
    end
  end

  task automatic run_image(input int kind);
    dwt_ref_pkg::line_t x, lo, hi;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        case (kind)
          0: img[r][c] = $urandom_range(255);
          1: img[r][c] = ((r + c) % 2) ? 255 : 0;
          default: img[r][c] = (c % 2) ? 0 : 255;
        endcase
    // Expected outputs in IRSA order (pass k, then even rows).
    for (int k = 0; k < N / 2; k++)
      for (int m = 0; m < N / 2; m++) begin
        for (int c = 0; c < N; c++) x[c] = img[2 * m][c];
        lift(N, x, lo, hi);
        exp_h.push_back(hi[k]);
        exp_l.push_back(lo[k]);
      end
    for (int k = 0; k < N / 2; k++)
      for (int m = 0; m < N / 2; m++)
        for (int p = 0; p < 3; p++) begin
          @(negedge clk);
          pix_valid  = 1;
          phase      = phase_t'(p);
          first_pass = (k == 0);
          last_pass  = (k == N / 2 - 1);
          pix        = (2 * k + p < N) ? pixel_t'(img[2 * m][2 * k + p]) : pixel_t'($urandom);
        end
    @(negedge clk);
    pix_valid = 0;
    repeat (4) @(negedge clk);
    check(exp_h.size() == 0 && exp_l.size() == 0, "all outputs produced");
    check(dut.u_queue.empty, "queue empty after an image");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_image(1);
    run_image(2);
    repeat (6) run_image(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
