// tb_dwt2d_top: end-to-end test of the 2-D DWT at N = 8.
//
// A frame-memory model answers the pixel requests in the same cycle. Every
// HH, HL, LH and LL coefficient is compared with the golden 2-D 5/3 model
// and must appear exactly once. Each image must take (3/4)N^2 + 6 = 54
// clocks from the first pixel request to `done`. Images: random, all-zero,
// all-255, checkerboard, stripes; two are started back to back (start in
// the cycle after done) and one start pulse arrives mid-run and must be
// ignored. The run counts how often each mechanism of the design occurred:
// left and right symmetric extension in the rows, the queue returning H
// of the previous pass, top and bottom extension in the columns (the
// column-end flush), an ignored start, a back-to-back start.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N  = 8;
  localparam int NH = N / 2;

  logic         clk = 0, rst_n = 0, start = 0;
  logic         busy, rd_valid, done;
  logic [2:0]   rd_row1, rd_row2, rd_col;
  pixel_t       pix1, pix2;
  logic         vh_valid, vl_valid;
  coef_t        hh, hl, lh, ll;
  logic [1:0]   vh_row, vh_col, vl_row, vl_col;

  int checks = 0, failures = 0;
  int img [N][N];
  dwt_ref_pkg::plane_t rimg, rhh, rhl, rlh, rll;
  int seen_h [NH][NH];
  int seen_l [NH][NH];
  int cyc = 0, first_rd = -1;

  // mechanism counters
  int n_row_left = 0, n_row_right = 0, n_queue = 0, n_col_top = 0, n_col_flush = 0;
  int n_start_ignored = 0, n_back_to_back = 0;

  dwt2d_top #(.N(N)) dut (.*);

  // Frame memory model: asynchronous read.
  assign pix1 = pixel_t'(img[rd_row1][rd_col]);
  assign pix2 = pixel_t'(img[rd_row2][rd_col]);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (rd_valid && first_rd < 0) first_rd = cyc;
    if (vh_valid) begin
      check(int'(hh) == rhh[vh_row][vh_col], "HH");
      check(int'(hl) == rhl[vh_row][vh_col], "HL");
      seen_h[vh_row][vh_col]++;
    end
    if (vl_valid) begin
      check(int'(lh) == rlh[vl_row][vl_col], "LH");
      check(int'(ll) == rll[vl_row][vl_col], "LL");
      seen_l[vl_row][vl_col]++;
    end
    if (dut.u_image_1.upd_pend && dut.u_image_1.fp_q) n_row_left++;
    if (dut.u_image_1.triple_valid && dut.last_pass) n_row_right++;
    if (dut.u_image_1.upd_pend && !dut.u_image_1.fp_q) n_queue++;
    if (dut.u_vertical_h.state == 2'd1 && dut.u_vertical_h.op_first) n_col_top++;
    if (dut.u_vertical_h.state == 2'd2) n_col_flush++;
  end

  task automatic make_image(input int kind);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        case (kind)
          0: img[r][c] = $urandom_range(255);
          1: img[r][c] = 0;
          2: img[r][c] = 255;
          3: img[r][c] = ((r + c) % 2) ? 255 : 0;
          default: img[r][c] = (r % 2) ? 0 : 255;
        endcase
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) rimg[r][c] = img[r][c];
    dwt2d(N, rimg, rhh, rhl, rlh, rll);
    seen_h = '{default: '{default: 0}};
    seen_l = '{default: '{default: 0}};
  endtask

  // Runs one image; start is raised at the current negedge.
  task automatic run_image(input int kind, input bit poke_start);
    int t_done;
    make_image(kind);
    first_rd = -1;
    start = 1;
    @(negedge clk);
    start = 0;
    if (poke_start) begin
      repeat (10) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "busy during run");
      n_start_ignored++;
    end
    while (!done) @(negedge clk);
    t_done = cyc;
    #1;  // let the output checker see the last coefficient first
    check(t_done - first_rd + 1 == 3 * N * N / 4 + 6, "(3/4)N^2 + 6 cycles per image");
    if (t_done - first_rd + 1 != 3 * N * N / 4 + 6)
      $display("  took %0d cycles", t_done - first_rd + 1);
    // coverage of the image: each coefficient exactly once
    for (int m = 0; m < NH; m++)
      for (int k = 0; k < NH; k++) begin
        check(seen_h[m][k] == 1, "HH/HL produced once");
        check(seen_l[m][k] == 1, "LH/LL produced once");
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_image(3, 1'b0);
    @(negedge clk);
    run_image(4, 1'b1);
    run_image(1, 1'b0);  // started in the cycle right after done
    n_back_to_back++;
    run_image(2, 1'b0);
    n_back_to_back++;
    repeat (10) run_image(0, 1'b0);
    repeat (3) @(negedge clk);
    check(!busy, "idle at the end");
    check(dut.u_image_1.u_queue.empty && dut.u_image_2.u_queue.empty, "queues drained");
    $display("mechanisms: row_left_ext=%0d row_right_ext=%0d queue_reuse=%0d col_top_ext=%0d col_flush=%0d start_ignored=%0d back_to_back=%0d",
             n_row_left, n_row_right, n_queue, n_col_top, n_col_flush, n_start_ignored, n_back_to_back);
    check(n_row_left > 0, "row left extension exercised");
    check(n_row_right > 0, "row right extension exercised");
    check(n_queue > 0, "queue reuse exercised");
    check(n_col_top > 0, "column top extension exercised");
    check(n_col_flush > 0, "column flush exercised");
    check(n_start_ignored > 0, "ignored start exercised");
    check(n_back_to_back > 0, "back-to-back images exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
