// tb_dwt2d_full: the 2-D DWT at its default size, N = 128, every
// parameter at its default. Transforms a random 128 x 128 image, a
// checkerboard and a smooth gradient back to back, compares all 4 x 64 x 64
// coefficients of each with the golden model, checks that each appears
// once, and checks the (3/4)N^2 + 6 = 12294 clock time per image.
module tb_dwt2d_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N  = 128;
  localparam int NH = N / 2;

  logic         clk = 0, rst_n = 0, start = 0;
  logic         busy, rd_valid, done;
  logic [6:0]   rd_row1, rd_row2, rd_col;
  pixel_t       pix1, pix2;
  logic         vh_valid, vl_valid;
  coef_t        hh, hl, lh, ll;
  logic [5:0]   vh_row, vh_col, vl_row, vl_col;

  int checks = 0, failures = 0;
  int img [N][N];
  dwt_ref_pkg::plane_t rimg, rhh, rhl, rlh, rll;
  int seen_h [NH][NH];
  int seen_l [NH][NH];
  int cyc = 0, first_rd = -1;

  dwt2d_top dut (.*);

  assign pix1 = pixel_t'(img[rd_row1][rd_col]);
  assign pix2 = pixel_t'(img[rd_row2][rd_col]);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (rd_valid && first_rd < 0) first_rd = cyc;
    if (vh_valid) begin
      check(int'(hh) == rhh[vh_row][vh_col] && int'(hl) == rhl[vh_row][vh_col], "HH/HL");
      seen_h[vh_row][vh_col]++;
    end
    if (vl_valid) begin
      check(int'(lh) == rlh[vl_row][vl_col] && int'(ll) == rll[vl_row][vl_col], "LH/LL");
      seen_l[vl_row][vl_col]++;
    end
  end

  task automatic run_image(input int kind);
    int t_done, bad;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        case (kind)
          0: img[r][c] = $urandom_range(255);
          1: img[r][c] = ((r + c) % 2) ? 255 : 0;
          default: img[r][c] = (r + c) & 8'hff;
        endcase
        rimg[r][c] = img[r][c];
      end
    dwt2d(N, rimg, rhh, rhl, rlh, rll);
    seen_h = '{default: '{default: 0}};
    seen_l = '{default: '{default: 0}};
    first_rd = -1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    t_done = cyc;
    #1;
    check(t_done - first_rd + 1 == 3 * N * N / 4 + 6, "(3/4)N^2 + 6 cycles");
    $display("image %0d: %0d cycles", kind, t_done - first_rd + 1);
    bad = 0;
    for (int m = 0; m < NH; m++)
      for (int k = 0; k < NH; k++)
        if (seen_h[m][k] != 1 || seen_l[m][k] != 1) bad++;
    check(bad == 0, "every coefficient produced once");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_image(0);
    run_image(1);
    run_image(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
