// tb_dwt_input_unit: feeds random three-pixel groups (with random idle
// cycles in between) and checks that the phase-C cycle presents the right
// triple, that c is the mirrored a on the last pass, and that triple_valid
// is high only in phase-C cycles.
module tb_dwt_input_unit;
  import dwt_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   pix_valid = 0, last_pass = 0;
  phase_t phase = PH_A;
  pixel_t pix = '0;
  logic   triple_valid;
  coef_t  a, b, c;
  int     checks = 0, failures = 0;

  dwt_input_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    pixel_t pa, pb, pc;
    bit     lp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (500) begin
      pa = pixel_t'($urandom);
      pb = pixel_t'($urandom);
      pc = pixel_t'($urandom);
      lp = ($urandom_range(3) == 0);
      @(negedge clk);
      pix_valid = 1; phase = PH_A; pix = pa; last_pass = lp;
      #1 check(!triple_valid, "no triple in phase A");
      @(negedge clk);
      phase = PH_B; pix = pb;
      #1 check(!triple_valid, "no triple in phase B");
      @(negedge clk);
      phase = PH_C; pix = pc;
      #1;
      check(triple_valid, "triple in phase C");
      check(int'(a) == int'(pa), "a");
      check(int'(b) == int'(pb), "b");
      check(int'(c) == (lp ? int'(pa) : int'(pc)), "c / extension");
      // Idle cycles must not disturb the held pixels.
      if ($urandom_range(1)) begin
        @(negedge clk);
        pix_valid = 0; phase = PH_A; pix = pixel_t'($urandom);
        #1 check(!triple_valid, "no triple when idle");
        check(int'(a) == int'(pa), "a held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
