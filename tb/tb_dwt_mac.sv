// tb_dwt_mac: checks the shift-and-add lifting unit against integer floor
// division, on corner values and random operands in the coefficient range
// the design uses (|value| <= 1000).
module tb_dwt_mac;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  mac_op_t op;
  coef_t   in1, in2, in3, out;
  int      checks = 0, failures = 0;

  dwt_mac dut (.op, .in1, .in2, .in3, .out);

  task automatic try(input mac_op_t o, input int a, input int b, input int c);
    int exp;
    op  = o;
    in1 = coef_t'(a);
    in2 = coef_t'(b);
    in3 = coef_t'(c);
    #1;
    exp = (o == OP_PREDICT) ? b - fdiv(a + c, 2) : b + fdiv(a + c + 2, 4);
    checks++;
    if (int'(out) != exp) begin
      failures++;
      $display("FAIL op=%0d in1=%0d in2=%0d in3=%0d out=%0d exp=%0d", o, a, b, c, int'(out), exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(OP_PREDICT, 0, 0, 0);
    try(OP_PREDICT, 1, 5, 0);      // floor(1/2) = 0
    try(OP_PREDICT, -1, 5, 0);     // floor(-1/2) = -1
    try(OP_PREDICT, 255, 0, 255);
    try(OP_UPDATE, 1, 7, 0);       // floor(3/4) = 0
    try(OP_UPDATE, -3, 7, 0);      // floor(-1/4) = -1
    try(OP_UPDATE, -7, 7, 0);      // floor(-5/4) = -2
    try(OP_UPDATE, 1000, -1000, 1000);
    try(OP_PREDICT, -1000, 1000, -1000);
    repeat (4000) begin
      try(mac_op_t'($urandom_range(1)),
          int'($urandom_range(2000)) - 1000,
          int'($urandom_range(2000)) - 1000,
          int'($urandom_range(2000)) - 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
