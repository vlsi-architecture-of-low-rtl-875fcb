// tb_dwt_queue: random push/pop traffic (including simultaneous push and pop
// and clear) against a queue model; checks head, count, full and empty.
module tb_dwt_queue;
  import dwt_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic  clk = 0, rst_n = 0;
  logic  clear = 0, push = 0, pop = 0;
  coef_t din = '0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic  full, empty;
  int    checks = 0, failures = 0;
  int    model[$];

  dwt_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(int'(dout) == model[0], "head");
      clear = ($urandom_range(199) == 0);
      pop   = (model.size() > 0) && ($urandom_range(1) == 1);
      push  = (model.size() < DEPTH || pop) && ($urandom_range(1) == 1);
      din   = coef_t'($urandom);
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(int'(din));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
