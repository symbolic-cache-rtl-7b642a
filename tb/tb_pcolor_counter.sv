// tb_pcolor_counter: drives random call/return pulses into the P-color
// counter and compares it, cycle by cycle, with an integer model of the
// call depth taken modulo 2**PCOLOR_W. Also checks reset, wrap-around in
// both directions and that a call and a return in one cycle cancel.
module tb_pcolor_counter;
  localparam int unsigned W = 6;
  logic clk = 0, rst_n = 0, call = 0, ret = 0;
  logic [W-1:0] color;
  int checks = 0, failures = 0;
  int depth = 0;

  pcolor_counter #(.PCOLOR_W(W)) dut (.clk, .rst_n, .call_i(call), .ret_i(ret), .pcolor_o(color));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (int'(color) != (depth % (1 << W) + (1 << W)) % (1 << W)) begin
      failures++;
      $display("FAIL %s: color=%0d depth=%0d", what, color, depth);
    end
  endtask

  task automatic step(bit c, bit r);
    @(negedge clk);
    call = c; ret = r;
    @(posedge clk); #1;
    depth += int'(c) - int'(r);
    call = 0; ret = 0;
    check("step");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset");
    rst_n = 1;
    // nested calls then returns
    repeat (5) step(1, 0);
    repeat (3) step(0, 1);
    step(1, 1);                        // cancel
    repeat (2) step(0, 1);
    step(0, 1);                        // underflow wraps to all ones
    repeat (70) step(1, 0);            // overflow wraps
    repeat (2000) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
