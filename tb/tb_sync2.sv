// tb_sync2: self-checking testbench for the multi-flop synchroniser.
//
// Two instances, the default two-flop one and a three-flop one, see the same
// random input. A shift register in the testbench records the input; after
// reset each output must equal the input from exactly STAGES clock edges
// earlier, and during reset both outputs must hold their reset value.
module tb_sync2;

  logic clk = 1'b0;
  logic rst_n;
  logic d;
  logic q2, q3;
  logic [7:0] hist;   // hist[0] = d sampled at the last edge
  int checks = 0, failures = 0;
  int cycle = 0;

  sync2 dut2 (.clk(clk), .rst_n(rst_n), .d(d), .q(q2));
  sync2 #(.WIDTH(1), .STAGES(3), .RESET_VAL(1'b1)) dut3 (.clk(clk), .rst_n(rst_n), .d(d), .q(q3));

  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %b expected %b", what, cycle, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    d     = 1'b1;
    hist  = '0;
    repeat (3) @(posedge clk);
    #1;
    check(q2, 1'b0, "reset value, 2 stages");
    check(q3, 1'b1, "reset value, 3 stages");
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[6:0], d};
      #1;
      if (i >= 1) check(q2, hist[1], "2-stage delay");
      else        check(q2, 1'b0, "2-stage output before first value arrives");
      if (i >= 2) check(q3, hist[2], "3-stage delay");
      else        check(q3, 1'b1, "3-stage output before first value arrives");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
