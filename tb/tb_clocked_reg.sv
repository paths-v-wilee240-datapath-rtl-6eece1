// tb_clocked_reg: random loads and holds against a shadow value, plus an
// asynchronous reset in the middle of a clock period.
module tb_clocked_reg;
  logic clock = 0, reset = 0, load = 0;
  logic [15:0] d, q, shadow;
  int checks = 0, failures = 0;

  clocked_reg #(.WIDTH(16)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== shadow) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, shadow);
    end
  endtask

  initial begin
    d = 16'hFFFF;
    #12 shadow = 0; check("reset");
    reset = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clock);
      load = ($urandom % 2) == 1;
      d    = 16'($urandom);
      @(posedge clock); #1;
      if (load) shadow = d;
      check(load ? "load" : "hold");
    end
    // asynchronous reset between edges
    @(negedge clock); #2 reset = 0; #1 shadow = 0; check("async reset");
    @(posedge clock); #1 check("reset held");
    reset = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
