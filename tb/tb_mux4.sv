// tb_mux4: checks the four-input multiplexer against a direct model for
// every select value with random data.
module tb_mux4;
  logic [1:0]  sel;
  logic [15:0] in0, in1, in2, in3, y, exp_y;
  int checks = 0, failures = 0;

  mux4 #(.WIDTH(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      {in0, in1, in2, in3} = {$urandom, $urandom, $urandom, $urandom};
      sel = 2'(i);
      #1;
      exp_y = (i % 4 == 0) ? in0 : (i % 4 == 1) ? in1 : (i % 4 == 2) ? in2 : in3;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%0d y=%h expected %h", sel, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
