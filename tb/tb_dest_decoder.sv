// tb_dest_decoder: checks every destination code: codes 1..6 enable exactly
// reg, sp, pc, mdr, mar, ir in turn; 0 and 7 enable nothing.
module tb_dest_decoder;
  import wile_pkg::*;
  dest_t      dest;
  logic [5:0] load;
  int checks = 0, failures = 0;

  dest_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] expected;
    for (int code = 0; code < 8; code++) begin
      dest = dest_t'(code);
      #1;
      expected = (code >= 1 && code <= 6) ? 6'(1 << (code - 1)) : 6'b0;
      checks++;
      if (load !== expected) begin
        failures++;
        $display("FAIL dest=%0d load=%b expected %b", code, load, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
