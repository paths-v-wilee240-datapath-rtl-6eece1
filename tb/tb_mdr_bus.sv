// tb_mdr_bus: checks the MDR source selection and load enable for the three
// legal enable combinations (none, ALU, memory) with random data.
module tb_mdr_bus;
  logic clock = 0, alu_en = 0, mem_en = 0, load;
  logic [15:0] alu_data, mem_data, y;
  int checks = 0, failures = 0;

  mdr_bus #(.WIDTH(16)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clock);
      alu_data = 16'($urandom); mem_data = 16'($urandom);
      alu_en = (i % 3) == 1;
      mem_en = (i % 3) == 2;
      #1;
      checks++;
      if (load !== (alu_en || mem_en)) begin
        failures++; $display("FAIL load=%b for alu_en=%b mem_en=%b", load, alu_en, mem_en);
      end
      if (alu_en || mem_en) begin
        checks++;
        if (y !== (alu_en ? alu_data : mem_data)) begin
          failures++; $display("FAIL y=%h alu=%h mem=%h", y, alu_data, mem_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
