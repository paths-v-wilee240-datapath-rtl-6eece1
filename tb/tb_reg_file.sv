// tb_reg_file: random writes through port A and reads on all three ports,
// compared with an array model; also checks that reset clears everything.
module tb_reg_file;
  logic clock = 0, reset = 0, we = 0;
  logic [2:0]  sel_a = 0, sel_b = 0, sel_c = 0;
  logic [15:0] wd = 0, rd_a, rd_b, rd_c;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  reg_file #(.WIDTH(16), .NREGS(8)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string port, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL port %s: %h expected %h", port, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) model[i] = 0;
    #12 reset = 1;
    for (int r = 0; r < 8; r++) begin
      sel_c = 3'(r); #1 cmp("C after reset", rd_c, 0);
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge clock);
      we    = ($urandom % 3) != 0;
      sel_a = 3'($urandom); sel_b = 3'($urandom); sel_c = 3'($urandom);
      wd    = 16'($urandom);
      #1;
      cmp("A", rd_a, model[sel_a]);
      cmp("B", rd_b, model[sel_b]);
      cmp("C", rd_c, model[sel_c]);
      @(posedge clock);
      if (we) model[sel_a] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
