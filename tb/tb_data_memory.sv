// tb_data_memory: downloads a full 256-word image over the parallel port
// (CPU clock and clk25 unrelated), checks it through the CPU read port,
// then runs random CPU writes and reads against an array model, checking
// that the read is combinational and the write lands on the clock edge.
module tb_data_memory;
  localparam int DEPTH = 256;
  logic clock = 0, clk25 = 0, reset = 1, we = 0, stbl = 1;
  logic [7:0]  addr = 0, pport = 0, addr_p;
  logic [15:0] wdata = 0, rdata;
  logic ackl, busy, pe;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(DEPTH), .WIDTH(16), .ACK_CYCLES(4)) dut (.*);

  always #7 clock = ~clock;     // unrelated to clk25 on purpose
  always #20 clk25 = ~clk25;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    while (busy) @(negedge clk25);
    pport = b;
    #30 stbl = 0;
    #120 stbl = 1;
    while (ackl) @(negedge clk25);
    while (!ackl) @(negedge clk25);
  endtask

  initial begin
    repeat (6) @(posedge clk25);
    reset = 0;                         // hold the CPU, enable loading
    repeat (6) @(posedge clk25);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      send_byte(model[i][15:8]);
      send_byte(model[i][7:0]);
    end
    check(pe === 1'b1, "pe after a full image");
    reset = 1;
    repeat (4) @(posedge clock);
    for (int i = 0; i < DEPTH; i++) begin
      addr = 8'(i); #1;
      check(rdata === model[i], $sformatf("loaded word %0d = %h, expected %h", i, rdata, model[i]));
    end
    // CPU port
    for (int i = 0; i < 1000; i++) begin
      @(negedge clock);
      addr  = 8'($urandom);
      we    = ($urandom % 2) == 1;
      wdata = 16'($urandom);
      #1 check(rdata === model[addr], $sformatf("read %0d = %h, expected %h", addr, rdata, model[addr]));
      @(posedge clock); #1;
      if (we) model[addr] = wdata;
      check(rdata === model[addr], $sformatf("after edge %0d = %h, expected %h", addr, rdata, model[addr]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
