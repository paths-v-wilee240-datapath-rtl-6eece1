// tb_parport_loader: a host model downloads words over the strobe/busy/ack
// handshake into a loader with a small depth; a memory-side model answers
// the write toggles after a random delay. Checks: busy while the CPU runs,
// every word and its address, the acknowledge pulse width, addr_p, pe once
// the memory is full, bytes past the end dropped, and the address rewinding
// after a run.
module tb_parport_loader;
  localparam int DEPTH = 8, ACK = 4;
  logic clk25 = 0, reset = 1, stbl = 1, wr_ack = 0;
  logic [7:0]  pport = 0;
  logic ackl, busy, pe, wr_req;
  logic [2:0]  addr_p, wr_addr;
  logic [15:0] wr_data;
  logic [15:0] mem [DEPTH];
  int writes = 0;
  int checks = 0, failures = 0;

  parport_loader #(.DEPTH(DEPTH), .WIDTH(16), .ACK_CYCLES(ACK)) dut (.*);

  always #20 clk25 = ~clk25;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory-side model: tracks the toggle while the CPU runs, writes after a
  // random delay in load mode.
  always @(posedge clk25) begin
    if (reset) wr_ack <= wr_req;
    else if (wr_req != wr_ack) begin
      repeat ($urandom % 4) @(posedge clk25);
      mem[wr_addr] <= wr_data;
      writes++;
      wr_ack <= wr_req;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Host: one byte through the handshake; returns the ack pulse width.
  task automatic send_byte(input logic [7:0] b, output int ack_len);
    while (busy) @(posedge clk25);
    pport = b;
    #30 stbl = 0;
    #120 stbl = 1;
    while (ackl) @(negedge clk25);
    while (!ackl) @(negedge clk25);
    @(negedge clk25);
    ack_len = last_ack_len;
  endtask

  // Width of the last acknowledge pulse, in clk25 cycles.
  int ack_run = 0, last_ack_len = 0;
  always @(posedge clk25) begin
    if (!ackl) ack_run <= ack_run + 1;
    else if (ack_run > 0) begin last_ack_len <= ack_run; ack_run <= 0; end
  end

  initial begin
    int len;
    repeat (5) @(posedge clk25);
    check(busy === 1'b1, "busy while CPU runs");
    reset = 0;
    repeat (5) @(posedge clk25);
    check(busy === 1'b0 && pe === 1'b0 && addr_p === 0, "idle in load mode");
    for (int i = 0; i < DEPTH; i++) begin
      send_byte(8'(8'hA0 + i), len);
      check(len == ACK, $sformatf("ack pulse %0d cycles", len));
      send_byte(8'(i * 3), len);
      check(len == ACK, $sformatf("ack pulse %0d cycles", len));
      check(addr_p == 3'((i + 1) % DEPTH), $sformatf("addr_p=%0d after word %0d", addr_p, i));
    end
    for (int i = 0; i < DEPTH; i++)
      check(mem[i] === {8'(8'hA0 + i), 8'(i * 3)},
            $sformatf("word %0d = %h", i, mem[i]));
    check(pe === 1'b1, "pe when full");
    // bytes past the end are acknowledged and dropped
    send_byte(8'h11, len); send_byte(8'h22, len);
    check(writes == DEPTH, $sformatf("%0d writes, expected %0d", writes, DEPTH));
    check(mem[0] === 16'hA000, "word 0 kept");
    // run, then a second download restarts at address 0
    reset = 1;
    repeat (5) @(posedge clk25);
    check(busy === 1'b1 && pe === 1'b0 && addr_p === 0, "rewind on run");
    reset = 0;
    repeat (5) @(posedge clk25);
    send_byte(8'h12, len); send_byte(8'h34, len);
    check(mem[0] === 16'h1234, $sformatf("reload word 0 = %h", mem[0]));
    check(addr_p === 1, "addr_p after reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
