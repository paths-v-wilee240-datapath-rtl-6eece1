// tb_alu: every ALU function on random and corner-case operands, compared
// with a model written with 32-bit integer arithmetic (results and all four
// condition codes).
module tb_alu;
  import wile_pkg::*;
  alu_fn_t     fn;
  logic [15:0] a, b, y;
  cc_t         cc;
  int checks = 0, failures = 0;

  alu #(.WIDTH(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  task automatic model(input int f, input int ua, input int ub,
                       output int ry, output bit c, output bit v);
    int sa, sb, sr;
    sa = (ua >= 32768) ? ua - 65536 : ua;
    sb = (ub >= 32768) ? ub - 65536 : ub;
    c = 0; v = 0;
    case (f)
      0: ry = ua;
      1: ry = ub;
      2: begin ry = (ua + 1) % 65536; c = (ua + 1) > 65535; sr = sa + 1; v = sr > 32767; end
      3: begin ry = (ua + 65535) % 65536; c = ua < 1; sr = sa - 1; v = sr < -32768; end
      4: begin ry = (ua + ub) % 65536; c = (ua + ub) > 65535; sr = sa + sb; v = sr > 32767 || sr < -32768; end
      5: begin ry = (ua - ub + 65536) % 65536; c = ua < ub; sr = sa - sb; v = sr > 32767 || sr < -32768; end
      6: ry = ua & ub;
      7: ry = ua | ub;
      8: ry = ua ^ ub;
      9: ry = 65535 - ua;
      10: begin ry = (sa >>> 1) & 65535; c = ua % 2; end
      11: begin ry = (ua * 2) % 65536; c = ua >= 32768; v = (ua >= 32768) != (ry >= 32768); end
      12: begin ry = ua / 2; c = ua % 2; end
      13: begin ry = ((ua * 2) % 65536) + (ua >= 32768 ? 1 : 0); c = ua >= 32768; end
      default: ry = ua;
    endcase
  endtask

  task automatic run(int f, logic [15:0] ta, logic [15:0] tb_);
    int ry; bit c, v;
    fn = alu_fn_t'(f); a = ta; b = tb_;
    #1;
    model(f, int'(ta), int'(tb_), ry, c, v);
    checks++;
    if (y !== 16'(ry) || cc.z !== (ry == 0) || cc.n !== (ry >= 32768) ||
        cc.c !== c || cc.v !== v) begin
      failures++;
      $display("FAIL fn=%0d a=%h b=%h: y=%h zcnv=%b, expected y=%h zcnv=%b%b%b%b",
               f, ta, tb_, y, cc, 16'(ry), ry == 0, c, ry >= 32768, v);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5555};
    for (int f = 0; f < 14; f++) begin
      foreach (corner[i]) foreach (corner[j]) run(f, corner[i], corner[j]);
      for (int k = 0; k < 200; k++) run(f, 16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
