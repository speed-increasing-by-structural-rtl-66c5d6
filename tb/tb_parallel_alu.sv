// tb_parallel_alu: random operands, operations and post-shifts against a
// reference computed bit by bit in the testbench.
module tb_parallel_alu;
  import mcu_pkg::*;
  op_e op; shift_e sh; data_t a, b, q; logic cin; flags_t fl;
  int checks = 0, failures = 0;

  parallel_alu dut (.op, .shift(sh), .a, .b, .cin, .q, .flags(fl));

  function automatic void model(input int o, input int s, input int x, input int y,
                                input int ci, output int rq, output int rc, output int rv);
    int r, c, v;
    c = ci; v = 0;
    case (o)
      1: begin r = x + y; c = (r > 255); r &= 255;
               v = ((x < 128) == (y < 128)) && ((r < 128) != (x < 128)); end
      2: begin r = x - y; c = (r < 0); r &= 255;
               v = ((x < 128) != (y < 128)) && ((r < 128) != (x < 128)); end
      3: r = x & y;  4: r = x | y;  5: r = x ^ y;
      6: r = 255 - (x | y); 7: r = 255 - (x & y); 8: r = 255 - (x ^ y);
      9: r = (255 - x) & y; 10: r = x & (255 - y);
      11: r = (255 - x) | y; 12: r = x | (255 - y);
      13: r = 255 - x; 14: r = 255 - y; 15: r = x; 16: r = y;
      17: r = 255; 18: r = 0; 19: r = x / 2; 20: r = (y * 2) & 255;
      default: r = 0;
    endcase
    if (s == 1) begin rq = (c * 128) + r / 2; c = r % 2; end
    else if (s == 2) begin rq = ((r * 2) & 255) + c; c = r / 128; end
    else rq = r;
    rc = c; rv = v;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int eq, ec, ev, par;
    for (int i = 0; i < 20000; i++) begin
      op  = op_e'($urandom_range(0, 20));
      sh  = shift_e'($urandom_range(0, 2));
      a   = data_t'($urandom); b = data_t'($urandom); cin = 1'($urandom);
      if (i < 4) begin op = OP_ADD; sh = SH_NONE; a = 8'hFF; b = 8'h01 << i; end
      #1;
      model(int'(op), int'(sh), int'(a), int'(b), int'(cin), eq, ec, ev);
      par = 0; for (int k = 0; k < 8; k++) par ^= (eq >> k) & 1;
      checks++;
      if (int'(q) != eq || int'(fl.c) != ec || int'(fl.v) != ev ||
          fl.z != (eq == 0) || int'(fl.n) != eq / 128 || int'(fl.p) != par) begin
        failures++;
        if (failures < 10) $display("ALU mismatch op=%0d sh=%0d a=%h b=%h cin=%0d q=%h/%h c=%0d/%0d v=%0d/%0d",
                                    op, sh, a, b, cin, q, eq, fl.c, ec, fl.v, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
