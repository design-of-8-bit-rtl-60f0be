// tb_addr_incr: exhaustive test of the +1 address adder at the default
// 4-bit width: y must be (a + 1) mod 16 for every a.
module tb_addr_incr;
  logic [3:0] a, y;
  int checks = 0, failures = 0;

  addr_incr #(.AW(4)) dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      a = 4'(x);
      #1;
      checks++;
      if (int'(y) != ((x + 1) % 16)) begin
        failures++;
        $display("FAIL a=%0d y=%0d", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
