// tb_char_comparator: exhaustive test of the 8-bit equality comparator.
// Every pair (a, b) of 8-bit values is applied; eq must be 1 exactly when
// the two values are equal.
module tb_char_comparator;
  logic [7:0] a, b;
  logic       eq;
  int checks = 0, failures = 0;

  char_comparator #(.W(8)) dut (.a(a), .b(b), .eq(eq));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int z = 0; z < 256; z++) begin
        a = 8'(x); b = 8'(z);
        #1;
        checks++;
        if (eq !== (x == z)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%02h b=%02h eq=%b", a, b, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
