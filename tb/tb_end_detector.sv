// tb_end_detector: exhaustive test of the end detector. For every PortA
// character and a set of first characters, at_end must flag the end code
// 8'hFF on PortA, empty must flag it at address 0, and match must be at_end
// of a non-empty pattern.
module tb_end_detector;
  import cm_pkg::*;
  char_t port_a, first;
  logic  at_end, empty, match;
  int checks = 0, failures = 0;

  end_detector dut (.port_a(port_a), .first(first), .at_end(at_end),
                    .empty(empty), .match(match));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] firsts [4] = '{8'h61, 8'h00, 8'hFE, 8'hFF};
    for (int f = 0; f < 4; f++) begin
      for (int x = 0; x < 256; x++) begin
        port_a = 8'(x); first = firsts[f];
        #1;
        checks++;
        if (at_end !== (x == 255) || empty !== (firsts[f] == 8'hFF) ||
            match !== ((x == 255) && (firsts[f] != 8'hFF))) begin
          failures++;
          if (failures < 10)
            $display("FAIL port_a=%02h first=%02h at_end=%b empty=%b match=%b",
                     port_a, first, at_end, empty, match);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
