// tb_pattern_regfile: tests the 16 x 8 pattern register file. After reset
// every entry must read as the end code on PortA, PortB and the x[0]
// output. Then random writes (some with the write enable low) are checked
// against a shadow array by reading random addresses on both ports; a write
// must become visible only after its clock edge.
module tb_pattern_regfile;
  import cm_pkg::*;
  localparam int L = 16;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  char_t      wdata = '0, rdata_a, rdata_b, rd_first;
  logic [7:0] shadow [L];
  int checks = 0, failures = 0;

  pattern_regfile #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%02h exp=%02h", what, got, exp);
    end
  endtask

  initial begin
    foreach (shadow[n]) shadow[n] = 8'hFF;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < L; n++) begin
      raddr_a = 4'(n); raddr_b = 4'(L - 1 - n);
      #1;
      check("reset A", rdata_a, 8'hFF);
      check("reset B", rdata_b, 8'hFF);
    end
    check("reset first", rd_first, 8'hFF);

    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // reads of the state before this cycle's write
      raddr_a = 4'($urandom_range(0, L - 1));
      raddr_b = 4'($urandom_range(0, L - 1));
      we      = ($urandom_range(0, 3) != 0);
      waddr   = 4'($urandom_range(0, L - 1));
      wdata   = 8'($urandom);
      #1;
      check("A", rdata_a, shadow[raddr_a]);
      check("B", rdata_b, shadow[raddr_b]);
      check("first", rd_first, shadow[0]);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < L; n++) begin
      raddr_a = 4'(n); raddr_b = 4'(n);
      #1;
      check("final A", rdata_a, shadow[n]);
      check("final B", rdata_b, shadow[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
