// pattern_regfile: the L x 8 register file holding one pattern.
//
// Characters x[0], x[1], ... of the pattern are stored at consecutive
// addresses from 0, followed by the end code. The file has one synchronous
// write port (write enable, address, data), used to load, change or delete a
// pattern while the matcher keeps running, and two asynchronous read ports,
// PortA and PortB, whose data follow their addresses in the same cycle. A
// third read output, `rd_first`, always presents x[0]; the approximate
// matcher needs it for its restart comparator (in the exact matcher PortB's
// address is tied to 0 for the same purpose).
//
// The depth (16 entries by default) and the one-write/two-read organisation
// follow the design; the extra x[0] output, the reset of all entries to the
// end code (an empty unit) and the write port's timing are choices of this
// implementation. A write to an address that is also being read becomes
// visible on the read ports in the cycle after the clock edge.
//
//   clk, rst_n          : clock, asynchronous active-low reset
//   we, waddr, wdata    : write port
//   raddr_a / rdata_a   : PortA
//   raddr_b / rdata_b   : PortB
//   rd_first            : contents of address 0
module pattern_regfile
  import cm_pkg::*;
#(
  parameter int unsigned L  = DEPTH,
  parameter int unsigned AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  char_t         wdata,
  input  logic [AW-1:0] raddr_a,
  output char_t         rdata_a,
  input  logic [AW-1:0] raddr_b,
  output char_t         rdata_b,
  output char_t         rd_first
);

  char_t mem [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < L; n++) mem[n] <= END_CHAR;
    end else if (we && (32'(waddr) < L)) begin
      mem[waddr] <= wdata;
    end
  end

  // Addresses beyond L (possible only when L is not a power of two) read
  // as the end code.
  always_comb begin
    rdata_a  = (32'(raddr_a) < L) ? mem[raddr_a] : END_CHAR;
    rdata_b  = (32'(raddr_b) < L) ? mem[raddr_b] : END_CHAR;
    rd_first = mem[0];
  end

endmodule
