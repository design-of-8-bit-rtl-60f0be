// exact_ctrl: control unit of the exact content-matching processor.
//
// The control unit is a binary up counter whose count is the PortA address
// i of the register file, i.e. the index of the pattern character x[i] that
// the next input character y must equal. Each clock edge it moves on the
// status signals of the datapath:
//
//   at_end            -> i := 1 if the current input equals x[0], else 0
//   Next    (x[i]==y) -> i := i + 1
//   Restart (x[0]==y) -> i := 1   (the mismatching character starts a new try)
//   otherwise         -> i := 0
//
// The three lower rows are the brute-force algorithm of the design. The
// at_end row is the end-of-pattern step (Output := 1; i := 0); this
// implementation also lets the character seen in that cycle start a new
// match through the Restart comparator, so back-to-back occurrences are not
// lost. With an empty register file (`empty`) the counter stays at 0.
//
// Interface: clk, asynchronous active-low rst_n (i := 0); status inputs
// next, restart, at_end, empty (combinational from the datapath); output
// addr = i, registered, changing one clock edge after the status it
// depends on.
module exact_ctrl #(
  parameter int unsigned AW = $clog2(cm_pkg::DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          next,
  input  logic          restart,
  input  logic          at_end,
  input  logic          empty,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] addr_d;
  logic          restart_ok;

  always_comb begin
    restart_ok = restart && !empty;
    if (at_end)          addr_d = restart_ok ? AW'(1) : '0;
    else if (next)       addr_d = addr + AW'(1);
    else if (restart_ok) addr_d = AW'(1);
    else                 addr_d = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else        addr <= addr_d;
  end

endmodule
