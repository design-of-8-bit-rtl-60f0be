// cm_ref_pkg: cycle-level reference models of the two matching processors,
// written as plain software over an array of pattern characters, for the
// testbenches to compare the RTL against.
//
// A model holds the pattern (without its end code), the pattern position i
// and, for the approximate matcher, the error count k. For each cycle,
// `match_now()` gives the output for the current position and `step(y)`
// consumes the stream character y of that cycle. Position n (= pattern
// length) stands for the end code. An empty pattern never matches.
package cm_ref_pkg;

  class exact_ref;
    logic [7:0] pat[$];
    int         i;

    function new();
      i = 0;
    endfunction

    function bit match_now();
      return (pat.size() > 0) && (i == pat.size());
    endfunction

    function void step(logic [7:0] y);
      int n = pat.size();
      bit rs = (n > 0) && (y == pat[0]);
      if (n == 0)              i = 0;
      else if (i == n)         i = rs ? 1 : 0;
      else if (y == pat[i])    i = i + 1;
      else if (rs)             i = 1;
      else                     i = 0;
    endfunction
  endclass

  class approx_ref;
    logic [7:0] pat[$];
    int         i;
    bit         k;
    // event counters: repetitions (insertion), jumps (deletion),
    // abandoned partial matches
    int         n_repeat, n_jump, n_giveup;

    function new();
      i = 0; k = 0; n_repeat = 0; n_jump = 0; n_giveup = 0;
    endfunction

    function bit match_now();
      return (pat.size() > 0) && (i == pat.size());
    endfunction

    function void step(logic [7:0] y);
      int n = pat.size();
      bit rs = (n > 0) && (y == pat[0]);
      if (n == 0) begin
        i = 0; k = 0;
      end else if (i == n) begin
        i = rs ? 1 : 0; k = 0;
      end else if (y == pat[i]) begin
        i = i + 1; k = 0;
      end else if ((i + 1 < n) && (y == pat[i+1])) begin
        i = i + 2; k = 1; n_jump++;
      end else if (!k) begin
        k = 1; n_repeat++;
      end else begin
        i = rs ? 1 : 0; k = 0; n_giveup++;
      end
    endfunction
  endclass

endpackage
