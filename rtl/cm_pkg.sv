// cm_pkg: shared types and constants of the content-matching processors.
//
// A pattern is stored as a string of 8-bit characters terminated by an end
// code. The 8-bit character width and the end code 8'hFF ("11111111") are the
// values used for the reference configuration of the design; the register
// file depth of 16 entries (4 address bits) is likewise the reference size.
// The names of the k-FSM states follow the three states s_0, s_{0-1} and s_2
// of the approximate matcher's error-count machine.
package cm_pkg;

  localparam int unsigned CHAR_W = 8;
  localparam int unsigned DEPTH  = 16;

  typedef logic [CHAR_W-1:0] char_t;

  // End-of-pattern code stored after the last pattern character.
  localparam char_t END_CHAR = 8'hFF;

  // Error-count FSM of the approximate matcher.
  //   K_S0   (s_0)     : no error pending, k = 0
  //   K_S0_1 (s_{0-1}) : a character was repeated (insertion or first half
  //                      of a substitution), k = 1
  //   K_S2   (s_2)     : a pattern character was skipped (deletion or second
  //                      half of a substitution), k = 1
  typedef enum logic [1:0] {
    K_S0   = 2'd0,
    K_S0_1 = 2'd1,
    K_S2   = 2'd2
  } k_state_t;

endpackage
