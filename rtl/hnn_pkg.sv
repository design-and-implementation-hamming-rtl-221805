// hnn_pkg: types and helper functions shared by the Hamming network RTL.
//
// hnn_sw_t bundles the nine one-bit inputs of the gate-level network in
// the order of the board's slide switches SW8..SW0 (bit 0 = SW0 = b1),
// so that a 9-bit switch word can be cast straight onto it. The switch
// order follows the board's pin table; packing them into one struct is a
// choice of this RTL.
//
// rc_state_t is the state of the recurrent (competitive) layer's
// iteration controller. The functions are the two transfer functions the
// network uses: the linear one of the feed-forward layer and the
// positive-linear one of the recurrent layer.
package hnn_pkg;

  typedef struct packed {
    logic w23;  // SW8
    logic w22;  // SW7
    logic w21;  // SW6
    logic w12;  // SW5
    logic p2;   // SW4
    logic w11;  // SW3
    logic p1;   // SW2
    logic b2;   // SW1
    logic b1;   // SW0
  } hnn_sw_t;

  typedef enum logic [1:0] {
    RC_IDLE = 2'd0,  // waiting for start
    RC_ITER = 2'd1   // competing, one update per clock
  } rc_state_t;

  // Positive-linear transfer: negative values become zero.
  function automatic int poslin(input int x);
    return (x < 0) ? 0 : x;
  endfunction

endpackage
