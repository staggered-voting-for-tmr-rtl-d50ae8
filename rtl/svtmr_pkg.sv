// svtmr_pkg: types and constants shared by the staggered-voting TMR
// shift-register chain.
//
// The chain is triple modular redundant: every stage holds three shift
// register (S/R) cells, one per copy of the chain, and a single
// two-out-of-three majority voter. The voter of stage s sits on chain
// (s mod 3), so the voter position walks 0, 1, 2, 0, ... down the chain
// (the canonical staggered topology).
//
// A manufacturing defect is modelled as an element output stuck at a fixed
// level. Every S/R cell and every voter takes a defect_t input for that; a
// real panel ties it to NO_DEFECT and synthesis removes the override. The
// defect model (stuck-at on the element output) is this design's choice;
// the analysis it supports only speaks of an element "not working".
package svtmr_pkg;

  // Number of redundant copies of the chain. The voter is a 2-of-3 voter,
  // so this is fixed at three.
  localparam int unsigned NMR = 3;

  // Stuck-at defect of one element: when stuck is set, the element output
  // is value, whatever the element computes.
  typedef struct packed {
    logic stuck;
    logic value;
  } defect_t;

  localparam defect_t NO_DEFECT = '{stuck: 1'b0, value: 1'b0};

  // Chain (0..NMR-1) that carries the voter of stage `stage`, and hence the
  // only chain whose next-stage S/R is fed by that voter.
  function automatic int unsigned voter_chain(input int unsigned stage);
    return stage % NMR;
  endfunction

  // Output of an element with a possible stuck-at defect.
  function automatic logic apply_defect(input logic good, input defect_t d);
    return d.stuck ? d.value : good;
  endfunction

endpackage
