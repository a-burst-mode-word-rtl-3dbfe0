// aer_pkg: shared helper for the clocked production-rule model of the
// burst-mode address-event receiver.
//
// Every state-holding gate of the asynchronous receiver (C-element,
// staticized node) is modelled as one flip-flop. Its next value follows the
// gate's pull-up guard (set) and pull-down guard (clr); when neither guard is
// true the node keeps its value, as the staticizer would. The guards of a
// correct production-rule set never fire together; if they do, the node
// keeps its value.
package aer_pkg;

  function automatic logic prs_next(input logic set, input logic clr, input logic q);
    if (set && !clr) return 1'b1;
    if (clr && !set) return 1'b0;
    return q;
  endfunction

endpackage
