// sorter_pkg: types shared by the processors of the linear systolic sorter.
//
// Each processor of the sorter alternates between two significant phases
// for every set of numbers that streams through it:
//   PH_COMPUTE - compare-exchange: keep the larger value, pass the smaller on;
//   PH_FORWARD - unloading: pass on, two ticks later, the results ejected by
//                the processors to its left.
// The one-tick transition between them is not a phase of its own: it is
// signalled by the "last" control bit and handled in the same cycle.
package sorter_pkg;

  typedef enum logic {
    PH_COMPUTE = 1'b0,
    PH_FORWARD = 1'b1
  } phase_t;

endpackage
