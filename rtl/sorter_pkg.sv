// sorter_pkg: types shared by the compressor blocks.
//
// ctrl_mode_e selects how the baseline-swap compressor is driven from one
// time slot to the next: as a cyclic 0-1 sorter whose starting output address
// is supplied from outside (a start address of zero makes it a plain 0-1
// sorter), or in the alternating input-fairness mode. slot_e names the two
// kinds of fairness time slot: in slot A the upper inputs have precedence,
// in slot B the lower ones do. The encodings are this design's choice.
package sorter_pkg;

  typedef enum logic {
    MODE_CYCLIC = 1'b0,  // start address taken from the d_start input
    MODE_FAIR   = 1'b1   // slots A and B alternate
  } ctrl_mode_e;

  typedef enum logic {
    SLOT_A = 1'b0,  // D = 0, running parities as computed
    SLOT_B = 1'b1   // D = number of active inputs, running parities inverted
  } slot_e;

endpackage
