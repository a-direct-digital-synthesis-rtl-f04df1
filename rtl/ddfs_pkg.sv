// ddfs_pkg: types shared by the amplitude-sequencing DDFS modules.
//
// The generator moves a point around a circle one unit step at a time,
// either along x or along y.  step_e names the step chosen for the next
// sample; STEP_NONE is used only when the point sits at the origin
// (amplitude word zero) and no step exists.
package ddfs_pkg;

  typedef enum logic [1:0] {
    STEP_NONE = 2'd0,
    STEP_X    = 2'd1,
    STEP_Y    = 2'd2
  } step_e;

endpackage
