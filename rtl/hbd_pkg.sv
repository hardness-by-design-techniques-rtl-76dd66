// hbd_pkg: constants shared by the triple-modular-redundant (TMR) counter
// family. The count width of 8 bits is the counter size used throughout the
// hardening study; the redundancy factor of three is what TMR means. Modules
// take the width as a parameter whose default comes from here.
package hbd_pkg;

  // Width of every counter, incrementer and voter word.
  localparam int unsigned COUNT_W = 8;

  // Number of redundant copies in every TMR structure.
  localparam int unsigned N_COPIES = 3;

endpackage
