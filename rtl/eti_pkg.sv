// eti_pkg: constants shared by the ETI (embedded transition inversion) link.
//
// WL_DEFAULT is the word length of the main configuration: eight parallel bits
// are multiplexed onto one serial line. nth_of() gives the inversion threshold,
// half the word length: a word whose bit transitions N_t reach that threshold is
// sent inverted and phase encoded.
package eti_pkg;

  localparam int unsigned WL_DEFAULT = 8;

  function automatic int unsigned nth_of(input int unsigned wl);
    return wl / 2;
  endfunction

endpackage
