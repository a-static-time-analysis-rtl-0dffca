// sca_pkg: sizes and mode encodings shared by the single-cycle-access (SCA)
// scan structures.
//
// The reference sizes are a page of SW = 32 scan chains, each SD = 31
// registers deep (992 registers per page), and PAGES = 32 pages. The SCAh
// register modes are encoded on se[0:1] exactly as in the mode table of the
// SCAh cell: se[0] is the global scan enable, se[1] the line select.
package sca_pkg;

  localparam int unsigned SW_DEFAULT    = 32;  // scan chains per page
  localparam int unsigned SD_DEFAULT    = 31;  // registers per chain (lines)
  localparam int unsigned PAGES_DEFAULT = 32;  // pages per structure

  // Modes of an SCAh register, value = {se[0], se[1]}.
  typedef enum logic [0:1] {
    SCAH_FUNCTIONAL = 2'b00,  // capture di, so follows si
    SCAH_ASYNC_READ = 2'b01,  // capture di, so shows dout
    SCAH_HOLD       = 2'b10,  // keep dout,  so follows si
    SCAH_WRITE_READ = 2'b11   // capture si, so shows dout
  } scah_mode_e;

  // Width of a line address that holds 0 (no line) and 1..sd.
  function automatic int unsigned addr_width(int unsigned sd);
    return (sd < 1) ? 1 : $clog2(sd + 1);
  endfunction

  // Width of a page index.
  function automatic int unsigned page_width(int unsigned pages);
    return (pages < 2) ? 1 : $clog2(pages);
  endfunction

  // Register stages of a pipelined XOR tree over n words with a register
  // set after every s-th level and after the last level (xor_tree).
  function automatic int unsigned xor_stages(int unsigned n, int unsigned s);
    int unsigned levels;
    int unsigned c;
    levels = (n < 2) ? 0 : $clog2(n);
    c = 0;
    if (levels == 0) return 1;
    for (int unsigned k = 1; k <= levels; k++) begin
      if ((s != 0 && k % s == 0) || k == levels) c++;
    end
    return c;
  endfunction

endpackage
