// rfir_pkg: types and constants shared by the reconfigurable multichannel FIR filter.
//
// The filter is an 8-bit, 16-tap, 8-channel FIR whose single shared multiplier can be
// switched between four multiplier structures (Wallace tree, radix-4 Booth, sequential
// shift-and-add, Dadda). DATA_W, TAPS and CHANNELS are the sizes of the main configuration.
// The multiplier-select encoding and the carry-select adder group sizing helpers are this
// design's own choices.
package rfir_pkg;

  localparam int unsigned DATA_W   = 8;   // sample and coefficient width
  localparam int unsigned TAPS     = 16;  // filter taps H(0)..H(15)
  localparam int unsigned CHANNELS = 8;   // input channels CH1..CH8

  // Control code of the multiplier mux.
  typedef enum logic [1:0] {
    MUL_WALLACE   = 2'd0,
    MUL_BOOTH     = 2'd1,
    MUL_SHIFT_ADD = 2'd2,
    MUL_DADDA     = 2'd3
  } mult_sel_e;

  // Square-root carry-select adder grouping: the first group is a 2-bit ripple adder that
  // takes the real carry-in, then groups of 2, 3, 4, 5, ... bits follow. For 16 bits this is
  // the five groups 2+2+3+4+5; a last group is cut short when the width runs out.
  function automatic int unsigned csla_group_size(int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Bit mask of the first bit of every group.
  function automatic logic [63:0] csla_first_mask(int unsigned width);
    logic [63:0] m;
    int unsigned pos;
    int unsigned g;
    m   = '0;
    pos = 0;
    g   = 0;
    while (pos < width) begin
      m[pos] = 1'b1;
      pos    = pos + csla_group_size(g);
      g      = g + 1;
    end
    return m;
  endfunction

  // Number of groups for a given width.
  function automatic int unsigned csla_num_groups(int unsigned width);
    int unsigned pos;
    int unsigned g;
    pos = 0;
    g   = 0;
    while (pos < width) begin
      pos = pos + csla_group_size(g);
      g   = g + 1;
    end
    return g;
  endfunction

endpackage
