// mrp_pkg: default sizes and port-numbering helpers shared by the
// multiplexed-read-port (MRP) memory.
//
// The MRP memory stores a block of luminance pixels for a motion-estimation
// engine. Each memory row is one external-bus word of ROW_W bits, i.e.
// ROW_W/PIX_W pixels. The defaults are the evaluated configuration: a 64-bit
// row (8 pixels of 8 bits), 16 rows per column, 2 columns (a 16x16 block as
// used by H.264/AVC) and 5 read ports per column. An HEVC 64x64 block is
// obtained with COLS = 8 and DEPTH = 64.
//
// The number of read ports may differ from column to column. It is given as a
// ports_t array, one entry per column (entries past the last column are
// ignored). The N*M output read ports are numbered column group by column
// group: the first ports_of[0] output ports form column 0's group, the next
// ports_of[1] column 1's, and so on. An output port's "home slot" is its
// position inside its group.
package mrp_pkg;

  localparam int unsigned PIX_W    = 8;   // bits per luminance pixel
  localparam int unsigned ROW_W    = 64;  // bits per memory row = write-bus width
  localparam int unsigned DEPTH    = 16;  // rows per column ('d')
  localparam int unsigned COLS     = 2;   // memory columns ('N')
  localparam int unsigned RPORTS   = 5;   // read ports per column ('M')
  localparam int unsigned MAX_COLS = 64;  // largest column count a ports_t can describe

  typedef int unsigned ports_t [MAX_COLS];

  // Total number of read ports of the first n columns.
  function automatic int unsigned total_ports(ports_t ports_of, int unsigned n);
    int unsigned s = 0;
    for (int unsigned c = 0; c < n; c++) s += ports_of[c];
    return s;
  endfunction

  // Largest read-port count among the first n columns.
  function automatic int unsigned max_ports(ports_t ports_of, int unsigned n);
    int unsigned mx = 1;
    for (int unsigned c = 0; c < n; c++) if (ports_of[c] > mx) mx = ports_of[c];
    return mx;
  endfunction

  // Home slot of output port k: its position inside its column group.
  function automatic int unsigned home_slot(ports_t ports_of, int unsigned n, int unsigned k);
    int unsigned first = 0;
    for (int unsigned c = 0; c < n; c++) begin
      if (k < first + ports_of[c]) return k - first;
      first += ports_of[c];
    end
    return 0;
  endfunction

endpackage
