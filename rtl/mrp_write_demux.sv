// mrp_write_demux: steers the single write port to one MRP memory column.
//
// The memory has one write port, as wide as the external bus (one row, i.e.
// 8 pixels at the default 64 bits). The column select picks which of the N
// columns receives the write: only that column sees its write enable, the
// write address and the write data; the other columns see zeros.
//
// Interface: we, col_sel, waddr, wdata in; per-column col_we, col_waddr and
// col_wdata out. Purely combinational. A col_sel at or above N writes nothing.
//
// Follows the document: one write port whose data and address are routed to
// the column chosen by select lines. Own choice: the document's separate data
// select and address select lines are carried as one column select, since
// both name the same column.
module mrp_write_demux #(
  parameter int unsigned W  = mrp_pkg::ROW_W,
  parameter int unsigned D  = mrp_pkg::DEPTH,
  parameter int unsigned N  = mrp_pkg::COLS,
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          we,
  input  logic [CW-1:0] col_sel,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  output logic          col_we    [N],
  output logic [AW-1:0] col_waddr [N],
  output logic [W-1:0]  col_wdata [N]
);

  // At most one column is written per clock.
  always_comb begin
    int unsigned n_we;
    n_we = 0;
    for (int unsigned c = 0; c < N; c++) n_we += 32'(col_we[c]);
    a_one_column: assert (n_we <= 1);
  end

  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      col_we[c]    = 1'b0;
      col_waddr[c] = '0;
      col_wdata[c] = '0;
      if (we && (32'(col_sel) == c)) begin
        col_we[c]    = 1'b1;
        col_waddr[c] = waddr;
        col_wdata[c] = wdata;
      end
    end
  end

endmodule
