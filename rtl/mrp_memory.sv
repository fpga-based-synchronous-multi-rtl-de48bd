// mrp_memory: multiplexed-read-port (MRP) local pixel memory for motion
// estimation, with one write port and many synchronous read ports.
//
// The memory is split into N columns (mrp_column), each D rows of W bits; at
// the defaults a row is 8 luminance pixels and the two columns of 16 rows hold
// one 16x16 block. One write port, as wide as the external bus, writes one row
// of one column per clock (mrp_write_demux picks the column). Each column has
// its own read ports, built as multiplexers over its rows: M per column by
// default, or M_COL[c] for column c when M_COL is given. The switch box
// (mrp_switch_box) connects the P = M_COL[0] + ... + M_COL[N-1] output read
// ports (N*M by default) to them, so up to P rows, the same row as often as
// wanted, are read in one clock.
//
// Interface:
//   wr_en, wr_col, wr_addr, wr_data          write row wr_addr of column wr_col
//   rd_en[k], rd_col[k], rd_row[k]           read request of output port k
//   rd_data[k], rd_valid[k], rd_conflict[k]  its result, one clock later
// With equal port counts, output port k uses read port (k mod M) of the
// column it names; mrp_switch_box gives the general rule and what happens
// when two requests need one column port.
//
// Timing: a read request presented before a rising edge is answered right
// after that edge (latency 1). A write becomes visible to reads sampled at the
// next edge; a read of a row in the same clock it is written returns the old
// data. Reset (asynchronous, active low) clears the rows and the outputs.
//
// Follows the document: the column / write-select / switch-box structure, one
// write port, 64-bit rows, d = 16, N = 2, M = 5 as defaults, and a read-port
// count that may differ per column. Own choices: the reset, the read latency
// of one clock, and the switch-box routing rule.
module mrp_memory #(
  parameter int unsigned W  = mrp_pkg::ROW_W,
  parameter int unsigned D  = mrp_pkg::DEPTH,
  parameter int unsigned N  = mrp_pkg::COLS,
  parameter int unsigned M  = mrp_pkg::RPORTS,
  parameter mrp_pkg::ports_t M_COL = '{default: M},
  localparam int unsigned P  = mrp_pkg::total_ports(M_COL, N),
  localparam int unsigned MX = mrp_pkg::max_ports(M_COL, N),
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [CW-1:0] wr_col,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  // P read ports
  input  logic          rd_en       [P],
  input  logic [CW-1:0] rd_col      [P],
  input  logic [AW-1:0] rd_row      [P],
  output logic [W-1:0]  rd_data     [P],
  output logic          rd_valid    [P],
  output logic          rd_conflict [P]
);

  logic          col_we    [N];
  logic [AW-1:0] col_waddr [N];
  logic [W-1:0]  col_wdata [N];
  logic [AW-1:0] col_raddr [N][MX];
  logic [W-1:0]  col_rdata [N][MX];

  mrp_write_demux #(.W(W), .D(D), .N(N)) u_wr_demux (
    .we       (wr_en),
    .col_sel  (wr_col),
    .waddr    (wr_addr),
    .wdata    (wr_data),
    .col_we   (col_we),
    .col_waddr(col_waddr),
    .col_wdata(col_wdata)
  );

  for (genvar c = 0; c < N; c++) begin : g_col
    logic [AW-1:0] raddr [M_COL[c]];
    logic [W-1:0]  rdata [M_COL[c]];

    for (genvar j = 0; j < MX; j++) begin : g_slot
      if (j < M_COL[c]) begin : g_used
        assign raddr[j]        = col_raddr[c][j];
        assign col_rdata[c][j] = rdata[j];
      end else begin : g_unused
        assign col_rdata[c][j] = '0;
      end
    end

    mrp_column #(.W(W), .D(D), .M(M_COL[c])) u_col (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (col_we[c]),
      .waddr(col_waddr[c]),
      .wdata(col_wdata[c]),
      .raddr(raddr),
      .rdata(rdata)
    );
  end

  mrp_switch_box #(.W(W), .D(D), .N(N), .M(M), .M_COL(M_COL)) u_switch (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_en      (rd_en),
    .rd_col     (rd_col),
    .rd_row     (rd_row),
    .col_raddr  (col_raddr),
    .col_rdata  (col_rdata),
    .rd_data    (rd_data),
    .rd_valid   (rd_valid),
    .rd_conflict(rd_conflict)
  );

endmodule
