// mrp_column: one column of the multiplexed-read-port (MRP) memory.
//
// The column holds D rows of W bits in flip-flops. A single write port stores
// wdata into row waddr on the rising clock edge when we is high. Each of the
// M read ports is a D-to-1 multiplexer over all rows whose select is that
// port's own read address, so every port can read any row, and any number of
// ports can read the same row, in the same cycle without arbitration.
//
// Timing: reads are combinational from the stored rows (no read latency inside
// the column); the enclosing memory registers the selected data. A read of the
// row being written in the same cycle returns the old contents; the new row is
// visible from the next cycle on, so a read waits for a write to complete.
// A read address at or above D returns zero.
//
// Follows the document: one write port, m read-port multiplexers, each selected
// by its read address, d rows. Own choices: flip-flop storage cleared by the
// asynchronous active-low reset, and zero for an out-of-range read address.
module mrp_column #(
  parameter int unsigned W  = mrp_pkg::ROW_W,
  parameter int unsigned D  = mrp_pkg::DEPTH,
  parameter int unsigned M  = mrp_pkg::RPORTS,
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  // M read ports
  input  logic [AW-1:0] raddr [M],
  output logic [W-1:0]  rdata [M]
);

  logic [W-1:0] rows [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned r = 0; r < D; r++) rows[r] <= '0;
    end else if (we && (32'(waddr) < D)) begin
      rows[waddr] <= wdata;
    end
  end

  // One D-to-1 multiplexer per read port; the read address is its select.
  always_comb begin
    for (int unsigned p = 0; p < M; p++) begin
      rdata[p] = '0;
      if (32'(raddr[p]) < D) rdata[p] = rows[raddr[p]];
    end
  end

endmodule
