// mrp_switch_box: connects the output read ports of the MRP memory to the
// columns' read ports and registers the read data.
//
// Column c has M_COL[c] read ports (M for every column by default); there are
// P = M_COL[0] + ... + M_COL[N-1] output read ports, numbered column group by
// column group (see mrp_pkg). Each output port k carries its own request:
// rd_en, a column rd_col and a row rd_row. Port k has a fixed home slot h, its
// place inside its group, and reaches column c through that column's read
// port h mod M_COL[c] (with equal M_COL this is simply k mod M). So when each
// group reads its own column, or the groups read the columns in any
// permutation, all P requests are served in the same clock. Requests that
// need the same column port are all served if they ask for the same row: the
// row is shared at no cost. If they ask for different rows the
// lower-numbered output port gets the column port and the others are refused
// (rd_conflict) rather than delayed. A request for a column at or above N is
// neither served nor flagged.
//
// Timing: one clock of latency. The request is sampled with the column data on
// a rising edge; rd_data, rd_valid and rd_conflict hold the result from that
// edge until the next. rd_data is zero when rd_valid is low. Asynchronous
// active-low reset clears the outputs.
//
// Follows the document: N columns with their own read-port counts, the read
// addresses entering the switch box and one read data output per read port,
// any subset of ports usable in a clock. Own choices: the slot mapping, the
// fixed priority for a conflicting request, the conflict flag and the output
// register.
module mrp_switch_box #(
  parameter int unsigned     W     = mrp_pkg::ROW_W,
  parameter int unsigned     D     = mrp_pkg::DEPTH,
  parameter int unsigned     N     = mrp_pkg::COLS,
  parameter int unsigned     M     = mrp_pkg::RPORTS,
  parameter mrp_pkg::ports_t M_COL = '{default: M},
  localparam int unsigned P  = mrp_pkg::total_ports(M_COL, N),
  localparam int unsigned MX = mrp_pkg::max_ports(M_COL, N),
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // output-side read requests
  input  logic          rd_en       [P],
  input  logic [CW-1:0] rd_col      [P],
  input  logic [AW-1:0] rd_row      [P],
  // column side; slots at or above M_COL[c] are unused
  output logic [AW-1:0] col_raddr   [N][MX],
  input  logic [W-1:0]  col_rdata   [N][MX],
  // registered read results
  output logic [W-1:0]  rd_data     [P],
  output logic          rd_valid    [P],
  output logic          rd_conflict [P]
);

  logic         port_used [N][MX];
  logic         served    [P];
  logic         refused   [P];
  logic [W-1:0] sel_data  [P];

  // Column port that output port k uses in column c.
  function automatic int unsigned slot_of(int unsigned k, int unsigned c);
    return mrp_pkg::home_slot(M_COL, N, k) % M_COL[c];
  endfunction

  // Address routing: the first request that needs a column port claims it.
  always_comb begin
    for (int unsigned c = 0; c < N; c++) begin
      for (int unsigned j = 0; j < MX; j++) begin
        port_used[c][j] = 1'b0;
        col_raddr[c][j] = '0;
      end
    end
    for (int unsigned k = 0; k < P; k++) begin
      for (int unsigned c = 0; c < N; c++) begin
        if (rd_en[k] && (32'(rd_col[k]) == c) && !port_used[c][slot_of(k, c)]) begin
          port_used[c][slot_of(k, c)] = 1'b1;
          col_raddr[c][slot_of(k, c)] = rd_row[k];
        end
      end
    end
  end

  // Data selection: a request is served when its column port carries its row.
  always_comb begin
    for (int unsigned k = 0; k < P; k++) begin
      served[k]   = 1'b0;
      refused[k]  = 1'b0;
      sel_data[k] = '0;
      for (int unsigned c = 0; c < N; c++) begin
        if (rd_en[k] && (32'(rd_col[k]) == c)) begin
          if (col_raddr[c][slot_of(k, c)] == rd_row[k]) begin
            served[k]   = 1'b1;
            sel_data[k] = col_rdata[c][slot_of(k, c)];
          end else begin
            refused[k] = 1'b1;
          end
        end
      end
    end
  end

  // A request is either served or refused, never both (reset clears both).
  for (genvar k = 0; k < P; k++) begin : g_chk
    a_one_outcome: assert property (@(posedge clk) !(rd_valid[k] && rd_conflict[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < P; k++) begin
        rd_data[k]     <= '0;
        rd_valid[k]    <= 1'b0;
        rd_conflict[k] <= 1'b0;
      end
    end else begin
      for (int unsigned k = 0; k < P; k++) begin
        rd_data[k]     <= sel_data[k];
        rd_valid[k]    <= served[k];
        rd_conflict[k] <= refused[k];
      end
    end
  end

endmodule
