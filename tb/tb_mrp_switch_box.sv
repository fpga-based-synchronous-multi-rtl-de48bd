// tb_mrp_switch_box: self-checking testbench for the MRP switch box.
//
// The columns are replaced by a model whose read port j of column c returns
// the word {c, j, row address}, so the data an output port receives tells
// which column port served it. Requests are drawn in three patterns: every
// port of a column group reading that column (all N*M ports served at once),
// every port reading one shared row, and random requests that provoke
// conflicts. The expected valid/conflict/data is derived from the rule "the
// lowest enabled output port of a slot that names a column owns that column's
// port; others naming the same column share it only for the same row", and is
// checked one clock after the request, with the previous result still on the
// outputs before that edge.
module tb_mrp_switch_box;
  localparam int unsigned W  = 32;
  localparam int unsigned D  = 16;
  localparam int unsigned N  = 3;
  localparam int unsigned M  = 4;
  localparam int unsigned P  = N * M;
  localparam int unsigned AW = 4;
  localparam int unsigned CW = 2;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          rd_en       [P];
  logic [CW-1:0] rd_col      [P];
  logic [AW-1:0] rd_row      [P];
  logic [AW-1:0] col_raddr   [N][M];
  logic [W-1:0]  col_rdata   [N][M];
  logic [W-1:0]  rd_data     [P];
  logic          rd_valid    [P];
  logic          rd_conflict [P];

  logic [W-1:0]  exp_data [P];
  logic          exp_val  [P];
  logic          exp_conf [P];
  int checks = 0, failures = 0;
  int n_all_served = 0, n_conflict = 0, n_shared = 0, n_badcol = 0;

  mrp_switch_box #(.W(W), .D(D), .N(N), .M(M)) dut (.*);

  // column model
  always_comb
    for (int c = 0; c < N; c++)
      for (int j = 0; j < M; j++)
        col_rdata[c][j] = {8'(c), 8'(j), 16'(col_raddr[c][j])};

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compute_expected();
    int nserved;
    nserved = 0;
    for (int k = 0; k < P; k++) begin
      int owner;
      owner = -1;
      for (int q = 0; q < P; q++)
        if (owner < 0 && rd_en[q] && (q % M) == (k % M) && rd_col[q] == rd_col[k])
          owner = q;
      exp_val[k]  = rd_en[k] && (int'(rd_col[k]) < N) && (rd_row[owner] == rd_row[k]);
      exp_conf[k] = rd_en[k] && (int'(rd_col[k]) < N) && !exp_val[k];
      exp_data[k] = exp_val[k] ? {8'(rd_col[k]), 8'(k % M), 16'(rd_row[k])} : '0;
      if (exp_val[k]) nserved++;
      if (exp_conf[k]) n_conflict++;
      if (exp_val[k] && owner != k) n_shared++;
      if (rd_en[k] && int'(rd_col[k]) >= N) n_badcol++;
    end
    if (nserved == int'(P)) n_all_served++;
  endtask

  task automatic check_outputs(string when);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (rd_valid[k] !== exp_val[k] || rd_conflict[k] !== exp_conf[k] ||
          rd_data[k] !== exp_data[k]) begin
        failures++;
        if (failures < 10)
          $display("%s port %0d: v=%0d c=%0d d=%h, want v=%0d c=%0d d=%h", when, k,
                   rd_valid[k], rd_conflict[k], rd_data[k], exp_val[k], exp_conf[k], exp_data[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < P; k++) begin
      rd_en[k] = 1'b0; rd_col[k] = '0; rd_row[k] = '0;
      exp_val[k] = 1'b0; exp_conf[k] = 1'b0; exp_data[k] = '0;
    end
    #1 rst_n = 1'b0;
    #1 check_outputs("reset");
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int pat;
      logic [AW-1:0] srow;
      logic [CW-1:0] scol;
      pat  = $urandom_range(0, 3);
      srow = AW'($urandom);
      scol = CW'($urandom_range(0, N - 1));
      @(negedge clk);
      for (int k = 0; k < P; k++) begin
        case (pat)
          0: begin rd_en[k] = 1'b1; rd_col[k] = CW'(k / M); rd_row[k] = AW'($urandom); end
          1: begin rd_en[k] = 1'b1; rd_col[k] = scol; rd_row[k] = srow; end
          default: begin
            rd_en[k]  = ($urandom_range(0, 4) != 0);
            rd_col[k] = CW'($urandom_range(0, N));      // N itself is out of range
            rd_row[k] = AW'($urandom_range(0, 3));
          end
        endcase
      end
      #1 check_outputs("hold");                         // previous result still held
      @(posedge clk);
      compute_expected();
      #1 check_outputs("result");
    end
    if (n_all_served == 0) begin failures++; $display("never served all ports"); end
    if (n_conflict == 0)   begin failures++; $display("never a conflict"); end
    if (n_shared == 0)     begin failures++; $display("never a shared port"); end
    if (n_badcol == 0)     begin failures++; $display("never a bad column"); end
    $display("all-served=%0d conflicts=%0d shared=%0d badcol=%0d",
             n_all_served, n_conflict, n_shared, n_badcol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
