// tb_mrp_memory: end-to-end testbench of the MRP memory at its default size
// (64-bit rows of 8 pixels, 16 rows, 2 columns, 5 read ports per column).
//
// 1. Reset, then load one 16x16 block of 8-bit pixels, one 8-pixel row per
//    clock; the load must take 16*16/8 = 32 clocks.
// 2. Read the whole block back through all 10 ports at once: ports 0-4 read
//    column 0, ports 5-9 column 1; 32 rows at 10 per clock arrive in
//    ceil(16/5) = 4 clocks, each one clock after its request.
// 3. Random traffic: writes into random rows while the ports read random,
//    often identical, rows; some ports idle; some requests collide on a
//    column port. A reference copy of the memory and the switch-box rule
//    give the expected data, valid and conflict flags one clock later.
// Each mechanism (all ports served in one clock, one row read by several
// ports, a read of a row in the cycle it is written returning the old row, a
// refused conflicting request, an idle port) is counted and must occur.
module tb_mrp_memory;
  localparam int unsigned W   = mrp_pkg::ROW_W;
  localparam int unsigned D   = mrp_pkg::DEPTH;
  localparam int unsigned N   = mrp_pkg::COLS;
  localparam int unsigned M   = mrp_pkg::RPORTS;
  localparam int unsigned PIX = mrp_pkg::PIX_W;
  localparam int unsigned PPR = W / PIX;          // pixels per row
  localparam int unsigned MC [N] = '{default: M};  // read ports per column
  localparam int unsigned P   = N * M;
  localparam int unsigned AW  = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned CW  = (N > 1) ? $clog2(N) : 1;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          wr_en = 1'b0;
  logic [CW-1:0] wr_col = '0;
  logic [AW-1:0] wr_addr = '0;
  logic [W-1:0]  wr_data = '0;
  logic          rd_en       [P];
  logic [CW-1:0] rd_col      [P];
  logic [AW-1:0] rd_row      [P];
  logic [W-1:0]  rd_data     [P];
  logic          rd_valid    [P];
  logic          rd_conflict [P];

  logic [W-1:0]  ref_mem  [N][D];
  logic [W-1:0]  exp_data [P];
  logic          exp_val  [P];
  logic          exp_conf [P];
  int checks = 0, failures = 0, cycle = 0;
  int n_all_served = 0, n_shared = 0, n_rdw_old = 0, n_conflict = 0, n_idle = 0;

  mrp_memory dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Column group of output port k, and its position inside the group.
  function automatic int group_of(int k);
    int first = 0;
    for (int c = 0; c < int'(N); c++) begin
      if (k < first + int'(MC[c])) return c;
      first += MC[c];
    end
    return 0;
  endfunction

  function automatic int home_of(int k);
    int first = 0;
    for (int c = 0; c < group_of(k); c++) first += MC[c];
    return k - first;
  endfunction

  // Pixel (x, y) of the test block: x is the pixel column 0..N*PPR-1.
  function automatic logic [PIX-1:0] pixel(int x, int y);
    return PIX'((x * 37 + y * 11 + x * y) ^ 8'h5a);
  endfunction

  // Row y of memory column c, pixel x = c*PPR + i in byte lane i.
  function automatic logic [W-1:0] block_row(int c, int y);
    logic [W-1:0] r;
    for (int i = 0; i < int'(PPR); i++) r[i*PIX +: PIX] = pixel(c * PPR + i, y);
    return r;
  endfunction

  // Expected result of the requests now on the inputs, from memory state
  // before the coming edge.
  task automatic compute_expected();
    int nserved;
    nserved = 0;
    for (int k = 0; k < int'(P); k++) begin
      int owner;
      owner = -1;
      for (int q = 0; q < int'(P); q++)
        if (owner < 0 && rd_en[q] && rd_col[q] == rd_col[k] && int'(rd_col[k]) < N &&
            home_of(q) % MC[rd_col[k]] == home_of(k) % MC[rd_col[k]])
          owner = q;
      exp_val[k]  = rd_en[k] && (int'(rd_col[k]) < N) && (rd_row[owner] == rd_row[k]);
      exp_conf[k] = rd_en[k] && (int'(rd_col[k]) < N) && !exp_val[k];
      exp_data[k] = exp_val[k] ? ref_mem[rd_col[k]][rd_row[k]] : '0;
      if (exp_val[k]) nserved++;
      if (exp_conf[k]) n_conflict++;
      if (!rd_en[k]) n_idle++;
      if (exp_val[k] && wr_en && wr_col == rd_col[k] && wr_addr == rd_row[k] &&
          wr_data != ref_mem[rd_col[k]][rd_row[k]]) n_rdw_old++;
      for (int q = 0; q < k; q++)
        if (exp_val[k] && rd_en[q] && rd_col[q] == rd_col[k] && rd_row[q] == rd_row[k]) begin
          n_shared++;
          break;
        end
    end
    if (nserved == int'(P)) n_all_served++;
  endtask

  task automatic check_outputs(string when);
    for (int k = 0; k < int'(P); k++) begin
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

  // One clock: apply requests (set by the caller), compute what they should
  // return, take the edge, update the reference for the write, and check.
  task automatic step();
    #1 check_outputs("hold");
    compute_expected();
    @(posedge clk);
    if (wr_en && int'(wr_col) < N) ref_mem[wr_col][wr_addr] = wr_data;
    #1 check_outputs("result");
    @(negedge clk);
  endtask

  task automatic idle_ports();
    for (int k = 0; k < int'(P); k++) begin
      rd_en[k] = 1'b0; rd_col[k] = '0; rd_row[k] = '0;
    end
  endtask

  initial begin
    int t0, t1, read_clocks;
    read_clocks = 0;
    for (int c = 0; c < int'(N); c++)
      if ((D + MC[c] - 1) / MC[c] > read_clocks) read_clocks = (D + MC[c] - 1) / MC[c];
    idle_ports();
    for (int c = 0; c < int'(N); c++) for (int r = 0; r < int'(D); r++) ref_mem[c][r] = '0;
    for (int k = 0; k < int'(P); k++) begin
      exp_val[k] = 1'b0; exp_conf[k] = 1'b0; exp_data[k] = '0;
    end
    #1 rst_n = 1'b0;
    #1 check_outputs("reset");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);

    // 1. block load, one row per clock
    t0 = cycle;
    for (int c = 0; c < int'(N); c++)
      for (int y = 0; y < int'(D); y++) begin
        wr_en = 1'b1; wr_col = CW'(c); wr_addr = AW'(y); wr_data = block_row(c, y);
        @(posedge clk);
        ref_mem[c][y] = wr_data;
        @(negedge clk);
      end
    wr_en = 1'b0;
    t1 = cycle;
    checks++;
    if (t1 - t0 != int'(N * D)) begin
      failures++;
      $display("block load took %0d clocks, want %0d", t1 - t0, N * D);
    end

    // 2. whole-block read through all ports: each group reads its column,
    //    MC[c] rows per clock
    t0 = cycle;
    for (int base = 0; base < int'(D); base++) begin
      int any;
      any = 0;
      for (int k = 0; k < int'(P); k++) begin
        rd_col[k] = CW'(group_of(k));
        rd_row[k] = AW'(base * MC[group_of(k)] + home_of(k));
        rd_en[k]  = (base * MC[group_of(k)] + home_of(k)) < D;
        if (rd_en[k]) any = 1;
      end
      if (any == 0) break;
      step();
      for (int k = 0; k < int'(P); k++)
        if (rd_en[k]) begin
          // compare against the pixel function, independent of the reference copy
          checks++;
          if (rd_data[k] !== block_row(group_of(k), int'(rd_row[k]))) begin
            failures++;
            $display("block row %0d col %0d wrong", rd_row[k], group_of(k));
          end
        end
    end
    t1 = cycle;
    checks++;
    if (t1 - t0 != read_clocks) begin
      failures++;
      $display("block read took %0d clocks, want %0d", t1 - t0, read_clocks);
    end
    idle_ports();

    // 3. random traffic
    for (int it = 0; it < 4000; it++) begin
      int pat;
      logic [AW-1:0] srow;
      pat  = $urandom_range(0, 3);
      srow = AW'($urandom);
      wr_en   = ($urandom_range(0, 1) == 1);
      wr_col  = CW'($urandom_range(0, N - 1));
      wr_addr = AW'($urandom);
      wr_data = {$urandom, $urandom};
      for (int k = 0; k < int'(P); k++) begin
        case (pat)
          0: begin                    // each column group reads its column
            rd_en[k] = 1'b1; rd_col[k] = CW'(group_of(k)); rd_row[k] = AW'($urandom);
          end
          1: begin                    // everyone reads the row being written
            rd_en[k] = 1'b1; rd_col[k] = wr_col; rd_row[k] = wr_addr;
          end
          2: begin                    // one shared row, some ports idle
            rd_en[k] = ($urandom_range(0, 2) != 0); rd_col[k] = CW'(group_of(k)); rd_row[k] = srow;
          end
          default: begin              // random, with collisions
            rd_en[k]  = ($urandom_range(0, 3) != 0);
            rd_col[k] = CW'($urandom_range(0, N - 1));
            rd_row[k] = AW'($urandom_range(0, 3));
          end
        endcase
      end
      step();
    end

    if (n_all_served == 0) begin failures++; $display("never all ports served"); end
    if (n_shared == 0)     begin failures++; $display("never a shared row"); end
    if (n_rdw_old == 0)    begin failures++; $display("never a read during write"); end
    if (n_conflict == 0)   begin failures++; $display("never a conflict"); end
    if (n_idle == 0)       begin failures++; $display("never an idle port"); end
    $display("all-served=%0d shared=%0d read-during-write=%0d conflicts=%0d idle=%0d",
             n_all_served, n_shared, n_rdw_old, n_conflict, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
