// tb_mrp_column: self-checking testbench for one MRP memory column.
//
// Writes random rows while the M read ports read random addresses, often the
// same row on several ports. A reference copy of the rows, updated only at the
// clock edge, gives the expected read data: combinational reads return the
// stored row, a row written in the current cycle still reads old, and the new
// value appears after the edge. Also checks the reset contents and that an
// out-of-range read address (D = 12 is not a power of two) returns zero.
module tb_mrp_column;
  localparam int unsigned W  = 64;
  localparam int unsigned D  = 12;
  localparam int unsigned M  = 5;
  localparam int unsigned AW = $clog2(D);

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [AW-1:0] raddr [M];
  logic [W-1:0]  rdata [M];

  logic [W-1:0]  ref_rows [D];
  int checks = 0, failures = 0, shared = 0;

  mrp_column #(.W(W), .D(D), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int p = 0; p < M; p++) begin
      logic [W-1:0] exp;
      exp = (32'(raddr[p]) < D) ? ref_rows[raddr[p]] : '0;
      checks++;
      if (rdata[p] !== exp) begin
        failures++;
        if (failures < 10)
          $display("port %0d addr %0d: got %h want %h", p, raddr[p], rdata[p], exp);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < D; r++) ref_rows[r] = '0;
    for (int p = 0; p < M; p++) raddr[p] = AW'(p);
    #1 rst_n = 1'b0;                    // asynchronous reset
    #1;
    check_reads();                      // reset contents are zero
    @(negedge clk) rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      waddr = AW'($urandom_range(0, D - 1));
      wdata = {$urandom, $urandom};
      for (int p = 0; p < M; p++) begin
        case ($urandom_range(0, 3))
          0: raddr[p] = waddr;                        // read the row being written
          1: raddr[p] = (p > 0) ? raddr[0] : waddr;   // same row as port 0
          2: raddr[p] = AW'($urandom_range(0, 15));   // may be out of range
          default: raddr[p] = AW'($urandom_range(0, D - 1));
        endcase
      end
      if (raddr[1] == raddr[0]) shared++;
      #1;
      check_reads();                    // old contents before the edge
      @(posedge clk);
      if (we) ref_rows[waddr] = wdata;
      #1;
      check_reads();                    // new contents after the edge
    end
    if (shared == 0) begin
      failures++;
      $display("no shared-row read happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
