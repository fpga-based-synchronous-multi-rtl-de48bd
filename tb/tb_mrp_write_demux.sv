// tb_mrp_write_demux: self-checking testbench for the write demultiplexer.
//
// Applies every column select (including ones at or above N, with N = 3) with
// the write enable high and low and random address and data, and checks that
// exactly the selected column sees the enable, address and data while every
// other column sees zeros.
module tb_mrp_write_demux;
  localparam int unsigned W  = 64;
  localparam int unsigned D  = 16;
  localparam int unsigned N  = 3;
  localparam int unsigned AW = 4;
  localparam int unsigned CW = 2;

  logic          we;
  logic [CW-1:0] col_sel;
  logic [AW-1:0] waddr;
  logic [W-1:0]  wdata;
  logic          col_we    [N];
  logic [AW-1:0] col_waddr [N];
  logic [W-1:0]  col_wdata [N];
  int checks = 0, failures = 0;

  mrp_write_demux #(.W(W), .D(D), .N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      we      = it[0];
      col_sel = CW'(it >> 1);
      waddr   = AW'($urandom);
      wdata   = {$urandom, $urandom};
      #1;
      for (int c = 0; c < N; c++) begin
        logic hit;
        hit = we && (int'(col_sel) == c);
        checks++;
        if (col_we[c] !== hit ||
            col_waddr[c] !== (hit ? waddr : '0) ||
            col_wdata[c] !== (hit ? wdata : '0)) begin
          failures++;
          if (failures < 10)
            $display("we=%0d sel=%0d col %0d: we=%0d addr=%h data=%h",
                     we, col_sel, c, col_we[c], col_waddr[c], col_wdata[c]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
