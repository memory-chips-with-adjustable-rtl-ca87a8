// tb_vawi_cell_array: self-checking test of the cell array, reduced to
// 16 rows x 64 columns. Random per-column writes against a reference copy;
// a write is visible on the read port one clock edge later, and columns
// without a write strobe keep their contents.
module tb_vawi_cell_array;
  int checks = 0, failures = 0;

  localparam int RB = 4, CB = 6;
  logic          clk = 1'b0;
  logic [RB-1:0] row_addr;
  logic [63:0]   bl_we, bl_wdata, row_q;
  logic [63:0]   ref_mem [16];

  vawi_cell_array #(.ROW_BITS(RB), .COL_BITS(CB)) dut (
    .clk(clk), .row_addr(row_addr), .bl_we(bl_we), .bl_wdata(bl_wdata), .row_q(row_q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row with full-width writes first
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      row_addr = 4'(r);
      bl_we    = '1;
      bl_wdata = {$urandom, $urandom};
      ref_mem[r] = bl_wdata;
    end
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      row_addr = 4'($urandom);
      bl_we    = (it % 4 == 0) ? '0 : {$urandom, $urandom} & {$urandom, $urandom};
      bl_wdata = {$urandom, $urandom};
      #1;
      checks++;
      if (row_q !== ref_mem[row_addr]) begin
        failures++;
        $display("FAIL read row %0d: %h exp %h", row_addr, row_q, ref_mem[row_addr]);
      end
      ref_mem[row_addr] = (ref_mem[row_addr] & ~bl_we) | (bl_wdata & bl_we);
      @(posedge clk);
      #1;
      checks++;
      if (row_q !== ref_mem[row_addr]) begin
        failures++;
        $display("FAIL after write row %0d: %h exp %h", row_addr, row_q, ref_mem[row_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
