// tb_vawi_io_circuits: self-checking test of the column I/O circuits at the
// default size (16 lines, 64 columns per line). Random one-hot column
// selects (some groups idle), random row contents and line values.
module tb_vawi_io_circuits;
  int checks = 0, failures = 0;

  logic [1023:0] col_sel, row_q, bl_we, bl_wdata;
  logic          wr;
  logic [15:0]   line_in, line_out;

  vawi_io_circuits #(.K(16), .COL_BITS(10)) dut (
    .col_sel(col_sel), .row_q(row_q), .wr(wr), .line_in(line_in),
    .line_out(line_out), .bl_we(bl_we), .bl_wdata(bl_wdata));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      int pick [16];
      logic [15:0] exp_out;
      col_sel = '0;
      for (int i = 0; i < 32; i++) row_q[i*32 +: 32] = $urandom;
      line_in = 16'($urandom);
      wr      = 1'($urandom);
      for (int g = 0; g < 16; g++) begin
        pick[g] = ($urandom % 3 == 0) ? -1 : int'($urandom % 64);
        if (pick[g] >= 0) col_sel[g*64 + pick[g]] = 1'b1;
        exp_out[g] = (pick[g] >= 0) ? row_q[g*64 + pick[g]] : 1'b0;
      end
      #1;
      checks++;
      if (line_out !== exp_out) begin
        failures++;
        $display("FAIL read: line_out=%h exp %h", line_out, exp_out);
      end
      for (int g = 0; g < 16; g++) begin
        for (int c = 0; c < 64; c++) begin
          logic ewe;
          ewe = wr && (pick[g] == c);
          checks++;
          if (bl_we[g*64+c] !== ewe || (ewe && bl_wdata[g*64+c] !== line_in[g])) begin
            failures++;
            $display("FAIL write g=%0d c=%0d: we=%b data=%b", g, c, bl_we[g*64+c], bl_wdata[g*64+c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
