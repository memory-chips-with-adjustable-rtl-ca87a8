// tb_vawi_podcu: self-checking test of the output data control unit
// (16 lines). For each width w, one random line of every group
// {j, j+w, j+2w, ..} is driven; pin j must show that line's value, and pins
// above w repeat pin (j mod w). With oe = 0 all pins are 0.
module tb_vawi_podcu;
  int checks = 0, failures = 0;

  logic [3:0]  mc;
  logic [15:0] line, line_drv, dout;
  logic        oe, dout_oe;

  vawi_podcu #(.K(16)) dut (
    .mc(mc), .line(line), .line_drv(line_drv), .oe(oe), .dout(dout), .dout_oe(dout_oe));

  logic [3:0] codes [5] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      int m, w;
      logic [15:0] exp;
      m    = it % 5;
      w    = 16 >> m;
      mc   = codes[m];
      line = 16'($urandom);
      oe   = (it % 11) != 5;
      line_drv = '0;
      for (int j = 0; j < w; j++) begin
        int member;
        member = j + w * int'($urandom % (16 / w));
        line_drv[member] = 1'b1;
        for (int p = j; p < 16; p += w) exp[p] = oe ? line[member] : 1'b0;
      end
      #1;
      checks++;
      if (dout !== exp || dout_oe !== oe) begin
        failures++;
        $display("FAIL w=%0d line=%h drv=%h: dout=%h exp %h", w, line, line_drv, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
