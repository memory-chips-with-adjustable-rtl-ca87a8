// tb_vawi_pidcu: self-checking test of the input data control unit
// (16 lines). In a w-bit configuration line i must carry pin (i mod w).
module tb_vawi_pidcu;
  int checks = 0, failures = 0;

  logic [3:0]  mc;
  logic [15:0] din, line;

  vawi_pidcu #(.K(16)) dut (.mc(mc), .din(din), .line(line));

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
      m   = it % 5;
      w   = 16 >> m;
      mc  = codes[m];
      din = 16'($urandom);
      for (int i = 0; i < 16; i++) exp[i] = din[i % w];
      #1;
      checks++;
      if (line !== exp) begin
        failures++;
        $display("FAIL w=%0d din=%h: line=%h exp %h", w, din, line, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
