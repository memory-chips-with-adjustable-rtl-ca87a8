// tb_vawi_pcadu: self-checking test of the programmable column decoder at
// its default size (16 decoders of 6-to-64, 10 column address bits).
//
// For each of the five width codes and random column addresses, the enabled
// decoder set and the 1024 select lines are compared with a reference: in
// the 1-bit configuration decoder g = {A16, A17, A18, A19} (A16 as the most
// significant bit) is the only one enabled; each doubling of the width drops
// one more of A19, A18, A17, A16 from that comparison.
module tb_vawi_pcadu;
  int checks = 0, failures = 0;

  logic         access;
  logic [9:0]   col_addr;
  logic [3:0]   mc;
  logic [15:0]  dec_en;
  logic [1023:0] col_sel;

  vawi_pcadu #(.K(16), .COL_BITS(10)) dut (
    .access(access), .col_addr(col_addr), .mc(mc), .dec_en(dec_en), .col_sel(col_sel));

  logic [3:0] codes [5] = '{4'b0000, 4'b1000, 4'b1100, 4'b1110, 4'b1111};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [15:0] exp_en;
      logic [1023:0] exp_sel;
      int m;
      logic [3:0] g_addr;
      m        = it % 5;             // number of used top address bits
      mc       = codes[m];           // m = 0: 16 bit ... m = 4: 1 bit
      col_addr = 10'($urandom);
      access   = (it % 7) != 3;
      // decoder number addressed in the 1-bit view: bit b <- A(19-b)
      for (int b = 0; b < 4; b++) g_addr[b] = col_addr[9-b];
      exp_en  = '0;
      exp_sel = '0;
      for (int g = 0; g < 16; g++) begin
        logic match;
        match = 1'b1;
        // the low (4-m) index bits are free (data pin), the rest must match
        for (int b = 4 - m; b < 4; b++) if (((g >> b) & 1) != g_addr[b]) match = 1'b0;
        if (match && access) begin
          exp_en[g] = 1'b1;
          exp_sel[g*64 + int'(col_addr[5:0])] = 1'b1;
        end
      end
      #1;
      checks++;
      if (dec_en !== exp_en || col_sel !== exp_sel) begin
        failures++;
        $display("FAIL mc=%b col=%h access=%b: dec_en=%h exp %h", mc, col_addr, access, dec_en, exp_en);
      end
      checks++;
      if (access && $countones(dec_en) != (16 >> m)) begin
        failures++;
        $display("FAIL mc=%b: %0d decoders enabled", mc, $countones(dec_en));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
