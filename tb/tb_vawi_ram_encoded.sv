// tb_vawi_ram_encoded: end-to-end test of the variable-width RAM with three
// dedicated mode pins (code 0 = 16 bits wide ... code 4 = 1 bit wide),
// reduced to 16 rows x 64 columns (1k bits, address A0..A9).
//
// Same reference model as the full-size test: pin Dj of a 2^m-bit
// configuration at address a is the 1-bit cell a with A(9-b) replaced by
// bit b of j. In this scheme the top m address bits are ignored; the test
// drives random values on them to show that. Random reads and writes, each
// in a random configuration; the width reported by the chip is checked too.
module tb_vawi_ram_encoded;
  import vawi_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        s, w_n;
  logic [2:0]  mode_pins;
  logic [9:0]  addr;
  logic [15:0] din, dout;
  logic        dout_oe;
  logic [2:0]  width_log2;

  vawi_ram #(.ROW_BITS(4), .COL_BITS(6), .SCHEME(MCU_ENCODED)) dut (
    .clk(clk), .s(s), .w_n(w_n), .mode_pins(mode_pins), .addr(addr), .din(din),
    .dout(dout), .dout_oe(dout_oe), .width_log2(width_log2));

  always #5 clk = ~clk;

  bit ref_mem [1024];
  int n_rd [5], n_wr [5];

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned cell_of(logic [9:0] a, int m, int j);
    logic [9:0] c;
    c = a;
    for (int b = 0; b < m; b++) c[9-b] = 1'((j >> b) & 1);
    return int'(c);
  endfunction

  initial begin
    s = 1'b0; w_n = 1'b1; mode_pins = '0; addr = '0; din = '0;
    for (int m = 0; m < 5; m++) begin n_rd[m] = 0; n_wr[m] = 0; end
    // fill through the 1-bit configuration
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      s = 1'b1; w_n = 1'b0; mode_pins = 3'd4; addr = 10'(a); din = 16'($urandom);
      ref_mem[a] = din[0];
      n_wr[0]++;
      @(posedge clk);
    end
    for (int it = 0; it < 20000; it++) begin
      int m;
      bit wr;
      m  = int'($urandom % 5);
      wr = ($urandom % 3) == 0;
      @(negedge clk);
      s = 1'b1; w_n = !wr; mode_pins = 3'(4 - m); addr = 10'($urandom); din = 16'($urandom);
      #1;
      checks++;
      if (int'(width_log2) != m) begin
        failures++;
        $display("FAIL code %0d: width_log2=%0d exp %0d", 4 - m, width_log2, m);
      end
      if (wr) begin
        for (int j = 0; j < (1 << m); j++) ref_mem[cell_of(addr, m, j)] = din[j];
        n_wr[m]++;
      end else begin
        logic [15:0] exp;
        for (int j = 0; j < 16; j++) exp[j] = ref_mem[cell_of(addr, m, j % (1 << m))];
        checks++;
        if (dout !== exp || dout_oe !== 1'b1) begin
          failures++;
          if (failures < 20) $display("FAIL read m=%0d addr=%h: dout=%h exp %h", m, addr, dout, exp);
        end
        n_rd[m]++;
      end
      @(posedge clk);
    end
    for (int m = 0; m < 5; m++) begin
      $display("width %0d: %0d writes, %0d reads", 1 << m, n_wr[m], n_rd[m]);
      checks++;
      if (n_wr[m] == 0 || n_rd[m] == 0) begin
        failures++;
        $display("FAIL width %0d not exercised", 1 << m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
