// tb_vawi_ram: end-to-end test of the variable-width RAM at its full default
// size (1M bits, widths 1 to 16, single mode pin with mode bits shared on the
// address pins).
//
// A reference model holds the 1M cells in the 1-bit view. Pin Dj of a 2^m-bit
// configuration at address a is reference cell a with A(19-b) replaced by
// bit b of j (b < m); the top m address bits carry the mode instead
// (2 bits: A19 = 0; 4 bits: A19..A18 = 10; 8 bits: A19..A17 = 110;
// 16 bits: A19..A17 = 111 and A16 free).
//
// Phases:
//  1. fill the whole array through the 16-bit configuration (64k writes),
//  2. read all 1M cells back through the 1-bit configuration,
//  3. random reads and writes, each access in a random configuration, with
//     deselected cycles in between; read data is checked in the same cycle the
//     address is applied (combinational read), and a write is checked by a
//     read in the cycle after the clock edge that stored it.
// Counted mechanisms: reads and writes in each of the five configurations,
// width changes between consecutive accesses, reads of data written through a
// different width, deselected cycles (no write, outputs off). Each must occur.
module tb_vawi_ram;
  import vawi_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        s, w_n;
  logic [0:0]  mode_pins;
  logic [19:0] addr;
  logic [15:0] din, dout;
  logic        dout_oe;
  logic [2:0]  width_log2;

  vawi_ram dut (
    .clk(clk), .s(s), .w_n(w_n), .mode_pins(mode_pins), .addr(addr), .din(din),
    .dout(dout), .dout_oe(dout_oe), .width_log2(width_log2));

  always #5 clk = ~clk;

  bit       ref_mem [2**20];
  bit [2:0] ref_wl  [2**20];  // width (log2) of the last write of each cell

  int n_rd [5], n_wr [5];
  int n_switch = 0, n_cross = 0, n_desel = 0;
  int last_m = -1;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference cell of pin j at address a in the 2^m-bit configuration
  function automatic int unsigned cell_of(logic [19:0] a, int m, int j);
    logic [19:0] c;
    c = a;
    for (int b = 0; b < m; b++) c[19-b] = 1'((j >> b) & 1);
    return int'(c);
  endfunction

  // address with the mode bits of the 2^m-bit configuration inserted
  function automatic logic [19:0] with_mode(logic [19:0] a, int m);
    logic [19:0] r;
    r = a;
    case (m)
      1: r[19]    = 1'b0;
      2: r[19:18] = 2'b10;
      3: r[19:17] = 3'b110;
      4: r[19:17] = 3'b111;
      default: ;
    endcase
    return r;
  endfunction

  task automatic note_mode(int m);
    if (last_m >= 0 && last_m != m) n_switch++;
    last_m = m;
  endtask

  // one write cycle: drive at the falling edge, stored at the rising edge
  task automatic do_write(int m, logic [19:0] a, logic [15:0] d);
    @(negedge clk);
    s = 1'b1; w_n = 1'b0; mode_pins = (m != 0); addr = with_mode(a, m); din = d;
    note_mode(m);
    #1;
    checks++;
    if (dout_oe !== 1'b0 || int'(width_log2) != m) begin
      failures++;
      $display("FAIL write cycle: dout_oe=%b width_log2=%0d (m=%0d)", dout_oe, width_log2, m);
    end
    for (int j = 0; j < (1 << m); j++) begin
      ref_mem[cell_of(addr, m, j)] = d[j];
      ref_wl[cell_of(addr, m, j)]  = 3'(m);
    end
    n_wr[m]++;
    @(posedge clk);
  endtask

  // one read cycle, checked in the same cycle
  task automatic do_read(int m, logic [19:0] a);
    logic [15:0] exp;
    bit is_cross;
    @(negedge clk);
    s = 1'b1; w_n = 1'b1; mode_pins = (m != 0); addr = with_mode(a, m); din = 16'($urandom);
    note_mode(m);
    #1;
    is_cross = 1'b0;
    for (int j = 0; j < 16; j++) begin
      int jj;
      jj = j % (1 << m);  // pins above the width repeat the low pins
      exp[j] = ref_mem[cell_of(addr, m, jj)];
      if (int'(ref_wl[cell_of(addr, m, jj)]) != m) is_cross = 1'b1;
    end
    checks++;
    if (dout !== exp || dout_oe !== 1'b1) begin
      failures++;
      if (failures < 20)
        $display("FAIL read m=%0d addr=%h: dout=%h exp %h oe=%b", m, addr, dout, exp, dout_oe);
    end
    n_rd[m]++;
    if (is_cross) n_cross++;
  endtask

  task automatic do_deselect();
    @(negedge clk);
    s = 1'b0; w_n = 1'($urandom); addr = 20'($urandom); din = 16'($urandom);
    mode_pins = 1'($urandom);
    #1;
    checks++;
    if (dout_oe !== 1'b0 || dout !== '0) begin
      failures++;
      $display("FAIL deselected: dout_oe=%b dout=%h", dout_oe, dout);
    end
    n_desel++;
    @(posedge clk);
  endtask

  initial begin
    s = 1'b0; w_n = 1'b1; mode_pins = '0; addr = '0; din = '0;
    for (int m = 0; m < 5; m++) begin n_rd[m] = 0; n_wr[m] = 0; end

    // 1. fill through the 16-bit configuration: A0..A15 address the words
    for (int a = 0; a < 2**16; a++) do_write(4, 20'(a), 16'($urandom));

    // 2. read back through the 1-bit configuration
    for (int a = 0; a < 2**20; a++) do_read(0, 20'(a));

    // 3. random traffic
    for (int it = 0; it < 200000; it++) begin
      int m, op;
      logic [19:0] a;
      m  = int'($urandom % 5);
      op = int'($urandom % 10);
      a  = 20'($urandom);
      if (op < 4) begin
        logic [15:0] d;
        d = 16'($urandom);
        do_write(m, a, d);
        do_read(m, a);      // the word written one edge earlier
      end else if (op < 9) begin
        do_read(m, a);
      end else begin
        do_deselect();
        do_read(m, a);      // nothing may have been written while deselected
      end
    end

    // combinational read: dout follows a new address without a clock edge
    @(negedge clk);
    s = 1'b1; w_n = 1'b1; mode_pins = 1'b1;
    addr = with_mode(20'h00000, 4);
    #1;
    addr = with_mode(20'h0ABCD, 4);
    #1;
    checks++;
    begin
      logic [15:0] exp;
      for (int j = 0; j < 16; j++) exp[j] = ref_mem[cell_of(addr, 4, j)];
      if (dout !== exp) begin
        failures++;
        $display("FAIL zero-latency read: dout=%h exp %h", dout, exp);
      end
    end

    for (int m = 0; m < 5; m++) begin
      $display("width %0d: %0d writes, %0d reads", 1 << m, n_wr[m], n_rd[m]);
      checks += 2;
      if (n_wr[m] == 0) begin failures++; $display("FAIL no write at width %0d", 1 << m); end
      if (n_rd[m] == 0) begin failures++; $display("FAIL no read at width %0d", 1 << m); end
    end
    $display("width changes %0d, cross-width reads %0d, deselected cycles %0d",
             n_switch, n_cross, n_desel);
    checks += 3;
    if (n_switch == 0) begin failures++; $display("FAIL no width change"); end
    if (n_cross  == 0) begin failures++; $display("FAIL no cross-width read"); end
    if (n_desel  == 0) begin failures++; $display("FAIL no deselected cycle"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
