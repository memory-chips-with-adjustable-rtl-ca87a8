// tb_vawi_ram_sized_run: random read/write test of one variable-width RAM
// of width variability factor K with the single shared mode pin, used by
// tb_vawi_ram_widths to run several sizes side by side.
//
// Reference model in the 1-bit view: pin Dj of a 2^m-bit configuration at
// address a is the 1-bit cell a with A(AW-1-b) replaced by bit b of j. The
// mode rides on the top address bits: M = 0 is 1 bit wide; with M = 1 the
// top bits read from A(AW-1) down hold t ones and then a zero for width
// 2^(t+1), or log2(K)-1 ones for the full width K. Every configuration is
// used for reads and writes; n_rd/n_wr count them.
module tb_vawi_ram_sized_run #(
  parameter int K        = 32,
  parameter int ROW_BITS = 2,
  parameter int COL_BITS = 10,
  parameter int OPS      = 4000
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import vawi_pkg::*;

  localparam int L  = $clog2(K);
  localparam int AW = ROW_BITS + COL_BITS;
  localparam int WLW = $clog2(L + 1);

  logic          s, w_n;
  logic [0:0]    mode_pins;
  logic [AW-1:0] addr;
  logic [K-1:0]  din, dout;
  logic          dout_oe;
  logic [WLW-1:0] width_log2;

  vawi_ram #(.K(K), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .SCHEME(MCU_SHARED)) dut (
    .clk(clk), .s(s), .w_n(w_n), .mode_pins(mode_pins), .addr(addr), .din(din),
    .dout(dout), .dout_oe(dout_oe), .width_log2(width_log2));

  bit ref_mem [2**AW];
  int n_rd [L+1];
  int n_wr [L+1];

  function automatic int unsigned cell_of(logic [AW-1:0] a, int m, int j);
    logic [AW-1:0] c;
    c = a;
    for (int b = 0; b < m; b++) c[AW-1-b] = 1'((j >> b) & 1);
    return int'(c);
  endfunction

  function automatic logic [AW-1:0] with_mode(logic [AW-1:0] a, int m);
    logic [AW-1:0] r;
    r = a;
    // m = 1: top bit 0; m = 2: 10; ... m = L: L-1 ones
    for (int t = 0; t < m - 1; t++) r[AW-1-t] = 1'b1;
    if (m >= 1 && m < L) r[AW-m] = 1'b0;
    return r;
  endfunction

  function automatic logic [K-1:0] rand_word();
    logic [K-1:0] w;
    for (int i = 0; i < K; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    s = 1'b0; w_n = 1'b1; mode_pins = '0; addr = '0; din = '0;
    for (int m = 0; m <= L; m++) begin n_rd[m] = 0; n_wr[m] = 0; end
    // fill through the widest configuration
    for (int a = 0; a < 2**(AW-L); a++) begin
      @(negedge clk);
      s = 1'b1; w_n = 1'b0; mode_pins = 1'b1; addr = with_mode(AW'(a), L); din = rand_word();
      for (int j = 0; j < K; j++) ref_mem[cell_of(addr, L, j)] = din[j];
      n_wr[L]++;
      @(posedge clk);
    end
    for (int it = 0; it < OPS; it++) begin
      int m;
      bit wr;
      m  = int'($urandom % (L + 1));
      wr = ($urandom % 3) == 0;
      @(negedge clk);
      s = 1'b1; w_n = !wr; mode_pins = (m != 0);
      addr = with_mode(AW'($urandom), m); din = rand_word();
      #1;
      checks++;
      if (int'(width_log2) != m) begin
        failures++;
        $display("FAIL K=%0d: width_log2=%0d exp %0d", K, width_log2, m);
      end
      if (wr) begin
        for (int j = 0; j < (1 << m); j++) ref_mem[cell_of(addr, m, j)] = din[j];
        n_wr[m]++;
      end else begin
        logic [K-1:0] exp;
        for (int j = 0; j < K; j++) exp[j] = ref_mem[cell_of(addr, m, j % (1 << m))];
        checks++;
        if (dout !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d read m=%0d addr=%h", K, m, addr);
        end
        n_rd[m]++;
      end
      @(posedge clk);
    end
    for (int m = 0; m <= L; m++) begin
      checks++;
      if (n_rd[m] == 0 || n_wr[m] == 0) begin
        failures++;
        $display("FAIL K=%0d: width %0d not exercised", K, 1 << m);
      end
    end
    $display("K=%0d: %0d widths from 1 to %0d exercised, %0d checks, %0d failures",
             K, L + 1, K, checks, failures);
    done = 1'b1;
  end
endmodule
