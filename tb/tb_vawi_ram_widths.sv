// tb_vawi_ram_widths: the variable-width RAM with larger width variability
// factors, K = 32, 64, 128 and 256 (widths 1..K), each on a 4k-bit array
// (4 rows x 1024 columns), all with the single shared mode pin. These are the
// width ranges whose overhead the design was sized against; the test shows
// the same RTL works unchanged at each of them.
module tb_vawi_ram_widths;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c [4], f [4];
  logic d [4];

  tb_vawi_ram_sized_run #(.K(32),  .ROW_BITS(2), .COL_BITS(10)) r32  (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_vawi_ram_sized_run #(.K(64),  .ROW_BITS(2), .COL_BITS(10)) r64  (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_vawi_ram_sized_run #(.K(128), .ROW_BITS(2), .COL_BITS(10)) r128 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_vawi_ram_sized_run #(.K(256), .ROW_BITS(2), .COL_BITS(10)) r256 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3],
             f[0] + f[1] + f[2] + f[3]);
    $finish;
  end
endmodule
